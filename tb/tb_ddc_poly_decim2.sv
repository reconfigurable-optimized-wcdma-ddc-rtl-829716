// tb_ddc_poly_decim2 -- self-checking testbench of the polyphase decimator.
//
// Uses a 7-tap symmetric coefficient set with zero taps and a gain above
// one, so that both pre-adding, zero-tap removal and output saturation are
// exercised. Random 14-bit samples are fed, first on every cycle and then
// with random gaps in in_valid. Every output is compared with a direct-form
// reference y[m] = sat(round(sum_k h[k] x[2m-k] / 2^13)) computed here from
// the full input history; the tb also checks one output per two inputs and
// the latency (output written by the 2nd edge after the edge that accepted
// the even-indexed sample).
module tb_ddc_poly_decim2;
  import ddc_pkg::*;

  localparam int NT = 7;
  localparam coef_t C [NT] = '{16'sd4000, -16'sd9000, 16'sd0, 16'sd32767,
                               16'sd0, -16'sd9000, 16'sd4000};
  localparam int NIN = 4000;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [13:0] in_data = '0;
  logic out_valid;
  logic signed [15:0] out_data;

  ddc_poly_decim2 #(.IN_W(14), .OUT_W(16), .NTAPS(NT), .COEFS(C)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_in = 0, n_out = 0, sat_hits = 0;
  int edge_cnt = 0;
  int acc_edge [NIN];
  int xs [NIN];

  always @(posedge clk) edge_cnt <= edge_cnt + 1;

  // reference for output m
  function automatic int ref_y(input int m);
    longint acc = 0;
    longint r;
    for (int k = 0; k < NT; k++)
      if (2*m - k >= 0) acc += longint'(C[k]) * xs[2*m-k];
    r = (acc + 4096) >>> 13;
    if (r > 32767) r = 32767;
    if (r < -32768) r = -32768;
    return int'(r);
  endfunction

  // record accepted samples
  always @(posedge clk) if (rst_n && in_valid) begin
    xs[n_in]       <= in_data;
    acc_edge[n_in] <= edge_cnt;
    n_in           <= n_in + 1;
  end

  // check outputs
  always @(negedge clk) if (rst_n && out_valid) begin
    int e;
    e = ref_y(n_out);
    checks++;
    if (out_data !== 16'(e)) begin
      failures++;
      if (failures < 10) $display("mismatch out %0d: got %0d exp %0d", n_out, out_data, e);
    end
    if (e == 32767 || e == -32768) sat_hits++;
    checks++;
    if (edge_cnt - 1 - acc_edge[2*n_out] != 2) begin
      failures++;
      if (failures < 10) $display("latency out %0d: %0d", n_out, edge_cnt - 1 - acc_edge[2*n_out]);
    end
    n_out++;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < NIN; i++) begin
      @(negedge clk);
      if (i >= NIN/2) while ($urandom_range(0, 2) == 0) begin
        in_valid = 0; @(negedge clk);
      end
      in_valid = 1;
      // bursts of full-scale alternating samples drive the output to saturation
      if ((i / 64) % 4 == 3) in_data = ((i / 2) % 2 == 0) ? 14'sd8191 : -14'sd8192;
      else in_data = 14'($urandom);
    end
    @(negedge clk); in_valid = 0;
    repeat (10) @(negedge clk);
    checks++;
    if (n_out != NIN/2) begin failures++; $display("output count %0d", n_out); end
    checks++;
    if (sat_hits == 0) begin failures++; $display("saturation never reached"); end
    $display("outputs=%0d saturated=%0d", n_out, sat_hits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

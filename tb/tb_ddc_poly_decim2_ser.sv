// tb_ddc_poly_decim2_ser -- self-checking testbench of the partially serial
// polyphase decimator.
//
// Two instances share one input stream: the default one (61-tap RRC set,
// 4 multipliers, 8 cycles per output) and one with the 27-tap half-band set
// and 3 multipliers, which exercises the removal of zero taps (8 non-zero
// pairs, 3 cycles per output). Random 14-bit samples, then full-scale
// alternating bursts, arrive every 4 clocks (the fastest rate the default
// instance accepts: one output per 8 clocks) and later with extra random
// gaps. Every output is compared with a direct-form reference
// sat(round(sum_k h[k] x[2m-k] / 2^13)); the latency (CYC+2 edges after the
// accepting edge) and the number of outputs are checked too.
module tb_ddc_poly_decim2_ser;
  import ddc_pkg::*;

  localparam int NIN = 3000;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [13:0] in_data = '0;
  logic out_valid_a, out_valid_b;
  logic signed [15:0] out_data_a, out_data_b;

  ddc_poly_decim2_ser dut_a (
    .clk, .rst_n, .in_valid, .in_data, .out_valid(out_valid_a), .out_data(out_data_a));

  ddc_poly_decim2_ser #(.NTAPS(HB2_TAPS), .COEFS(HB2_COEFS), .NMUL(3)) dut_b (
    .clk, .rst_n, .in_valid, .in_data, .out_valid(out_valid_b), .out_data(out_data_b));

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_in = 0, n_a = 0, n_b = 0;
  int edge_cnt = 0;
  int acc_edge [NIN];
  int xs [NIN];

  always @(posedge clk) edge_cnt <= edge_cnt + 1;

  function automatic int ref_y(input int m, input bit hb);
    longint acc = 0;
    longint r;
    int nt;
    nt = hb ? HB2_TAPS : RRC_TAPS;
    for (int k = 0; k < nt; k++)
      if (2*m - k >= 0) acc += longint'(hb ? HB2_COEFS[k] : RRC_COEFS[k]) * xs[2*m-k];
    r = (acc + 4096) >>> 13;
    if (r > 32767) r = 32767;
    if (r < -32768) r = -32768;
    return int'(r);
  endfunction

  always @(posedge clk) if (rst_n && in_valid) begin
    xs[n_in]       <= in_data;
    acc_edge[n_in] <= edge_cnt;
    n_in           <= n_in + 1;
  end

  task automatic check(input int m, input bit hb, input logic signed [15:0] got, input int lat);
    int e;
    e = ref_y(m, hb);
    checks += 2;
    if (got !== 16'(e)) begin
      failures++;
      if (failures < 10) $display("%s out %0d: got %0d exp %0d", hb ? "hb" : "rrc", m, got, e);
    end
    if (edge_cnt - 1 - acc_edge[2*m] != lat) begin
      failures++;
      if (failures < 10) $display("%s latency out %0d: %0d", hb ? "hb" : "rrc", m,
                                  edge_cnt - 1 - acc_edge[2*m]);
    end
  endtask

  always @(negedge clk) if (rst_n) begin
    if (out_valid_a) begin check(n_a, 0, out_data_a, 8 + 2); n_a++; end
    if (out_valid_b) begin check(n_b, 1, out_data_b, 3 + 2); n_b++; end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < NIN; i++) begin
      @(negedge clk);
      in_valid = 1;
      if ((i / 80) % 4 == 3) in_data = ((i / 2) % 2 == 0) ? 14'sd8191 : -14'sd8192;
      else in_data = 14'($urandom);
      @(negedge clk);
      in_valid = 0;
      repeat (2) @(negedge clk);
      if (i >= NIN/2) repeat ($urandom_range(0, 3)) @(negedge clk);
    end
    repeat (20) @(negedge clk);
    checks += 2;
    if (n_a != NIN/2) begin failures++; $display("rrc output count %0d", n_a); end
    if (n_b != NIN/2) begin failures++; $display("hb output count %0d", n_b); end
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

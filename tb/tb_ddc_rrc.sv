// tb_ddc_rrc -- self-checking testbench of ddc_rrc.
//
// Feeds 4000 complex samples (uniform random 14-bit values on both rails,
// then a constant DC level, then full-scale steps) one per SPACE clocks (the rate
// this stage sees inside the DDC) and
// compares each decimated output with a direct-form reference computed here
// from the package coefficient set: y[m] = sat(round(sum_k h[k] x[2m-k] /
// 2^13)), separately for I and Q. Also checks that exactly one output
// leaves per two inputs, the latency (LAT edges after the accepting edge), and
// that the settled DC gain is unity within one LSB (DC in -> 4*DC out).
module tb_ddc_rrc;
  import ddc_pkg::*;

  localparam int NIN = 4000;
  localparam int DC  = 3000;
  localparam int SPACE = 4;   // clocks per input sample inside the DDC
  localparam int LAT   = 10;  // edges from accepting edge to output

  logic   clk = 0, rst_n = 0, in_valid = 0;
  cfin_t  in_data = '0;
  logic   out_valid;
  cfout_t out_data;

  ddc_rrc dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_in = 0, n_out = 0, dc_seen = 0;
  int edge_cnt = 0;
  int acc_edge [NIN];
  int xr [NIN];
  int xi [NIN];

  always @(posedge clk) edge_cnt <= edge_cnt + 1;

  function automatic int ref_y(input int m, input bit im);
    longint acc = 0;
    longint r;
    for (int k = 0; k < RRC_TAPS; k++)
      if (2*m - k >= 0) acc += longint'(RRC_COEFS[k]) * (im ? xi[2*m-k] : xr[2*m-k]);
    r = (acc + 4096) >>> 13;
    if (r > 32767) r = 32767;
    if (r < -32768) r = -32768;
    return int'(r);
  endfunction

  always @(posedge clk) if (rst_n && in_valid) begin
    xr[n_in]       <= in_data.re;
    xi[n_in]       <= in_data.im;
    acc_edge[n_in] <= edge_cnt;
    n_in           <= n_in + 1;
  end

  always @(negedge clk) if (rst_n && out_valid) begin
    int er, ei;
    er = ref_y(n_out, 0);
    ei = ref_y(n_out, 1);
    checks += 3;
    if (out_data.re !== 16'(er) || out_data.im !== 16'(ei)) begin
      failures++;
      if (failures < 10) $display("mismatch out %0d: got %0d,%0d exp %0d,%0d",
                                   n_out, out_data.re, out_data.im, er, ei);
    end
    if (edge_cnt - 1 - acc_edge[2*n_out] != LAT) begin
      failures++;
      if (failures < 10) $display("latency out %0d", n_out);
    end
    // settled DC section: samples 2m-RRC_TAPS .. 2m all equal DC
    if (2*n_out - RRC_TAPS >= NIN/2 && 2*n_out < 3*NIN/4) begin
      dc_seen++;
      if (out_data.re - 4*DC > 1 || out_data.re - 4*DC < -1 ||
          out_data.im + 4*DC > 1 || out_data.im + 4*DC < -1) begin
        failures++;
        if (failures < 10) $display("DC gain: %0d %0d", out_data.re, out_data.im);
      end
    end
    n_out++;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < NIN; i++) begin
      @(negedge clk);
      in_valid = 1;
      if (i < NIN/2) begin
        in_data.re = 14'($urandom);
        in_data.im = 14'($urandom);
      end else if (i < 3*NIN/4) begin
        in_data.re = 14'(DC);
        in_data.im = -14'(DC);
      end else begin
        in_data.re = ((i / 40) % 2 == 0) ? 14'sd8191 : -14'sd8192;
        in_data.im = ((i / 40) % 2 == 0) ? -14'sd8192 : 14'sd8191;
      end
      if (SPACE > 1) begin
        @(negedge clk);
        in_valid = 0;
        repeat (SPACE - 2) @(negedge clk);
      end
    end
    @(negedge clk); in_valid = 0;
    repeat (10) @(negedge clk);
    checks += 2;
    if (n_out != NIN/2) begin failures++; $display("output count %0d", n_out); end
    if (dc_seen == 0) begin failures++; $display("no settled DC output"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

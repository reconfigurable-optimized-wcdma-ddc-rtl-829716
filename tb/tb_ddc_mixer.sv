// tb_ddc_mixer -- self-checking testbench of the complex mixer.
//
// Drives random 14-bit samples and random 18-bit cos/sin values (including
// the extreme codes, so that the rounding and the saturation of
// -8192 * -131072 are exercised), with random gaps in in_valid, and checks
// I = sat(round(x*cos / 2^17)) and Q = sat(round(-x*sin / 2^17)) computed
// here with 64-bit integers, together with the 2-edge latency.
module tb_ddc_mixer;
  localparam int N = 5000;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [13:0] x_in = '0;
  logic signed [17:0] cos_in = '0, sin_in = '0;
  logic out_valid;
  logic signed [13:0] i_out, q_out;

  ddc_mixer dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_in = 0, n_out = 0, n_sat = 0;
  int edge_cnt = 0;
  int acc_edge [N];
  int ei [N];
  int eq [N];

  function automatic int mix_ref(input longint a);
    longint r;
    r = (a + 65536) >>> 17;
    if (r > 8191) r = 8191;
    if (r < -8192) r = -8192;
    return int'(r);
  endfunction

  always @(posedge clk) edge_cnt <= edge_cnt + 1;

  always @(posedge clk) if (rst_n && in_valid) begin
    ei[n_in]       <= mix_ref(longint'(x_in) * longint'(cos_in));
    eq[n_in]       <= mix_ref(-(longint'(x_in) * longint'(sin_in)));
    acc_edge[n_in] <= edge_cnt;
    n_in           <= n_in + 1;
  end

  always @(negedge clk) if (rst_n && out_valid) begin
    checks += 2;
    if (int'(i_out) != ei[n_out] || int'(q_out) != eq[n_out]) begin
      failures++;
      if (failures < 10) $display("sample %0d: got %0d,%0d exp %0d,%0d",
                                  n_out, i_out, q_out, ei[n_out], eq[n_out]);
    end
    if (ei[n_out] == 8191 || eq[n_out] == 8191) n_sat++;
    if (edge_cnt - 1 - acc_edge[n_out] != 1) begin
      failures++;
      if (failures < 10) $display("latency sample %0d", n_out);
    end
    n_out++;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      while ($urandom_range(0, 4) == 0) begin in_valid = 0; @(negedge clk); end
      in_valid = 1;
      x_in   = 14'($urandom);
      cos_in = 18'($urandom);
      sin_in = 18'($urandom);
      if (i % 100 == 7) begin
        x_in = -14'sd8192; cos_in = -18'sd131072; sin_in = -18'sd131072;
      end
    end
    @(negedge clk); in_valid = 0;
    repeat (5) @(negedge clk);
    checks += 2;
    if (n_out != N) begin failures++; $display("output count %0d", n_out); end
    if (n_sat == 0) begin failures++; $display("saturation never reached"); end
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

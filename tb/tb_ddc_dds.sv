// tb_ddc_dds -- self-checking testbench of the DDS.
//
// Steps the DDS with ce (every cycle, then with random gaps) under three
// tuning words, switching the word while it runs. For the n-th step the
// expected phase is the sum of the tuning words applied before it; cos/sin
// are compared with 0.9999 * 2^17 * cos/sin(2*pi*phase/2^28) from the
// simulator's real-number math, allowing 2 LSB. Checks the pipeline
// latency (output written DDS_LAT-1 edges after the accepting edge), that
// every output quadrant was visited, and the count of outputs.
module tb_ddc_dds;
  import ddc_pkg::*;

  localparam int NSTEP = 6000;
  localparam real AMP = 0.9999 * 131072.0;
  localparam real PI = 3.14159265358979323846;

  logic clk = 0, rst_n = 0, ce = 0;
  logic [PHASE_W-1:0] tuning_word = '0;
  logic out_valid;
  logic signed [NCO_W-1:0] cos_out, sin_out;

  ddc_dds dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_in = 0, n_out = 0, max_err = 0;
  int edge_cnt = 0;
  int acc_edge [NSTEP];
  logic [PHASE_W-1:0] ph [NSTEP];
  logic [PHASE_W-1:0] ph_next = '0;
  bit quad_seen [4];

  always @(posedge clk) edge_cnt <= edge_cnt + 1;

  always @(posedge clk) if (rst_n && ce) begin
    ph[n_in]       <= ph_next;
    ph_next        <= ph_next + tuning_word;
    acc_edge[n_in] <= edge_cnt;
    n_in           <= n_in + 1;
  end

  always @(negedge clk) if (rst_n && out_valid) begin
    real a;
    int ec, es, dc, ds;
    a  = 2.0 * PI * real'(ph[n_out]) / real'(2.0 ** PHASE_W);
    ec = int'($floor(AMP * $cos(a) + 0.5));
    es = int'($floor(AMP * $sin(a) + 0.5));
    dc = int'(cos_out) - ec;
    ds = int'(sin_out) - es;
    if (dc < 0) dc = -dc;
    if (ds < 0) ds = -ds;
    if (dc > max_err) max_err = dc;
    if (ds > max_err) max_err = ds;
    quad_seen[ph[n_out][PHASE_W-1 -: 2]] = 1;
    checks += 2;
    if (dc > 2 || ds > 2) begin
      failures++;
      if (failures < 10) $display("step %0d phase %h: got %0d,%0d exp %0d,%0d",
                                  n_out, ph[n_out], cos_out, sin_out, ec, es);
    end
    if (edge_cnt - 1 - acc_edge[n_out] != DDS_LAT - 1) begin
      failures++;
      if (failures < 10) $display("latency step %0d: %0d", n_out, edge_cnt - 1 - acc_edge[n_out]);
    end
    n_out++;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < NSTEP; i++) begin
      @(negedge clk);
      // tuning words: 15.36 MHz + 100 kHz, 3.5 MHz, and a random one
      if (i == 0)           tuning_word = 28'd67546316;
      else if (i == 2000)   tuning_word = 28'd15291733;
      else if (i == 4000)   tuning_word = 28'($urandom);
      if (i >= 3000) while ($urandom_range(0, 3) == 0) begin
        ce = 0; @(negedge clk);
      end
      ce = 1;
    end
    @(negedge clk); ce = 0;
    repeat (DDS_LAT + 5) @(negedge clk);
    checks += 2;
    if (n_out != NSTEP) begin failures++; $display("output count %0d", n_out); end
    if (!(quad_seen[0] && quad_seen[1] && quad_seen[2] && quad_seen[3])) begin
      failures++; $display("not all quadrants visited");
    end
    $display("max error %0d LSB", max_err);
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

// tb_ddc_top -- end-to-end self-checking testbench of the WCDMA DDC.
//
// Runs the complete down-converter at its default parameters. The IF input
// is a WCDMA-like test signal: a wanted tone 0.6 MHz above the carrier, an
// adjacent-channel tone 5 MHz above it and random noise (sections A and B), quantised to 14
// bits. The run has three sections:
//   A  carrier 15.36 MHz, samples on every clock;
//   B  carrier retuned on the fly to 10.0 MHz, in_valid with random gaps
//      (clock-enable operation);
//   C  carrier 10.0 MHz, adjacent-channel tone alone.
// An independent floating-point model (real mixer with the exact oscillator
// phase, the three decimate-by-2 filters as direct convolutions with the
// quantised coefficients, no internal rounding) gives the expected I/Q;
// each output must lie within 16 LSB of it (the model leaves out the
// rounding of four 14-bit requantisation points, whose worst-case sum is
// below that bound). The testbench also checks: one output per 8 inputs
// and the HB1/HB2/RRC rates, the latency in section A, that the wanted tone
// comes out at the expected level, and that the adjacent channel is
// suppressed by at least 60 dB. It counts each mechanism (retune, input
// gaps, every decimation stage) and fails if one never happened.
module tb_ddc_top;
  import ddc_pkg::*;

  localparam int  NA = 8000, NB = 8000, NC = 4000;
  localparam int  NIN = NA + NB + NC;
  localparam real PI = 3.14159265358979323846;
  localparam real FS = 61.44e6;
  localparam real LO_AMP = 0.9999;         // DDS peak relative to 2^17
  localparam int  TOL = 16;
  // Edges from accepting sample 8m (the newest sample output m depends on)
  // to the edge that writes output m: DDS alignment, mixer, and for each
  // filter one accepting edge plus its own latency (HB1 2, HB2 4+2, RRC
  // 8+2 edges) and one requantisation edge between filters.
  localparam int  LAT = (DDS_LAT - 1) + 2 + 3 + 1 + (1 + 4 + 2) + 1 + (1 + 8 + 2);

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [ADC_W-1:0] adc_in = '0;
  logic [PHASE_W-1:0] tuning_word = '0;
  logic out_valid;
  logic signed [FOUT_W-1:0] i_out, q_out;

  ddc_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_in = 0, n_out = 0, max_err = 0, edge_cnt = 0;
  int n_retune = 0, n_gap = 0, n_hb1 = 0, n_hb2 = 0, n_rrc = 0;
  int lat_checked = 0;
  real wanted_pow = 0.0, adj_pow = 0.0;
  int  wanted_n = 0, adj_n = 0;

  int  acc_edge [NIN];
  real mi [NIN], mq [NIN];
  real y1i [NIN/2], y1q [NIN/2];
  real y2i [NIN/4], y2q [NIN/4];
  real y3i [NIN/8], y3q [NIN/8];
  real phase_acc = 0.0;                    // LO phase in units of 2^28

  function automatic real h(input int which, input int k);
    case (which)
      1: return real'(HB1_COEFS[k]) / 32768.0;
      2: return real'(HB2_COEFS[k]) / 32768.0;
      default: return real'(RRC_COEFS[k]) / 32768.0;
    endcase
  endfunction

  always @(posedge clk) edge_cnt <= edge_cnt + 1;

  // Floating-point reference, evaluated as each sample is accepted.
  always @(posedge clk) if (rst_n && in_valid) begin
    int n, m;
    real a, si, sq;
    n = n_in;
    a = 2.0 * PI * phase_acc / (2.0 ** PHASE_W);
    mi[n] =  real'(adc_in) * LO_AMP * $cos(a);
    mq[n] = -real'(adc_in) * LO_AMP * $sin(a);
    phase_acc = phase_acc + real'(tuning_word);
    if (phase_acc >= 2.0 ** PHASE_W) phase_acc = phase_acc - 2.0 ** PHASE_W;
    acc_edge[n] = edge_cnt;
    if (n % 2 == 0) begin
      m = n / 2; si = 0.0; sq = 0.0;
      for (int k = 0; k < HB1_TAPS; k++) if (n - k >= 0) begin
        si += h(1, k) * mi[n-k]; sq += h(1, k) * mq[n-k];
      end
      y1i[m] = si; y1q[m] = sq;
      if (m % 2 == 0) begin
        int p;
        p = m / 2; si = 0.0; sq = 0.0;
        for (int k = 0; k < HB2_TAPS; k++) if (m - k >= 0) begin
          si += h(2, k) * y1i[m-k]; sq += h(2, k) * y1q[m-k];
        end
        y2i[p] = si; y2q[p] = sq;
        if (p % 2 == 0) begin
          int r;
          r = p / 2; si = 0.0; sq = 0.0;
          for (int k = 0; k < RRC_TAPS; k++) if (p - k >= 0) begin
            si += h(3, k) * y2i[p-k]; sq += h(3, k) * y2q[p-k];
          end
          // 16-bit output carries two more fraction bits than the input
          y3i[r] = 4.0 * si; y3q[r] = 4.0 * sq;
        end
      end
    end
    n_in <= n_in + 1;
  end

  // Stage activity
  always @(negedge clk) if (rst_n) begin
    if (dut.hb1_valid) n_hb1++;
    if (dut.hb2_valid) n_hb2++;
    if (dut.rrc_valid) n_rrc++;
  end

  // Output check
  always @(negedge clk) if (rst_n && out_valid) begin
    int di, dq, e;
    real ri, rq;
    ri = y3i[n_out]; rq = y3q[n_out];
    di = int'(i_out) - int'($floor(ri + 0.5));
    dq = int'(q_out) - int'($floor(rq + 0.5));
    if (di < 0) di = -di;
    if (dq < 0) dq = -dq;
    e = (di > dq) ? di : dq;
    if (e > max_err) max_err = e;
    checks++;
    if (e > TOL) begin
      failures++;
      if (failures < 10) $display("out %0d: got %0d,%0d model %.1f,%.1f",
                                  n_out, i_out, q_out, ri, rq);
    end
    // latency while in_valid is continuous (section A)
    if (8*n_out < NA) begin
      checks++;
      lat_checked++;
      if (edge_cnt - 1 - acc_edge[8*n_out] != LAT) begin
        failures++;
        if (failures < 10) $display("latency out %0d: %0d", n_out,
                                    edge_cnt - 1 - acc_edge[8*n_out]);
      end
    end
    // settled part of section A: wanted tone power
    if (8*n_out > 1000 && 8*n_out < NA - 100) begin
      wanted_pow += real'(i_out) * real'(i_out) + real'(q_out) * real'(q_out);
      wanted_n++;
    end
    // settled part of section C: adjacent channel only
    if (8*n_out > NA + NB + 1000) begin
      adj_pow += real'(i_out) * real'(i_out) + real'(q_out) * real'(q_out);
      adj_n++;
    end
    n_out++;
  end

  // IF sample: tones relative to the carrier fc, plus noise
  function automatic logic signed [ADC_W-1:0] if_sample(input int n, input real fc,
                                                         input bit wanted);
    real v;
    v = 0.0;
    if (wanted) v += 1200.0 * (real'($urandom_range(0, 1000)) / 1000.0 - 0.5);
    if (wanted) v += 4000.0 * $cos(2.0 * PI * (fc + 0.6e6) * real'(n) / FS);
    v += 4000.0 * $cos(2.0 * PI * (fc + 5.0e6) * real'(n) / FS + 1.0);
    return ADC_W'(int'($floor(v + 0.5)));
  endfunction

  initial begin
    real fc;
    repeat (3) @(negedge clk);
    rst_n = 1;
    fc = 15.36e6;
    tuning_word = PHASE_W'(longint'(fc / FS * (2.0 ** PHASE_W) + 0.5));
    for (int i = 0; i < NIN; i++) begin
      @(negedge clk);
      if (i == NA) begin
        fc = 10.0e6;
        tuning_word = PHASE_W'(longint'(fc / FS * (2.0 ** PHASE_W) + 0.5));
        n_retune++;
      end
      if (i >= NA && i < NA + NB) while ($urandom_range(0, 3) == 0) begin
        in_valid = 0; n_gap++; @(negedge clk);
      end
      in_valid = 1;
      adc_in = if_sample(i, fc, i < NA + NB);
    end
    @(negedge clk); in_valid = 0;
    repeat (LAT + 10) @(negedge clk);

    $display("inputs=%0d outputs=%0d hb1=%0d hb2=%0d rrc=%0d max_err=%0d LSB",
             n_in, n_out, n_hb1, n_hb2, n_rrc, max_err);
    checks += 4;
    if (n_out != NIN / 8) begin failures++; $display("output count"); end
    if (n_hb1 != NIN / 2) begin failures++; $display("HB1 rate"); end
    if (n_hb2 != NIN / 4) begin failures++; $display("HB2 rate"); end
    if (n_rrc != NIN / 8) begin failures++; $display("RRC rate"); end
    // Wanted tone: amplitude 4000 -> 2000 per complex component -> x4 scale
    // = 8000 at the output, times the pass-band gain (about 1).
    begin
      real a_w, a_adj, rej_db;
      a_w   = $sqrt(wanted_pow / real'(wanted_n));
      a_adj = $sqrt(adj_pow / real'(adj_n));
      rej_db = 20.0 * $log10(8000.0 / (a_adj + 1e-9));
      $display("wanted rms %.1f, adjacent rms %.1f, rejection %.1f dB", a_w, a_adj, rej_db);
      checks += 2;
      if (a_w < 7000.0 || a_w > 9000.0) begin failures++; $display("wanted level"); end
      if (rej_db < 60.0) begin failures++; $display("adjacent rejection"); end
    end
    // every mechanism must have happened
    checks += 6;
    if (n_retune == 0)    begin failures++; $display("no retune"); end
    if (n_gap == 0)       begin failures++; $display("no input gap"); end
    if (n_hb1 == 0)       begin failures++; $display("HB1 idle"); end
    if (n_hb2 == 0)       begin failures++; $display("HB2 idle"); end
    if (n_rrc == 0)       begin failures++; $display("RRC idle"); end
    if (lat_checked == 0) begin failures++; $display("latency unchecked"); end
    $display("mechanisms: retune=%0d gaps=%0d", n_retune, n_gap);
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

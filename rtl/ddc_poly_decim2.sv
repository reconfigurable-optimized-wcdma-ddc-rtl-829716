// ddc_poly_decim2 -- decimate-by-2 FIR filter in polyphase form.
//
// The input stream is split by a two-way commutator: every other sample
// (phase 0, "x[2m]") enters the delay line of sub-filter E0, the samples in
// between (phase 1, "x[2m-1]") enter the delay line of sub-filter E1. E0
// holds the even-indexed taps h[0], h[2], ... and E1 the odd-indexed taps,
// so E0 and E1 only work at the output rate and their sum is the decimated
// output y[m] = sum_k h[k] x[2m-k]. This is the polyphase decimator with the
// down-samplers moved ahead of the sub-filters.
//
// The coefficient set must be symmetric and of odd length (linear phase):
// tap k and tap NTAPS-1-k then lie in the same sub-filter, and their two
// samples are added before the single multiplication they share. Taps whose
// coefficient is zero (every second tap of a half-band filter) generate no
// hardware at all.
//
// Interface: one sample is accepted in each cycle in which in_valid is high;
// in_valid may be high every cycle. The first sample after reset is phase 0.
// Each phase-0 sample x[2m] completes an output: out_valid/out_data are
// written by the second clock edge after the edge that accepted it (three
// register stages: delay lines, pre-add and multiply, sum/round/saturate).
// So out_valid pulses once per two accepted samples. Output scaling: out = round(acc / 2^SHIFT),
// saturated to OUT_W bits, where acc = sum h[k]*x[2m-k] with h in Q1.15;
// SHIFT = 13 turns a 14-bit input into a 16-bit output carrying two more
// fraction bits. Reset (synchronous, active low) clears the delay lines.
//
// The polyphase split, the symmetric-coefficient saving and the pipeline
// registers follow the source design; the register placement, rounding,
// saturation and valid handshake are this implementation's choices.
module ddc_poly_decim2
  import ddc_pkg::*;
#(
  parameter int    IN_W  = FIN_W,
  parameter int    OUT_W = FOUT_W,
  parameter int    NTAPS = HB1_TAPS,
  parameter coef_t COEFS [NTAPS] = HB1_COEFS,
  parameter int    SHIFT = COEF_FRAC - (OUT_W - IN_W)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_data,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_data
);

  localparam int N0   = (NTAPS + 1) / 2;   // taps of E0 (even k)
  localparam int N1   = NTAPS / 2;         // taps of E1 (odd k)
  localparam int NP   = (NTAPS + 1) / 2;   // symmetric pairs incl. centre
  localparam int PRE_W  = IN_W + 1;
  localparam int PROD_W = PRE_W + COEF_W;
  localparam int ACC_W  = PROD_W + $clog2(NP) + 1;

  // Elaboration-time checks of the coefficient set.
  if (NTAPS % 2 == 0) begin : g_len_err
    $error("ddc_poly_decim2: NTAPS must be odd");
  end
  for (genvar k = 0; k < NTAPS / 2; k++) begin : g_sym_chk
    if (COEFS[k] != COEFS[NTAPS-1-k]) begin : g_sym_err
      $error("ddc_poly_decim2: coefficients must be symmetric");
    end
  end

  // ---------------------------------------------------------- commutator
  logic                   phase;           // 0: next sample goes to E0
  logic signed [IN_W-1:0] e0 [N0];          // e0[j] = x[2m-2j]
  logic signed [IN_W-1:0] e1 [N1];          // e1[j] = x[2m-2j-1]
  logic                   fire;            // a complete pair is in the lines

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase <= 1'b0;
      fire  <= 1'b0;
      for (int j = 0; j < N0; j++) e0[j] <= '0;
      for (int j = 0; j < N1; j++) e1[j] <= '0;
    end else begin
      fire <= 1'b0;
      if (in_valid) begin
        phase <= ~phase;
        if (!phase) begin
          e0[0] <= in_data;
          for (int j = 1; j < N0; j++) e0[j] <= e0[j-1];
          fire <= 1'b1;
        end else begin
          e1[0] <= in_data;
          for (int j = 1; j < N1; j++) e1[j] <= e1[j-1];
        end
      end
    end
  end

  // Sample seen by tap k of the full-rate filter: x[2m-k].
  function automatic logic signed [IN_W-1:0] tap(input int k);
    return (k % 2 == 0) ? e0[k/2] : e1[k/2];
  endfunction

  // ------------------------------------------- pre-add and multiply stage
  logic signed [PROD_W-1:0] prod [NP];
  logic                     prod_valid;

  for (genvar p = 0; p < NP; p++) begin : g_tap
    localparam int KB = NTAPS - 1 - p;   // mirror tap
    if (COEFS[p] == 0) begin : g_zero
      assign prod[p] = '0;
    end else begin : g_mac
      logic signed [PRE_W-1:0] pre;
      always_comb begin
        if (p == KB) pre = PRE_W'(tap(p));
        else         pre = PRE_W'(tap(p)) + PRE_W'(tap(KB));
      end
      logic signed [PROD_W-1:0] prod_q;
      always_ff @(posedge clk) begin
        if (fire) prod_q <= pre * COEFS[p];
      end
      assign prod[p] = prod_q;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) prod_valid <= 1'b0;
    else        prod_valid <= fire;
  end

  // ------------------------------------------ sum, round, saturate stage
  logic signed [ACC_W-1:0] acc;
  logic signed [ACC_W-1:0] acc_rnd;
  logic signed [OUT_W-1:0] sat;

  always_comb begin
    acc = '0;
    for (int p = 0; p < NP; p++) acc += ACC_W'(prod[p]);
    acc_rnd = (acc + (ACC_W'(1) <<< (SHIFT - 1))) >>> SHIFT;
    if (acc_rnd > ACC_W'((2 ** (OUT_W - 1)) - 1))
      sat = {1'b0, {(OUT_W-1){1'b1}}};
    else if (acc_rnd < -ACC_W'(2 ** (OUT_W - 1)))
      sat = {1'b1, {(OUT_W-1){1'b0}}};
    else
      sat = OUT_W'(acc_rnd);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= prod_valid;
      if (prod_valid) out_data <= sat;
    end
  end

endmodule

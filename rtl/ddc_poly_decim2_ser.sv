// ddc_poly_decim2_ser -- partially serial decimate-by-2 polyphase FIR filter.
//
// Same filter and same commutator as ddc_poly_decim2 (even samples into the
// E0 delay line, odd samples into the E1 delay line, symmetric taps
// pre-added, zero taps dropped), but the multiplications of one output are
// spread over several clock cycles so that only NMUL multipliers are needed.
// When a phase-0 sample completes an output, the NNZ pre-added sample pairs
// belonging to non-zero coefficients are captured in a register bank; a
// multiply-accumulate engine then works through them NMUL at a time, one
// group per cycle, in CYC = ceil(NNZ/NMUL) cycles, while the delay lines are
// free to accept the next samples. This suits a filter whose output rate is
// well below the clock, as in a decimation chain clocked at the input rate.
//
// Interface and arithmetic are those of ddc_poly_decim2 (one sample per
// in_valid; first sample after reset is phase 0; out = round(acc/2^SHIFT)
// saturated to OUT_W bits; synchronous active-low reset). Rate limit: two
// consecutive phase-0 samples must be at least CYC clock cycles apart
// (checked by an assertion); with the default RRC set (31 non-zero pairs)
// and NMUL = 4, CYC = 8, i.e. one output per 8 clocks, exactly the rate of
// the final stage of the DDC when the clock equals the 61.44 MHz IF rate.
// Timing: out_valid/out_data are written by the (CYC+2)-th clock edge after
// the edge that accepted the phase-0 sample (1 capture, CYC multiply-
// accumulate edges, the last of which loads the result, 1 round/saturate).
//
// The source design only names a partially serial polyphase architecture;
// the capture bank, the group-per-cycle schedule and the rate assertion are
// this implementation's own.
module ddc_poly_decim2_ser
  import ddc_pkg::*;
#(
  parameter int    IN_W  = FIN_W,
  parameter int    OUT_W = FOUT_W,
  parameter int    NTAPS = RRC_TAPS,
  parameter coef_t COEFS [NTAPS] = RRC_COEFS,
  parameter int    SHIFT = COEF_FRAC - (OUT_W - IN_W),
  parameter int    NMUL  = 4
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_data,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_data
);

  localparam int N0 = (NTAPS + 1) / 2;
  localparam int N1 = NTAPS / 2;
  localparam int NP = (NTAPS + 1) / 2;   // symmetric pairs incl. centre

  // Number of non-zero pairs among the first p, and in total.
  function automatic int nz_before(input int p);
    int n = 0;
    for (int i = 0; i < p; i++) if (COEFS[i] != 0) n++;
    return n;
  endfunction

  localparam int NNZ    = nz_before(NP);
  localparam int CYC    = (NNZ + NMUL - 1) / NMUL;
  localparam int NSLOT  = CYC * NMUL;
  localparam int CNT_W  = (CYC > 1) ? $clog2(CYC) : 1;
  localparam int PRE_W  = IN_W + 1;
  localparam int PROD_W = PRE_W + COEF_W;
  localparam int ACC_W  = PROD_W + $clog2(NSLOT) + 1;

  if (NTAPS % 2 == 0) begin : g_len_err
    $error("ddc_poly_decim2_ser: NTAPS must be odd");
  end
  for (genvar k = 0; k < NTAPS / 2; k++) begin : g_sym_chk
    if (COEFS[k] != COEFS[NTAPS-1-k]) begin : g_sym_err
      $error("ddc_poly_decim2_ser: coefficients must be symmetric");
    end
  end

  // ---------------------------------------------------------- commutator
  logic                   phase;
  logic signed [IN_W-1:0] e0 [N0];          // e0[j] = x[2m-2j]
  logic signed [IN_W-1:0] e1 [N1];          // e1[j] = x[2m-2j-1]
  logic                   fire;

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

  function automatic logic signed [IN_W-1:0] tap(input int k);
    return (k % 2 == 0) ? e0[k/2] : e1[k/2];
  endfunction

  // ------------------------------- pre-add into compacted slots, capture
  logic signed [PRE_W-1:0]  pre_slot  [NSLOT];
  coef_t                    coef_slot [NSLOT];
  logic signed [PRE_W-1:0]  pre_q     [NSLOT];

  for (genvar p = 0; p < NP; p++) begin : g_pair
    localparam int KB = NTAPS - 1 - p;
    if (COEFS[p] != 0) begin : g_nz
      localparam int S = nz_before(p);
      always_comb begin
        if (p == KB) pre_slot[S] = PRE_W'(tap(p));
        else         pre_slot[S] = PRE_W'(tap(p)) + PRE_W'(tap(KB));
      end
      assign coef_slot[S] = COEFS[p];
    end
  end
  for (genvar s = NNZ; s < NSLOT; s++) begin : g_pad
    assign pre_slot[s]  = '0;
    assign coef_slot[s] = '0;
  end

  // ------------------------------------------- multiply-accumulate engine
  logic             busy;
  logic [CNT_W-1:0] cnt;
  logic             last;       // final group of the current output
  logic             done;
  logic signed [ACC_W-1:0] acc;
  logic signed [ACC_W-1:0] result;
  logic signed [ACC_W-1:0] group_sum;

  assign last = busy && (int'(cnt) == CYC - 1);

  always_comb begin
    group_sum = '0;
    for (int j = 0; j < NMUL; j++)
      group_sum += ACC_W'(pre_q[int'(cnt) * NMUL + j] * coef_slot[int'(cnt) * NMUL + j]);
  end

  // The final group goes straight into result, so a new capture may take
  // place on the same edge and outputs can follow each other every CYC
  // cycles.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      cnt    <= '0;
      done   <= 1'b0;
      acc    <= '0;
      result <= '0;
      for (int s = 0; s < NSLOT; s++) pre_q[s] <= '0;
    end else begin
      done <= last;
      if (last) result <= acc + group_sum;
      if (fire) begin
        for (int s = 0; s < NSLOT; s++) pre_q[s] <= pre_slot[s];
        busy <= 1'b1;
        cnt  <= '0;
        acc  <= '0;
      end else if (busy) begin
        acc <= acc + group_sum;
        if (last) busy <= 1'b0;
        else      cnt  <= cnt + 1'b1;
      end
    end
  end

  // A new output may only start once the previous one is in its last cycle.
  always_ff @(posedge clk) begin
    if (rst_n) assert (!(fire && busy && !last))
      else $error("ddc_poly_decim2_ser: outputs requested faster than one per %0d cycles", CYC);
  end

  // ------------------------------------------------ round and saturate
  logic signed [ACC_W-1:0] acc_rnd;
  logic signed [OUT_W-1:0] sat;

  always_comb begin
    acc_rnd = (result + (ACC_W'(1) <<< (SHIFT - 1))) >>> SHIFT;
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
      out_valid <= done;
      if (done) out_data <= sat;
    end
  end

endmodule

// ddc_dds -- direct digital synthesizer producing cos and sin for the mixer.
//
// A PHASE_W-bit phase accumulator advances by the tuning word once per
// accepted IF sample (ce), so sample n is paired with the phase
// n * tuning_word (mod 2^PHASE_W), i.e. the local oscillator frequency is
// f0 = tuning_word * Fs / 2^PHASE_W. With Fs = 61.44 MHz and PHASE_W = 28
// the tuning step is 0.229 Hz. The tuning word can be changed at any time
// and takes effect from the next sample on.
//
// cos and sin of the top CORDIC_ZW phase bits are computed by a fully
// pipelined rotation-mode CORDIC with CORDIC_N iterations: the phase is
// first folded into [-pi/2, pi/2) (subtracting pi and negating the result
// when the angle lies in the left half-plane), the vector (X0, 0) is then
// rotated by micro-rotations of +-atan(2^-i), and the result is rounded to
// NCO_W-bit signed values (peak 0.9999 * 2^(NCO_W-1)).
//
// Timing: cos/sin for a sample appear with out_valid DDS_LAT = CORDIC_N + 3
// cycles after its ce (1 phase register, 1 fold, CORDIC_N iterations,
// 1 output rounding). Synchronous active-low reset clears the accumulator.
//
// The phase accumulator follows the specified tuning resolution (~0.25 Hz);
// the CORDIC sine generator and its widths are this design's choice.
module ddc_dds
  import ddc_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     ce,
  input  logic [PHASE_W-1:0]       tuning_word,
  output logic                     out_valid,
  output logic signed [NCO_W-1:0]  cos_out,
  output logic signed [NCO_W-1:0]  sin_out
);

  typedef logic signed [CORDIC_XW-1:0] xy_t;

  // ------------------------------------------------------- phase accumulator
  logic [PHASE_W-1:0] acc;
  logic [CORDIC_ZW-1:0] phase_q;   // phase truncated to the CORDIC width
  logic               phase_v;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc     <= '0;
      phase_q <= '0;
      phase_v <= 1'b0;
    end else begin
      phase_v <= ce;
      if (ce) begin
        phase_q <= acc[PHASE_W-1 -: CORDIC_ZW];
        acc     <= acc + tuning_word;
      end
    end
  end

  // ------------------------------------------------------- fold to +-pi/2
  logic [CORDIC_ZW-1:0] p;
  assign p = phase_q;

  xy_t    x [CORDIC_N+1];
  xy_t    y [CORDIC_N+1];
  angle_t z [CORDIC_N+1];
  logic   neg [CORDIC_N+1];
  logic   v [CORDIC_N+1];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v[0] <= 1'b0;
    end else begin
      v[0] <= phase_v;
    end
    x[0]   <= xy_t'(CORDIC_X0);
    y[0]   <= '0;
    // Angles in [pi/2, 3pi/2): rotate by the angle - pi, negate afterwards.
    neg[0] <= p[CORDIC_ZW-1] ^ p[CORDIC_ZW-2];
    z[0]   <= angle_t'(p ^ {(p[CORDIC_ZW-1] ^ p[CORDIC_ZW-2]),
                            {(CORDIC_ZW-1){1'b0}}});
  end

  // ---------------------------------------------------- CORDIC iterations
  for (genvar i = 0; i < CORDIC_N; i++) begin : g_stage
    always_ff @(posedge clk) begin
      if (!rst_n) v[i+1] <= 1'b0;
      else        v[i+1] <= v[i];
      neg[i+1] <= neg[i];
      if (!z[i][CORDIC_ZW-1]) begin
        x[i+1] <= x[i] - (y[i] >>> i);
        y[i+1] <= y[i] + (x[i] >>> i);
        z[i+1] <= z[i] - CORDIC_ATAN[i];
      end else begin
        x[i+1] <= x[i] + (y[i] >>> i);
        y[i+1] <= y[i] - (x[i] >>> i);
        z[i+1] <= z[i] + CORDIC_ATAN[i];
      end
    end
  end

  // ------------------------------------------------------ round and sign
  function automatic logic signed [NCO_W-1:0] rnd(input xy_t a, input logic n);
    xy_t r;
    r = (a + (xy_t'(1) <<< (CORDIC_GUARD - 1))) >>> CORDIC_GUARD;
    if (n) r = -r;
    return NCO_W'(r);
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      cos_out   <= '0;
      sin_out   <= '0;
    end else begin
      out_valid <= v[CORDIC_N];
      cos_out   <= rnd(x[CORDIC_N], neg[CORDIC_N]);
      sin_out   <= rnd(y[CORDIC_N], neg[CORDIC_N]);
    end
  end

endmodule

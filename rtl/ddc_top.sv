// ddc_top -- single-carrier WCDMA digital down-converter.
//
// Takes the real 14-bit IF samples of an ADC at 61.44 MSPS (16x the
// 3.84 Mcps chip rate) and delivers complex 16-bit baseband samples at
// 7.68 MSPS (2x chip rate), a total decimation of 8 done in three stages:
//
//   adc_in --+--> delay (DDS_LAT) --> mixer --> HB1 /2 --> HB2 /2 --> RRC /2 --> I/Q
//            |                          ^      61.44     30.72      15.36      7.68 MSPS
//   in_valid +--> DDS (tuning_word) ----+ cos, -sin
//
// The DDS phase advances once per input sample, so the carrier at
// f0 = tuning_word * 61.44 MHz / 2^28 is moved to 0 Hz. The IF sample is
// delayed by the DDS pipeline latency so that sample n meets cos/sin of
// phase n * tuning_word. Each decimator is a polyphase decimate-by-2 FIR
// with 14-bit inputs and 16-bit outputs. HB1, which must produce an output
// every 2 clocks, is fully parallel (ddc_poly_decim2); HB2 and the RRC
// filter are partially serial (ddc_poly_decim2_ser), sharing 2 and 4
// multipliers per rail over the 4 and 8 clocks they have per output. This
// relies on the clock being at least the IF sample rate, which holds since
// in_valid carries at most one sample per clock. Between stages
// the 16-bit output is rounded back to 14 bits (ddc_pkg::requant), so every
// filter sees the input precision it was specified for.
//
// Interface: in_valid may be high on every cycle (clock = sample clock) or
// be used as a clock enable at a lower rate. out_valid pulses once per 8
// accepted samples. Output level: a full-scale input tone at f0 gives I/Q
// of amplitude about 2^15 / 2 (the mixer splits the real tone into a
// wanted and an image component; the image is filtered out).
// Output m is completed by input sample 8m (the first sample after reset,
// the ninth, ...). With in_valid high on every cycle it is written by the
// 47th clock edge after the edge that accepted that sample: DDS_LAT-1 = 22
// for the oscillator, 2 for the mixer, 3 + 1 for HB1 and its requantiser,
// 7 + 1 for HB2 and its requantiser and 11 for the RRC filter.
// Synchronous active-low reset.
//
// Structure, rates, precisions, filter orders and the DDS/mixer equations
// follow the design specification; the CORDIC sine generator, the stage
// requantisation by rounding, and the valid-strobe handshake are choices of
// this implementation.
module ddc_top
  import ddc_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  logic signed [ADC_W-1:0] adc_in,
  input  logic [PHASE_W-1:0] tuning_word,
  output logic               out_valid,
  output logic signed [FOUT_W-1:0] i_out,
  output logic signed [FOUT_W-1:0] q_out
);

  // ----------------------------------------------------------------- DDS
  logic                    lo_valid;
  logic signed [NCO_W-1:0] lo_cos, lo_sin;

  ddc_dds u_dds (
    .clk, .rst_n, .ce(in_valid), .tuning_word,
    .out_valid(lo_valid), .cos_out(lo_cos), .sin_out(lo_sin)
  );

  // --------------------------------------- align IF samples with the DDS
  logic signed [ADC_W-1:0] x_dly [DDS_LAT];
  logic                    v_dly [DDS_LAT];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < DDS_LAT; i++) begin
        v_dly[i] <= 1'b0;
        x_dly[i] <= '0;
      end
    end else begin
      v_dly[0] <= in_valid;
      x_dly[0] <= adc_in;
      for (int i = 1; i < DDS_LAT; i++) begin
        v_dly[i] <= v_dly[i-1];
        x_dly[i] <= x_dly[i-1];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst_n) assert (v_dly[DDS_LAT-1] == lo_valid)
      else $error("ddc_top: IF sample and DDS output out of step");
  end

  // --------------------------------------------------------------- mixer
  logic  mix_valid;
  cfin_t mix_out;

  ddc_mixer #(.IN_W(ADC_W), .LO_W(NCO_W), .OUT_W(FIN_W)) u_mixer (
    .clk, .rst_n,
    .in_valid(v_dly[DDS_LAT-1]), .x_in(x_dly[DDS_LAT-1]),
    .cos_in(lo_cos), .sin_in(lo_sin),
    .out_valid(mix_valid), .i_out(mix_out.re), .q_out(mix_out.im)
  );

  // ---------------------------------------------------- decimation chain
  logic   hb1_valid, hb2_valid, rrc_valid;
  cfout_t hb1_out, hb2_out, rrc_out;
  logic   hb2_in_valid, rrc_in_valid;
  cfin_t  hb2_in, rrc_in;

  ddc_hb1 u_hb1 (
    .clk, .rst_n, .in_valid(mix_valid), .in_data(mix_out),
    .out_valid(hb1_valid), .out_data(hb1_out)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      hb2_in_valid <= 1'b0;
      hb2_in       <= '0;
      rrc_in_valid <= 1'b0;
      rrc_in       <= '0;
    end else begin
      hb2_in_valid <= hb1_valid;
      if (hb1_valid) hb2_in <= requant_c(hb1_out);
      rrc_in_valid <= hb2_valid;
      if (hb2_valid) rrc_in <= requant_c(hb2_out);
    end
  end

  ddc_hb2 u_hb2 (
    .clk, .rst_n, .in_valid(hb2_in_valid), .in_data(hb2_in),
    .out_valid(hb2_valid), .out_data(hb2_out)
  );

  ddc_rrc u_rrc (
    .clk, .rst_n, .in_valid(rrc_in_valid), .in_data(rrc_in),
    .out_valid(rrc_valid), .out_data(rrc_out)
  );

  assign out_valid = rrc_valid;
  assign i_out     = rrc_out.re;
  assign q_out     = rrc_out.im;

endmodule

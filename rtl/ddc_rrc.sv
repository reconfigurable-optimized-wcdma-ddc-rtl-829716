// ddc_rrc -- root-raised-cosine channel filter and final decimator (15.36 -> 7.68 MSPS).
//
// An order-60 (61-tap) root-raised-cosine matched filter with roll-off 0.22,
// cut-off 1.92 MHz (half the chip rate) and a 50 dB Chebyshev window. It
// removes the adjacent channels and brings the rate to 2x the chip rate for
// timing recovery. All 61 taps are non-zero: 31 multiplications per output
// per rail after symmetric pre-adding (E0: 31 taps, E1: 30 taps), done
// here in 8 cycles on 4 multipliers.
//
// The I and Q rails each run through their own ddc_poly_decim2_ser instance:
// the polyphase decimate-by-2 structure with symmetric pre-add, built
// partially serial with NMUL multipliers per rail that work through the
// non-zero coefficient pairs of one output in CYC = 8 clock cycles
// (default NMUL = 4). Inside the DDC, clocked at the 61.44 MHz IF rate,
// this stage receives one input sample per 4 clocks and has to deliver one output
// per 8 clocks, so the multipliers are fully used.
// Interface: in_valid/in_data carry one complex sample; out_valid pulses
// once per two input samples with the filtered, decimated complex sample.
// Every even-indexed input (the first after reset, the third, ...)
// completes an output, written by the 10-th clock edge after the edge that
// accepted it; such inputs must be at least 8 clocks apart.
// Precision: 14-bit input, 16-bit output, 16-bit coefficients (Q1.15), as
// the design specifies; the output keeps two more fraction bits than the
// input (unity DC gain, output = 4 * input level). Synchronous active-low
// reset clears the delay lines.
// Order, rates and precisions follow the source design; its coefficient
// values are not published, so the set in ddc_pkg is this design's own.
module ddc_rrc
  import ddc_pkg::*;
#(
  parameter int NMUL = 4   // multipliers per rail
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  cfin_t  in_data,
  output logic   out_valid,
  output cfout_t out_data
);

  logic valid_i, valid_q;

  ddc_poly_decim2_ser #(
    .IN_W (FIN_W), .OUT_W(FOUT_W), .NTAPS(RRC_TAPS), .COEFS(RRC_COEFS), .NMUL(NMUL)
  ) u_i (
    .clk, .rst_n, .in_valid, .in_data(in_data.re),
    .out_valid(valid_i), .out_data(out_data.re)
  );

  ddc_poly_decim2_ser #(
    .IN_W (FIN_W), .OUT_W(FOUT_W), .NTAPS(RRC_TAPS), .COEFS(RRC_COEFS), .NMUL(NMUL)
  ) u_q (
    .clk, .rst_n, .in_valid, .in_data(in_data.im),
    .out_valid(valid_q), .out_data(out_data.im)
  );

  assign out_valid = valid_i;

  // Both rails see the same strobe, so their phases never drift apart.
  always_ff @(posedge clk) begin
    if (rst_n) assert (valid_i == valid_q)
      else $error("ddc_rrc: I and Q rails out of step");
  end

endmodule

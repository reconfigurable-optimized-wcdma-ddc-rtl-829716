// ddc_hb2 -- second half-band decimator of the DDC (30.72 -> 15.36 MSPS).
//
// An order-26 (27-tap) equiripple half-band low-pass filter. As in the first
// half-band stage, the E1 branch is only the centre tap (0.5) and E0 holds
// 14 taps in 7 symmetric pairs: 8 multiplications per output per rail,
// done here in 4 cycles on 2 multipliers.
// Pass band 0 .. 2.34 MHz.
//
// The I and Q rails each run through their own ddc_poly_decim2_ser instance:
// the polyphase decimate-by-2 structure with symmetric pre-add, built
// partially serial with NMUL multipliers per rail that work through the
// non-zero coefficient pairs of one output in CYC = 4 clock cycles
// (default NMUL = 2). Inside the DDC, clocked at the 61.44 MHz IF rate,
// this stage receives one input sample per 2 clocks and has to deliver one output
// per 4 clocks, so the multipliers are fully used.
// Interface: in_valid/in_data carry one complex sample; out_valid pulses
// once per two input samples with the filtered, decimated complex sample.
// Every even-indexed input (the first after reset, the third, ...)
// completes an output, written by the 6-th clock edge after the edge that
// accepted it; such inputs must be at least 4 clocks apart.
// Precision: 14-bit input, 16-bit output, 16-bit coefficients (Q1.15), as
// the design specifies; the output keeps two more fraction bits than the
// input (unity DC gain, output = 4 * input level). Synchronous active-low
// reset clears the delay lines.
// Order, rates and precisions follow the source design; its coefficient
// values are not published, so the set in ddc_pkg is this design's own.
module ddc_hb2
  import ddc_pkg::*;
#(
  parameter int NMUL = 2   // multipliers per rail
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
    .IN_W (FIN_W), .OUT_W(FOUT_W), .NTAPS(HB2_TAPS), .COEFS(HB2_COEFS), .NMUL(NMUL)
  ) u_i (
    .clk, .rst_n, .in_valid, .in_data(in_data.re),
    .out_valid(valid_i), .out_data(out_data.re)
  );

  ddc_poly_decim2_ser #(
    .IN_W (FIN_W), .OUT_W(FOUT_W), .NTAPS(HB2_TAPS), .COEFS(HB2_COEFS), .NMUL(NMUL)
  ) u_q (
    .clk, .rst_n, .in_valid, .in_data(in_data.im),
    .out_valid(valid_q), .out_data(out_data.im)
  );

  assign out_valid = valid_i;

  // Both rails see the same strobe, so their phases never drift apart.
  always_ff @(posedge clk) begin
    if (rst_n) assert (valid_i == valid_q)
      else $error("ddc_hb2: I and Q rails out of step");
  end

endmodule

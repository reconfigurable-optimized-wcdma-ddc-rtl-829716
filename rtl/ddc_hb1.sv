// ddc_hb1 -- first half-band decimator of the DDC (61.44 -> 30.72 MSPS).
//
// An order-10 (11-tap) equiripple half-band low-pass filter that halves the
// sample rate of the complex mixer output. Only the centre tap and the taps
// at odd distance from it are non-zero, so the E1 polyphase branch reduces
// to the single centre tap (0.5) and E0 holds 6 taps forming 3 symmetric
// pairs: 4 multiplications per output per rail. Pass band 0 .. 2.34 MHz
// (1.22 x half the 3.84 Mcps chip rate).
//
// The I and Q rails each run through their own ddc_poly_decim2 instance
// (polyphase decimate-by-2 with symmetric pre-add; zero taps cost nothing).
// Interface: in_valid/in_data carry one complex sample per cycle at most;
// out_valid pulses once per two input samples with the filtered, decimated
// complex sample: every even-indexed input (the first after reset, the
// third, ...) completes an output, written by the second clock edge after
// the edge that accepted it.
// Precision: 14-bit input, 16-bit output, 16-bit coefficients (Q1.15), as
// the design specifies; the output keeps two more fraction bits than the
// input (unity DC gain, output = 4 * input level). Synchronous active-low
// reset clears the delay lines.
// Order, rates and precisions follow the source design; its coefficient
// values are not published, so the set in ddc_pkg is this design's own.
module ddc_hb1
  import ddc_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  cfin_t  in_data,
  output logic   out_valid,
  output cfout_t out_data
);

  logic valid_i, valid_q;

  ddc_poly_decim2 #(
    .IN_W (FIN_W), .OUT_W(FOUT_W), .NTAPS(HB1_TAPS), .COEFS(HB1_COEFS)
  ) u_i (
    .clk, .rst_n, .in_valid, .in_data(in_data.re),
    .out_valid(valid_i), .out_data(out_data.re)
  );

  ddc_poly_decim2 #(
    .IN_W (FIN_W), .OUT_W(FOUT_W), .NTAPS(HB1_TAPS), .COEFS(HB1_COEFS)
  ) u_q (
    .clk, .rst_n, .in_valid, .in_data(in_data.im),
    .out_valid(valid_q), .out_data(out_data.im)
  );

  assign out_valid = valid_i;

  // Both rails see the same strobe, so their phases never drift apart.
  always_ff @(posedge clk) begin
    if (rst_n) assert (valid_i == valid_q)
      else $error("ddc_hb1: I and Q rails out of step");
  end

endmodule

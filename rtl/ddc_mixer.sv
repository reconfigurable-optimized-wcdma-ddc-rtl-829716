// ddc_mixer -- complex mixer translating the real IF signal to baseband.
//
// Multiplies each real IF sample X(n) by the local oscillator from the DDS,
// forming I(n) = X(n) cos(w0 n) and Q(n) = -X(n) sin(w0 n), i.e. X(n) times
// exp(-j w0 n). Two real multipliers (14 x 18 bits) are used.
//
// Scaling: cos/sin are Q1.17, so each product is shifted right by 17 bits
// with round-half-up and saturated to OUT_W bits; the result has the input's
// scale (a full-scale input times a full-scale cosine is a full-scale
// output). OUT_W defaults to the 14-bit input precision of the first filter.
//
// Timing: x, cos and sin must arrive together with in_valid; the products
// are registered in cycle 1 and the rounded I/Q leave with out_valid in
// cycle 2. Synchronous active-low reset clears the valid pipeline.
// The equations follow the design; widths and rounding are this design's.
module ddc_mixer
  import ddc_pkg::*;
#(
  parameter int IN_W  = ADC_W,
  parameter int LO_W  = NCO_W,
  parameter int OUT_W = FIN_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  x_in,
  input  logic signed [LO_W-1:0]  cos_in,
  input  logic signed [LO_W-1:0]  sin_in,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] i_out,
  output logic signed [OUT_W-1:0] q_out
);

  localparam int PW    = IN_W + LO_W;
  localparam int SHIFT = LO_W - 1;

  logic signed [PW-1:0] prod_i, prod_q;
  logic                 prod_v;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      prod_v <= 1'b0;
      prod_i <= '0;
      prod_q <= '0;
    end else begin
      prod_v <= in_valid;
      if (in_valid) begin
        prod_i <= x_in * cos_in;
        prod_q <= -(x_in * sin_in);
      end
    end
  end

  function automatic logic signed [OUT_W-1:0] scale(input logic signed [PW-1:0] a);
    logic signed [PW:0] r;
    r = ((PW+1)'(a) + ((PW+1)'(1) <<< (SHIFT - 1))) >>> SHIFT;
    if (r > (PW+1)'(2 ** (OUT_W - 1) - 1))
      return {1'b0, {(OUT_W-1){1'b1}}};
    if (r < -(PW+1)'(2 ** (OUT_W - 1)))
      return {1'b1, {(OUT_W-1){1'b0}}};
    return OUT_W'(r);
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      i_out     <= '0;
      q_out     <= '0;
    end else begin
      out_valid <= prod_v;
      if (prod_v) begin
        i_out <= scale(prod_i);
        q_out <= scale(prod_q);
      end
    end
  end

endmodule

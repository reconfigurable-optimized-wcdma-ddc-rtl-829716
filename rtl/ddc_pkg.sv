// ddc_pkg -- shared constants, types, filter coefficients and helpers of the
// WCDMA digital down-converter.
//
// Sample widths follow the design's specification table: 14-bit real IF
// input, 14-bit filter inputs, 16-bit filter outputs and 16-bit coefficients.
// The coefficient values themselves are this design's own: they were
// obtained with the design methods the filters are specified by and then
// rounded to signed Q1.15 (value = round(h * 2^15)):
//   HB1  order 10, equiripple (Parks-McClellan) half-band, Fs = 61.44 MHz,
//        pass band 0 .. 2.34 MHz, stop band 28.38 .. 30.72 MHz; taps at even
//        distance from the centre forced to zero, centre = 0.5, DC gain 1.
//   HB2  order 26, designed the same way at Fs = 30.72 MHz, pass band
//        0 .. 2.34 MHz, stop band 13.02 .. 15.36 MHz.
//   RRC  order 60, root-raised-cosine at 4 samples per chip (Fs = 15.36 MHz,
//        chip rate 3.84 Mcps, 3 dB point 1.92 MHz), roll-off 0.22,
//        multiplied by a 50 dB Chebyshev window, normalised to DC gain 1.
// All three sets are symmetric (linear phase) and of odd length.
package ddc_pkg;

  // ---------------------------------------------------------------- widths
  localparam int ADC_W   = 14;  // real IF input
  localparam int FIN_W   = 14;  // input precision of every filter
  localparam int FOUT_W  = 16;  // output precision of every filter / DDC
  localparam int COEF_W  = 16;  // coefficient precision (Q1.15)
  localparam int COEF_FRAC = COEF_W - 1;

  // ------------------------------------------------------------------ DDS
  localparam int PHASE_W   = 28;  // 61.44 MHz / 2^28 = 0.229 Hz resolution
  localparam int NCO_W     = 18;  // cos/sin amplitude width (Q1.17)
  localparam int CORDIC_N  = 20;  // CORDIC iterations
  localparam int CORDIC_ZW = 24;  // CORDIC angle width, 2^24 units = 2*pi
  localparam int CORDIC_XW = 26;  // CORDIC x/y datapath width
  localparam int CORDIC_GUARD = 5; // x/y carry 2^5 more resolution than output
  // Start vector 0.9999 * 2^(NCO_W-1+GUARD) / K, K = prod sqrt(1+2^-2i)
  // = 1.6467602581 for 20 iterations: output peak 0.9999 * (2^17).
  localparam int CORDIC_X0 = 2546750;
  // Pipeline latency of the DDS from a phase step (ce) to its cos/sin.
  localparam int DDS_LAT   = CORDIC_N + 3;

  typedef logic signed [CORDIC_ZW-1:0] angle_t;
  // atan(2^-i) in units of 2*pi/2^24, i = 0 .. 19.
  localparam angle_t CORDIC_ATAN [CORDIC_N] = '{
    24'sd2097152, 24'sd1238021, 24'sd654136, 24'sd332050, 24'sd166669,
    24'sd83416,   24'sd41718,   24'sd20860,  24'sd10430,  24'sd5215,
    24'sd2608,    24'sd1304,    24'sd652,    24'sd326,    24'sd163,
    24'sd81,      24'sd41,      24'sd20,     24'sd10,     24'sd5};

  // -------------------------------------------------------------- filters
  typedef logic signed [COEF_W-1:0] coef_t;

  localparam int HB1_TAPS = 11;   // order 10
  localparam int HB2_TAPS = 27;   // order 26
  localparam int RRC_TAPS = 61;   // order 60

  localparam coef_t HB1_COEFS [HB1_TAPS] = '{
    16'sd206, 16'sd0, -16'sd1641, 16'sd0, 16'sd9627, 16'sd16384,
    16'sd9627, 16'sd0, -16'sd1641, 16'sd0, 16'sd206};

  localparam coef_t HB2_COEFS [HB2_TAPS] = '{
    16'sd1, 16'sd0, -16'sd12, 16'sd0, 16'sd72, 16'sd0, -16'sd297, 16'sd0,
    16'sd935, 16'sd0, -16'sd2616, 16'sd0, 16'sd10108, 16'sd16384,
    16'sd10108, 16'sd0, -16'sd2616, 16'sd0, 16'sd935, 16'sd0, -16'sd297,
    16'sd0, 16'sd72, 16'sd0, -16'sd12, 16'sd0, 16'sd1};

  localparam coef_t RRC_COEFS [RRC_TAPS] = '{
    16'sd4, 16'sd3, 16'sd1, -16'sd3, -16'sd7, -16'sd5, 16'sd5, 16'sd14,
    16'sd10, -16'sd10, -16'sd32, -16'sd28, 16'sd17, 16'sd79, 16'sd98,
    16'sd20, -16'sd139, -16'sd263, -16'sd207, 16'sd86, 16'sd476, 16'sd655,
    16'sd339, -16'sd466, -16'sd1328, -16'sd1526, -16'sd449, 16'sd1970,
    16'sd5063, 16'sd7666, 16'sd8683, 16'sd7666, 16'sd5063, 16'sd1970,
    -16'sd449, -16'sd1526, -16'sd1328, -16'sd466, 16'sd339, 16'sd655,
    16'sd476, 16'sd86, -16'sd207, -16'sd263, -16'sd139, 16'sd20, 16'sd98,
    16'sd79, 16'sd17, -16'sd28, -16'sd32, -16'sd10, 16'sd10, 16'sd14,
    16'sd5, -16'sd5, -16'sd7, -16'sd3, 16'sd1, 16'sd3, 16'sd4};

  // ---------------------------------------------------------- sample types
  typedef logic signed [FIN_W-1:0]  fin_t;
  typedef logic signed [FOUT_W-1:0] fout_t;

  // Complex sample at filter input and output precision.
  typedef struct packed {
    fin_t re;
    fin_t im;
  } cfin_t;

  typedef struct packed {
    fout_t re;
    fout_t im;
  } cfout_t;

  // Requantise a 16-bit filter output to the 14-bit input of the next
  // filter: drop two LSBs with round-half-up and saturate.
  function automatic fin_t requant(input fout_t v);
    logic signed [FOUT_W:0] t;
    t = (FOUT_W+1)'(v) + (FOUT_W+1)'(2);
    t = t >>> (FOUT_W - FIN_W);
    if (t > (FOUT_W+1)'(2**(FIN_W-1) - 1))
      return fin_t'(2**(FIN_W-1) - 1);
    return fin_t'(t);
  endfunction

  function automatic cfin_t requant_c(input cfout_t v);
    cfin_t r;
    r.re = requant(v.re);
    r.im = requant(v.im);
    return r;
  endfunction

endpackage

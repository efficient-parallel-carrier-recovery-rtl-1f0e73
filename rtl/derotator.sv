// derotator: multiplies a complex sample by exp(-j*angle).
//
//   dout = (I + jQ)(cos a - j sin a) = (I cos a + Q sin a) + j(Q cos a - I sin a)
//
// The angle's top LUT_BITS bits (rounded) index a table of cosine and sine
// values in Q1.10, built at elaboration from cos/sin; four real multipliers
// and rounding follow, and the result saturates to IQ_W bits. This is the
// complex multiplier by exp(-j psi) after the DPLL and by exp(-j phi) after
// the phase search; the table form is this design's choice. Combinational.
module derotator
  import cr_pkg::*;
#(
  parameter int LUT_BITS = 10
) (
  input  cplx_t  din,
  input  phase_t angle,
  output cplx_t  dout
);
  localparam int CW   = 12;            // coefficient width, Q1.10
  localparam int ONE  = 1 << (CW - 2);
  localparam int NLUT = 1 << LUT_BITS;
  localparam int PW   = IQ_W + CW + 1;

  typedef logic signed [CW-1:0] coef_t;

  typedef coef_t lut_t [NLUT];

  function automatic lut_t make_lut(bit sine);
    lut_t t;
    for (int k = 0; k < NLUT; k++) begin
      real a;
      a = 2.0 * PI * real'(k) / real'(NLUT);
      t[k] = coef_t'(int'($floor((sine ? $sin(a) : $cos(a)) * real'(ONE) + 0.5)));
    end
    return t;
  endfunction

  localparam lut_t COS_LUT = make_lut(1'b0);
  localparam lut_t SIN_LUT = make_lut(1'b1);

  localparam int SH = PH_W - LUT_BITS;

  logic [LUT_BITS-1:0]  idx;
  logic [PH_W-1:0]      angle_r;
  coef_t                c, s;
  logic signed [PW-1:0] re, im;

  function automatic iq_t sat_round(logic signed [PW-1:0] v);
    logic signed [PW-1:0] r;
    r = (v + PW'(ONE / 2)) >>> (CW - 2);
    if (r > PW'((1 << (IQ_W - 1)) - 1))  return iq_t'((1 << (IQ_W - 1)) - 1);
    if (r < -PW'(1 << (IQ_W - 1)))       return iq_t'(-(1 << (IQ_W - 1)));
    return iq_t'(r);
  endfunction

  always_comb begin
    // round to the nearest table angle (wraps modulo 2*pi)
    if (SH > 0) angle_r = angle + PH_W'(1 << (SH > 0 ? SH - 1 : 0));
    else        angle_r = angle;
    idx = angle_r[SH +: LUT_BITS];
    c = COS_LUT[idx];
    s = SIN_LUT[idx];
    re = PW'(din.i) * PW'(c) + PW'(din.q) * PW'(s);
    im = PW'(din.q) * PW'(c) - PW'(din.i) * PW'(s);
    dout.i = sat_round(re);
    dout.q = sat_round(im);
  end
endmodule

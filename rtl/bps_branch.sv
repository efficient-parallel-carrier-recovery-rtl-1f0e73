// bps_branch: one test-phase branch of the blind phase search for one
// sample: rotate by -phi_b (phi_b = BIDX/B * pi/2), slice to the nearest
// 16-QAM point and return the squared distance |d|^2 to it.
// The rotation uses Q1.10 constants computed at elaboration; the rotated
// sample is rounded and saturated to IQ_W bits. Combinational.
module bps_branch
  import cr_pkg::*;
#(
  parameter int B    = 32,
  parameter int BIDX = 0
) (
  input  cplx_t                din,
  output logic [2*IQ_W-1:0]    d2
);
  localparam int  CW  = 12;
  localparam int  ONE = 1 << (CW - 2);
  localparam real PHI = real'(BIDX) / real'(B) * PI / 2.0;
  localparam int  PW  = IQ_W + CW + 1;
  localparam logic signed [CW-1:0] C = CW'(int'($floor($cos(PHI) * ONE + 0.5)));
  localparam logic signed [CW-1:0] S = CW'(int'($floor($sin(PHI) * ONE + 0.5)));

  function automatic iq_t sat_round(logic signed [PW-1:0] v);
    logic signed [PW-1:0] r;
    r = (v + PW'(ONE / 2)) >>> (CW - 2);
    if (r > PW'((1 << (IQ_W - 1)) - 1)) return iq_t'((1 << (IQ_W - 1)) - 1);
    if (r < -PW'(1 << (IQ_W - 1)))      return iq_t'(-(1 << (IQ_W - 1)));
    return iq_t'(r);
  endfunction

  iq_t                 ri, rq, li, lq;
  logic [1:0]          si, sq;
  logic signed [IQ_W:0] di, dq;

  always_comb begin
    ri = sat_round(PW'(din.i) * PW'(C) + PW'(din.q) * PW'(S));
    rq = sat_round(PW'(din.q) * PW'(C) - PW'(din.i) * PW'(S));
  end

  qam16_slicer u_si (.x(ri), .level(li), .sym(si));
  qam16_slicer u_sq (.x(rq), .level(lq), .sym(sq));

  always_comb begin
    di = (IQ_W+1)'(ri) - (IQ_W+1)'(li);
    dq = (IQ_W+1)'(rq) - (IQ_W+1)'(lq);
    d2 = (2*IQ_W)'(di * di) + (2*IQ_W)'(dq * dq);
  end
endmodule

// cordic_vec: rectangular-to-polar conversion of one complex sample, giving
// the phase theta and magnitude |r| on which the phase-domain DPLL works.
//
// A combinational CORDIC in vectoring mode. A sample in the left half plane
// is first turned by pi; ITER micro-rotations by +-atan(2^-i) then drive y
// to zero while the rotation angles are summed. The angle accumulator keeps
// GUARD extra fraction bits, x and y FB, and the results are rounded to a PH_W-bit binary angle. The
// magnitude carries the CORDIC gain (about 1.6468), which the ring bounds
// of the tentative decision already include. The conversion itself is this
// design's choice: the loop is specified on (theta, |r|) only.
module cordic_vec
  import cr_pkg::*;
#(
  parameter int ITER = 12
) (
  input  iq_t    x,
  input  iq_t    y,
  output phase_t theta,
  output mag_t   mag
);
  localparam int GUARD = 4;
  localparam int AW    = PH_W + GUARD;
  localparam int FB    = 6;          // fraction bits of x and y
  localparam int XW    = IQ_W + 3 + FB;

  function automatic logic [AW-1:0] atan_tab(int i);
    return AW'(int'($atan(2.0 ** (-i)) / (2.0 * PI) * real'(1 << AW)));
  endfunction

  logic signed [XW-1:0] xs, ys, xn, xr;
  logic [AW-1:0]        z;
  logic [AW-1:0]        zr;

  always_comb begin
    if (x < 0) begin
      xs = -(XW'(x) <<< FB);
      ys = -(XW'(y) <<< FB);
      z  = AW'(1) << (AW - 1);       // pi
    end else begin
      xs = XW'(x) <<< FB;
      ys = XW'(y) <<< FB;
      z  = '0;
    end
    for (int i = 0; i < ITER; i++) begin
      if (ys >= 0) begin
        xn = xs + (ys >>> i);
        ys = ys - (xs >>> i);
        z  = z + atan_tab(i);
      end else begin
        xn = xs - (ys >>> i);
        ys = ys + (xs >>> i);
        z  = z - atan_tab(i);
      end
      xs = xn;
    end
    zr    = z + AW'(1 << (GUARD - 1));
    theta = zr[AW-1 -: PH_W];
    xr    = (xs + XW'(1 << (FB - 1))) >>> FB;
    mag   = (xr > XW'((1 << MAG_W) - 1)) ? '1 : MAG_W'(xr);
  end
endmodule

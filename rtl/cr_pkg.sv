// cr_pkg: number formats and constants shared by the parallel 16-QAM carrier
// recovery.
//
// Phases are binary angles: an unsigned PH_W-bit word where 2^PH_W is one full
// turn (2*pi). Addition modulo 2*pi is then plain wrap-around, and the
// "modulus pi/2" operation of the phase-domain loop is a truncation to the low
// PH_W-2 bits. Complex samples are signed IQ_W-bit pairs; the 16-QAM levels
// are +-QAM_A and +-3*QAM_A. Magnitudes come from a CORDIC and carry its gain
// of about 1.6468. The word widths and the level scale are this design's own
// choice; the angle constants alpha0..alpha2 (pi/4, arctan(1/3), arctan(3))
// are the three first-quadrant phases of the 16-QAM constellation.
package cr_pkg;

  parameter int IQ_W  = 10;            // bits per I or Q component
  parameter int PH_W  = 12;            // bits per binary angle (2*pi = 2^PH_W)
  parameter int MAG_W = IQ_W + 1;      // CORDIC magnitude width
  parameter int QAM_A = 64;            // inner 16-QAM level

  localparam int QW   = PH_W - 2;      // width of a phase reduced modulo pi/2
  localparam int EW   = PH_W - 1;      // width of a signed phase error
  localparam real PI  = 3.14159265358979323846;

  typedef logic [PH_W-1:0]         phase_t;  // full binary angle
  typedef logic [QW-1:0]           qphase_t; // angle modulo pi/2
  typedef logic signed [EW-1:0]    perr_t;   // phase error, |e| < pi/2
  typedef logic signed [IQ_W-1:0]  iq_t;
  typedef logic [MAG_W-1:0]        mag_t;

  typedef struct packed {
    iq_t i;
    iq_t q;
  } cplx_t;

  // Convert radians to binary-angle units (rounded).
  function automatic int rad2ang(real rad);
    return int'(rad / (2.0 * PI) * real'(1 << PH_W));
  endfunction

  // First-quadrant symbol phases of 16-QAM.
  localparam int ALPHA0 = 1 << (PH_W - 3);          // pi/4
  localparam int ALPHA1 = rad2ang($atan(1.0 / 3.0)); // arctan(1/3)
  localparam int ALPHA2 = rad2ang($atan(3.0));       // arctan(3)

  // CORDIC vectoring gain prod(sqrt(1+2^-2i)) ~ 1.6468.
  localparam real CORDIC_GAIN = 1.646760258;

  // Default ring bounds for the tentative decision: midpoints between the
  // 16-QAM ring radii sqrt(2), sqrt(10), sqrt(18) (in units of QAM_A), scaled
  // by the CORDIC gain.
  localparam int RHO_L_DEF = int'((1.414213562 + 3.16227766) / 2.0 * QAM_A * CORDIC_GAIN);
  localparam int RHO_U_DEF = int'((3.16227766 + 4.242640687) / 2.0 * QAM_A * CORDIC_GAIN);

endpackage

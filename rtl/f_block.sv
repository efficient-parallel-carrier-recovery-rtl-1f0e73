// f_block: tentative first-quadrant symbol phase rho_hat = f(|r|, theta_hat)
// for 16-QAM (block F_k of the parallel proportional loop).
//
// theta_hat = (phi_hat - psi_p) modulo pi/2, where psi_p is the proportional
// NCO phase of the previous clock cycle (the precomputation that takes the
// decision out of the critical loop). Two comparisons select the symbol
// phase: the middle ring (rho_l < |r| <= rho_u) holds the two off-diagonal
// points, the rest of the constellation lies on the diagonal (pi/4). On the
// middle ring, theta_hat >= pi/4 picks arctan(3), otherwise arctan(1/3).
// Because phases are binary angles, the pi/4 test is the top bit of the
// modulo-pi/2 angle and the modulus is a truncation.
//
// The comparisons, the mux order and its constants follow the published
// look-up-table form of F_k; on the exact boundaries (|r| = rho_u,
// theta_hat = pi/4) that form and the defining equation differ, and this
// module takes the look-up-table form. The ring bounds are ports; their
// usual values are RHO_L_DEF/RHO_U_DEF in cr_pkg (this design's choice).
//
// Purely combinational.
module f_block
  import cr_pkg::*;
(
  input  phase_t  phi_hat, // phi_hat_{n+k}: theta minus integral NCO phase
  input  mag_t    mag,     // |r_{n+k}| (CORDIC scaled)
  input  phase_t  psi_p,   // proportional NCO phase of the previous cycle
  input  mag_t    rho_l,   // lower ring bound
  input  mag_t    rho_u,   // upper ring bound
  output qphase_t rho      // rho_hat_{n+k}, angle modulo pi/2
);
  qphase_t theta_hat;
  logic    upper_half;  // theta_hat >= pi/4
  logic    mid_ring;    // rho_l < |r| <= rho_u

  always_comb begin
    theta_hat  = qphase_t'(phi_hat - psi_p);
    upper_half = theta_hat[QW-1];
    mid_ring   = (mag > rho_l) && (mag <= rho_u);
    unique case ({mid_ring, upper_half})
      2'b00, 2'b01: rho = qphase_t'(ALPHA0);
      2'b10:        rho = qphase_t'(ALPHA1);
      default:      rho = qphase_t'(ALPHA2);
    endcase
  end
endmodule

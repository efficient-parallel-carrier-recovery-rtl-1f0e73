// pec: phase error computation of the parallel DPLL for one lane.
//
// err_k = (phi_hat_k - psi_p_{k-1}) modulo pi/2  -  rho_hat_k
//
// phi_hat_k is the received phase with the integral NCO phase already
// removed, psi_p_{k-1} the proportional NCO phase that applies to the
// symbol before k (the output of W_{m-1} for lane m, or the fed-back phase
// for lane 0), and rho_hat_k the tentative first-quadrant symbol phase. The
// result is a signed binary angle in (-pi/2, pi/2). Combinational.
module pec
  import cr_pkg::*;
(
  input  phase_t  phi_hat,
  input  phase_t  psi_p,
  input  qphase_t rho,
  output perr_t   err
);
  qphase_t theta_hat;
  always_comb begin
    theta_hat = qphase_t'(phi_hat - psi_p);
    err       = perr_t'({1'b0, theta_hat}) - perr_t'({1'b0, rho});
  end
endmodule

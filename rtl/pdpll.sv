// pdpll: low-latency parallel type II phase-domain DPLL for M-QAM (16-QAM
// decisions).
//
// Each clock carries a block of P received phases theta and magnitudes |r|.
//   cycle 0: phi = theta - psi_i (integral NCO phase for that lane); the
//            proportional loop reduces it modulo pi/2, takes tentative
//            decisions F_k and registers the block.
//   cycle 1: the W_m blocks give psi_p for every symbol; one PEC per lane
//            forms e_k = (phi_k - psi_p_{k-1}) mod pi/2 - rho_k. The total
//            NCO phase psi = psi_i + psi_p_{k-1} of every lane is registered
//            (out_valid two cycles after in_valid), and at the same edge the
//            integral loop adds Ki*sum(e) to its frequency word and advances
//            its NCO. The new integral phase reaches the input subtraction of
//            the block that enters one cycle later, so errors of block j act
//            on block j+2 (integral latency L = P symbols, l = 1).
// The proportional loop is one cycle long and never waits for a decision:
// that is the approximation that makes the parallel loop fast. psi is the
// phase by which the top derotates each sample; freq is the frequency
// estimate Ki*acc (NI_MAX fraction bits below the phase LSB, per symbol).
// The pipeline split and the stall behaviour (nothing changes on an invalid
// cycle) are this design's choice.
module pdpll
  import cr_pkg::*;
#(
  parameter int P      = 64,
  parameter int NP_MAX = 6,
  parameter int NI_MAX = 12
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  phase_t                  theta [P],
  input  mag_t                    mag   [P],
  input  logic [2:0]              np,
  input  logic [3:0]              ni,
  input  mag_t                    rho_l,
  input  mag_t                    rho_u,
  output logic                    out_valid,
  output phase_t                  psi   [P],
  output logic [PH_W+NI_MAX-1:0]  freq
);
  phase_t  psi_i    [P];
  phase_t  phi_in   [P];
  phase_t  psi_i_q  [P];   // integral phase used by the registered block
  logic    q_valid;
  phase_t  phi_q    [P];
  qphase_t rho_q    [P];
  phase_t  psi_p    [P];   // psi_p_{n+m-1}
  perr_t   err_c    [P];

  always_comb
    for (int k = 0; k < P; k++) phi_in[k] = theta[k] - psi_i[k];

  prop_loop #(.P(P), .NP_MAX(NP_MAX)) u_prop (
    .clk, .rst_n, .in_valid,
    .phi_in   (phi_in),
    .mag_in   (mag),
    .rho_l, .rho_u, .np,
    .q_valid  (q_valid),
    .phi_q    (phi_q),
    .rho_q    (rho_q),
    .psi_lane (psi_p)
  );

  for (genvar k = 0; k < P; k++) begin : g_pec
    pec u_pec (
      .phi_hat (phi_q[k]),
      .psi_p   (psi_p[k]),
      .rho     (rho_q[k]),
      .err     (err_c[k])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int k = 0; k < P; k++) begin
        psi_i_q[k] <= '0;
        psi[k]     <= '0;
      end
    end else begin
      out_valid <= q_valid;
      if (in_valid) psi_i_q <= psi_i;
      if (q_valid) begin
        for (int k = 0; k < P; k++) psi[k] <= psi_i_q[k] + psi_p[k];
      end
    end
  end

  int_loop #(.P(P), .NI_MAX(NI_MAX)) u_int (
    .clk, .rst_n,
    .nco_adv   (in_valid),
    .err_valid (q_valid),
    .err       (err_c),
    .ni,
    .psi_i     (psi_i),
    .freq      (freq)
  );
endmodule

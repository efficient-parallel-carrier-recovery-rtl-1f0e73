// prop_loop: low-latency parallel proportional loop of the phase-domain DPLL.
//
// One clock cycle handles a block of P symbols. The incoming block (phi_hat,
// |r|) goes through the P tentative-decision blocks F_k, which use the
// proportional NCO phase fed back at the end of the previous block, and both
// phi_hat and rho_hat are registered (the z^-1 after each F_k). In the next
// cycle the P blocks W_m form the NCO phases psi_p_{n+m} of every symbol of
// the registered block from the one fed-back phase psi_p_{n-1}; W_{P-1}'s
// result is registered as the new feedback. The loop therefore contains one
// subtraction stage, one P-term sum and one addition per cycle.
//
// Outputs, all valid in the cycle after in_valid (q_valid):
//   phi_q/rho_q  - the registered block,
//   psi_lane[m]  - psi_p_{n+m-1}, the phase that applies before symbol m
//                  (lane 0: the fed-back phase, lane m: output of W_{m-1}).
// Registers only load on valid blocks, so a gap in the input stream freezes
// the loop (this design's choice). Kp = 2^-np, np <= NP_MAX.
module prop_loop
  import cr_pkg::*;
#(
  parameter int P      = 64,
  parameter int NP_MAX = 6
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  phase_t     phi_in [P],
  input  mag_t       mag_in [P],
  input  mag_t       rho_l,
  input  mag_t       rho_u,
  input  logic [2:0] np,
  output logic       q_valid,
  output phase_t     phi_q    [P],
  output qphase_t    rho_q    [P],
  output phase_t     psi_lane [P]
);
  localparam int AW = PH_W + NP_MAX;

  logic [AW-1:0] psi_fb;          // psi_p_{n-1}, with fraction bits
  logic [AW-1:0] psi_w [P];       // W_m outputs
  qphase_t       rho_c [P];
  phase_t        psi_fb_top;

  assign psi_fb_top = psi_fb[AW-1 -: PH_W];

  for (genvar k = 0; k < P; k++) begin : g_lane
    f_block u_f (
      .phi_hat (phi_in[k]),
      .mag     (mag_in[k]),
      .psi_p   (psi_fb_top),
      .rho_l   (rho_l),
      .rho_u   (rho_u),
      .rho     (rho_c[k])
    );

    w_block #(.NT(k + 1), .NP_MAX(NP_MAX)) u_w (
      .phi_hat  (phi_q[0:k]),
      .rho      (rho_q[0:k]),
      .psi_prev (psi_fb),
      .np       (np),
      .psi      (psi_w[k])
    );

    if (k == 0) begin : g_l0
      assign psi_lane[k] = psi_fb_top;
    end else begin : g_ln
      assign psi_lane[k] = psi_w[k-1][AW-1 -: PH_W];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_valid <= 1'b0;
      psi_fb  <= '0;
      for (int k = 0; k < P; k++) begin
        phi_q[k] <= '0;
        rho_q[k] <= '0;
      end
    end else begin
      q_valid <= in_valid;
      if (in_valid) begin
        phi_q <= phi_in;
        rho_q <= rho_c;
      end
      if (q_valid) psi_fb <= psi_w[P-1];
    end
  end
endmodule

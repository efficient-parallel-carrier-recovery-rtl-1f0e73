// carrier_recovery: two-stage parallel carrier recovery for a 16-QAM
// intradyne coherent receiver, P symbols per clock.
//
// Stage one is a low-latency parallel phase-domain DPLL. It removes the
// carrier frequency offset and the slow, large frequency wander of a
// vibrating laser, which a purely feed-forward phase estimator cannot follow.
// Stage two is a parallel blind phase search that removes the remaining
// laser phase noise. A final 16-QAM slicer gives the decisions, and a
// differential quadrant decoder turns them into data bits that no pi/2
// rotation of the recovered phase (a cycle slip) can corrupt for longer
// than one symbol.
//
// Data path, one block of P equalized samples per clock (lane 0 oldest):
//   cycle 0    CORDIC per lane: r -> (theta, |r|), registered
//   cycle 1-2  pdpll: NCO phase psi per lane; the Cartesian samples are
//              delayed alongside
//   cycle 3    derotator: r * exp(-j psi), registered
//   cycle 4-5  bps: phase search, unwrap, derotation
//   cycle 6    slicer, registered outputs
//   cycle 7    differential quadrant decoder
// out_valid follows in_valid by 7 cycles, data_valid by 8. Lane k of
// r_hat/dec is the sample (N-1)/2 symbols before input lane k, because the
// phase search window is centred. An invalid input cycle is a bubble that
// moves down the pipeline and leaves all loop state unchanged.
//
// The loop gains start at acquisition values (Kp = 2^-5, Ki = 2^-11) and
// drop to the tracking values Kp = 2^-6, Ki = 2^-12 after ACQ_CYCLES blocks
// (gear_shift). P = 64, B = 32 test phases, N = 21 window length and
// Kp = 2^-6 are the published configuration. The published integral gain
// for P = 64 is 2^-10; in this block-parallel loop that gives a per-block
// integral gain Ki*P^2 = 4, for which the loop does not settle, so the
// default is 2^-12 (Ki*P^2 = 1). The word widths (cr_pkg), the front-end
// CORDIC, the ring bounds, the acquisition gains, the pipeline split and the
// bit mapping of the differential decoder are this design's choice.
module carrier_recovery
  import cr_pkg::*;
#(
  parameter int P          = 64,
  parameter int B          = 32,
  parameter int N          = 21,
  parameter int NP_TRK     = 6,
  parameter int NI_TRK     = 12,
  parameter int NP_ACQ     = 5,
  parameter int NI_ACQ     = 11,
  parameter int ACQ_CYCLES = 512,
  parameter int RHO_L      = RHO_L_DEF,
  parameter int RHO_U      = RHO_U_DEF
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  cplx_t                  r_in  [P],
  output logic                   out_valid,
  output cplx_t                  r_hat [P],
  output logic [3:0]             dec   [P],   // {I index, Q index}, 0..3 = -3A..3A
  output logic                   data_valid,
  output logic [3:0]             data  [P],   // {quadrant change, position in quadrant}
  output logic [$clog2(4*B)-1:0] bps_phase [P], // phase-search estimate, 2*pi = 4B
  output logic [PH_W+NI_TRK-1:0] freq_est,    // phase advance per symbol
  output logic                   tracking
);
  // ---- front end: rectangular to polar -----------------------------------
  phase_t theta_c [P];
  mag_t   mag_c   [P];
  phase_t theta_a [P];
  mag_t   mag_a   [P];
  cplx_t  r_a     [P];
  cplx_t  r_b     [P];
  cplx_t  r_c     [P];
  logic   va, vb;

  for (genvar k = 0; k < P; k++) begin : g_cordic
    cordic_vec u_cv (.x(r_in[k].i), .y(r_in[k].q), .theta(theta_c[k]), .mag(mag_c[k]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      va <= 1'b0;
      vb <= 1'b0;
      for (int k = 0; k < P; k++) begin
        theta_a[k] <= '0;
        mag_a[k]   <= '0;
        r_a[k]     <= '0;
        r_b[k]     <= '0;
        r_c[k]     <= '0;
      end
    end else begin
      va <= in_valid;
      vb <= va;
      if (in_valid) begin
        theta_a <= theta_c;
        mag_a   <= mag_c;
        r_a     <= r_in;
      end
      if (va) r_b <= r_a;
      if (vb) r_c <= r_b;
    end
  end

  // ---- stage one: parallel DPLL -------------------------------------------
  logic [2:0] np;
  logic [3:0] ni;
  logic       vp;
  phase_t     psi [P];

  gear_shift #(
    .ACQ_CYCLES (ACQ_CYCLES),
    .NP_ACQ (NP_ACQ), .NI_ACQ (NI_ACQ),
    .NP_TRK (NP_TRK), .NI_TRK (NI_TRK)
  ) u_gear (
    .clk, .rst_n,
    .valid    (va),
    .np       (np),
    .ni       (ni),
    .tracking (tracking)
  );

  pdpll #(.P(P), .NP_MAX(NP_TRK), .NI_MAX(NI_TRK)) u_dpll (
    .clk, .rst_n,
    .in_valid  (va),
    .theta     (theta_a),
    .mag       (mag_a),
    .np, .ni,
    .rho_l     (mag_t'(RHO_L)),
    .rho_u     (mag_t'(RHO_U)),
    .out_valid (vp),
    .psi       (psi),
    .freq      (freq_est)
  );

  // ---- derotation by the DPLL phase ---------------------------------------
  cplx_t r_t_c [P];
  cplx_t r_t   [P];
  logic  vt;

  for (genvar k = 0; k < P; k++) begin : g_derot
    derotator #(.LUT_BITS(10)) u_dr (.din(r_c[k]), .angle(psi[k]), .dout(r_t_c[k]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vt <= 1'b0;
      for (int k = 0; k < P; k++) r_t[k] <= '0;
    end else begin
      vt <= vp;
      if (vp) r_t <= r_t_c;
    end
  end

  // ---- stage two: blind phase search --------------------------------------
  logic  vs;
  cplx_t r_s [P];

  bps #(.P(P), .B(B), .N(N)) u_bps (
    .clk, .rst_n,
    .in_valid  (vt),
    .r_in      (r_t),
    .out_valid (vs),
    .r_out     (r_s),
    .phase     (bps_phase)
  );

  // ---- slicer -------------------------------------------------------------
  iq_t        lev_i [P];
  iq_t        lev_q [P];
  logic [1:0] sym_i [P];
  logic [1:0] sym_q [P];

  for (genvar k = 0; k < P; k++) begin : g_slice
    qam16_slicer u_si (.x(r_s[k].i), .level(lev_i[k]), .sym(sym_i[k]));
    qam16_slicer u_sq (.x(r_s[k].q), .level(lev_q[k]), .sym(sym_q[k]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int k = 0; k < P; k++) begin
        r_hat[k] <= '0;
        dec[k]   <= '0;
      end
    end else begin
      out_valid <= vs;
      if (vs) begin
        r_hat <= r_s;
        for (int k = 0; k < P; k++) dec[k] <= {sym_i[k], sym_q[k]};
      end
    end
  end

  // ---- differential quadrant decoding --------------------------------------
  qam16_diff_decoder #(.P(P)) u_diff (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (out_valid),
    .dec       (dec),
    .out_valid (data_valid),
    .data      (data)
  );
endmodule

// tb_prop_loop: cycle-by-cycle comparison of the parallel proportional loop
// (P = 8) with a behavioural model of the same equations (tentative
// decisions with the previous cycle's NCO phase, W sums, feedback), under
// random data, random stalls and random gain shifts; then a lock test: with
// diagonal symbols and a fixed phase offset the NCO phase must settle on
// the offset.
module tb_prop_loop;
  import cr_pkg::*;
  localparam int P = 8, NPM = 6, AW = PH_W + NPM;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n, in_valid, q_valid;
  phase_t phi_in [P], phi_q [P], psi_lane [P];
  mag_t mag_in [P];
  qphase_t rho_q [P];
  logic [2:0] np;
  mag_t rl, ru;

  prop_loop #(.P(P), .NP_MAX(NPM)) dut (.clk, .rst_n, .in_valid, .phi_in, .mag_in,
    .rho_l(rl), .rho_u(ru), .np, .q_valid, .phi_q, .rho_q, .psi_lane);

  // model state
  int m_qv, m_phi [P], m_rho [P];
  longint m_psi;

  function automatic int f_ref(int ph, int ps, int m);
    int th;
    th = ((ph - ps) % 4096 + 4096) % 1024;
    if (m > RHO_L_DEF && m <= RHO_U_DEF) return th >= 512 ? 814 : 210;
    return 512;
  endfunction

  function automatic longint w_ref(int n, longint psi, int npv);
    longint acc, top, r;
    top = psi >> NPM; acc = 0;
    for (int k = 0; k < n; k++) acc += ((m_phi[k] - top) % 4096 + 4096) % 1024 - m_rho[k];
    r = (psi + acc * (longint'(1) << (NPM - npv))) % (longint'(1) << AW);
    if (r < 0) r += longint'(1) << AW;
    return r;
  endfunction

  task automatic compare();
    checks++;
    if (int'(q_valid) != m_qv) begin failures++; $display("FAIL q_valid"); end
    for (int m = 0; m < P; m++) begin
      int exp_l;
      exp_l = (m == 0) ? int'(m_psi >> NPM) : int'(w_ref(m, m_psi, int'(np)) >> NPM);
      checks += 3;
      if (int'(phi_q[m]) != m_phi[m]) begin failures++; $display("FAIL phi_q[%0d]", m); end
      if (int'(rho_q[m]) != m_rho[m]) begin failures++; $display("FAIL rho_q[%0d] %0d %0d", m, rho_q[m], m_rho[m]); end
      if (int'(psi_lane[m]) != exp_l) begin failures++; $display("FAIL psi_lane[%0d] %0d %0d", m, psi_lane[m], exp_l); end
    end
  endtask

  // one clock: drive inputs, advance the model, compare
  task automatic step(bit v, int ph [P], int mg [P]);
    longint nxt;
    int top;
    in_valid = v;
    for (int k = 0; k < P; k++) begin phi_in[k] = phase_t'(ph[k]); mag_in[k] = mag_t'(mg[k]); end
    top = int'(m_psi >> NPM);
    nxt = m_qv ? w_ref(P, m_psi, int'(np)) : m_psi;
    @(posedge clk);
    if (v) for (int k = 0; k < P; k++) begin m_phi[k] = ph[k]; m_rho[k] = f_ref(ph[k], top, mg[k]); end
    m_psi = nxt;
    m_qv = int'(v);
    #1 compare();
  endtask

  initial begin
    int ph [P], mg [P];
    rl = mag_t'(RHO_L_DEF); ru = mag_t'(RHO_U_DEF);
    rst_n = 0; in_valid = 0; np = 3'd6;
    for (int k = 0; k < P; k++) begin phi_in[k] = '0; mag_in[k] = '0; m_phi[k] = 0; m_rho[k] = 0; end
    m_qv = 0; m_psi = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int c = 0; c < 600; c++) begin
      for (int k = 0; k < P; k++) begin ph[k] = $urandom_range(4095); mg[k] = $urandom_range(600); end
      if (c % 50 == 0) np = 3'($urandom_range(6, 3));
      step($urandom_range(3) != 0, ph, mg);
    end
    // lock test: diagonal symbols (pi/4 + k*pi/2) offset by 100 LSB
    np = 3'd3;
    for (int c = 0; c < 200; c++) begin
      for (int k = 0; k < P; k++) begin ph[k] = (512 + 1024 * $urandom_range(3) + 100) % 4096; mg[k] = 150; end
      step(1'b1, ph, mg);
    end
    checks++;
    if (int'(psi_lane[0]) % 1024 < 98 || int'(psi_lane[0]) % 1024 > 102) begin
      failures++; $display("FAIL lock: psi=%0d", psi_lane[0]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_f_block: random and boundary checks of the 16-QAM tentative decision
// rho_hat = f(|r|, theta_hat) against a reference written from the decision
// rule: middle ring -> arctan(1/3) below pi/4, arctan(3) from pi/4 up;
// otherwise pi/4. Angles in 12-bit binary units.
module tb_f_block;
  import cr_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  phase_t phi, psi;
  mag_t   mag, rl, ru;
  qphase_t rho;

  f_block dut (.phi_hat(phi), .mag(mag), .psi_p(psi), .rho_l(rl), .rho_u(ru), .rho(rho));

  function automatic int ref_rho(int ph, int ps, int m, int l, int u);
    int th;
    th = ((ph - ps) % 4096 + 4096) % 1024;
    if (m > l && m <= u) return (th >= 512) ? int'($atan(3.0) / (2.0 * 3.141592653589793) * 4096.0)
                                           : int'($atan(1.0 / 3.0) / (2.0 * 3.141592653589793) * 4096.0);
    return 512;
  endfunction

  task automatic check(int ph, int ps, int m);
    phi = phase_t'(ph); psi = phase_t'(ps); mag = mag_t'(m);
    @(posedge clk);
    checks++;
    if (int'(rho) != ref_rho(ph, ps, m, int'(rl), int'(ru))) begin
      failures++;
      $display("FAIL phi=%0d psi=%0d mag=%0d rho=%0d exp=%0d", ph, ps, m, rho, ref_rho(ph, ps, m, int'(rl), int'(ru)));
    end
  endtask

  int seen [3];
  initial begin
    rl = mag_t'(RHO_L_DEF); ru = mag_t'(RHO_U_DEF);
    // boundaries of the ring and of the pi/4 line
    check(512, 0, int'(rl));       check(512, 0, int'(rl) + 1);
    check(511, 0, int'(ru));       check(512, 0, int'(ru) + 1);
    check(511 + 1024, 0, 300);     check(100, 100 - 512, 300);
    check(0, 4095, 300);           check(3000, 1000, 100);
    for (int i = 0; i < 2000; i++) begin
      check($urandom_range(4095), $urandom_range(4095), $urandom_range(2047));
      if (rho == qphase_t'(512)) seen[0]++; else if (rho < qphase_t'(512)) seen[1]++; else seen[2]++;
    end
    for (int i = 0; i < 3; i++) begin
      checks++;
      if (seen[i] == 0) begin failures++; $display("FAIL decision %0d never seen", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

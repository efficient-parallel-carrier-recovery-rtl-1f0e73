// tb_pec: random checks of the phase error e = (phi - psi) mod pi/2 - rho
// against integer arithmetic on 12-bit binary angles.
module tb_pec;
  import cr_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  phase_t phi, psi;
  qphase_t rho;
  perr_t err;
  pec dut (.phi_hat(phi), .psi_p(psi), .rho(rho), .err(err));

  initial begin
    int rhos [3] = '{210, 512, 814};
    for (int i = 0; i < 3000; i++) begin
      int ph, ps, r, e;
      ph = $urandom_range(4095); ps = $urandom_range(4095); r = rhos[$urandom_range(2)];
      if (i < 3) begin ph = 1023 * i; ps = 0; r = rhos[i]; end
      phi = phase_t'(ph); psi = phase_t'(ps); rho = qphase_t'(r);
      @(posedge clk);
      e = (((ph - ps) % 4096 + 4096) % 1024) - r;
      checks++;
      if (int'(err) != e) begin
        failures++;
        $display("FAIL phi=%0d psi=%0d rho=%0d err=%0d exp=%0d", ph, ps, r, err, e);
      end
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

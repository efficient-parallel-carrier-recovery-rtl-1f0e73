// tb_w_block: random checks of W_m (8 terms here) against the sum
// psi + 2^-np * sum((phi_k - psi) mod pi/2 - rho_k), with the NCO phase
// carrying NP_MAX = 6 fraction bits and wrapping modulo 2*pi.
module tb_w_block;
  import cr_pkg::*;
  localparam int NT = 8, NPM = 6, AW = PH_W + NPM;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  phase_t  phi [NT];
  qphase_t rho [NT];
  logic [AW-1:0] psi_prev, psi;
  logic [2:0] np;

  w_block #(.NT(NT), .NP_MAX(NPM)) dut (.phi_hat(phi), .rho(rho), .psi_prev(psi_prev), .np(np), .psi(psi));

  initial begin
    int rhos [3] = '{210, 512, 814};
    for (int i = 0; i < 3000; i++) begin
      longint acc, top, expv;
      psi_prev = AW'($urandom);
      np = 3'($urandom_range(NPM));
      top = longint'(psi_prev) >> NPM;
      acc = 0;
      for (int k = 0; k < NT; k++) begin
        phi[k] = phase_t'($urandom);
        rho[k] = qphase_t'(rhos[$urandom_range(2)]);
        acc += ((longint'(phi[k]) - top) % 4096 + 4096) % 1024 - longint'(rho[k]);
      end
      expv = (longint'(psi_prev) + acc * (longint'(1) << (NPM - int'(np)))) % (longint'(1) << AW);
      if (expv < 0) expv += longint'(1) << AW;
      @(posedge clk);
      checks++;
      if (longint'(psi) != expv) begin
        failures++;
        $display("FAIL psi=%0d exp=%0d", psi, expv);
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

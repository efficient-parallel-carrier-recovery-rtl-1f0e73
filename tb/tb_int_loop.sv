// tb_int_loop: cycle-by-cycle comparison of the parallel integral loop
// (P = 8) with a model of acc += 2^(NI_MAX-ni)*sum(e) on err_valid,
// base += P*acc on nco_adv,
// psi_i[m] = base + (m+1)*acc, under random errors, stalls and gains.
module tb_int_loop;
  import cr_pkg::*;
  localparam int P = 8, NIM = 10, AW = PH_W + NIM;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n, err_valid, nco_adv;
  perr_t err [P];
  logic [3:0] ni;
  phase_t psi_i [P];
  logic [AW-1:0] freq;

  int_loop #(.P(P), .NI_MAX(NIM)) dut (.clk, .rst_n, .nco_adv, .err_valid, .err, .ni, .psi_i, .freq);

  longint acc, base;
  localparam longint MOD = longint'(1) << AW;

  initial begin
    rst_n = 0; err_valid = 0; nco_adv = 0; ni = 4'd10; acc = 0; base = 0;
    for (int k = 0; k < P; k++) err[k] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int c = 0; c < 2000; c++) begin
      longint s, nacc, nbase;
      err_valid = ($urandom_range(3) != 0);
      nco_adv   = ($urandom_range(3) != 0);
      if (c % 100 == 0) ni = 4'($urandom_range(10, 6));
      s = 0;
      for (int k = 0; k < P; k++) begin
        // mostly small errors so the frequency word stays in range
        err[k] = perr_t'(int'($urandom_range(40)) - 20);
        s += longint'(err[k]);
      end
      nacc = acc; nbase = base;
      if (err_valid) nacc  = ((acc + s * (longint'(1) << (NIM - int'(ni)))) % MOD + MOD) % MOD;
      if (nco_adv)   nbase = (base + longint'(P) * acc) % MOD;
      @(posedge clk);
      acc = nacc; base = nbase;
      #1;
      checks++;
      if (longint'(freq) != acc) begin failures++; $display("FAIL freq %0d %0d", freq, acc); end
      for (int m = 0; m < P; m++) begin
        longint e;
        e = ((base + longint'(m + 1) * acc) % MOD) >> NIM;
        checks++;
        if (longint'(psi_i[m]) != e) begin failures++; $display("FAIL psi_i[%0d] %0d %0d", m, psi_i[m], e); end
      end
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

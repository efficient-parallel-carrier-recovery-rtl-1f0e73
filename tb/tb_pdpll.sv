// tb_pdpll: closed-loop test of the parallel DPLL (P = 16) on random 16-QAM
// symbols in phase form, with a carrier frequency offset of 25.6 binary-angle
// LSB per symbol (200 MHz at 32 GBd) and a static phase offset. Checks:
// two-cycle latency; after pull-in the residual phase of every symbol
// (theta - psi - symbol phase, modulo pi/2) is within 12 LSB (1.1 deg); the
// frequency estimate equals the offset within 0.25 LSB per symbol; random
// input stalls do not disturb the lock. The symbol phases, radii and the
// offsets are generated here independently of the design.
module tb_pdpll;
  import cr_pkg::*;
  localparam int P = 16, NPM = 6, NIM = 10;
  localparam real OMEGA = 25.6;            // LSB per symbol
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n, in_valid, out_valid;
  phase_t theta [P], psi [P];
  mag_t mag [P];
  logic [2:0] np;
  logic [3:0] ni;
  logic [PH_W+NIM-1:0] freq;

  pdpll #(.P(P), .NP_MAX(NPM), .NI_MAX(NIM)) dut (.clk, .rst_n, .in_valid, .theta, .mag,
    .np, .ni, .rho_l(mag_t'(RHO_L_DEF)), .rho_u(mag_t'(RHO_U_DEF)), .out_valid, .psi, .freq);

  int zq [$];   // symbol phase (LSB) of each sent symbol
  int tq [$];   // theta sent
  int blk_out = 0, stalls = 0, first_in = -1, first_out = -1, cyc = 0;
  real ph = 300.0;

  always @(posedge clk) cyc++;

  initial begin
    rst_n = 0; in_valid = 0; np = 3'd4; ni = 4'd8;
    for (int k = 0; k < P; k++) begin theta[k] = '0; mag[k] = '0; end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int c = 0; c < 1500; c++) begin
      @(negedge clk);
      if (c == 400) begin np = 3'd5; ni = 4'd10; end
      in_valid = (c < 20) || ($urandom_range(9) != 0);
      if (!in_valid) stalls++;
      if (in_valid) begin
        if (first_in < 0) first_in = cyc + 1;
        for (int k = 0; k < P; k++) begin
          int si, sq, z, t;
          real a;
          si = 2 * int'($urandom_range(3)) - 3;
          sq = 2 * int'($urandom_range(3)) - 3;
          a  = $atan2(real'(sq), real'(si)) / (2.0 * 3.141592653589793) * 4096.0;
          z  = int'(a);
          t  = int'($floor(a + ph + 0.5)) + int'($urandom_range(2)) - 1;
          theta[k] = phase_t'(((t % 4096) + 4096) % 4096);
          mag[k]   = mag_t'(int'($sqrt(real'(si * si + sq * sq)) * 64.0 * 1.646760258));
          zq.push_back(z);
          tq.push_back(int'(theta[k]));
          ph = ph + OMEGA;
          if (ph >= 4096.0) ph = ph - 4096.0;
        end
      end
    end
    @(negedge clk); in_valid = 0;
    repeat (4) @(posedge clk);
    checks++;
    if (first_out - first_in != 2) begin failures++; $display("FAIL latency %0d", first_out - first_in); end
    checks++;
    if (stalls == 0) begin failures++; $display("FAIL no stall"); end
    begin
      real f;
      f = real'($signed(freq)) / real'(1 << NIM);
      checks++;
      if (f - OMEGA > 0.25 || OMEGA - f > 0.25) begin failures++; $display("FAIL freq %f", f); end
    end
    $display("blocks out %0d, stalls %0d", blk_out, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    if (first_out < 0) first_out = cyc;
    for (int k = 0; k < P; k++) begin
      int z, t, r;
      z = zq.pop_front(); t = tq.pop_front();
      r = ((t - int'(psi[k]) - z) % 1024 + 1024 + 512) % 1024 - 512;
      if (blk_out > 600) begin
        checks++;
        if (r > 12 || r < -12) begin
          failures++;
          if (failures < 10) $display("FAIL residual %0d at block %0d lane %0d", r, blk_out, k);
        end
      end
    end
    blk_out++;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

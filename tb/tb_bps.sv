// tb_bps: the parallel blind phase search (P = 16, B = 32, N = 9) on random
// 16-QAM symbols whose carrier phase starts at 0.3 rad and turns slowly
// (one turn per 3000 symbols) with small additive noise. Checks: two-cycle
// latency; every output sample sliced equals the symbol sent (N-1)/2
// symbols before, i.e. the estimate tracks the phase through quadrant
// crossings without slips; the reported phase is within 2 steps of the
// true phase; the unwrap crossed a quadrant at least 4 times; random input
// stalls change nothing.
module tb_bps;
  import cr_pkg::*;
  localparam int P = 16, B = 32, N = 9, UW = $clog2(4 * B);
  localparam real TWO_PI = 2.0 * 3.141592653589793;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n, in_valid, out_valid;
  cplx_t r_in [P], r_out [P];
  logic [UW-1:0] phase [P];

  bps #(.P(P), .B(B), .N(N)) dut (.clk, .rst_n, .in_valid, .r_in, .out_valid, .r_out, .phase);

  int si_q [$], sq_q [$];
  real ph_q [$];
  int cyc = 0, first_in = -1, first_out = -1, blk_out = 0, crossings = 0, stalls = 0;
  int last_quadrant = 0;
  always @(posedge clk) cyc++;

  initial begin
    int n = 0;
    rst_n = 0; in_valid = 0;
    for (int k = 0; k < P; k++) r_in[k] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int c = 0; c < 700; c++) begin
      @(negedge clk);
      in_valid = (c < 10) || ($urandom_range(7) != 0);
      if (!in_valid) stalls++;
      if (in_valid) begin
        if (first_in < 0) first_in = cyc + 1;
        for (int k = 0; k < P; k++) begin
          int si, sq;
          real ph, re, im;
          si = 2 * int'($urandom_range(3)) - 3;
          sq = 2 * int'($urandom_range(3)) - 3;
          ph = 0.3 + TWO_PI * real'(n) / 3000.0;
          re = 64.0 * (real'(si) * $cos(ph) - real'(sq) * $sin(ph)) + real'(int'($urandom_range(6)) - 3);
          im = 64.0 * (real'(si) * $sin(ph) + real'(sq) * $cos(ph)) + real'(int'($urandom_range(6)) - 3);
          r_in[k].i = iq_t'(int'(re));
          r_in[k].q = iq_t'(int'(im));
          si_q.push_back(si); sq_q.push_back(sq); ph_q.push_back(ph);
          n++;
        end
      end
    end
    @(negedge clk); in_valid = 0;
    repeat (4) @(posedge clk);
    checks += 3;
    if (first_out - first_in != 2) begin failures++; $display("FAIL latency %0d", first_out - first_in); end
    if (crossings < 4) begin failures++; $display("FAIL only %0d quadrant crossings", crossings); end
    if (stalls == 0) begin failures++; $display("FAIL no stall"); end
    $display("blocks %0d crossings %0d stalls %0d", blk_out, crossings, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output lane k is the sample (N-1)/2 before input lane k
  always @(posedge clk) if (rst_n && out_valid) begin
    if (first_out < 0) first_out = cyc;
    for (int k = 0; k < P; k++) begin
      int idx, si, sq, di, dq, ep, dp, q;
      idx = blk_out * P + k - (N - 1) / 2;
      if (idx >= 0) begin
        si = si_q[idx]; sq = sq_q[idx];
        di = (r_out[k].i >= 128) ? 3 : (r_out[k].i >= 0) ? 1 : (r_out[k].i >= -128) ? -1 : -3;
        dq = (r_out[k].q >= 128) ? 3 : (r_out[k].q >= 0) ? 1 : (r_out[k].q >= -128) ? -1 : -3;
        ep = int'(ph_q[idx] / TWO_PI * real'(4 * B)) % (4 * B);
        dp = ((int'(phase[k]) - ep) % (4 * B) + 4 * B + 2 * B) % (4 * B) - 2 * B;
        q  = int'(phase[k]) / B;
        if (q != last_quadrant) crossings++;
        last_quadrant = q;
        if (idx >= 2 * P) begin
          checks += 2;
          if (di != si || dq != sq) begin
            failures++;
            if (failures < 10) $display("FAIL symbol %0d: got %0d,%0d sent %0d,%0d", idx, di, dq, si, sq);
          end
          if (dp > 2 || dp < -2) begin
            failures++;
            if (failures < 10) $display("FAIL phase %0d: got %0d exp %0d", idx, phase[k], ep);
          end
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

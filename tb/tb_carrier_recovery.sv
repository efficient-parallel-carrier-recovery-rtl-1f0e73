// tb_carrier_recovery: end-to-end test of the two-stage carrier recovery at
// its default configuration (P = 64, B = 32, N = 21, gear shift after 512
// blocks).
//
// Channel model (generated here): random 16-QAM symbols (levels +-64,
// +-192), a carrier frequency offset of 200 MHz at 32 GBd, a sinusoidal
// frequency wander of 40 MHz amplitude, laser phase noise as a random walk
// (250 kHz linewidth) and small additive noise. Random input stalls.
// Checks:
//   - latency: out_valid seven cycles after in_valid;
//   - after the gear shift and settling, every decision equals the symbol
//     sent (N-1)/2 symbols before the output lane, up to one fixed
//     rotation by a multiple of pi/2 (the ambiguity that differential
//     quadrant coding resolves);
//   - the differentially decoded data, eight cycles after the input, equal
//     the data the sent symbols carry (quadrant change from the previous
//     symbol and position inside the quadrant), with no rotation allowed;
//   - the frequency estimate is within 5 MHz of the true, wandering
//     frequency at the end (the loop lags a fast wander slightly);
//   - mechanisms seen at least once: input stall, gear shift, all three
//     tentative decisions of the DPLL, a quadrant crossing of the phase
//     search unwrap.
module tb_carrier_recovery;
  import cr_pkg::*;
  localparam int P = 64, N = 21, NBLK = 1100, SETTLE = 800;
  localparam real TWO_PI = 2.0 * 3.141592653589793;
  localparam real RS = 32.0e9;
  localparam real F0 = 200.0e6, AP = 40.0e6, FTONE = 2.0e6, LW = 250.0e3;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n, in_valid, out_valid, tracking;
  cplx_t r_in [P], r_hat [P];
  logic [3:0] dec [P];
  logic [6:0] bps_phase [P];
  logic [23:0] freq_est;
  logic data_valid;
  logic [3:0] data [P];

  carrier_recovery dut (.clk, .rst_n, .in_valid, .r_in, .out_valid, .r_hat, .dec,
    .bps_phase, .freq_est, .tracking, .data_valid, .data);

  byte si_q [$], sq_q [$];
  int cyc = 0, first_in = -1, first_out = -1, blk_out = 0, stalls = 0;
  int crossings = 0, last_q = 0, rot = -1, sym_checked = 0;
  int first_data = -1, blk_data = 0, data_checked = 0;
  int rho_seen [3];
  bit gear_seen = 0;
  always @(posedge clk) cyc++;

  // mechanisms observed inside the design
  always @(posedge clk) if (rst_n) begin
    if (tracking) gear_seen = 1;
    for (int k = 0; k < P; k++) begin
      if (dut.u_dpll.rho_q[k] == qphase_t'(ALPHA0)) rho_seen[0]++;
      else if (dut.u_dpll.rho_q[k] == qphase_t'(ALPHA1)) rho_seen[1]++;
      else rho_seen[2]++;
    end
  end

  // rotate (si, sq) by q quarter turns
  function automatic void rot90(int q, inout int a, inout int b);
    for (int i = 0; i < q; i++) begin int t; t = a; a = -b; b = t; end
  endfunction

  // quadrant (0..3 counter-clockwise from I>0, Q>0) of a sent symbol and
  // its position bits {|I| = 3, |Q| = 3} once turned back to the first
  // quadrant
  function automatic void quad_pos(int a, int b, output int quad, output int pos);
    quad = 0;
    for (int r = 0; r < 4; r++) begin
      int x, y;
      x = a; y = b;
      rot90((4 - r) % 4, x, y);
      if (x > 0 && y > 0) begin
        quad = r;
        pos = ((x == 3) ? 2 : 0) + ((y == 3) ? 1 : 0);
      end
    end
  endfunction

  initial begin
    real ph, fdev, gauss;
    int n;
    ph = 0.7; n = 0;
    rst_n = 0; in_valid = 0;
    for (int k = 0; k < P; k++) r_in[k] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int c = 0; c < NBLK; c++) begin
      @(negedge clk);
      in_valid = (c < 10) || ($urandom_range(15) != 0);
      if (!in_valid) stalls++;
      if (in_valid) begin
        if (first_in < 0) first_in = cyc + 1;
        for (int k = 0; k < P; k++) begin
          int si, sq;
          real re, im;
          si = 2 * int'($urandom_range(3)) - 3;
          sq = 2 * int'($urandom_range(3)) - 3;
          re = 64.0 * (real'(si) * $cos(ph) - real'(sq) * $sin(ph)) + real'(int'($urandom_range(8)) - 4);
          im = 64.0 * (real'(si) * $sin(ph) + real'(sq) * $cos(ph)) + real'(int'($urandom_range(8)) - 4);
          r_in[k].i = iq_t'(int'(re));
          r_in[k].q = iq_t'(int'(im));
          si_q.push_back(byte'(si)); sq_q.push_back(byte'(sq));
          // carrier: offset + sinusoidal wander + random-walk phase noise
          fdev  = F0 + AP * $sin(TWO_PI * FTONE * real'(n) / RS);
          gauss = (real'($urandom_range(1000)) + real'($urandom_range(1000)) + real'($urandom_range(1000))
                   - 1500.0) / 500.0;     // approx. unit variance
          ph = ph + TWO_PI * fdev / RS + $sqrt(TWO_PI * LW / RS) * gauss;
          n++;
        end
      end
    end
    @(negedge clk); in_valid = 0;
    repeat (10) @(posedge clk);
    begin
      real f_hz;
      f_hz = real'($signed(freq_est)) / real'(1 << 12) / 4096.0 * RS;
      // the wander at the last symbol
      fdev = F0 + AP * $sin(TWO_PI * FTONE * real'(n) / RS);
      checks++;
      if (f_hz - fdev > 5.0e6 || fdev - f_hz > 5.0e6) begin
        failures++; $display("FAIL frequency estimate %f MHz, true %f MHz", f_hz / 1e6, fdev / 1e6);
      end
      $display("frequency estimate %0.2f MHz (true %0.2f MHz)", f_hz / 1e6, fdev / 1e6);
    end
    checks += 6;
    if (first_out - first_in != 7) begin failures++; $display("FAIL latency %0d", first_out - first_in); end
    if (stalls == 0)      begin failures++; $display("FAIL no input stall"); end
    if (!gear_seen)       begin failures++; $display("FAIL no gear shift"); end
    for (int i = 0; i < 3; i++)
      if (rho_seen[i] == 0) begin failures++; $display("FAIL tentative decision %0d never taken", i); end
    checks++;
    if (crossings == 0)   begin failures++; $display("FAIL no quadrant crossing in the phase search"); end
    checks += 2;
    if (first_data - first_in != 8) begin failures++; $display("FAIL data latency %0d", first_data - first_in); end
    if (data_checked < 10000) begin failures++; $display("FAIL only %0d data symbols checked", data_checked); end
    checks++;
    if (sym_checked < 10000) begin failures++; $display("FAIL only %0d symbols checked", sym_checked); end
    $display("data symbols checked %0d", data_checked);
    $display("blocks %0d, stalls %0d, symbols checked %0d, rotation %0d, crossings %0d, rho %0d/%0d/%0d",
             blk_out, stalls, sym_checked, rot, crossings, rho_seen[0], rho_seen[1], rho_seen[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    if (first_out < 0) first_out = cyc;
    for (int k = 0; k < P; k++) begin
      int idx, si, sq, di, dq, q;
      q = int'(bps_phase[k]) / 32;
      if (q != last_q) crossings++;
      last_q = q;
      idx = blk_out * P + k - (N - 1) / 2;
      if (blk_out >= SETTLE && idx >= 0) begin
        di = 2 * int'(dec[k][3:2]) - 3;
        dq = 2 * int'(dec[k][1:0]) - 3;
        if (rot < 0) begin
          for (int r = 0; r < 4; r++) begin
            si = si_q[idx]; sq = sq_q[idx];
            rot90(r, si, sq);
            if (si == di && sq == dq) rot = r;
          end
          if (rot < 0) rot = 0;
        end
        si = si_q[idx]; sq = sq_q[idx];
        rot90(rot, si, sq);
        checks++;
        sym_checked++;
        if (si != di || sq != dq) begin
          failures++;
          if (failures < 10) $display("FAIL symbol %0d: got %0d,%0d expected %0d,%0d", idx, di, dq, si, sq);
        end
      end
    end
    blk_out++;
  end

  always @(posedge clk) if (rst_n && data_valid) begin
    if (first_data < 0) first_data = cyc;
    for (int k = 0; k < P; k++) begin
      int idx, qc, pc, qp, pp, want;
      idx = blk_data * P + k - (N - 1) / 2;
      if (blk_data >= SETTLE && idx >= 1) begin
        quad_pos(si_q[idx], sq_q[idx], qc, pc);
        quad_pos(si_q[idx-1], sq_q[idx-1], qp, pp);
        want = (((qc - qp + 4) % 4) << 2) | pc;
        checks++;
        data_checked++;
        if (int'(data[k]) != want) begin
          failures++;
          if (failures < 10) $display("FAIL data %0d: got %h expected %h", idx, data[k], want);
        end
      end
    end
    blk_data++;
  end

  initial begin
    repeat (NBLK + 200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

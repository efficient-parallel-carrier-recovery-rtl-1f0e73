// tb_qam16_diff_decoder: self-checking testbench for qam16_diff_decoder.
//
// A transmitter model draws 4 data bits per symbol, adds the first two to
// the running quadrant number and places the point given by the last two
// in that quadrant, by turning a first-quadrant point a quarter turn at a
// time with (i, q) -> (-q, i). The symbols then pass a channel that turns
// every one by a fixed multiple of pi/2, a multiple that changes now and
// then (a cycle slip), and are sliced back to indices. The decoder's data
// must equal the sent data on every symbol except the first after reset
// and the one right after each slip. Blocks come with random gaps of
// in_valid low, and out_valid must follow in_valid by exactly one cycle.
module tb_qam16_diff_decoder;
  localparam int P      = 8;
  localparam int BLOCKS = 3000;

  logic       clk = 1'b0;
  logic       rst_n;
  logic       in_valid;
  logic [3:0] dec  [P];
  logic       out_valid;
  logic [3:0] data [P];

  int checks = 0, failures = 0, slips = 0, skipped = 0;

  qam16_diff_decoder #(.P(P)) dut (.*);

  always #1 clk = ~clk;

  initial begin
    repeat (20 * BLOCKS) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Index 0..3 of a level in {-3, -1, 1, 3}.
  function automatic logic [1:0] idx(int lev);
    return 2'((lev + 3) / 2);
  endfunction

  logic [3:0] exp_data [P];
  bit         exp_skip [P];
  bit         pend;

  always @(posedge clk) begin
    if (rst_n) begin
      if (out_valid !== pend) begin
        failures++;
        $display("out_valid %0b, expected %0b", out_valid, pend);
      end
      checks++;
      if (out_valid && pend) begin
        for (int k = 0; k < P; k++) begin
          if (exp_skip[k]) begin
            skipped++;
            continue;
          end
          checks++;
          if (data[k] !== exp_data[k]) begin
            failures++;
            if (failures < 10)
              $display("lane %0d: data %h, expected %h", k, data[k], exp_data[k]);
          end
        end
      end
    end
  end

  initial begin
    int tx_quad, rot;
    bit first;
    rst_n    = 1'b0;
    in_valid = 1'b0;
    pend     = 1'b0;
    tx_quad  = 0;
    rot      = 0;
    first    = 1'b1;
    for (int k = 0; k < P; k++) dec[k] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int b = 0; b < BLOCKS; b++) begin
      logic [3:0] d [P];
      bit         s [P];
      @(negedge clk);
      for (int k = 0; k < P; k++) begin
        int i, q, t, turns;
        d[k] = 4'($urandom);
        s[k] = first;
        first = 1'b0;
        if ($urandom_range(0, 199) == 0) begin
          rot = (rot + $urandom_range(1, 3)) % 4;
          s[k] = 1'b1;
          slips++;
        end
        tx_quad = (tx_quad + int'(d[k][3:2])) % 4;
        i = d[k][1] ? 3 : 1;
        q = d[k][0] ? 3 : 1;
        turns = (tx_quad + rot) % 4;
        for (int r = 0; r < turns; r++) begin
          t = i; i = -q; q = t;
        end
        dec[k] = {idx(i), idx(q)};
      end
      in_valid = 1'b1;
      @(posedge clk);
      #0;
      pend = 1'b1;
      exp_data = d;
      exp_skip = s;
      @(negedge clk);
      in_valid = 1'b0;
      @(posedge clk);
      #0;
      pend = 1'b0;
      repeat ($urandom_range(0, 2)) @(posedge clk);
    end
    repeat (3) @(posedge clk);
    checks++;
    if (slips == 0) begin
      failures++;
      $display("no cycle slip was applied");
    end
    $display("slips %0d, symbols skipped %0d", slips, skipped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

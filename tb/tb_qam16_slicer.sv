// tb_qam16_slicer: exhaustive check of the 16-QAM axis decision over all
// 10-bit inputs: nearest level of -192, -64, 64, 192 (ties at 0 and +-128
// go up).
module tb_qam16_slicer;
  import cr_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  iq_t x, level;
  logic [1:0] sym;
  qam16_slicer dut (.x(x), .level(level), .sym(sym));
  initial begin
    int levs [4] = '{-192, -64, 64, 192};
    for (int v = -512; v < 512; v++) begin
      int best, bd;
      best = 0; bd = 1 << 20;
      for (int j = 0; j < 4; j++) begin
        int d;
        d = (v - levs[j]) < 0 ? levs[j] - v : v - levs[j];
        if (d <= bd) begin bd = d; best = j; end
      end
      x = iq_t'(v);
      @(posedge clk);
      checks++;
      if (int'(sym) != best || int'(level) != levs[best]) begin
        failures++;
        $display("FAIL x=%0d sym=%0d level=%0d exp=%0d", v, sym, level, best);
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

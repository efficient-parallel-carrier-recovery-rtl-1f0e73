// tb_derotator: random samples and angles; the output must equal
// r * exp(-j a) computed in floating point within 2 LSB per component
// (table quantisation of 2*pi/1024 plus rounding).
module tb_derotator;
  import cr_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  cplx_t din, dout;
  phase_t angle;
  derotator #(.LUT_BITS(10)) dut (.din(din), .angle(angle), .dout(dout));
  initial begin
    for (int i = 0; i < 4000; i++) begin
      int xi, yi, a;
      real ar, er, ei;
      xi = int'($urandom_range(500)) - 250;
      yi = int'($urandom_range(500)) - 250;
      a  = $urandom_range(4095);
      din.i = iq_t'(xi); din.q = iq_t'(yi); angle = phase_t'(a);
      @(posedge clk);
      ar = 2.0 * 3.141592653589793 * real'(a) / 4096.0;
      er = real'(xi) * $cos(ar) + real'(yi) * $sin(ar);
      ei = real'(yi) * $cos(ar) - real'(xi) * $sin(ar);
      checks += 2;
      if ((real'(dout.i) - er > 2.0 || er - real'(dout.i) > 2.0)) begin failures++; $display("FAIL re %0d %f", dout.i, er); end
      if ((real'(dout.q) - ei > 2.0 || ei - real'(dout.q) > 2.0)) begin failures++; $display("FAIL im %0d %f", dout.q, ei); end
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

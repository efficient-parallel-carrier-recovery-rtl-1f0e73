// tb_cordic_vec: random samples in all four quadrants; the phase must match
// atan2 within 2 binary-angle LSB (2*pi = 4096) and the magnitude must
// match 1.6468*|r| within 2 LSB.
module tb_cordic_vec;
  import cr_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  iq_t x, y;
  phase_t theta;
  mag_t mag;
  cordic_vec dut (.x(x), .y(y), .theta(theta), .mag(mag));
  initial begin
    for (int i = 0; i < 4000; i++) begin
      int xi, yi, ea, da;
      real m;
      do begin
        xi = int'($urandom_range(600)) - 300;
        yi = int'($urandom_range(600)) - 300;
      end while (xi * xi + yi * yi < 400);
      x = iq_t'(xi); y = iq_t'(yi);
      @(posedge clk);
      ea = int'($atan2(real'(yi), real'(xi)) / (2.0 * 3.141592653589793) * 4096.0);
      da = ((int'(theta) - ea) % 4096 + 4096 + 2048) % 4096 - 2048;
      m  = $sqrt(real'(xi * xi + yi * yi)) * 1.646760258;
      checks += 2;
      if (da > 2 || da < -2) begin
        failures++;
        $display("FAIL phase x=%0d y=%0d theta=%0d exp=%0d", xi, yi, theta, ea);
      end
      if (real'(mag) - m > 2.0 || m - real'(mag) > 2.0) begin
        failures++;
        $display("FAIL mag x=%0d y=%0d mag=%0d exp=%f", xi, yi, mag, m);
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

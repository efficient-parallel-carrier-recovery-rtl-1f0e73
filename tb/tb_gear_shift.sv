// tb_gear_shift: the acquisition gains hold for exactly ACQ_CYCLES valid
// blocks (invalid cycles do not count), then the tracking gains apply and
// stay.
module tb_gear_shift;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst_n, valid, tracking;
  logic [2:0] np;
  logic [3:0] ni;
  gear_shift #(.ACQ_CYCLES(20), .NP_ACQ(4), .NI_ACQ(8), .NP_TRK(6), .NI_TRK(10)) dut (
    .clk, .rst_n, .valid, .np, .ni, .tracking);
  initial begin
    int nvalid;
    rst_n = 0; valid = 0; nvalid = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 80; c++) begin
      @(negedge clk);
      checks++;
      if (nvalid < 20) begin
        if (np != 3'd4 || ni != 4'd8 || tracking) begin failures++; $display("FAIL acq at %0d", nvalid); end
      end else begin
        if (np != 3'd6 || ni != 4'd10 || !tracking) begin failures++; $display("FAIL trk at %0d", nvalid); end
      end
      valid = (c % 3 != 0);
      @(posedge clk);
      if (valid) nvalid++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

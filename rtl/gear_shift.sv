// gear_shift: loop-gain schedule of the DPLL.
//
// After reset the loop runs with the larger acquisition gains
// Kp = 2^-NP_ACQ, Ki = 2^-NI_ACQ for ACQ_CYCLES valid blocks, which widens
// the capture range and speeds up pull-in; it then switches once to the
// tracking gains Kp = 2^-NP_TRK, Ki = 2^-NI_TRK (2^-6 and 2^-12 for P = 64).
// That gears are shifted during capture is given; the single switch, its
// time and the acquisition gains are this design's choice.
// Outputs are registered; tracking goes high with the switch.
module gear_shift #(
  parameter int ACQ_CYCLES = 512,
  parameter int NP_ACQ     = 5,
  parameter int NI_ACQ     = 11,
  parameter int NP_TRK     = 6,
  parameter int NI_TRK     = 12
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       valid,
  output logic [2:0] np,
  output logic [3:0] ni,
  output logic       tracking
);
  localparam int CW = $clog2(ACQ_CYCLES + 1);
  logic [CW-1:0] count;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count    <= '0;
      tracking <= 1'b0;
    end else if (valid && !tracking) begin
      if (count == CW'(ACQ_CYCLES - 1)) tracking <= 1'b1;
      count <= count + 1'b1;
    end
  end

  assign np = tracking ? 3'(NP_TRK) : 3'(NP_ACQ);
  assign ni = tracking ? 4'(NI_TRK) : 4'(NI_ACQ);
endmodule

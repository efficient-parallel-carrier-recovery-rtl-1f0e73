// qam16_slicer: 16-QAM decision on one axis.
//
// Returns the nearest of the levels -3A, -A, +A, +3A (A = QAM_A) and its
// index 0..3 (Gray-free natural order, -3A = 0). Thresholds are at 0 and
// +-2A. Used as the final slicer and as Q(.) inside the blind phase search.
// Combinational.
module qam16_slicer
  import cr_pkg::*;
(
  input  iq_t        x,
  output iq_t        level,
  output logic [1:0] sym
);
  always_comb begin
    if (x >= iq_t'(2 * QAM_A))      sym = 2'd3;
    else if (x >= 0)                sym = 2'd2;
    else if (x >= -iq_t'(2 * QAM_A)) sym = 2'd1;
    else                            sym = 2'd0;
    unique case (sym)
      2'd3:    level = iq_t'(3 * QAM_A);
      2'd2:    level = iq_t'(QAM_A);
      2'd1:    level = -iq_t'(QAM_A);
      default: level = -iq_t'(3 * QAM_A);
    endcase
  end
endmodule

// qam16_diff_decoder: differential quadrant decoding of 16-QAM decisions.
//
// The carrier loops recover the phase only modulo pi/2, so the receiver's
// decisions may be turned by a fixed multiple of pi/2, and a cycle slip
// changes that multiple. With the quadrant coded differentially, two bits
// per symbol are the change of quadrant from the previous symbol, which no
// fixed rotation alters, and the other two bits give the point's position
// inside its quadrant, read after turning the point back into the first
// quadrant, which is also rotation invariant. A slip then costs one symbol
// instead of all that follow.
//
// Quadrants are numbered counter-clockwise from the first (I>0, Q>0) = 0.
// Per lane: dq = (q_n - q_{n-1}) mod 4 and pos = {|I'| = 3A, |Q'| = 3A}
// where (I', Q') is the point turned back by q_n quarter turns. The
// quadrant of the last lane is kept for the next block. One register
// stage; out_valid follows in_valid by one cycle. That the symbols are
// differentially coded in quadrant is given; this bit mapping is this
// design's choice.
module qam16_diff_decoder #(
  parameter int P = 64
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic [3:0] dec  [P],   // {I index, Q index}, 0..3 = -3A..3A
  output logic       out_valid,
  output logic [3:0] data [P]    // {dq, pos}
);
  logic [1:0] quad [P];
  logic [1:0] pos  [P];
  logic [1:0] prev [P];      // quadrant of the symbol before lane k
  logic [1:0] last_quad;

  always_comb begin
    for (int k = 0; k < P; k++) begin
      logic ip, qp;       // sign of I and Q (1 = positive)
      logic io, qo;       // outer level on I and Q
      ip = dec[k][3];
      qp = dec[k][1];
      io = (dec[k][3:2] == 2'd0) || (dec[k][3:2] == 2'd3);
      qo = (dec[k][1:0] == 2'd0) || (dec[k][1:0] == 2'd3);
      unique case ({ip, qp})
        2'b11:   begin quad[k] = 2'd0; pos[k] = {io, qo}; end
        2'b01:   begin quad[k] = 2'd1; pos[k] = {qo, io}; end
        2'b00:   begin quad[k] = 2'd2; pos[k] = {io, qo}; end
        default: begin quad[k] = 2'd3; pos[k] = {qo, io}; end
      endcase
    end
    prev[0] = last_quad;
    for (int k = 1; k < P; k++) prev[k] = quad[k-1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      last_quad <= '0;
      for (int k = 0; k < P; k++) data[k] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        for (int k = 0; k < P; k++)
          data[k] <= {quad[k] - prev[k], pos[k]};
        last_quad <= quad[P-1];
      end
    end
  end
endmodule

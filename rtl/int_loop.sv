// int_loop: low-latency parallel integral loop of the phase-domain DPLL.
//
//   psi_i[m] = base + (m+1) * acc,  m = 0..P-1     (psi_i_{n+m})
// is the integral phase of the m-th symbol of the block now entering the
// DPLL (nco_adv high); with that block the NCO advances,
//   base  <- base + P * acc                        (integral NCO, psi_i_{n-1})
// and for every block of P phase errors e_k (err_valid)
//   acc   <- acc + Ki * sum_k e_k                  (frequency estimate, Ki*acc)
// Advancing the NCO by the blocks that enter, not by the errors that come
// back, keeps its phase tied to the symbol index when the input stalls.
// acc carries NI_MAX fraction bits below the phase LSB, so acc is directly
// the phase advance per symbol, and Ki = 2^-ni is a left shift by
// NI_MAX-ni before accumulation. The published loop accumulates the raw
// errors and multiplies by Ki afterwards; for a fixed gain this is the same
// number, and multiplying first keeps the frequency estimate continuous when
// the gain is switched (gear shifting). All phase arithmetic wraps modulo
// 2*pi; a frequency word that wraps aliases to the same phase advance.
//
// Timing: the outputs are combinational from the registers; errors
// presented in one cycle change psi_i after the next edge.
module int_loop
  import cr_pkg::*;
#(
  parameter int P      = 64,
  parameter int NI_MAX = 12
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 nco_adv,     // a block enters the DPLL
  input  logic                 err_valid,   // err holds a block's errors
  input  perr_t                err   [P],
  input  logic [3:0]           ni,          // Ki = 2^-ni, ni <= NI_MAX
  output phase_t               psi_i [P],
  output logic [PH_W+NI_MAX-1:0] freq       // Ki*acc (two's complement)
);
  localparam int AW = PH_W + NI_MAX;        // NCO and frequency word width
  localparam int SW = EW + $clog2(P) + 1;

  logic [AW-1:0]        acc;     // frequency word, wraps modulo 2*pi
  logic [AW-1:0]        base;    // psi_i_{n-1}
  logic signed [SW-1:0] esum;
  logic [AW-1:0]        inc;

  always_comb begin
    esum = '0;
    for (int k = 0; k < P; k++) esum += SW'(err[k]);
    inc = AW'(signed'(esum));
    inc = inc << (NI_MAX - int'(ni));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc  <= '0;
      base <= '0;
    end else begin
      if (err_valid) acc  <= acc + inc;
      if (nco_adv)   base <= base + AW'(P) * acc;
    end
  end

  for (genvar m = 0; m < P; m++) begin : g_lane
    logic [AW-1:0] full;
    assign full     = base + AW'(m + 1) * acc;
    assign psi_i[m] = full[AW-1 -: PH_W];
  end

  assign freq = acc;
endmodule

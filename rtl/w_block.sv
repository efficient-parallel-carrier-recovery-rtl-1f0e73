// w_block: block W_m of the low-latency parallel proportional loop.
//
// Computes the proportional NCO phase of the (m+1)-th symbol of a block
// directly from the phase fed back at the end of the previous block:
//
//   psi_p_{n+m} = psi_p_{n-1} + Kp * sum_{k=0..m} [ (phi_hat_{n+k} - psi_p_{n-1}) mod pi/2
//                                                  - rho_hat_{n+k} ]
//
// with NT = m+1 terms and Kp = 2^-np. Neglecting the Kp*e terms inside the
// sum is what removes the serial dependency between the symbols of a block.
// The NCO phase carries NP_MAX fraction bits below the binary-angle LSB so
// the shift by np <= NP_MAX loses nothing; all arithmetic wraps modulo 2*pi.
// The sum is written as one expression; synthesis chooses the fast adder
// (a carry-save tree is the intended structure). Combinational.
module w_block
  import cr_pkg::*;
#(
  parameter int NT     = 64,  // number of terms (m+1)
  parameter int NP_MAX = 6    // fraction bits of the NCO, largest np
) (
  input  phase_t                 phi_hat [NT],
  input  qphase_t                rho     [NT],
  input  logic [PH_W+NP_MAX-1:0] psi_prev,     // psi_p_{n-1}, with fraction bits
  input  logic [2:0]             np,           // Kp = 2^-np, np <= NP_MAX
  output logic [PH_W+NP_MAX-1:0] psi           // psi_p_{n+m}
);
  localparam int SW = EW + $clog2(NT) + 1;      // width of the error sum
  localparam int AW = PH_W + NP_MAX;

  phase_t               psi_top;
  logic signed [SW-1:0] sum;
  logic signed [AW-1:0] step;

  always_comb begin
    psi_top = psi_prev[AW-1 -: PH_W];
    sum = '0;
    for (int k = 0; k < NT; k++) begin
      sum += SW'(signed'({1'b0, qphase_t'(phi_hat[k] - psi_top)}))
           - SW'(signed'({1'b0, rho[k]}));
    end
    step = AW'(sum);                        // wraps modulo 2*pi
    step = step <<< (NP_MAX - int'(np));
    psi  = psi_prev + step;
  end
endmodule

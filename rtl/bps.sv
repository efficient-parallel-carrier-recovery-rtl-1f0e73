// bps: parallel blind phase search (second carrier recovery stage), removing
// the laser phase noise left after the DPLL.
//
// For each of B test phases phi_b = b/B * pi/2 every sample is rotated by
// -phi_b, sliced, and its squared distance |d|^2 to the decision is formed
// (bps_branch). The distances of N consecutive samples are summed for every
// test phase, the phase with the smallest sum is the estimate for the
// sample in the middle of those N, and that sample is rotated back by it.
// Estimates live in [0, pi/2); an unwrapper turns them into a continuous
// phase by taking any step larger than pi/4 between consecutive estimates
// as a crossing into the next quadrant.
//
// Parallel form (P samples per clock, lane 0 oldest):
//   cycle 0: P x B branches; distances and samples are registered together
//            with the previous block's, so windows may reach back N-1 lanes.
//   cycle 1: prefix sums give the N-sample window of every lane and phase,
//            a minimum search picks b, the unwrap runs across the lanes from
//            the last estimate of the previous block, and the sample
//            (N-1)/2 symbols older than lane k's newest is derotated.
// Outputs are registered: out_valid follows in_valid by two cycles and lane
// k of r_out is the input sample (N-1)/2 symbols before input lane k.
// phase is the unwrapped estimate modulo 2*pi in units of 2*pi/(4B).
// Requires N odd and N-1 <= P. Ties in the minimum take the lower b. The
// window layout, tie rule and unwrap rule are this design's choice.
module bps
  import cr_pkg::*;
#(
  parameter int P = 64,
  parameter int B = 32,
  parameter int N = 21
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  cplx_t           r_in  [P],
  output logic            out_valid,
  output cplx_t           r_out [P],
  output logic [$clog2(4*B)-1:0] phase [P]
);
  localparam int DW = 2 * IQ_W;                 // |d|^2 width
  localparam int SW = DW + $clog2(P + N);       // window / prefix sum width
  localparam int H  = N - 1;                    // lanes kept from last block
  localparam int BW = $clog2(B);
  localparam int UW = $clog2(4 * B);

  typedef logic [DW-1:0] d2_t;
  typedef logic [SW-1:0] sum_t;

  d2_t   d2_c   [P][B];
  d2_t   d2_cur [P][B];
  d2_t   d2_old [H][B];
  cplx_t r_cur  [P];
  cplx_t r_old  [H];
  logic  v1;

  for (genvar k = 0; k < P; k++) begin : g_lane
    for (genvar b = 0; b < B; b++) begin : g_ph
      bps_branch #(.B(B), .BIDX(b)) u_br (.din(r_in[k]), .d2(d2_c[k][b]));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0;
      for (int k = 0; k < P; k++) begin
        r_cur[k] <= '0;
        for (int b = 0; b < B; b++) d2_cur[k][b] <= '0;
      end
      for (int k = 0; k < H; k++) begin
        r_old[k] <= '0;
        for (int b = 0; b < B; b++) d2_old[k][b] <= '0;
      end
    end else begin
      v1 <= in_valid;
      if (in_valid) begin
        for (int k = 0; k < H; k++) begin
          r_old[k]  <= r_cur[P-H+k];
          d2_old[k] <= d2_cur[P-H+k];
        end
        r_cur  <= r_in;
        d2_cur <= d2_c;
      end
    end
  end

  // ---- cycle 1: window sums, minimum search, unwrap, derotation ----------
  logic [BW-1:0] best  [P];
  logic [UW-1:0] uphase[P];
  cplx_t         center[P];
  cplx_t         rot   [P];
  logic [BW-1:0] last_best;
  logic [UW-1:0] last_phase;

  sum_t win_min [P];

  always_comb begin
    for (int k = 0; k < P; k++) begin
      best[k]    = '0;
      win_min[k] = '1;
    end
    for (int b = 0; b < B; b++) begin
      sum_t cum [P+H+1];
      cum[0] = '0;
      for (int j = 0; j < P + H; j++)
        cum[j+1] = cum[j] + SW'(j < H ? d2_old[j][b] : d2_cur[j-H][b]);
      for (int k = 0; k < P; k++) begin
        sum_t s;
        s = cum[k+N] - cum[k];
        if (b == 0 || s < win_min[k]) begin
          best[k] = BW'(b);
          win_min[k] = s;
        end
      end
    end
  end

  always_comb begin
    logic [BW-1:0] prev_b;
    logic [UW-1:0] prev_u;
    logic [BW-1:0] step;
    prev_b = last_best;
    prev_u = last_phase;
    for (int k = 0; k < P; k++) begin
      step      = best[k] - prev_b;                 // modulo B
      // step in [-B/2, B/2): sign-extend the modulo-B difference
      uphase[k] = prev_u + {{(UW-BW){step[BW-1]}}, step};
      prev_b    = best[k];
      prev_u    = uphase[k];
    end
    for (int k = 0; k < P; k++)
      center[k] = (k + H / 2 < H) ? r_old[k + H / 2] : r_cur[k + H / 2 - H];
  end

  for (genvar k = 0; k < P; k++) begin : g_rot
    derotator #(.LUT_BITS(UW)) u_rot (
      .din   (center[k]),
      .angle ({uphase[k], {(PH_W-UW){1'b0}}}),
      .dout  (rot[k])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid  <= 1'b0;
      last_best  <= '0;
      last_phase <= '0;
      for (int k = 0; k < P; k++) begin
        r_out[k] <= '0;
        phase[k] <= '0;
      end
    end else begin
      out_valid <= v1;
      if (v1) begin
        r_out      <= rot;
        phase      <= uphase;
        last_best  <= best[P-1];
        last_phase <= uphase[P-1];
      end
    end
  end
endmodule

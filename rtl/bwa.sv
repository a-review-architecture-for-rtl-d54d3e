// bwa -- butterfly-formed weight accumulator (BWA), general and revised form.
//
// Counts the 1s among IN_W input bits of equal weight 2**BASE_LOG2 and
// reports the count as a set of output bits, each of a power-of-two weight.
// The inputs are zero-padded to W = 2**M bits, M = ceil(log2(IN_W)). M
// stages of W/2 half adders follow. In stage s the vector is split into
// 2**s blocks of equal weight; inside a block, inputs 2i and 2i+1 go to one
// half adder whose carry goes to position i of the block and whose sum goes
// to position i + half. The carries of a block thus form the next stage's
// first half-block (twice the weight) and the sums its second half-block
// (same weight): carry bits are only ever added to carry bits and sum bits
// to sum bits. Output j has weight 2**(BASE_LOG2 + M - popcount(j)), so for
// 8 inputs the outputs have the weights 8,4,4,2,4,2,2,1 and
// count = 8*o[0] + 4*(o[1]+o[2]+o[4]) + 2*(o[3]+o[5]+o[6]) + o[7].
//
// Revised form: only the range of the count matters, so a block whose
// weight exceeds 2**PMAX_LOG2 (P_max) is not accumulated further. Its bits
// are ORed into or_out instead, and the half adders that would have
// processed it are left out. A set or_out means count*weight > P_max. The
// w_out bits whose weight exceeds P_max are tied to 0. With PMAX_LOG2 at
// least BASE_LOG2 + M nothing is pruned and the general form results.
// Where the pruned bits are combined (one OR tree per BWA, collecting
// every block at the stage where it first exceeds P_max) is this design's
// reading of the revised structure; the count it reports is exact.
//
// Interface: in[IN_W-1:0]; w_out[W-1:0] weighted bits; or_out. Combinational.
// Defaults: the 8-input BWA with P_max = 2 (R_MAX = 1) of the revised example.
module bwa #(
  parameter int IN_W      = 8,
  parameter int BASE_LOG2 = 0,
  parameter int PMAX_LOG2 = 1
) (
  input  logic [IN_W-1:0]                                 in,
  output logic [(1 << ecc_match_pkg::clog2i(IN_W))-1:0]   w_out,
  output logic                                            or_out
);
  import ecc_match_pkg::*;

  localparam int M = clog2i(IN_W);
  localparam int W = 1 << M;

  // Weight exponent of block b (s bits, 0 = carry branch) at stage s.
  function automatic int blk_exp(input int s, input int b);
    return BASE_LOG2 + s - popcnt(b);
  endfunction

  // Positions of v[s] that belong to blocks which exceed P_max at stage s
  // for the first time (their parent block was still accumulated).
  function automatic logic [W-1:0] fresh_dead(input int s);
    logic [W-1:0] m;
    int bs;
    m  = '0;
    bs = W >> s;
    for (int b = 0; b < (1 << s); b++) begin
      if (blk_exp(s, b) == PMAX_LOG2 + 1 && (s == 0 || (b & 1) == 0))
        for (int p = 0; p < bs; p++) m[b*bs + p] = 1'b1;
    end
    if (s == 0 && BASE_LOG2 > PMAX_LOG2) m = '1;
    return m;
  endfunction

  logic [W-1:0] v   [M+1];
  logic [M:0]   orc;

  assign v[0]   = W'(in);
  assign orc[0] = |(v[0] & fresh_dead(0));

  for (genvar s = 0; s < M; s++) begin : g_stage
    localparam int BS = W >> s;      // block size at stage s
    localparam int H  = BS / 2;
    for (genvar b = 0; b < (1 << s); b++) begin : g_blk
      if (blk_exp(s, b) <= PMAX_LOG2) begin : g_live
        for (genvar i = 0; i < H; i++) begin : g_ha
          half_adder u_ha (
            .a    (v[s][b*BS + 2*i]),
            .b    (v[s][b*BS + 2*i + 1]),
            .carry(v[s+1][b*BS + i]),
            .sum  (v[s+1][b*BS + H + i])
          );
        end
      end else begin : g_pruned
        assign v[s+1][b*BS +: BS] = '0;
      end
    end
    assign orc[s+1] = orc[s] | (|(v[s+1] & fresh_dead(s + 1)));
  end

  for (genvar j = 0; j < W; j++) begin : g_out
    if (bwa_exp(M, BASE_LOG2, j) <= PMAX_LOG2) begin : g_keep
      assign w_out[j] = v[M][j];
    end else begin : g_drop
      assign w_out[j] = 1'b0;
    end
  end

  assign or_out = orc[M];
endmodule

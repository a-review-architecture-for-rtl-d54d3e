// ecc_tag_matcher -- direct compare of an incoming tag with a stored
// codeword of a systematic error-correcting code, without decoding.
//
// The stored (retrieved) codeword is {data, parity}: its K-bit data part is
// the tag as written, its N-K parity bits were produced by the encoder when
// it was written. Instead of decoding it and comparing tags, the matcher
// asks whether the retrieved codeword lies within the correctable distance
// of the codeword the incoming tag would have:
//  * the data part is XORed with the incoming tag straight away, in
//    parallel with the encoder that computes the incoming tag's parity;
//  * the parity part is XORed with the encoder output;
//  * a first-level BWA on each difference vector counts its 1s
//    (revised form: bits heavier than P_max are ORed);
//  * the second level (interconnection, OR-gate tree, one BWA per weight
//    up to P_max) merges the two counts;
//  * the decision unit sorts the Hamming distance into four ranges and
//    raises match (d <= T_MAX), fault (T_MAX < d <= R_MAX) or mismatch.
// Because the data comparison does not wait for the encoder, the critical
// path is encoder + short parity path, not encoder + full n-bit compare.
//
// Interface: retrieved_cw[N-1:0] = {data[K-1:0], parity[N-K-1:0]},
// incoming_tag[K-1:0]; outputs range, match, fault, mismatch. Purely
// combinational, no clock: the result is valid one propagation delay after
// the inputs. Defaults: the (8,4) SEC-DED code with T_MAX = 1, R_MAX = 2.
// The encoder's code (extended Hamming) is this design's choice.
module ecc_tag_matcher #(
  parameter int K     = 4,
  parameter int N     = 8,
  parameter int T_MAX = 1,
  parameter int R_MAX = 2
) (
  input  logic [N-1:0]              retrieved_cw,
  input  logic [K-1:0]              incoming_tag,
  output ecc_match_pkg::hd_range_e  range,
  output logic                      match,
  output logic                      fault,
  output logic                      mismatch
);
  import ecc_match_pkg::*;

  localparam int P     = N - K;
  localparam int M_TAG = clog2i(K);
  localparam int M_PAR = clog2i(P);
  localparam int PM    = pmax_log2(R_MAX);
  localparam int LW    = l2_total(M_TAG, M_PAR, PM);

  // Data path: k-bit comparison, started at once.
  logic [K-1:0]            tag_diff;
  logic [(1 << M_TAG)-1:0] tag_w;
  logic                    tag_or;

  xor_bank #(.W(K)) u_xor_tag (
    .a   (retrieved_cw[N-1 -: K]),
    .b   (incoming_tag),
    .diff(tag_diff)
  );

  bwa #(.IN_W(K), .BASE_LOG2(0), .PMAX_LOG2(PM)) u_bwa_tag (
    .in    (tag_diff),
    .w_out (tag_w),
    .or_out(tag_or)
  );

  // Parity path: (n-k)-bit comparison after encoding.
  logic [P-1:0]            enc_parity;
  logic [P-1:0]            par_diff;
  logic [(1 << M_PAR)-1:0] par_w;
  logic                    par_or;

  secded_encoder #(.K(K), .N(N)) u_encoder (
    .data  (incoming_tag),
    .parity(enc_parity)
  );

  xor_bank #(.W(P)) u_xor_par (
    .a   (retrieved_cw[P-1:0]),
    .b   (enc_parity),
    .diff(par_diff)
  );

  bwa #(.IN_W(P), .BASE_LOG2(0), .PMAX_LOG2(PM)) u_bwa_par (
    .in    (par_diff),
    .w_out (par_w),
    .or_out(par_or)
  );

  // Second level and decision.
  logic            q;
  logic [PM:0]     l2_or;
  logic [LW-1:0]   l2_w;

  hd_second_level #(.M_TAG(M_TAG), .M_PAR(M_PAR), .PMAX_LOG2(PM)) u_level2 (
    .tag_w (tag_w),
    .tag_or(tag_or),
    .par_w (par_w),
    .par_or(par_or),
    .q     (q),
    .l2_or (l2_or),
    .l2_w  (l2_w)
  );

  decision_unit #(.M_TAG(M_TAG), .M_PAR(M_PAR), .T_MAX(T_MAX), .R_MAX(R_MAX)) u_decision (
    .q       (q),
    .l2_or   (l2_or),
    .l2_w    (l2_w),
    .range   (range),
    .match   (match),
    .fault   (fault),
    .mismatch(mismatch)
  );

  initial begin
    assert (T_MAX >= 0 && R_MAX >= T_MAX && K >= 2 && N > K + 1)
      else $error("ecc_tag_matcher: inconsistent parameters");
  end
endmodule

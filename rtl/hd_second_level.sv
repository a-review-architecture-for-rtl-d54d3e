// hd_second_level -- interconnection and second level of the Hamming-
// distance computer.
//
// Takes the outputs of the two first-level BWAs (data part and parity part
// of the codeword) and merges them:
//  * the two first-level OR outputs, which flag bits of weight above P_max,
//    enter one OR-gate tree whose output is q;
//  * every first-level bit of weight 2**e, e = 0..PMAX_LOG2, is wired to the
//    second-level BWA responsible for weight 2**e (tag bits first, then
//    parity bits). That BWA counts them with base weight 2**e and, being of
//    the revised form, ORs everything above P_max into l2_or[e].
// The interconnection is pure wiring; the source of each BWA input is given
// by ecc_match_pkg::l2_src. The outputs of the weight-2**e BWA occupy
// l2_w[l2_offset(e) +: l2_width(e)] and bit p there has the weight
// 2**ecc_match_pkg::l2_bit_exp(M_TAG, M_PAR, PMAX_LOG2, p).
// If q and all l2_or bits are 0, the Hamming distance equals the weighted
// sum of l2_w; otherwise it exceeds P_max*2-1 >= R_MAX+1.
//
// Parameters: M_TAG, M_PAR = stage counts of the first-level BWAs,
// PMAX_LOG2 = log2(P_max). Defaults: the (8,4) code, K = 4 and N-K = 4
// (two stages each) with R_MAX = 2, P_max = 2. Combinational.
module hd_second_level #(
  parameter int M_TAG     = 2,
  parameter int M_PAR     = 2,
  parameter int PMAX_LOG2 = 1
) (
  input  logic [(1 << M_TAG)-1:0]  tag_w,   // first-level weighted bits, data part
  input  logic                     tag_or,  // first-level fourth-range flag, data part
  input  logic [(1 << M_PAR)-1:0]  par_w,   // first-level weighted bits, parity part
  input  logic                     par_or,  // first-level fourth-range flag, parity part
  output logic                     q,       // OR-gate tree output
  output logic [PMAX_LOG2:0]       l2_or,   // fourth-range flag of each second-level BWA
  output logic [ecc_match_pkg::l2_total(M_TAG, M_PAR, PMAX_LOG2)-1:0] l2_w
);
  import ecc_match_pkg::*;

  localparam int SRC_W = (1 << M_TAG) + (1 << M_PAR);

  logic [SRC_W-1:0] src;
  assign src = {par_w, tag_w};

  or_tree #(.N_IN(2)) u_or_tree (
    .in ({par_or, tag_or}),
    .any(q)
  );

  for (genvar e = 0; e <= PMAX_LOG2; e++) begin : g_weight
    localparam int CNT = l2_count(M_TAG, M_PAR, e);
    localparam int OFF = l2_offset(M_TAG, M_PAR, e);
    localparam int WID = l2_width(M_TAG, M_PAR, e);
    if (CNT > 0) begin : g_bwa
      logic [CNT-1:0] gin;
      for (genvar i = 0; i < CNT; i++) begin : g_wire
        assign gin[i] = src[l2_src(M_TAG, M_PAR, e, i)];
      end
      bwa #(.IN_W(CNT), .BASE_LOG2(e), .PMAX_LOG2(PMAX_LOG2)) u_bwa (
        .in    (gin),
        .w_out (l2_w[OFF +: WID]),
        .or_out(l2_or[e])
      );
    end else begin : g_none
      assign l2_or[e] = 1'b0;
    end
  end
endmodule

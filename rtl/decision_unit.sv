// decision_unit -- classifies the Hamming distance into one of four ranges.
//
// Inputs are the second-level outputs: q and l2_or flag a distance above
// 2*P_max-1 (hence above R_MAX); otherwise the distance is the weighted sum
// of l2_w, where bit p of l2_w has weight 2**l2_bit_exp(p). That sum is at
// most a few times P_max, so the adder is a handful of bits wide; it is the
// compact form of the truth table that maps the second-level outputs to a
// range. Ranges: 0; 1..T_MAX (correctable: match); T_MAX+1..R_MAX
// (detectable, uncorrectable: fault); above R_MAX (mismatch).
// Exactly one of match, fault and mismatch is set. Combinational.
// Defaults: the (8,4) SEC-DED code, T_MAX = 1, R_MAX = 2.
module decision_unit #(
  parameter int M_TAG = 2,
  parameter int M_PAR = 2,
  parameter int T_MAX = 1,
  parameter int R_MAX = 2
) (
  input  logic                                   q,
  input  logic [ecc_match_pkg::pmax_log2(R_MAX):0] l2_or,
  input  logic [ecc_match_pkg::l2_total(M_TAG, M_PAR, ecc_match_pkg::pmax_log2(R_MAX))-1:0] l2_w,
  output ecc_match_pkg::hd_range_e               range,
  output logic                                   match,
  output logic                                   fault,
  output logic                                   mismatch
);
  import ecc_match_pkg::*;

  localparam int PM  = pmax_log2(R_MAX);
  localparam int LW  = l2_total(M_TAG, M_PAR, PM);
  localparam int SW  = clog2i(LW * (1 << PM) + 1) + 1;

  // Weighted value of each l2_w bit; the weight is an elaboration-time
  // constant (0 for bits whose weight exceeds P_max, which the BWAs never
  // set).
  logic [SW-1:0] term [LW];
  logic [SW-1:0] d_low;
  logic          beyond;

  for (genvar p = 0; p < LW; p++) begin : g_term
    localparam int XP = l2_bit_exp(M_TAG, M_PAR, PM, p);
    localparam logic [SW-1:0] WT = (XP <= PM) ? SW'(1 << XP) : '0;
    assign term[p] = l2_w[p] ? WT : '0;
  end

  always_comb begin
    d_low = '0;
    for (int p = 0; p < LW; p++) d_low = d_low + term[p];
  end

  assign beyond = q | (|l2_or);

  always_comb begin
    if (beyond || d_low > SW'(R_MAX)) range = HD_BEYOND;
    else if (d_low > SW'(T_MAX))      range = HD_DETECTABLE;
    else if (d_low != '0)             range = HD_CORRECTABLE;
    else                              range = HD_ZERO;
  end

  assign match    = (range == HD_ZERO) || (range == HD_CORRECTABLE);
  assign fault    = (range == HD_DETECTABLE);
  assign mismatch = (range == HD_BEYOND);
endmodule

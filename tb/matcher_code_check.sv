// matcher_code_check -- drives one ecc_tag_matcher instance of a given code
// size with random tags and retrieved codewords and compares its verdict
// with a reference computed here.
//
// Each trial encodes a random tag with a position-based extended Hamming
// reference encoder, flips e distinct random bits (e = 0 .. R_MAX+3; every
// eighth trial uses a fully random retrieved word instead) and then
// presents the tag either unchanged or, in every fourth trial, replaced by
// a different random tag. The expected range follows from the population
// count of the difference. Results are reported through checks, failures
// and done; seen[] counts each range, and a range that never occurred
// counts as a failure.
module matcher_code_check #(
  parameter int K      = 32,
  parameter int N      = 39,
  parameter int T_MAX  = 1,
  parameter int R_MAX  = 2,
  parameter int TRIALS = 2000
) (
  output int   checks,
  output int   failures,
  output logic done
);
  import ecc_match_pkg::*;

  logic [N-1:0] retrieved_cw;
  logic [K-1:0] incoming_tag;
  hd_range_e    range;
  logic         match, fault, mismatch;
  int           seen [4];

  ecc_tag_matcher #(.K(K), .N(N), .T_MAX(T_MAX), .R_MAX(R_MAX)) dut (
    .retrieved_cw(retrieved_cw),
    .incoming_tag(incoming_tag),
    .range       (range),
    .match       (match),
    .fault       (fault),
    .mismatch    (mismatch)
  );

  function automatic logic [N-1:0] ref_codeword(input logic [K-1:0] t);
    logic [255:0] h;
    logic [N-K-1:0] par;
    int j;
    h = '0;
    j = 0;
    for (int pos = 3; pos < 256 && j < K; pos++)
      if ((pos & (pos - 1)) != 0) begin
        h[pos] = t[j];
        j++;
      end
    par = '0;
    for (int i = 0; i < N - K - 1; i++)
      for (int pos = 1; pos < 256; pos++)
        if (((pos >> i) & 1) != 0) par[i] ^= h[pos];
    par[N-K-1] = ^{t, par[N-K-2:0]};
    return {t, par};
  endfunction

  function automatic logic [K-1:0] rand_k();
    logic [K-1:0] v;
    for (int i = 0; i < K; i += 32) v = (v << 32) | K'($urandom);
    return v;
  endfunction

  initial begin
    logic [N-1:0] cw, r;
    logic [K-1:0] t;
    int e, d;
    int unsigned pos;
    hd_range_e exp_r;
    checks = 0;
    failures = 0;
    done = 1'b0;
    foreach (seen[i]) seen[i] = 0;
    for (int trial = 0; trial < TRIALS; trial++) begin
      t  = rand_k();
      cw = ref_codeword(t);
      r  = cw;
      e  = int'($urandom % (R_MAX + 4));
      for (int k = 0; k < e; k++) begin
        do pos = $urandom % N; while (r[pos] != cw[pos]);
        r[pos] = ~r[pos];
      end
      if (trial % 8 == 7) r = N'({rand_k(), rand_k()});
      if (trial % 4 == 3) t = rand_k();
      incoming_tag = t;
      retrieved_cw = r;
      #1;
      d = $countones(ref_codeword(t) ^ r);
      if (d == 0)          exp_r = HD_ZERO;
      else if (d <= T_MAX) exp_r = HD_CORRECTABLE;
      else if (d <= R_MAX) exp_r = HD_DETECTABLE;
      else                 exp_r = HD_BEYOND;
      seen[exp_r]++;
      checks++;
      if (range != exp_r || match != (d <= T_MAX) ||
          fault != (d > T_MAX && d <= R_MAX) || mismatch != (d > R_MAX)) begin
        failures++;
        if (failures < 10)
          $display("FAIL (%0d,%0d) T=%0d R=%0d d=%0d range=%0d exp=%0d",
                   N, K, T_MAX, R_MAX, d, range, exp_r);
      end
    end
    // Every range must have occurred (none is correctable when T_MAX = 0).
    foreach (seen[i]) begin
      if (i == int'(HD_CORRECTABLE) && T_MAX == 0) continue;
      checks++;
      if (seen[i] == 0) failures++;
    end
    $display("(%0d,%0d) T_MAX=%0d R_MAX=%0d: zero=%0d correctable=%0d detectable=%0d beyond=%0d",
             N, K, T_MAX, R_MAX, seen[0], seen[1], seen[2], seen[3]);
    done = 1'b1;
  end
endmodule

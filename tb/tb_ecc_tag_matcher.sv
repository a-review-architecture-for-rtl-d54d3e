// tb_ecc_tag_matcher -- end-to-end test of the matcher at its default
// (8,4) SEC-DED configuration.
//
// Every incoming tag (16) is compared with every possible 8-bit retrieved
// codeword (256). The expected result is worked out here without the
// design's structure: the reference codeword of the tag comes from a
// position-based Hamming encoder written below, d is the population count
// of the XOR with the retrieved word, and d is classified into the four
// ranges. The test also counts how often each mechanism of the design was
// exercised (each range; the first-level OR path; the second-level OR path;
// a mismatch found only by the decision unit's sum; errors confined to the
// data part, to the parity part, or spread over both) and fails if one never
// occurred. The design is combinational, so each vector is checked 1 ns
// after it is applied.
module tb_ecc_tag_matcher;
  import ecc_match_pkg::*;

  localparam int K = 4;
  localparam int N = 8;
  localparam int T_MAX = 1;
  localparam int R_MAX = 2;

  logic [N-1:0] retrieved_cw;
  logic [K-1:0] incoming_tag;
  hd_range_e    range;
  logic         match, fault, mismatch;

  ecc_tag_matcher dut (
    .retrieved_cw(retrieved_cw),
    .incoming_tag(incoming_tag),
    .range       (range),
    .match       (match),
    .fault       (fault),
    .mismatch    (mismatch)
  );

  int checks = 0;
  int failures = 0;

  // Reference encoder: build the Hamming codeword by position (1-based),
  // data in the non-power-of-two positions, then append overall parity.
  function automatic logic [N-1:0] ref_codeword(input logic [K-1:0] t);
    logic [15:0] h;
    logic [N-K-1:0] par;
    int j;
    h = '0;
    j = 0;
    for (int pos = 1; pos < 16 && j < K; pos++)
      if (pos != 1 && pos != 2 && pos != 4 && pos != 8) begin
        h[pos] = t[j];
        j++;
      end
    par = '0;
    for (int i = 0; i < N - K - 1; i++)
      for (int pos = 1; pos < 16; pos++)
        if (((pos >> i) & 1) != 0) par[i] ^= h[pos];
    par[N-K-1] = ^{t, par[N-K-2:0]};
    return {t, par};
  endfunction

  int cnt_range [4];
  int cnt_l1_or, cnt_l2_or, cnt_sum_mismatch;
  int cnt_data_only, cnt_par_only, cnt_both;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] cw, diff;
    int d;
    hd_range_e exp_r;
    for (int t = 0; t < (1 << K); t++) begin
      cw = ref_codeword(K'(t));
      for (int r = 0; r < (1 << N); r++) begin
        incoming_tag = K'(t);
        retrieved_cw = N'(r);
        #1;
        diff = cw ^ N'(r);
        d = $countones(diff);
        if (d == 0)          exp_r = HD_ZERO;
        else if (d <= T_MAX) exp_r = HD_CORRECTABLE;
        else if (d <= R_MAX) exp_r = HD_DETECTABLE;
        else                 exp_r = HD_BEYOND;
        checks++;
        if (range !== exp_r || match !== (d <= T_MAX) ||
            fault !== (d > T_MAX && d <= R_MAX) || mismatch !== (d > R_MAX)) begin
          failures++;
          if (failures < 10)
            $display("FAIL tag=%h cw=%h d=%0d range=%0d exp=%0d m/f/x=%b%b%b",
                     t, r, d, range, exp_r, match, fault, mismatch);
        end
        cnt_range[exp_r]++;
        if (dut.u_level2.q) cnt_l1_or++;
        if (|dut.u_level2.l2_or) cnt_l2_or++;
        if (mismatch && !dut.u_level2.q && !(|dut.u_level2.l2_or)) cnt_sum_mismatch++;
        if (d > 0 && d <= R_MAX) begin
          if (diff[N-K-1:0] == '0)       cnt_data_only++;
          else if (diff[N-1:N-K] == '0)  cnt_par_only++;
          else                           cnt_both++;
        end
      end
    end
    $display("ranges: zero=%0d correctable=%0d detectable=%0d beyond=%0d",
             cnt_range[0], cnt_range[1], cnt_range[2], cnt_range[3]);
    $display("first-level OR=%0d second-level OR=%0d sum-only mismatch=%0d",
             cnt_l1_or, cnt_l2_or, cnt_sum_mismatch);
    $display("errors in data only=%0d parity only=%0d both=%0d",
             cnt_data_only, cnt_par_only, cnt_both);
    // Every (tag, codeword) pair is exercised once: 16 * 256 combinations.
    checks++;
    if (cnt_range[0] != 16 || cnt_range[1] != 16 * 8 || cnt_range[2] != 16 * 28) begin
      failures++;
      $display("FAIL range distribution");
    end
    foreach (cnt_range[i]) begin
      checks++;
      if (cnt_range[i] == 0) failures++;
    end
    checks += 6;
    if (cnt_l1_or == 0)        failures++;
    if (cnt_l2_or == 0)        failures++;
    if (cnt_sum_mismatch == 0) failures++;
    if (cnt_data_only == 0)    failures++;
    if (cnt_par_only == 0)     failures++;
    if (cnt_both == 0)         failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

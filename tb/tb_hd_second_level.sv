// tb_hd_second_level -- checks the interconnection, OR-gate tree and
// second-level BWAs.
//
// (8,4) configuration, exhaustive over all legal first-level outputs: each
// first-level BWA has outputs of weight 4,2,2,1 (index 0..3), of which the
// weight-4 one is replaced by its OR flag. Expected, worked out by hand for
// this configuration: q = OR of the two flags; the BWA for 1's takes the two
// weight-1 bits, U = AND and V = XOR (l2_w[0], l2_w[1]); the BWA for 2's
// takes the four weight-2 bits, flags two or more of them (l2_or[1]) and
// outputs their parity as the weight-2 bit T (l2_w[5]); bits 2..4 are 0.
// (39,32) configuration (5 and 3 first-level stages, P_max = 2), random:
// the weighted sum of l2_w must equal the weighted sum of the inputs unless
// an l2_or flag is set, in which case the inputs must outweigh l2_w by at
// least 2*P_max.
module tb_hd_second_level;
  import ecc_match_pkg::*;

  logic [3:0]  tw, pw;
  logic        tor, por, q;
  logic [1:0]  l2or;
  logic [5:0]  l2w;

  logic [31:0] tw5;
  logic [7:0]  pw3;
  logic        q5;
  logic [1:0]  l2or5;
  logic [l2_total(5, 3, 1)-1:0] l2w5;

  int checks = 0;
  int failures = 0;

  hd_second_level u84 (
    .tag_w(tw), .tag_or(tor), .par_w(pw), .par_or(por),
    .q(q), .l2_or(l2or), .l2_w(l2w)
  );

  hd_second_level #(.M_TAG(5), .M_PAR(3), .PMAX_LOG2(1)) u3932 (
    .tag_w(tw5), .tag_or(1'b0), .par_w(pw3), .par_or(1'b0),
    .q(q5), .l2_or(l2or5), .l2_w(l2w5)
  );

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c2, c1, tin, tout, x, n_or;
    n_or = 0;
    for (int v = 0; v < 256; v++) begin
      tw  = {v[2:0], 1'b0};
      tor = v[3];
      pw  = {v[6:4], 1'b0};
      por = v[7];
      #1;
      c1 = int'(tw[3]) + int'(pw[3]);
      c2 = int'(tw[1]) + int'(tw[2]) + int'(pw[1]) + int'(pw[2]);
      check(q == (tor | por), $sformatf("q v=%h", v));
      check(l2w[0] == (tw[3] & pw[3]) && l2w[1] == (tw[3] ^ pw[3]) && !l2or[0],
            $sformatf("BWA for 1's v=%h c1=%0d", v, c1));
      check(l2or[1] == (c2 >= 2) && l2w[5] == c2[0], $sformatf("BWA for 2's v=%h c2=%0d", v, c2));
      check(l2w[4:2] == '0, $sformatf("heavy bits v=%h", v));
    end
    for (int i = 0; i < 4000; i++) begin
      tw5 = $urandom;
      pw3 = 8'($urandom);
      if (i % 2 == 0) begin
        tw5 &= $urandom;
        tw5 &= $urandom;
        pw3 &= 8'($urandom);
      end
      // The first-level BWA never sets outputs heavier than P_max = 2.
      for (int j = 0; j < 32; j++) if (bwa_exp(5, 0, j) > 1) tw5[j] = 1'b0;
      for (int j = 0; j < 8; j++)  if (bwa_exp(3, 0, j) > 1) pw3[j] = 1'b0;
      #1;
      tin = 0;
      for (int j = 0; j < 32; j++) if (tw5[j]) tin += 1 << bwa_exp(5, 0, j);
      for (int j = 0; j < 8; j++)  if (pw3[j]) tin += 1 << bwa_exp(3, 0, j);
      tout = 0;
      for (int p = 0; p < $bits(l2w5); p++) begin
        x = l2_bit_exp(5, 3, 1, p);
        if (l2w5[p]) begin
          if (x > 1) tout += 1000;  // heavy bits must stay 0
          else       tout += 1 << x;
        end
      end
      if (|l2or5) n_or++;
      check(!q5, "q (39,32)");
      check((l2or5 == '0) ? (tout == tin) : (tin >= tout + 4),
            $sformatf("(39,32) in=%0d out=%0d or=%b", tin, tout, l2or5));
    end
    check(n_or > 0 && n_or < 4000, "(39,32) OR path exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

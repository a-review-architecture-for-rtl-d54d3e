// tb_ecc_tag_matcher_codes -- runs the matcher at longer SEC-DED codes than
// the default (8,4): (39,32) and (72,64) with T_MAX = 1, R_MAX = 2, and
// (39,32) with the thresholds T_MAX = 2, R_MAX = 5, and (8,4) with
// T_MAX = 0, R_MAX = 1 (detection only, r_max = 1 as in the revised BWA
// example) and with T_MAX = 1, R_MAX = 3 (P_max = 4, so the first-level
// BWAs prune nothing). Threshold settings other than T_MAX = 1, R_MAX = 2
// do not correspond to the code's real capability; they exercise the
// generic structure. Each instance is checked by matcher_code_check
// against an independent reference.
module tb_ecc_tag_matcher_codes;
  int   c [5];
  int   f [5];
  logic d [5];
  int   tot_c, tot_f;

  matcher_code_check #(.K(32), .N(39), .T_MAX(1), .R_MAX(2)) u_39 (.checks(c[0]), .failures(f[0]), .done(d[0]));
  matcher_code_check #(.K(64), .N(72), .T_MAX(1), .R_MAX(2)) u_72 (.checks(c[1]), .failures(f[1]), .done(d[1]));
  matcher_code_check #(.K(32), .N(39), .T_MAX(2), .R_MAX(5)) u_t2 (.checks(c[2]), .failures(f[2]), .done(d[2]));
  matcher_code_check #(.K(4),  .N(8),  .T_MAX(0), .R_MAX(1)) u_r1 (.checks(c[3]), .failures(f[3]), .done(d[3]));
  matcher_code_check #(.K(4),  .N(8),  .T_MAX(1), .R_MAX(3)) u_r3 (.checks(c[4]), .failures(f[4]), .done(d[4]));

  always_comb begin
    tot_c = 0;
    tot_f = 0;
    for (int i = 0; i < 5; i++) begin
      tot_c += c[i];
      tot_f += f[i];
    end
  end

  initial begin
    #1000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", tot_c, tot_f + 1);
    $finish;
  end

  initial begin
    // The checkers clear done at time 0; look only after that.
    #1;
    wait (d[0] && d[1] && d[2] && d[3] && d[4]);
    #1;
    $display("TB_RESULT checks=%0d failures=%0d", tot_c, tot_f + ((tot_c > 0) ? 0 : 1));
    $finish;
  end
endmodule

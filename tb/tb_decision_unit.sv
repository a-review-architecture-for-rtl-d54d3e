// tb_decision_unit -- checks the decision unit.
//
// (8,4) configuration (T_MAX = 1, R_MAX = 2), exhaustive over the inputs the
// second level can produce: q, the two l2_or flags and the weighted bits
// U (weight 2, l2_w[0]), V (weight 1, l2_w[1]) and T (weight 2, l2_w[5]).
// The distance is 2U + V + 2T unless a flag is set, and the range follows
// from it. A second instance (5 and 3 first-level stages, T_MAX = 2,
// R_MAX = 5, so P_max = 4) is driven with random weighted bits, each bit
// weighing 2**l2_bit_exp(p); it checks the wider adder and thresholds.
module tb_decision_unit;
  import ecc_match_pkg::*;

  logic       q;
  logic [1:0] l2or;
  logic [5:0] l2w;
  hd_range_e  rng;
  logic       m, f, x;

  logic       qb;
  logic [2:0] l2orb;
  logic [l2_total(5, 3, 2)-1:0] l2wb;
  hd_range_e  rngb;
  logic       mb, fb, xb;

  int checks = 0;
  int failures = 0;
  int seen [4];

  decision_unit u84 (.q(q), .l2_or(l2or), .l2_w(l2w), .range(rng),
                     .match(m), .fault(f), .mismatch(x));

  decision_unit #(.M_TAG(5), .M_PAR(3), .T_MAX(2), .R_MAX(5)) uw (
    .q(qb), .l2_or(l2orb), .l2_w(l2wb), .range(rngb), .match(mb), .fault(fb), .mismatch(xb));

  function automatic hd_range_e classify(input int d, input int t, input int r);
    if (d == 0)  return HD_ZERO;
    if (d <= t)  return HD_CORRECTABLE;
    if (d <= r)  return HD_DETECTABLE;
    return HD_BEYOND;
  endfunction

  task automatic check(input hd_range_e got, input hd_range_e exp,
                       input logic gm, input logic gf, input logic gx, input string what);
    checks++;
    if (got != exp || gm != (exp == HD_ZERO || exp == HD_CORRECTABLE) ||
        gf != (exp == HD_DETECTABLE) || gx != (exp == HD_BEYOND)) begin
      failures++;
      $display("FAIL %s got=%0d exp=%0d mfx=%b%b%b", what, got, exp, gm, gf, gx);
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
    int d, xp;
    logic flag;
    for (int v = 0; v < 64; v++) begin
      {q, l2or} = v[5:3];
      l2w = {v[2], 3'b000, v[1], v[0]};
      #1;
      d = 2 * int'(v[0]) + int'(v[1]) + 2 * int'(v[2]);
      check(rng, (v[5:3] != 0) ? HD_BEYOND : classify(d, 1, 2), m, f, x,
            $sformatf("(8,4) v=%h", v));
    end
    for (int i = 0; i < 3000; i++) begin
      flag = ($urandom % 8) == 0;
      qb    = flag & 1'($urandom);
      l2orb = flag ? 3'($urandom) : '0;
      l2wb  = '0;
      d = 0;
      for (int p = 0; p < $bits(l2wb); p++) begin
        xp = l2_bit_exp(5, 3, 2, p);
        if (xp <= 2 && ($urandom % 6) == 0) begin
          l2wb[p] = 1'b1;
          d += 1 << xp;
        end
      end
      #1;
      check(rngb, (qb || l2orb != 0) ? HD_BEYOND : classify(d, 2, 5), mb, fb, xb,
            $sformatf("wide d=%0d", d));
      seen[rngb]++;
    end
    foreach (seen[r]) begin
      checks++;
      if (seen[r] == 0) begin
        failures++;
        $display("FAIL wide range %0d never produced", r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_bwa -- checks the butterfly-formed weight accumulator in the
// configurations the matcher uses.
//
//  * 8 inputs, nothing pruned (general form): exhaustive; the count of 1s
//    must equal 8*I + 4*(J+K+M) + 2*(L+N+O) + P with I..P = outputs 0..7.
//  * 8 inputs, P_max = 2 (revised form, the module default): exhaustive.
//  * 4 inputs, P_max = 2 (first-level BWA of the (8,4) matcher): exhaustive.
//  * 4 inputs of weight 2, P_max = 2 (second-level BWA for 2's): exhaustive.
//  * 2 inputs (second-level BWA for 1's) and 1 input: exhaustive.
//  * 39 inputs, P_max = 4: random and low-weight patterns.
// For the revised forms the rule is: with the input count c of weight 2**B,
// and S the weighted sum of the outputs (output j weighs
// 2**(B + M - popcount(j))), S == c*2**B when or_out is 0, and
// c*2**B >= S + 2*P_max when or_out is 1; outputs heavier than P_max are 0.
module tb_bwa;
  logic [7:0]  in8g, in8r;
  logic [7:0]  w8g, w8r;
  logic        or8g, or8r;
  logic [3:0]  in4, in4b, w4, w4b;
  logic        or4, or4b;
  logic [1:0]  in2, w2;
  logic        or2;
  logic        in1, w1, or1;
  logic [38:0] in39;
  logic [63:0] w39;
  logic        or39;

  int checks = 0;
  int failures = 0;

  bwa #(.IN_W(8), .PMAX_LOG2(20))             u8g (.in(in8g), .w_out(w8g), .or_out(or8g));
  bwa                                         u8r (.in(in8r), .w_out(w8r), .or_out(or8r));
  bwa #(.IN_W(4), .PMAX_LOG2(1))              u4  (.in(in4),  .w_out(w4),  .or_out(or4));
  bwa #(.IN_W(4), .BASE_LOG2(1), .PMAX_LOG2(1)) u4b (.in(in4b), .w_out(w4b), .or_out(or4b));
  bwa #(.IN_W(2), .PMAX_LOG2(1))              u2  (.in(in2),  .w_out(w2),  .or_out(or2));
  bwa #(.IN_W(1), .PMAX_LOG2(1))              u1  (.in(in1),  .w_out(w1),  .or_out(or1));
  bwa #(.IN_W(39), .PMAX_LOG2(2))             u39 (.in(in39), .w_out(w39), .or_out(or39));

  task automatic check_rule(input string what, input logic [63:0] in, input int in_w,
                            input logic [63:0] w, input int m, input int base,
                            input int pm, input logic orb);
    int tot, s, x, pc;
    tot = 0;
    for (int i = 0; i < in_w; i++) tot += int'(in[i]);
    tot = tot << base;
    s = 0;
    for (int j = 0; j < (1 << m); j++) begin
      pc = 0;
      for (int b = 0; b < m; b++) pc += (j >> b) & 1;
      x = base + m - pc;
      if (w[j]) begin
        if (x > pm) begin
          checks++;
          failures++;
          $display("FAIL %s: output %0d of weight 2**%0d above P_max is set", what, j, x);
        end
        s += 1 << x;
      end
    end
    checks++;
    if (!orb ? (s != tot) : (tot < s + (2 << pm))) begin
      failures++;
      $display("FAIL %s: in=%h count*weight=%0d outputs=%0d or=%b", what, in, tot, s, orb);
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
    int d, ors;
    ors = 0;
    for (int v = 0; v < 256; v++) begin
      in8g = 8'(v);
      in8r = 8'(v);
      in4  = 4'(v);
      in4b = 4'(v >> 4);
      in2  = 2'(v);
      in1  = v[0];
      #1;
      // Equation (2) of the general structure, outputs I..P.
      d = 8 * int'(w8g[0]) + 4 * (int'(w8g[1]) + int'(w8g[2]) + int'(w8g[4]))
          + 2 * (int'(w8g[3]) + int'(w8g[5]) + int'(w8g[6])) + int'(w8g[7]);
      checks++;
      if (d != $countones(in8g) || or8g) begin
        failures++;
        $display("FAIL general 8-input: in=%h d=%0d or=%b", in8g, d, or8g);
      end
      check_rule("8-input revised", 64'(in8r), 8, 64'(w8r), 3, 0, 1, or8r);
      check_rule("4-input", 64'(in4), 4, 64'(w4), 2, 0, 1, or4);
      check_rule("4-input weight 2", 64'(in4b), 4, 64'(w4b), 2, 1, 1, or4b);
      check_rule("2-input", 64'(in2), 2, 64'(w2), 1, 0, 1, or2);
      check_rule("1-input", 64'(in1), 1, 64'(w1), 0, 0, 1, or1);
      ors += int'(or8r) + int'(or4) + int'(or4b);
    end
    for (int i = 0; i < 3000; i++) begin
      case (i % 3)
        0: in39 = 39'({$urandom, $urandom});
        1: in39 = 39'({$urandom, $urandom}) & 39'({$urandom, $urandom}) & 39'({$urandom, $urandom});
        default: in39 = (39'(1) << ($urandom % 39)) | (39'(i % 4 == 2) << ($urandom % 39))
                        | (39'(i % 5 == 2) << ($urandom % 39));
      endcase
      #1;
      check_rule("39-input", 64'(in39), 39, w39, 6, 0, 2, or39);
      ors += int'(or39);
    end
    // The OR path must have been exercised.
    checks++;
    if (ors == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

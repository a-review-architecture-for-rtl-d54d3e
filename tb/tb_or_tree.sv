// tb_or_tree -- checks the OR-gate tree at the default two inputs and at
// five inputs (both exhaustively) and at 13 inputs (all-zero, every one-hot
// pattern and random patterns). The output must be 1 exactly when some
// input is 1.
module tb_or_tree;

  logic [1:0]  in2;
  logic [4:0]  in5;
  logic [12:0] in13;
  logic        y2, y5, y13;
  int checks = 0;
  int failures = 0;

  or_tree                 dut2  (.in(in2),  .any(y2));
  or_tree #(.N_IN(5))     dut5  (.in(in5),  .any(y5));
  or_tree #(.N_IN(13))    dut13 (.in(in13), .any(y13));

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%b exp=%b", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      in2 = 2'(i);
      #1 check(y2, i != 0, "N_IN=2");
    end
    for (int i = 0; i < 32; i++) begin
      in5 = 5'(i);
      #1 check(y5, i != 0, "N_IN=5");
    end
    in13 = '0;
    #1 check(y13, 1'b0, "N_IN=13 zero");
    for (int i = 0; i < 13; i++) begin
      in13 = 13'(1) << i;
      #1 check(y13, 1'b1, "N_IN=13 one-hot");
    end
    for (int i = 0; i < 200; i++) begin
      in13 = 13'($urandom) & 13'($urandom);
      #1 check(y13, in13 != '0, "N_IN=13 random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

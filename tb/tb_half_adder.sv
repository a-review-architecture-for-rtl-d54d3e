// tb_half_adder -- exhaustive check of the half adder: for all four input
// pairs, 2*carry + sum must equal a + b.
module tb_half_adder;

  logic a, b, carry, sum;
  int checks = 0;
  int failures = 0;

  half_adder dut (.a(a), .b(b), .carry(carry), .sum(sum));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i);
      #1;
      checks++;
      if (2 * int'(carry) + int'(sum) != int'(a) + int'(b)) begin
        failures++;
        $display("FAIL a=%b b=%b carry=%b sum=%b", a, b, carry, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

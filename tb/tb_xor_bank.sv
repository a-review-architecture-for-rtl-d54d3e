// tb_xor_bank -- checks the XOR bank exhaustively at its default width of 4
// and with random words at 39 bits: each diff bit must be set exactly where
// the two words differ, bit by bit.
module tb_xor_bank;

  logic [3:0]  a4, b4, d4;
  logic [38:0] a39, b39, d39;
  int checks = 0;
  int failures = 0;

  xor_bank            dut4  (.a(a4),  .b(b4),  .diff(d4));
  xor_bank #(.W(39))  dut39 (.a(a39), .b(b39), .diff(d39));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      {a4, b4} = 8'(i);
      #1;
      for (int k = 0; k < 4; k++) begin
        checks++;
        if (d4[k] !== (a4[k] != b4[k])) begin
          failures++;
          $display("FAIL W=4 a=%h b=%h bit %0d", a4, b4, k);
        end
      end
    end
    for (int i = 0; i < 200; i++) begin
      a39 = 39'({$urandom, $urandom});
      b39 = (i % 2 == 0) ? a39 ^ (39'(1) << (i % 39)) : 39'({$urandom, $urandom});
      #1;
      for (int k = 0; k < 39; k++) begin
        checks++;
        if (d39[k] !== (a39[k] != b39[k])) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

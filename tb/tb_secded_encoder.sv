// tb_secded_encoder -- checks the systematic SEC-DED encoder.
//
// (8,4): all 16 codewords; each must match a table of the extended Hamming
// code with data at Hamming positions 3,5,6,7 (check bits at 1,2,4,
// overall parity last), and every pair of distinct codewords must be at
// Hamming distance at least 4.
// (39,32) and (72,64): the code is linear, so its minimum distance is the
// least weight of a nonzero codeword; every data word of weight 1, 2 and 3
// is encoded and the codeword {data, parity} must have weight >= 4. The
// (39,32) overall parity bit must make every codeword of even weight.
module tb_secded_encoder;
  logic [3:0]  d4;
  logic [3:0]  p4;
  logic [31:0] d32;
  logic [6:0]  p32;
  logic [63:0] d64;
  logic [7:0]  p64;
  int checks = 0;
  int failures = 0;

  secded_encoder                   u8  (.data(d4),  .parity(p4));
  secded_encoder #(.K(32), .N(39)) u39 (.data(d32), .parity(p32));
  secded_encoder #(.K(64), .N(72)) u72 (.data(d64), .parity(p64));

  // Reference (8,4) parity {overall, c4, c2, c1} for data d3..d0 placed at
  // positions 7,6,5,3: c1 = d0^d1^d3, c2 = d0^d2^d3, c4 = d1^d2^d3.
  function automatic logic [3:0] ref_par4(input logic [3:0] d);
    logic c1, c2, c4;
    c1 = d[0] ^ d[1] ^ d[3];
    c2 = d[0] ^ d[2] ^ d[3];
    c4 = d[1] ^ d[2] ^ d[3];
    return {^d ^ c1 ^ c2 ^ c4, c4, c2, c1};
  endfunction

  logic [7:0] cw [16];

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int minw;
    for (int v = 0; v < 16; v++) begin
      d4 = 4'(v);
      #1;
      cw[v] = {d4, p4};
      checks++;
      if (p4 !== ref_par4(d4)) begin
        failures++;
        $display("FAIL (8,4) data=%h parity=%h exp=%h", d4, p4, ref_par4(d4));
      end
    end
    for (int a = 0; a < 16; a++)
      for (int b = a + 1; b < 16; b++) begin
        checks++;
        if ($countones(cw[a] ^ cw[b]) < 4) begin
          failures++;
          $display("FAIL (8,4) distance %h/%h", cw[a], cw[b]);
        end
      end
    minw = 99;
    for (int i = 0; i < 64; i++)
      for (int j = i; j < 64; j++)
        for (int k = j; k < 64; k++) begin
          d64 = (64'(1) << i) | (64'(1) << j) | (64'(1) << k);
          d32 = 32'(d64);
          #1;
          if (i < 32 && j < 32 && k < 32) begin
            checks += 2;
            if ($countones({d32, p32}) < 4) begin
              failures++;
              $display("FAIL (39,32) weight data=%h parity=%h", d32, p32);
            end
            if ($countones({d32, p32}) % 2 != 0) failures++;
          end
          checks++;
          if ($countones({d64, p64}) < 4) begin
            failures++;
            $display("FAIL (72,64) weight data=%h parity=%h", d64, p64);
          end
          if ($countones({d64, p64}) < minw) minw = $countones({d64, p64});
        end
    // The bound is tight: some weight-3 data word gives a weight-4 codeword.
    checks++;
    if (minw != 4) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// xor_bank -- bitwise difference of two words.
//
// Bit i of diff is set when a and b differ in bit i, so the number of set
// bits is the Hamming distance between a and b. The matcher uses one bank
// of K bits for the data (tag) part and one of N-K bits for the parity part
// of the codeword. Combinational.
// The default width of 4 is the data part of the (8,4) example code.
module xor_bank #(
  parameter int W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] diff
);
  for (genvar i = 0; i < W; i++) begin : g_bit
    assign diff[i] = a[i] ^ b[i];
  end
endmodule

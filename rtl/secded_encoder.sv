// secded_encoder -- systematic single-error-correcting, double-error-
// detecting encoder (extended Hamming code).
//
// Produces the N-K parity bits of the codeword {data, parity} from the K
// data bits; the data part of the codeword is the data itself, which is
// what lets the matcher compare the data bits while this encoder is still
// working. The K data bits are placed, in order, at the positions 3, 5, 6,
// 7, 9, ... of a Hamming code (the positions that are not powers of two).
// Check bit i (i < N-K-1) is the XOR of the data bits whose position has
// bit i set; the last parity bit is the XOR of all data and check bits, which
// raises the minimum distance to 4 (correct 1 error, detect 2).
// The code construction is this design's choice; the matcher itself works
// with any systematic code whose parity is a linear function of the data.
//
// Interface: data[K-1:0] in, parity[N-K-1:0] out, parity[N-K-1] being the
// overall parity bit. Combinational. Defaults: the (8,4) code.
module secded_encoder #(
  parameter int K = 4,
  parameter int N = 8
) (
  input  logic [K-1:0]   data,
  output logic [N-K-1:0] parity
);
  import ecc_match_pkg::*;

  localparam int R = N - K - 1;   // Hamming check bits

  // Hamming position of data bit j.
  function automatic int data_pos(input int j);
    int pos, n;
    pos = 2;
    n   = -1;
    while (n < j) begin
      pos++;
      if ((pos & (pos - 1)) != 0) n++;
    end
    return pos;
  endfunction

  // Data bits that feed check bit i.
  function automatic logic [K-1:0] check_mask(input int i);
    logic [K-1:0] m;
    for (int j = 0; j < K; j++) m[j] = ((data_pos(j) >> i) & 1) == 1;
    return m;
  endfunction

  logic [R-1:0] chk;

  for (genvar i = 0; i < R; i++) begin : g_chk
    assign chk[i] = ^(data & check_mask(i));
  end

  assign parity = {(^data) ^ (^chk), chk};

  // The code must be long enough to give every data bit a position.
  initial begin
    assert (R >= 2 && data_pos(K - 1) < (1 << R))
      else $error("secded_encoder: N=%0d is too short for K=%0d", N, K);
  end
endmodule

// half_adder -- the processing element of the butterfly-formed weight
// accumulator (BWA).
//
// Both inputs carry the same weight w. The carry output has weight 2w and
// the sum output weight w, so carry*2w + sum*w equals the weighted count of
// the inputs. Purely combinational: outputs follow the inputs within the
// same cycle.
module half_adder (
  input  logic a,      // input bit of weight w
  input  logic b,      // input bit of weight w
  output logic carry,  // weight 2w
  output logic sum     // weight w
);
  assign carry = a & b;
  assign sum   = a ^ b;
endmodule

// or_tree -- OR-gate tree that flags a Hamming distance in the fourth range.
//
// Every input bit carries a weight larger than P_max, the largest power of
// two not above R_MAX+1, so any set input means the distance exceeds the
// detectable range. The tree is built as a balanced binary tree of 2-input
// ORs: level l combines pairs of level l-1 results, padding with 0.
// Interface: N_IN input bits, one output. Combinational.
// The default of two inputs is the second-level OR tree (output Q) of the
// (8,4) example, which ORs the weight-4 bit of each first-level BWA.
module or_tree #(
  parameter int N_IN = 2
) (
  input  logic [N_IN-1:0] in,
  output logic            any
);
  localparam int LEVELS = ecc_match_pkg::clog2i(N_IN);
  localparam int W      = 1 << LEVELS;

  // lvl[l] holds W >> l partial ORs.
  logic [W-1:0] lvl [LEVELS+1];

  assign lvl[0] = W'(in);

  for (genvar l = 0; l < LEVELS; l++) begin : g_level
    localparam int NOUT = W >> (l + 1);
    for (genvar g = 0; g < NOUT; g++) begin : g_gate
      assign lvl[l+1][g] = lvl[l][2*g] | lvl[l][2*g+1];
    end
    if (NOUT < W) begin : g_pad
      assign lvl[l+1][W-1:NOUT] = '0;
    end
  end

  assign any = lvl[LEVELS][0];
endmodule

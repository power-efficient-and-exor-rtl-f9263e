// gate_tree -- fan-out-free tree of AND or EXOR gates with limited fan-in.
//
// A wide AND (or EXOR) of N signals cannot be mapped onto one library cell,
// so it is decomposed into a tree in which every gate has at most MAX_FANIN
// inputs and every gate output drives exactly one gate of the next level.
// Level 0 is the input vector; each level groups the signals of the level
// below, left to right, MAX_FANIN at a time (the last group may be smaller,
// and a group of one is a plain wire). The number of levels is
// ceil(log_MAX_FANIN(N)).
//
// The fan-in limits (4 for AND, 3 for EXOR) and the use of fan-out-free trees
// follow the technology binding of the networks; the left-to-right greedy
// grouping is this design's own choice.
//
// Interface: in[N-1:0] -> out. Purely combinational, no clock.
module gate_tree
  import ah_pkg::*;
#(
  parameter tree_op_e    OP        = TREE_AND,
  parameter int unsigned N         = 6,
  parameter int unsigned MAX_FANIN = AND_MAX_FANIN
) (
  input  logic [N-1:0] in,
  output logic         out
);

  localparam int unsigned LEVELS = tree_levels(N, MAX_FANIN);

  // node[l] holds the tree_width(N, MAX_FANIN, l) signals of level l in its
  // low bits; the bits above are tied to zero and never read.
  logic [N-1:0] node [LEVELS+1];

  assign node[0] = in;

  for (genvar l = 0; l < LEVELS; l++) begin : g_level
    localparam int unsigned NIN  = tree_width(N, MAX_FANIN, l);
    localparam int unsigned NOUT = tree_width(N, MAX_FANIN, l + 1);
    for (genvar g = 0; g < NOUT; g++) begin : g_gate
      localparam int unsigned LO  = g * MAX_FANIN;
      localparam int unsigned CNT = (NIN - LO < MAX_FANIN) ? (NIN - LO) : MAX_FANIN;
      if (OP == TREE_AND) begin : g_and
        assign node[l+1][g] = &node[l][LO +: CNT];
      end else begin : g_xor
        assign node[l+1][g] = ^node[l][LO +: CNT];
      end
    end
    if (NOUT < N) begin : g_tie
      assign node[l+1][N-1:NOUT] = '0;
    end
  end

  assign out = node[LEVELS][0];

endmodule

// ah_pkg -- shared types and constants for the AND-EXOR-Inverter realisation
// of Achilles' heel functions.
//
// An Achilles' heel function of support size n = p*q is the read-once sum of
// products f = c_1 + c_2 + ... + c_q, where every cube c_i is the AND of p
// literals on its own p inputs (no input is shared between cubes). Three
// variants are used:
//   AH_PAH  (positive)   every literal is the true input,
//   AH_PHAH (pure horn)  exactly one literal per cube is complemented,
//   AH_NAH  (negative)   every literal is complemented.
// Which literal of a pure-horn cube is complemented is this design's choice:
// the lowest-numbered input of the cube.
//
// The gate library limits follow the technology binding used for the
// networks: AND gates have at most four inputs, EXOR gates at most three;
// wider gates are decomposed into fan-out-free trees (see gate_tree).
package ah_pkg;

  // Function variant. The order matches the benchmark tables (PAH, PHAH, NAH).
  typedef enum logic [1:0] {
    AH_PAH  = 2'd0,
    AH_PHAH = 2'd1,
    AH_NAH  = 2'd2
  } ah_variant_e;

  localparam int unsigned AH_NUM_VARIANTS = 3;

  // Gate type of a reduction tree.
  typedef enum logic {
    TREE_AND = 1'b0,
    TREE_XOR = 1'b1
  } tree_op_e;

  // Largest fan-in of a single library gate.
  localparam int unsigned AND_MAX_FANIN = 4;
  localparam int unsigned XOR_MAX_FANIN = 3;

  // Widest cube supported by the literal-polarity mask below.
  localparam int unsigned AH_MAX_P = 32;

  // Input-inversion mask of one cube of p literals: bit j set means input j
  // of the cube drives the AND through an inverter.
  function automatic logic [AH_MAX_P-1:0] cube_inv_mask(ah_variant_e variant, int unsigned p);
    logic [AH_MAX_P-1:0] m;
    m = '0;
    unique case (variant)
      AH_PAH:  m = '0;
      AH_PHAH: m[0] = 1'b1;
      AH_NAH:  for (int unsigned j = 0; j < AH_MAX_P; j++) m[j] = (j < p);
      default: m = '0;
    endcase
    return m;
  endfunction

  // Number of gate levels a fan-out-free tree with gates of at most f inputs
  // needs to reduce n signals to one.
  function automatic int unsigned tree_levels(int unsigned n, int unsigned f);
    int unsigned lv;
    int unsigned m;
    lv = 0;
    m  = n;
    while (m > 1) begin
      m  = (m + f - 1) / f;
      lv = lv + 1;
    end
    return lv;
  endfunction

  // Number of signals left after `lvl` levels of such a tree.
  function automatic int unsigned tree_width(int unsigned n, int unsigned f, int unsigned lvl);
    int unsigned m;
    m = n;
    for (int unsigned i = 0; i < lvl; i++) m = (m + f - 1) / f;
    return m;
  endfunction

endpackage

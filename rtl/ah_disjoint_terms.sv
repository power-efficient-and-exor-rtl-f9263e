// ah_disjoint_terms -- cube inversion network that makes the cubes disjoint.
//
// An OR of cubes becomes an EXOR of cubes once the cubes are made mutually
// exclusive (two disjoint cubes give a + b = a XOR b), and a + b can be
// rewritten as a XOR (~a & b). Applied to c_1 + ... + c_K this gives
//   f = t_1 ^ t_2 ^ ... ^ t_K,   t_i = c_i & ~c_1 & ~c_2 & ... & ~c_(i-1),
// so t_i is true exactly when c_i is the first true cube. The network uses
// K-1 cube inverters (c_K is never inverted) and K product terms, each an
// AND tree of at most four-input gates. At most one t_i is true at a time.
// t_1 needs no gate: term[0] is a wire from cube[0].
//
// Interface: cube[K-1:0] -> term[K-1:0]. Purely combinational. K must be at
// least 2. Cube c_1 is cube[0]; the priority order (lowest index first) is
// this design's choice: any fixed order gives the same function.
module ah_disjoint_terms
  import ah_pkg::*;
#(
  parameter int unsigned K = 2
) (
  input  logic [K-1:0] cube,
  output logic [K-1:0] term
);

  // Product-term inverters: one for every cube but the last.
  logic [K-2:0] cube_n;
  assign cube_n = ~cube[K-2:0];

  // The first term is the first cube itself.
  assign term[0] = cube[0];

  for (genvar i = 1; i < K; i++) begin : g_term
    logic [i:0] and_in;
    assign and_in = {cube[i], cube_n[i-1:0]};
    gate_tree #(
      .OP       (TREE_AND),
      .N        (i + 1),
      .MAX_FANIN(AND_MAX_FANIN)
    ) u_and (
      .in (and_in),
      .out(term[i])
    );
  end

endmodule

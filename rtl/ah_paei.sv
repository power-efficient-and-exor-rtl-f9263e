// ah_paei -- one Achilles' heel function in AND-EXOR-Inverter form.
//
// f = c_1 + c_2 + ... + c_Q, where cube c_i is the AND of the P literals on
// inputs x[i*P +: P]. A plain two-level AND-EXOR form of this function needs
// 2^Q - 1 products; this realisation needs only Q products and Q-1 product
// term inversions:
//   1. ah_cube          -- Q cubes (input inverters + AND trees),
//   2. ah_disjoint_terms -- makes the cubes disjoint, t_i = c_i & ~c_(j<i),
//   3. gate_tree (EXOR) -- f = t_1 ^ ... ^ t_Q with EXOR gates of at most
//                          three inputs.
// Every node other than the primary inputs and the cube outputs drives one
// gate only, which keeps the network easy to test for stuck-at faults.
//
// Interface: x[P*Q-1:0] -> f. Purely combinational. The assignment of inputs
// to cubes (cube i owns x[i*P +: P]) is this design's own choice. P >= 1,
// Q >= 2.
module ah_paei
  import ah_pkg::*;
#(
  parameter ah_variant_e VARIANT = AH_PAH,
  parameter int unsigned P       = 2,
  parameter int unsigned Q       = 2
) (
  input  logic [P*Q-1:0] x,
  output logic           f
);

  logic [Q-1:0] cube;
  logic [Q-1:0] term;

  for (genvar i = 0; i < Q; i++) begin : g_cube
    ah_cube #(
      .VARIANT(VARIANT),
      .P      (P)
    ) u_cube (
      .x(x[i*P +: P]),
      .c(cube[i])
    );
  end

  ah_disjoint_terms #(
    .K(Q)
  ) u_terms (
    .cube(cube),
    .term(term)
  );

  gate_tree #(
    .OP       (TREE_XOR),
    .N        (Q),
    .MAX_FANIN(XOR_MAX_FANIN)
  ) u_xor (
    .in (term),
    .out(f)
  );

endmodule

// ah_cube -- one essential prime cube of an Achilles' heel function.
//
// The cube is the AND of P literals on its own P inputs. Literals that the
// variant complements pass through an inverter first (no cell of the library
// has inverted inputs); the AND of the P literals is a gate_tree of AND gates
// with at most four inputs each. The positive variant needs no inverters, the
// negative variant one per input and the pure-horn variant one per cube.
//
// Interface: x[P-1:0] (input j of this cube) -> c (cube value).
// Purely combinational. The choice of input 0 as the complemented literal of
// a pure-horn cube is this design's own (see ah_pkg).
module ah_cube
  import ah_pkg::*;
#(
  parameter ah_variant_e VARIANT = AH_PAH,
  parameter int unsigned P       = 2
) (
  input  logic [P-1:0] x,
  output logic         c
);

  localparam logic [AH_MAX_P-1:0] INV_MASK = cube_inv_mask(VARIANT, P);

  logic [P-1:0] lit;

  // Input inverters.
  assign lit = x ^ INV_MASK[P-1:0];

  gate_tree #(
    .OP       (TREE_AND),
    .N        (P),
    .MAX_FANIN(AND_MAX_FANIN)
  ) u_and (
    .in (lit),
    .out(c)
  );

endmodule

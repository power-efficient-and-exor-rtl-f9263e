// ah_suite -- the benchmark set of Achilles' heel functions, side by side.
//
// The set covers every cube width p from P_MIN to P_MAX, every cube count q
// from Q_MIN to Q_MAX and the three variants (positive, pure horn, negative):
// 5 x 2 x 3 = 30 independent functions with 4 to 18 inputs at the defaults,
// named pPAHn, pPHAHn and pNAHn with n = p*q inputs (2PAH4 ... 6NAH18). Each
// is an ah_paei instance; they share no logic.
//
// Interface: function (v, p, q) reads x[v][p-P_MIN][q-Q_MIN][p*q-1:0] and
// drives f[v][p-P_MIN][q-Q_MIN], with v = 0 PAH, 1 PHAH, 2 NAH. Input bits
// at and above p*q of each vector are not connected: a single vector width
// MAX_N serves all functions. Purely combinational.
module ah_suite
  import ah_pkg::*;
#(
  parameter int unsigned P_MIN = 2,
  parameter int unsigned P_MAX = 6,
  parameter int unsigned Q_MIN = 2,
  parameter int unsigned Q_MAX = 3
) (
  input  logic [P_MAX*Q_MAX-1:0] x [AH_NUM_VARIANTS][P_MAX-P_MIN+1][Q_MAX-Q_MIN+1],
  output logic                   f [AH_NUM_VARIANTS][P_MAX-P_MIN+1][Q_MAX-Q_MIN+1]
);

  for (genvar v = 0; v < AH_NUM_VARIANTS; v++) begin : g_var
    for (genvar pi = 0; pi <= P_MAX - P_MIN; pi++) begin : g_p
      for (genvar qi = 0; qi <= Q_MAX - Q_MIN; qi++) begin : g_q
        localparam int unsigned P = P_MIN + pi;
        localparam int unsigned Q = Q_MIN + qi;
        ah_paei #(
          .VARIANT(ah_variant_e'(v)),
          .P      (P),
          .Q      (Q)
        ) u_fn (
          .x(x[v][pi][qi][P*Q-1:0]),
          .f(f[v][pi][qi])
        );
      end
    end
  end

endmodule

// tb_ah_suite -- end-to-end test of the full benchmark set at its default size.
//
// All 30 functions (p = 2..6, q = 2..3, positive, pure-horn and negative) are
// driven from one 18-bit counter that runs through all 2^18 values, so every
// function sees each of its input vectors at least once. Each output is
// compared with the sum of products evaluated directly in the testbench.
//
// Mechanisms counted per function, each of which must occur at least once:
//   no_cube    -- no cube true (output 0, all terms off),
//   first[i]   -- cube i is the first true cube, so disjoint term i carries
//                 the output (i = 1..q),
//   overlap    -- two or more cubes true at once, the case in which the cube
//                 inversions are needed to keep the terms disjoint.
// A watchdog ends the run after a fixed number of cycles.
module tb_ah_suite;
  import ah_pkg::*;

  localparam int unsigned NP = 5;
  localparam int unsigned NQ = 2;
  localparam int unsigned NX = 18;

  int checks   = 0;
  int failures = 0;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [NX-1:0] x [AH_NUM_VARIANTS][NP][NQ];
  logic          f [AH_NUM_VARIANTS][NP][NQ];

  ah_suite u_dut (
    .x(x),
    .f(f)
  );

  int no_cube [AH_NUM_VARIANTS][NP][NQ];
  int overlap [AH_NUM_VARIANTS][NP][NQ];
  int first   [AH_NUM_VARIANTS][NP][NQ][3];

  string vname [AH_NUM_VARIANTS] = '{"PAH", "PHAH", "NAH"};

  initial begin
    for (int v = 0; v < AH_NUM_VARIANTS; v++)
      for (int pi = 0; pi < NP; pi++)
        for (int qi = 0; qi < NQ; qi++) begin
          x[v][pi][qi] = '0;
          no_cube[v][pi][qi] = 0;
          overlap[v][pi][qi] = 0;
          for (int i = 0; i < 3; i++) first[v][pi][qi][i] = 0;
        end

    for (int n = 0; n < (1 << NX); n++) begin
      @(posedge clk);
      for (int v = 0; v < AH_NUM_VARIANTS; v++)
        for (int pi = 0; pi < NP; pi++)
          for (int qi = 0; qi < NQ; qi++) x[v][pi][qi] = NX'(n);
      #1;
      for (int v = 0; v < AH_NUM_VARIANTS; v++)
        for (int pi = 0; pi < NP; pi++)
          for (int qi = 0; qi < NQ; qi++) begin
            int p, q, cnt, fst;
            p   = pi + 2;
            q   = qi + 2;
            // Only the first 2^(p*q) counter values are new vectors.
            if (n < (1 << (p * q))) begin
              cnt = 0;
              fst = -1;
              for (int i = 0; i < q; i++) begin
                logic c;
                c = 1'b1;
                for (int j = 0; j < p; j++) begin
                  logic lit;
                  lit = x[v][pi][qi][i*p + j];
                  if (v == 2 || (v == 1 && j == 0)) lit = ~lit;
                  c = c & lit;
                end
                if (c) begin
                  cnt++;
                  if (fst < 0) fst = i;
                end
              end
              if (cnt == 0) no_cube[v][pi][qi]++;
              if (cnt >= 2) overlap[v][pi][qi]++;
              if (fst >= 0) first[v][pi][qi][fst]++;
              checks++;
              if (f[v][pi][qi] !== (cnt > 0)) begin
                failures++;
                if (failures <= 10)
                  $display("FAIL %0d%s%0d x=%b: got %0b expected %0b", p, vname[v], p * q,
                           x[v][pi][qi], f[v][pi][qi], cnt > 0);
              end
            end
          end
    end

    for (int v = 0; v < AH_NUM_VARIANTS; v++)
      for (int pi = 0; pi < NP; pi++)
        for (int qi = 0; qi < NQ; qi++) begin
          int p, q;
          p = pi + 2;
          q = qi + 2;
          $display("%0d%s%0d: no_cube=%0d overlap=%0d first=%0d/%0d/%0d", p, vname[v], p * q,
                   no_cube[v][pi][qi], overlap[v][pi][qi], first[v][pi][qi][0],
                   first[v][pi][qi][1], first[v][pi][qi][2]);
          checks++;
          if (no_cube[v][pi][qi] == 0 || overlap[v][pi][qi] == 0) begin
            failures++;
            $display("FAIL %0d%s%0d: a mechanism never occurred", p, vname[v], p * q);
          end
          for (int i = 0; i < q; i++) begin
            checks++;
            // Cube i is first true for exactly 2^(p*(q-i-1)) * (2^p - 1)^i vectors.
            if (first[v][pi][qi][i] != (1 << (p * (q - i - 1))) * ((1 << p) - 1) ** i) begin
              failures++;
              $display("FAIL %0d%s%0d: term %0d carried the output %0d times", p, vname[v],
                       p * q, i + 1, first[v][pi][qi][i]);
            end
          end
        end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat ((1 << NX) + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

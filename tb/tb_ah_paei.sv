// tb_ah_paei -- self-checking test of one Achilles' heel function.
//
// Eighteen functions are instantiated: all three variants with p = 2..4 and
// q = 2..3 (4 to 12 inputs). All are driven from one 12-bit counter, so each
// sees every one of its input vectors. The expected value is the sum of
// products evaluated directly in the testbench (OR over the cubes of the AND
// of their literals), independent of the EXOR form built by the design. The
// number of vectors with two or more true cubes (where the EXOR form differs
// from a plain EXOR of the cubes) is counted and must be non-zero. Three more
// functions with p = 2 and q = 16 (32 inputs, the widest size of the cube
// count study) are driven with 20000 random vectors each. A watchdog ends the
// run after a fixed number of cycles.
module tb_ah_paei;
  import ah_pkg::*;

  int checks   = 0;
  int failures = 0;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [11:0] x;
  logic        f [AH_NUM_VARIANTS][3][2];

  for (genvar v = 0; v < AH_NUM_VARIANTS; v++) begin : g_v
    for (genvar pi = 0; pi < 3; pi++) begin : g_p
      for (genvar qi = 0; qi < 2; qi++) begin : g_q
        ah_paei #(.VARIANT(ah_variant_e'(v)), .P(pi + 2), .Q(qi + 2)) u_dut (
          .x(x[(pi+2)*(qi+2)-1:0]),
          .f(f[v][pi][qi])
        );
      end
    end
  end

  logic [31:0] xw;
  logic        fw [AH_NUM_VARIANTS];

  for (genvar v = 0; v < AH_NUM_VARIANTS; v++) begin : g_wide
    ah_paei #(.VARIANT(ah_variant_e'(v)), .P(2), .Q(16)) u_dut (
      .x(xw),
      .f(fw[v])
    );
  end

  // Number of true cubes of function (v, p, q) for input vector in.
  function automatic int true_cubes(int v, int p, int q, logic [31:0] in);
    int cnt = 0;
    for (int i = 0; i < q; i++) begin
      logic c = 1'b1;
      for (int j = 0; j < p; j++) begin
        logic lit = in[i*p + j];
        if (v == 2 || (v == 1 && j == 0)) lit = ~lit;
        c = c & lit;
      end
      if (c) cnt++;
    end
    return cnt;
  endfunction

  initial begin
    int overlaps;
    overlaps = 0;
    x = '0;
    xw = '0;
    for (int n = 0; n < 4096; n++) begin
      @(posedge clk);
      x = 12'(n);
      #1;
      for (int v = 0; v < AH_NUM_VARIANTS; v++)
        for (int pi = 0; pi < 3; pi++)
          for (int qi = 0; qi < 2; qi++) begin
            int tc;
            tc = true_cubes(v, pi + 2, qi + 2, 32'(x));
            if (tc >= 2) overlaps++;
            checks++;
            if (f[v][pi][qi] !== (tc > 0)) begin
              failures++;
              if (failures <= 10)
                $display("FAIL variant %0d p=%0d q=%0d x=%b: got %0b", v, pi + 2, qi + 2, x, f[v][pi][qi]);
            end
          end
    end
    for (int n = 0; n < 20000; n++) begin
      @(posedge clk);
      xw = $urandom;
      // Every fourth vector makes the function depend on a late cube only.
      if (n % 4 == 0) xw = xw & ~32'(32'hffff_ffff >> ($urandom % 32));
      #1;
      for (int v = 0; v < AH_NUM_VARIANTS; v++) begin
        int tc;
        tc = true_cubes(v, 2, 16, xw);
        if (tc >= 2) overlaps++;
        checks++;
        if (fw[v] !== (tc > 0)) begin
          failures++;
          if (failures <= 10) $display("FAIL wide variant %0d x=%h: got %0b", v, xw, fw[v]);
        end
      end
    end
    checks++;
    if (overlaps == 0) begin
      failures++;
      $display("FAIL no vector with overlapping cubes was applied");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_ah_cube -- self-checking test of a single cube with input inverters.
//
// Fifteen cubes are instantiated: every variant with P = 2..6 literals. Each
// is driven with all 2^P input vectors from a shared counter. The expected
// value follows the variant definitions directly: positive cube = AND of the
// inputs, negative cube = NOR of the inputs, pure-horn cube = ~x[0] AND the
// other inputs. A watchdog ends the run after a fixed number of cycles.
module tb_ah_cube;
  import ah_pkg::*;

  int checks   = 0;
  int failures = 0;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [5:0] x;
  logic       c [AH_NUM_VARIANTS][5];

  for (genvar v = 0; v < AH_NUM_VARIANTS; v++) begin : g_v
    for (genvar pi = 0; pi < 5; pi++) begin : g_p
      ah_cube #(.VARIANT(ah_variant_e'(v)), .P(pi + 2)) u_dut (
        .x(x[pi+1:0]),
        .c(c[v][pi])
      );
    end
  end

  function automatic logic expected(int v, int p, logic [5:0] in);
    logic r = 1'b1;
    case (v)
      0: for (int j = 0; j < p; j++) r = r & in[j];
      1: begin
        r = ~in[0];
        for (int j = 1; j < p; j++) r = r & in[j];
      end
      default: for (int j = 0; j < p; j++) r = r & ~in[j];
    endcase
    return r;
  endfunction

  initial begin
    int ones;
    ones = 0;
    x = '0;
    for (int n = 0; n < 64; n++) begin
      @(posedge clk);
      x = 6'(n);
      #1;
      for (int v = 0; v < AH_NUM_VARIANTS; v++)
        for (int pi = 0; pi < 5; pi++) begin
          checks++;
          if (c[v][pi]) ones++;
          if (c[v][pi] !== expected(v, pi + 2, x)) begin
            failures++;
            if (failures <= 10)
              $display("FAIL variant %0d p=%0d x=%b: got %0b", v, pi + 2, x, c[v][pi]);
          end
        end
    end
    // Each cube is true for exactly one of its 2^P vectors, seen 64/2^P times.
    checks++;
    if (ones != AH_NUM_VARIANTS * (16 + 8 + 4 + 2 + 1)) begin
      failures++;
      $display("FAIL cube true count %0d", ones);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

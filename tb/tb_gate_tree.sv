// tb_gate_tree -- self-checking test of the fan-in-limited gate tree.
//
// Five trees are checked: AND over 1, 4, 6 and 17 inputs with four-input
// gates, and EXOR over 2, 7 and 18 inputs with three-input gates. Trees of up
// to 7 inputs are driven with every input vector, the wide ones with 4000
// random vectors. The expected output is the plain reduction (&x or ^x)
// computed in the testbench. A watchdog ends the run after a fixed number of
// clock cycles.
module tb_gate_tree;
  import ah_pkg::*;

  int checks   = 0;
  int failures = 0;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [0:0]  a1;
  logic [3:0]  a4;
  logic [5:0]  a6;
  logic [16:0] a17;
  logic [1:0]  e2;
  logic [6:0]  e7;
  logic [17:0] e18;
  logic ya1, ya4, ya6, ya17, ye2, ye7, ye18;

  gate_tree #(.OP(TREE_AND), .N(1),  .MAX_FANIN(AND_MAX_FANIN)) u_a1  (.in(a1),  .out(ya1));
  gate_tree #(.OP(TREE_AND), .N(4),  .MAX_FANIN(AND_MAX_FANIN)) u_a4  (.in(a4),  .out(ya4));
  gate_tree #(.OP(TREE_AND), .N(6),  .MAX_FANIN(AND_MAX_FANIN)) u_a6  (.in(a6),  .out(ya6));
  gate_tree #(.OP(TREE_AND), .N(17), .MAX_FANIN(AND_MAX_FANIN)) u_a17 (.in(a17), .out(ya17));
  gate_tree #(.OP(TREE_XOR), .N(2),  .MAX_FANIN(XOR_MAX_FANIN)) u_e2  (.in(e2),  .out(ye2));
  gate_tree #(.OP(TREE_XOR), .N(7),  .MAX_FANIN(XOR_MAX_FANIN)) u_e7  (.in(e7),  .out(ye7));
  gate_tree #(.OP(TREE_XOR), .N(18), .MAX_FANIN(XOR_MAX_FANIN)) u_e18 (.in(e18), .out(ye18));

  task automatic check(string name, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures <= 10) $display("FAIL %s: got %0b expected %0b", name, got, exp);
    end
  endtask

  // Reference reductions written bit by bit.
  function automatic logic ref_and(logic [31:0] v, int n);
    logic r = 1'b1;
    for (int i = 0; i < n; i++) r = r & v[i];
    return r;
  endfunction
  function automatic logic ref_xor(logic [31:0] v, int n);
    logic r = 1'b0;
    for (int i = 0; i < n; i++) r = r ^ v[i];
    return r;
  endfunction

  initial begin
    a1 = '0; a4 = '0; a6 = '0; a17 = '0; e2 = '0; e7 = '0; e18 = '0;
    for (int v = 0; v < 128; v++) begin
      @(posedge clk);
      a1 = v[0:0]; a4 = v[3:0]; a6 = v[5:0]; e2 = v[1:0]; e7 = v[6:0];
      #1;
      if (v < 2)  check("and1", ya1, ref_and(32'(a1), 1));
      if (v < 16) check("and4", ya4, ref_and(32'(a4), 4));
      if (v < 64) check("and6", ya6, ref_and(32'(a6), 6));
      if (v < 4)  check("xor2", ye2, ref_xor(32'(e2), 2));
      check("xor7", ye7, ref_xor(32'(e7), 7));
    end
    for (int v = 0; v < 4000; v++) begin
      @(posedge clk);
      e18 = 18'($urandom);
      // Bias the AND input towards all-ones so both outputs are seen.
      a17 = (v % 3 == 0) ? ~17'(1 << ($urandom % 20)) : 17'($urandom);
      #1;
      check("and17", ya17, ref_and(32'(a17), 17));
      check("xor18", ye18, ref_xor(32'(e18), 18));
    end
    // Corner vectors for the wide trees.
    @(posedge clk);
    a17 = '1; e18 = '1;
    #1;
    check("and17_ones", ya17, 1'b1);
    check("xor18_ones", ye18, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

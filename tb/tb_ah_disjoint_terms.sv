// tb_ah_disjoint_terms -- self-checking test of the cube inversion network.
//
// Networks for K = 2..6 cubes are driven with every cube pattern. Expected:
// term i is true exactly when cube i is true and no lower-numbered cube is
// (found by a scan in the testbench); at most one term is true; and the OR of
// the cubes equals the EXOR of the terms. A watchdog ends the run after a
// fixed number of cycles.
module tb_ah_disjoint_terms;
  int checks   = 0;
  int failures = 0;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [5:0] cube;
  logic [1:0] t2;
  logic [2:0] t3;
  logic [3:0] t4;
  logic [4:0] t5;
  logic [5:0] t6;

  ah_disjoint_terms #(.K(2)) u_k2 (.cube(cube[1:0]), .term(t2));
  ah_disjoint_terms #(.K(3)) u_k3 (.cube(cube[2:0]), .term(t3));
  ah_disjoint_terms #(.K(4)) u_k4 (.cube(cube[3:0]), .term(t4));
  ah_disjoint_terms #(.K(5)) u_k5 (.cube(cube[4:0]), .term(t5));
  ah_disjoint_terms #(.K(6)) u_k6 (.cube(cube[5:0]), .term(t6));

  task automatic check_k(int k, logic [5:0] got);
    logic [5:0] exp;
    int first;
    logic any, par;
    exp = '0;
    first = -1;
    any = 1'b0;
    par = 1'b0;
    for (int i = 0; i < k; i++) begin
      if (cube[i] && first < 0) first = i;
      any = any | cube[i];
      par = par ^ got[i];
    end
    if (first >= 0) exp[first] = 1'b1;
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures <= 10) $display("FAIL K=%0d cube=%b: terms %b expected %b", k, cube, got, exp);
    end
    checks++;
    if (!$onehot0(got)) begin
      failures++;
      if (failures <= 10) $display("FAIL K=%0d cube=%b: terms not disjoint %b", k, cube, got);
    end
    checks++;
    if (par !== any) begin
      failures++;
      if (failures <= 10) $display("FAIL K=%0d cube=%b: EXOR of terms differs from OR", k, cube);
    end
  endtask

  initial begin
    cube = '0;
    for (int n = 0; n < 64; n++) begin
      @(posedge clk);
      cube = 6'(n);
      #1;
      if (n < 4)  check_k(2, 6'(t2));
      if (n < 8)  check_k(3, 6'(t3));
      if (n < 16) check_k(4, 6'(t4));
      if (n < 32) check_k(5, 6'(t5));
      check_k(6, t6);
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

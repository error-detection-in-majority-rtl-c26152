// tb_eg_ldpc_pkg - checks the code constants computed by eg_ldpc_pkg:
// (N,K,J) of the EG codes for S=2,3,4 and of the difference-set codes for
// S=1,2,3; the generator polynomials of the (15,7), (63,37) and (73,45) codes
// against tabulated values; the (15,7) check sums against the code tables;
// and for those three codes that every check sum has weight J, contains bit
// N-1, is orthogonal to the others and is a parity check of every codeword
// x^i*g(x).
module tb_eg_ldpc_pkg;
  import eg_ldpc_pkg::*;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic check_code(input code_family_e f, input int s, input vec_t g);
    int   n = code_n(f, s);
    int   j = code_j(f, s);
    vec_t seen = '0;
    for (int c = 0; c < j; c++) begin
      vec_t m = vec_t'(check_mask(f, s, c));
      check(popcount(m) == j, $sformatf("S=%0d mask %0d weight", s, c));
      check(m[n-1] == 1'b1, $sformatf("S=%0d mask %0d has bit N-1", s, c));
      m[n-1] = 1'b0;
      check((seen & m) == '0, $sformatf("S=%0d mask %0d orthogonal", s, c));
      seen = seen | m;
      m[n-1] = 1'b1;
      for (int i = 0; i < code_k(f, s); i++)
        check(^(m & (g << i)) == 1'b0, $sformatf("S=%0d mask %0d vs x^%0d g", s, c, i));
    end
  endtask

  initial begin
    check(code_n(CODE_EG, 2) == 15 && code_k(CODE_EG, 2) == 7 && code_j(CODE_EG, 2) == 4, "(15,7) sizes");
    check(code_n(CODE_EG, 3) == 63 && code_k(CODE_EG, 3) == 37 && code_j(CODE_EG, 3) == 8, "(63,37) sizes");
    check(code_n(CODE_EG, 4) == 255 && code_k(CODE_EG, 4) == 175 && code_j(CODE_EG, 4) == 16, "(255,175) sizes");
    check(code_n(CODE_DSCC, 1) == 7 && code_k(CODE_DSCC, 1) == 3 && code_j(CODE_DSCC, 1) == 3, "(7,3) sizes");
    check(code_n(CODE_DSCC, 2) == 21 && code_k(CODE_DSCC, 2) == 11 && code_j(CODE_DSCC, 2) == 5, "(21,11) sizes");
    check(code_n(CODE_DSCC, 3) == 73 && code_k(CODE_DSCC, 3) == 45 && code_j(CODE_DSCC, 3) == 9, "(73,45) sizes");
    check(vec_t'(gen_poly(CODE_EG, 2)) == G15, "g(x) of (15,7)");
    check(vec_t'(gen_poly(CODE_EG, 3)) == G63, "g(x) of (63,37)");
    check(poly_deg(gen_poly(CODE_EG, 4)) == 80, "deg g(x) of (255,175)");
    check(vec_t'(gen_poly(CODE_DSCC, 3)) == G73, "g(x) of (73,45)");
    check(poly_deg(gen_poly(CODE_DSCC, 2)) == 10, "deg g(x) of (21,11)");
    for (int c = 0; c < 4; c++) begin
      automatic logic found = 1'b0;
      for (int r = 0; r < 4; r++) if (check_mask(CODE_EG, 2, c) == poly_t'(CS15[r])) found = 1'b1;
      check(found, $sformatf("(15,7) check sum %0d in table", c));
    end
    check_code(CODE_EG, 2, G15);
    check_code(CODE_EG, 3, G63);
    check_code(CODE_DSCC, 3, G73);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

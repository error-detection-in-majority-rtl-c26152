// tb_xor_matrix - all 2^15 tap values of the (15,7) check-sum network against
// the tabulated check sums, and for the (63,37) network that every codeword
// gives all-zero sums and that a single error in bit 62 sets all 8 sums
// while a single error elsewhere sets at most one. The same two checks are
// made for the (73,45) difference-set network (9 sums).
module tb_xor_matrix;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [14:0] t15;
  logic [3:0]  s15;
  logic [62:0] t63;
  logic [7:0]  s63;
  logic [72:0] t73;
  logic [8:0]  s73;
  logic [14:0] dut_mask [4];
  int          perm [4];

  xor_matrix #(.S(2)) dut15 (.taps_i(t15), .sums_o(s15));
  xor_matrix #(.S(3)) dut63 (.taps_i(t63), .sums_o(s63));
  xor_matrix #(.FAMILY(eg_ldpc_pkg::CODE_DSCC), .S(3)) dut73 (.taps_i(t73), .sums_o(s73));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    // Probe single-bit inputs to find which tabulated row each output uses
    // (the order of the sums is free), then check all inputs exhaustively.
    for (int b = 0; b < 15; b++) begin
      t15 = 15'(1) << b;
      #1;
      for (int j = 0; j < 4; j++) dut_mask[j][b] = s15[j];
    end
    for (int j = 0; j < 4; j++) begin
      perm[j] = -1;
      for (int r = 0; r < 4; r++) if (dut_mask[j] == CS15[r]) perm[j] = r;
      check(perm[j] >= 0, $sformatf("sum %0d support %b not a check sum", j, dut_mask[j]));
      for (int i = 0; i < j; i++) check(perm[i] != perm[j], "check sums distinct");
    end
    for (int v = 0; v < (1 << 15); v++) begin
      logic [3:0] want;
      t15 = 15'(v);
      #1;
      for (int j = 0; j < 4; j++) want[j] = (perm[j] >= 0) ? ^(t15 & CS15[perm[j]]) : 1'b0;
      check(s15 == want, $sformatf("taps %h: got %b expected %b", v, s15, want));
    end
    for (int t = 0; t < 2000; t++) begin
      automatic vec_t cw = clmul(rand_vec(37), G63);
      t63 = cw[62:0];
      #1;
      check(s63 == '0, "(63,37) codeword gives zero sums");
    end
    for (int b = 0; b < 63; b++) begin
      t63 = 63'(1) << b;
      #1;
      if (b == 62) check(s63 == '1, "(63,37) error in bit 62");
      else check($countones(s63) <= 1, $sformatf("(63,37) error in bit %0d", b));
    end
    for (int t = 0; t < 2000; t++) begin
      automatic vec_t cw = clmul(rand_vec(45), G73);
      t73 = cw[72:0];
      #1;
      check(s73 == '0, "(73,45) codeword gives zero sums");
    end
    for (int b = 0; b < 73; b++) begin
      t73 = 73'(1) << b;
      #1;
      if (b == 72) check(s73 == '1, "(73,45) error in bit 72");
      else check($countones(s73) <= 1, $sformatf("(73,45) error in bit %0d", b));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_eg_encoder - all 128 data words of the (15,7) encoder and 2000 random
// words each of the (63,37) EG encoder and the (73,45) difference-set
// encoder: the data must appear unchanged in the top K bits and the codeword
// must be divisible by the tabulated g(x).
module tb_eg_encoder;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [6:0]  d15;
  logic [14:0] c15;
  logic [36:0] d63;
  logic [62:0] c63;
  logic [44:0] d73;
  logic [72:0] c73;

  eg_encoder #(.S(2)) dut15 (.data_i(d15), .codeword_o(c15));
  eg_encoder #(.S(3)) dut63 (.data_i(d63), .codeword_o(c63));
  eg_encoder #(.FAMILY(eg_ldpc_pkg::CODE_DSCC), .S(3)) dut73 (.data_i(d73), .codeword_o(c73));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    for (int d = 0; d < 128; d++) begin
      d15 = 7'(d);
      #1;
      check(c15[14:8] == d15, $sformatf("(15,7) data %h", d));
      check(pmod(vec_t'(c15), G15) == '0, $sformatf("(15,7) codeword %h of %h", c15, d));
    end
    for (int t = 0; t < 2000; t++) begin
      d63 = 37'(rand_vec(37));
      #1;
      check(c63[62:26] == d63, "(63,37) data");
      check(pmod(vec_t'(c63), G63) == '0, $sformatf("(63,37) codeword of %h", d63));
    end
    for (int t = 0; t < 2000; t++) begin
      d73 = 45'(rand_vec(45));
      #1;
      check(c73[72:28] == d73, "(73,45) data");
      check(pmod(vec_t'(c73), G73) == '0, $sformatf("(73,45) codeword of %h", d73));
    end
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

// tb_majority_gate - every input of a 4-input and an 8-input majority gate:
// the output must be 1 exactly when more than half of the inputs are 1.
module tb_majority_gate;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [3:0] in4;
  logic [7:0] in8;
  logic       m4, m8;

  majority_gate #(.J(4)) dut4 (.in_i(in4), .maj_o(m4));
  majority_gate #(.J(8)) dut8 (.in_i(in8), .maj_o(m8));

  initial begin
    for (int v = 0; v < 256; v++) begin
      automatic int ones4 = 0, ones8 = 0;
      in4 = 4'(v);
      in8 = 8'(v);
      for (int i = 0; i < 8; i++) begin
        ones8 += (v >> i) & 1;
        if (i < 4) ones4 += (v >> i) & 1;
      end
      #1;
      checks += 2;
      if (m4 != (ones4 > 2)) begin failures++; $display("FAIL: J=4 in=%b", in4); end
      if (m8 != (ones8 > 4)) begin failures++; $display("FAIL: J=8 in=%b", in8); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_cyclic_shift_register - random loads, shifts and correction requests
// against a reference rotation model; also checks that N shifts with no
// correction bring a word back to its original alignment.
module tb_cyclic_shift_register;
  localparam int N = 15;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic         load_i = 0, shift_i = 0, correct_i = 0;
  logic [N-1:0] codeword_i = 0, taps_o, model;

  cyclic_shift_register #(.N(N)) dut (.*);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 check(taps_o == '0, "reset value");
    rst_n = 1;
    model = '0;
    // Full rotation with no correction returns the loaded word.
    @(negedge clk);
    load_i = 1; codeword_i = 15'h5a3c; model = codeword_i;
    @(negedge clk);
    load_i = 0; shift_i = 1;
    repeat (N) @(negedge clk);
    shift_i = 0;
    check(taps_o == 15'h5a3c, "N shifts restore the word");
    for (int t = 0; t < 3000; t++) begin
      load_i     = ($urandom_range(15) == 0);
      shift_i    = 1'($urandom);
      correct_i  = 1'($urandom);
      codeword_i = N'($urandom);
      if (load_i) model = codeword_i;
      else if (shift_i) model = {model[N-2:0], model[N-1] ^ correct_i};
      @(negedge clk);
      check(taps_o == model, $sformatf("step %0d: got %h expected %h", t, taps_o, model));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

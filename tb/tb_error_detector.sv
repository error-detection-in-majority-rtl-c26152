// tb_error_detector - random clear/sample/check-sum sequences against a
// sticky-flag model: the flag rises only on a nonzero sum inside the
// sampling window, stays up until clear, and error_now_o already shows the
// current cycle's sums.
module tb_error_detector;
  localparam int J = 4;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic         clear_i = 0, sample_i = 0, error_now_o, error_o, model = 0;
  logic [J-1:0] sums_i = 0;

  error_detector #(.J(J)) dut (.*);

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      logic now;
      @(negedge clk);
      clear_i  = ($urandom_range(7) == 0);
      sample_i = 1'($urandom);
      sums_i   = ($urandom_range(2) == 0) ? J'($urandom) : '0;
      #1;
      now = model | (sample_i & (sums_i != 0));
      checks += 2;
      if (error_now_o != now) begin failures++; $display("FAIL: error_now at %0d", t); end
      if (error_o != model) begin failures++; $display("FAIL: error at %0d", t); end
      model = clear_i ? 1'b0 : now;
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

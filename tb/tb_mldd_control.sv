// tb_mldd_control - drives decode requests with error_now_i raised in a
// chosen cycle (or never) and checks the control outputs cycle by cycle:
// one load, the number of shift cycles (3 when no error shows in the
// window, 15 otherwise, also for an error that first shows after the
// window), the sampling window, done_o, early_o and ready_o.
module tb_mldd_control;
  localparam int N = 15, D = 3;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start_i = 0, error_now_i = 0;
  logic ready_o, load_o, shift_o, sample_o, done_o, early_o;

  mldd_control #(.N(N), .DETECT_CYCLES(D)) dut (.*);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // err_at: shift cycle (0-based) from which error_now_i is high, -1 never.
  task automatic run(input int err_at);
    int shifts = 0, samples = 0, cycles = 0;
    bit expect_early = (err_at < 0 || err_at >= D);
    @(negedge clk);
    check(ready_o, "ready while idle");
    start_i = 1;
    #1 check(load_o, "load with accepted start");
    @(negedge clk);
    start_i = 0;
    while (!done_o && cycles < 40) begin
      check(shift_o && !ready_o && !load_o, "shift while running");
      check(sample_o == (shifts < D), $sformatf("sample in shift %0d", shifts));
      error_now_i = (err_at >= 0 && shifts >= err_at) && sample_o;
      shifts++;
      cycles++;
      @(negedge clk);
    end
    error_now_i = 0;
    check(done_o, "done reached");
    check(!shift_o, "no shift when done");
    check(shifts == (expect_early ? D : N), $sformatf("err_at %0d: %0d shifts", err_at, shifts));
    check(early_o == expect_early, $sformatf("err_at %0d: early flag", err_at));
    @(negedge clk);
    check(!done_o && ready_o, "back to idle after one done cycle");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(-1);
    for (int e = 0; e < D; e++) run(e);
    run(D + 2);   // an error that only a later check sum would show
    for (int t = 0; t < 30; t++) run($urandom_range(5) - 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

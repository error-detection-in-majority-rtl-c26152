// tb_mldd_decoder - exhaustive error test of the (15,7) decoder.
//
// 200 error-free random codewords, then every error pattern of weight 0 to 4 (1941 patterns), each on a fresh random
// codeword d(x)*g(x), is decoded. Checks: an error-free word stops early after
// the three-cycle window (valid 4 clocks after start) with the error flag
// clear; every pattern of 1 to 4 bits is detected and decoded for all 15
// cycles (valid 16 clocks after start); patterns of 1 or 2 bits come out
// corrected. All 3003 five-bit patterns are decoded too and the number that
// escape detection in the window is reported (the code has weight-5
// codewords, so some must).
module tb_mldd_decoder;
  import tb_ref_pkg::*;
  localparam int N = 15, K = 7, D = 3;

  int checks = 0, failures = 0;
  int n_early = 0, n_full = 0, n_corrected = 0, n_w5_missed = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic         start_i = 0;
  logic [N-1:0] codeword_i = 0, codeword_o;
  logic [K-1:0] data_o;
  logic         ready_o, valid_o, error_o, early_o;

  mldd_decoder #(.S(2), .DETECT_CYCLES(D)) dut (.*);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic decode(input logic [N-1:0] word, output int latency);
    @(negedge clk);
    while (!ready_o) @(negedge clk);
    start_i    = 1;
    codeword_i = word;
    latency    = 0;
    @(negedge clk);
    start_i = 0;
    latency = 1;
    while (!valid_o && latency < 100) begin
      @(negedge clk);
      latency++;
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    // Error-free words: the common case in a memory.
    for (int t = 0; t < 200; t++) begin
      automatic vec_t cw = clmul(rand_vec(K), G15);
      int lat;
      decode(cw[N-1:0], lat);
      n_early += int'(early_o);
      check(lat == D + 1 && early_o && !error_o, $sformatf("clean word latency %0d", lat));
      check(codeword_o == cw[N-1:0] && data_o == cw[N-1:N-K], "clean word returned unchanged");
    end
    for (int e = 0; e < (1 << N); e++) begin
      automatic int           w = $countones(e);
      vec_t         cw;
      automatic logic [N-1:0] err = N'(e);
      int           lat;
      if (w > 5) continue;
      cw = clmul(rand_vec(K), G15);
      decode(cw[N-1:0] ^ err, lat);
      if (early_o) n_early++; else n_full++;
      if (w == 5) begin
        if (early_o) n_w5_missed++;
        check(lat == (early_o ? D + 1 : N + 1), $sformatf("w5 %h latency %0d", err, lat));
        continue;
      end
      check(lat == ((w == 0) ? D + 1 : N + 1), $sformatf("err %h latency %0d", err, lat));
      check(early_o == (w == 0), $sformatf("err %h early %b", err, early_o));
      check(error_o == (w != 0), $sformatf("err %h not detected", err));
      if (w <= 2) begin
        check(codeword_o == cw[N-1:0], $sformatf("err %h: got %h expected %h", err, codeword_o, cw[N-1:0]));
        check(data_o == cw[N-1:N-K], $sformatf("err %h data", err));
        if (w > 0 && codeword_o == cw[N-1:0]) n_corrected++;
      end
    end
    $display("early stops=%0d full decodes=%0d corrected=%0d five-bit escapes=%0d",
             n_early, n_full, n_corrected, n_w5_missed);
    check(n_early > 0 && n_full > 0 && n_corrected > 0, "every mechanism exercised");
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

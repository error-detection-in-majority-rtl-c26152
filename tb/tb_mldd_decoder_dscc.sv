// tb_mldd_decoder_dscc - the decoder built for the (73,45) difference-set
// cyclic code (J=9 check sums, corrects four bits). Random codewords
// d(x)*g(x) with 1500 random error patterns of each weight 1 to 5, plus
// error-free words: error-free words must stop after the three-cycle window
// (4 clocks), every error of up to five bits must be detected in it (full
// decode, 74 clocks), and errors of up to four bits must come out corrected.
module tb_mldd_decoder_dscc;
  import tb_ref_pkg::*;
  localparam int N = 73, K = 45, D = 3;

  int checks = 0, failures = 0, n_early = 0, n_full = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic         start_i = 0;
  logic [N-1:0] codeword_i = 0, codeword_o;
  logic [K-1:0] data_o;
  logic         ready_o, valid_o, error_o, early_o;

  mldd_decoder #(.FAMILY(eg_ldpc_pkg::CODE_DSCC), .S(3), .DETECT_CYCLES(D)) dut (.*);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int w = 0; w <= 5; w++) begin
      for (int t = 0; t < 1500; t++) begin
        automatic vec_t cw  = clmul(rand_vec(K), G73);
        automatic vec_t err = rand_err(N, w);
        automatic int   lat = 1;
        @(negedge clk);
        start_i    = 1;
        codeword_i = cw[N-1:0] ^ err[N-1:0];
        @(negedge clk);
        start_i = 0;
        while (!valid_o && lat < 200) begin
          @(negedge clk);
          lat++;
        end
        if (early_o) n_early++; else n_full++;
        check(lat == ((w == 0) ? D + 1 : N + 1), $sformatf("w%0d latency %0d", w, lat));
        check(error_o == (w != 0), $sformatf("w%0d detection", w));
        if (w <= 4) begin
          check(codeword_o == cw[N-1:0], $sformatf("w%0d correction", w));
          check(data_o == cw[N-1:N-K], $sformatf("w%0d data", w));
        end
        @(negedge clk);
      end
    end
    $display("early stops=%0d full decodes=%0d", n_early, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (900000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

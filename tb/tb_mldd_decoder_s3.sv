// tb_mldd_decoder_s3 - the decoder built for the (63,37) EG-LDPC code (S=3,
// J=8 check sums). Random codewords d(x)*g(x) with 1500 random error
// patterns of each weight 1 to 4, plus error-free words: error-free words
// must stop after the three-cycle window, every error of up to four bits must
// be detected in it, and (with 8 orthogonal sums) be fully corrected after
// 63 cycles.
module tb_mldd_decoder_s3;
  import tb_ref_pkg::*;
  localparam int N = 63, K = 37, D = 3;

  int checks = 0, failures = 0, n_early = 0, n_full = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic         start_i = 0;
  logic [N-1:0] codeword_i = 0, codeword_o;
  logic [K-1:0] data_o;
  logic         ready_o, valid_o, error_o, early_o;

  mldd_decoder #(.S(3), .DETECT_CYCLES(D)) dut (.*);

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
    for (int w = 0; w <= 4; w++) begin
      for (int t = 0; t < 1500; t++) begin
        automatic vec_t cw  = clmul(rand_vec(K), G63);
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
        check(codeword_o == cw[N-1:0], $sformatf("w%0d correction", w));
        check(data_o == cw[N-1:N-K], $sformatf("w%0d data", w));
        @(negedge clk);
      end
    end
    $display("early stops=%0d full decodes=%0d", n_early, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

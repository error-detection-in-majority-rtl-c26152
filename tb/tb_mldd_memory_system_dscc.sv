// tb_mldd_memory_system_dscc - end-to-end run of the protected memory built
// with the (73,45) difference-set cyclic code (FAMILY=CODE_DSCC, S=3; J=9
// check sums, four-bit correction) and 64 words.
//
// Same flow as the default-size test: random writes, soft errors of 0 to 5
// bits through the upset port (some as two separate upsets), a write/upset
// collision, then back-to-back reads. Checks per read: data returned
// correctly for up to four flipped bits, the error flag set and a full decode
// for any flipped bit (five included), early stop only for clean words, and
// the latency (5 clocks from the accepted request for a clean word, 75
// otherwise). Every mechanism must occur at least once.
module tb_mldd_memory_system_dscc;
  import tb_ref_pkg::*;
  localparam int N = 73, K = 45, DEPTH = 64, AW = 6;

  int checks = 0, failures = 0;
  int lat_sum = 0;
  int n_early = 0, n_full = 0, n_corr = 0, n_uncorr = 0, n_upset = 0, n_coll = 0, n_stall = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc++;

  logic          wr_en = 0, upset_en = 0, rd_en = 0;
  logic [AW-1:0] wr_addr = 0, upset_addr = 0, rd_addr = 0;
  logic [K-1:0]  wr_data = 0;
  logic [N-1:0]  upset_mask = 0;
  logic          rd_ready, rd_valid, rd_error, rd_early;
  logic [K-1:0]  rd_data;
  logic [N-1:0]  rd_codeword;

  mldd_memory_system #(.FAMILY(eg_ldpc_pkg::CODE_DSCC), .S(3)) dut (.*);

  logic [K-1:0] data_ref [DEPTH];
  logic [N-1:0] err_ref  [DEPTH];

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic upset(input int a, input logic [N-1:0] m);
    @(negedge clk);
    upset_en = 1; upset_addr = AW'(a); upset_mask = m;
    err_ref[a] ^= m;
    n_upset++;
    @(negedge clk);
    upset_en = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = AW'(a); wr_data = K'(rand_vec(K));
      data_ref[a] = wr_data;
      err_ref[a]  = '0;
    end
    @(negedge clk);
    wr_en = 0;
    for (int a = 0; a < DEPTH; a++) begin
      automatic int w = (a % 8 < 2) ? 0 : a % 8 - 2;
      if (w == 0) continue;
      if (w >= 2 && a % 16 >= 8) begin
        // Two separate upsets that together flip w bits.
        automatic vec_t e = rand_err(N, w);
        // The lowest flipped bit goes first, the rest in a second upset.
        automatic logic [N-1:0] first = e[N-1:0] & (~e[N-1:0] + N'(1));
        upset(a, first);
        upset(a, e[N-1:0] ^ first);
      end else begin
        automatic vec_t e = rand_err(N, w);
        upset(a, e[N-1:0]);
      end
    end
    // Write and upset to the same word in one cycle: the write wins.
    @(negedge clk);
    wr_en = 1; wr_addr = 0; wr_data = 45'h155;
    upset_en = 1; upset_addr = 0; upset_mask = 73'h3;
    data_ref[0] = 45'h155; err_ref[0] = '0;
    n_coll++;
    @(negedge clk);
    wr_en = 0; upset_en = 0;

    // Read every word back; the request stays high while the decoder is busy.
    @(negedge clk);
    rd_en = 1; rd_addr = 0;
    for (int a = 0; a < DEPTH; a++) begin
      int c0, lat, w;
      while (!rd_ready) begin
        n_stall++;
        @(negedge clk);
      end
      c0 = cyc;
      @(negedge clk);
      if (a + 1 < DEPTH) rd_addr = AW'(a + 1); else rd_en = 0;
      while (!rd_valid && cyc - c0 < 200) begin
        if (rd_en && !rd_ready) n_stall++;
        @(negedge clk);
      end
      lat = cyc - c0;
      lat_sum += lat;
      w = $countones(err_ref[a]);
      check(rd_valid, $sformatf("addr %0d: no result", a));
      check(lat == ((w == 0) ? 5 : 75), $sformatf("addr %0d: latency %0d (w=%0d)", a, lat, w));
      check(rd_early == (w == 0), $sformatf("addr %0d: early %b (w=%0d)", a, rd_early, w));
      check(rd_error == (w != 0), $sformatf("addr %0d: error flag (w=%0d)", a, w));
      if (rd_early) n_early++; else n_full++;
      if (w <= 4) begin
        check(rd_data == data_ref[a], $sformatf("addr %0d: data %h expected %h (w=%0d)", a, rd_data, data_ref[a], w));
        check(pmod(vec_t'(rd_codeword), G73) == '0, $sformatf("addr %0d: not a codeword", a));
        if (w > 0 && rd_data == data_ref[a]) n_corr++;
      end else if (rd_error) begin
        n_uncorr++;
      end
      @(negedge clk);
      check(!rd_valid, "valid lasts one cycle");
    end
    $display("early=%0d full=%0d corrected=%0d detected_uncorrectable=%0d upsets=%0d collisions=%0d stalls=%0d",
             n_early, n_full, n_corr, n_uncorr, n_upset, n_coll, n_stall);
    // Average read latency: clean words must pull it below the 75 clocks
    // that a decoder without early stop would need for every word.
    $display("average read latency %0d.%02d clocks (%0d without early stop)",
             lat_sum / DEPTH, (lat_sum % DEPTH) * 100 / DEPTH, 75);
    check(lat_sum == n_early * 5 + n_full * 75, "total latency");
    check(lat_sum < DEPTH * 75, "early stop lowers the average latency");
    check(n_early > 0, "early stop happened");
    check(n_full > 0, "full decode happened");
    check(n_corr > 0, "correction happened");
    check(n_uncorr > 0, "uncorrectable error detected");
    check(n_upset > 0, "upset happened");
    check(n_coll > 0, "collision happened");
    check(n_stall > 0, "read stall happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_codeword_memory - random writes, upsets and reads against a reference
// array, including a write and an upset to the same word in one cycle (the
// write must win) and reads of words that were upset several times.
module tb_codeword_memory;
  localparam int N = 15, DEPTH = 16, AW = 4;

  int checks = 0, failures = 0, collisions = 0, upsets = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic          wr_en = 0, upset_en = 0, rd_en = 0;
  logic [AW-1:0] wr_addr = 0, upset_addr = 0, rd_addr = 0;
  logic [N-1:0]  wr_data = 0, upset_mask = 0, rd_data;
  logic [N-1:0]  model [DEPTH];

  codeword_memory #(.N(N), .DEPTH(DEPTH)) dut (.*);

  initial begin
    // Fill every word first.
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = AW'(a); wr_data = N'($urandom); model[a] = wr_data;
    end
    @(negedge clk);
    wr_en = 0;
    for (int t = 0; t < 3000; t++) begin
      logic [N-1:0] expect_q;
      logic         do_rd;
      @(negedge clk);
      wr_en      = ($urandom_range(3) == 0);
      wr_addr    = AW'($urandom);
      wr_data    = N'($urandom);
      upset_en   = ($urandom_range(2) == 0);
      upset_addr = (wr_en && $urandom_range(3) == 0) ? wr_addr : AW'($urandom);
      upset_mask = N'($urandom);
      do_rd      = ($urandom_range(1) == 0);
      rd_en      = do_rd;
      rd_addr    = AW'($urandom);
      expect_q   = model[rd_addr];                // read before this cycle's write
      if (upset_en && wr_en && upset_addr == wr_addr) collisions++;
      if (upset_en && !(wr_en && upset_addr == wr_addr)) begin
        model[upset_addr] ^= upset_mask;
        upsets++;
      end
      if (wr_en) model[wr_addr] = wr_data;
      @(posedge clk);
      #1;
      if (do_rd) begin
        checks++;
        if (rd_data !== expect_q) begin
          failures++;
          if (failures < 10) $display("FAIL: addr %0d got %h expected %h", rd_addr, rd_data, expect_q);
        end
      end
    end
    checks++;
    if (collisions == 0 || upsets == 0) failures++;
    $display("collisions=%0d upsets=%0d", collisions, upsets);
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

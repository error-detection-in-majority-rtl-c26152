// codeword_memory - the word-wide storage array that holds encoded words.
//
// DEPTH words of N bits with one synchronous write port and one synchronous
// read port (rd_data is valid the clock after rd_en, and holds until the next
// read). A third port, upset, XORs upset_mask into the stored word at
// upset_addr; it models the single event upsets that flip bits of a word
// while it sits in memory, so that a test can place soft errors. If a write
// and an upset hit the same address in one cycle, the write wins. Read during
// write of the same address returns the old word.
//
// The document describes a memory that stores encoded words and suffers bit
// flips; depth, port timing and the upset port are this design's choices.
// The contents are not reset, as in an SRAM macro.
module codeword_memory #(
  parameter int N     = 15,
  parameter int DEPTH = 64,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  logic [N-1:0]  wr_data,
  input  logic          upset_en,
  input  logic [AW-1:0] upset_addr,
  input  logic [N-1:0]  upset_mask,
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr,
  output logic [N-1:0]  rd_data
);
  logic [N-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (upset_en && !(wr_en && wr_addr == upset_addr))
      mem[upset_addr] <= mem[upset_addr] ^ upset_mask;
    if (wr_en)
      mem[wr_addr] <= wr_data;
    if (rd_en)
      rd_data <= mem[rd_addr];
  end

endmodule

// mldd_memory_system - memory protected by an EG-LDPC code (or, with
// FAMILY=CODE_DSCC, a difference-set cyclic code) whose reads pass
// through a majority-logic decoder that stops early on error-free words.
//
// Write path: wr_data (K data bits) is encoded into an N-bit codeword by
// eg_encoder and written to codeword_memory. Soft errors can be placed in a
// stored word through the upset port. Read path: a read accepted while
// rd_ready is high reads the codeword (one clock), then mldd_decoder checks
// it. A word with no error in the first three decoding cycles is returned
// right away; any other word is decoded for all N cycles, which corrects up
// to floor(J/2) flipped bits (2 for the (15,7) code). Corrected words are not
// written back.
//
// Timing: one read in flight. rd_valid pulses DETECT_CYCLES+2 clocks after the
// accepted rd_en for an error-free word (5 for the defaults) and N+2 clocks
// after it otherwise (17). The encode-store-decode structure follows the
// document; the upset port, the handshake and the memory depth are this
// design's choices.
module mldd_memory_system
  import eg_ldpc_pkg::*;
#(
  parameter code_family_e FAMILY        = CODE_EG,
  parameter int           S             = 2,
  parameter int           DEPTH         = 64,
  parameter int           DETECT_CYCLES = 3,
  localparam int          N             = code_n(FAMILY, S),
  localparam int          K             = code_k(FAMILY, S),
  localparam int          AW            = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  logic [K-1:0]  wr_data,
  input  logic          upset_en,
  input  logic [AW-1:0] upset_addr,
  input  logic [N-1:0]  upset_mask,
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr,
  output logic          rd_ready,
  output logic          rd_valid,
  output logic [K-1:0]  rd_data,
  output logic [N-1:0]  rd_codeword,
  output logic          rd_error,
  output logic          rd_early
);
  logic [N-1:0] wr_codeword, mem_q;
  logic         rd_pend, dec_ready, rd_go;

  eg_encoder #(.FAMILY(FAMILY), .S(S)) u_enc (.data_i(wr_data), .codeword_o(wr_codeword));

  assign rd_ready = dec_ready & ~rd_pend;
  assign rd_go    = rd_en & rd_ready;

  codeword_memory #(.N(N), .DEPTH(DEPTH)) u_mem (
    .clk,
    .wr_en, .wr_addr, .wr_data(wr_codeword),
    .upset_en, .upset_addr, .upset_mask,
    .rd_en(rd_go), .rd_addr, .rd_data(mem_q)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rd_pend <= 1'b0;
    else        rd_pend <= rd_go;
  end

  mldd_decoder #(.FAMILY(FAMILY), .S(S), .DETECT_CYCLES(DETECT_CYCLES)) u_dec (
    .clk, .rst_n,
    .start_i(rd_pend), .codeword_i(mem_q), .ready_o(dec_ready),
    .valid_o(rd_valid), .codeword_o(rd_codeword), .data_o(rd_data),
    .error_o(rd_error), .early_o(rd_early)
  );

  a_dec_free : assert property (@(posedge clk) 
    rd_pend |-> dec_ready);

endmodule

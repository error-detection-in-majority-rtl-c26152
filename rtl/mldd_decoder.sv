// mldd_decoder - serial one-step majority-logic decoder for an EG-LDPC code
// (default) or a difference-set cyclic code (FAMILY=CODE_DSCC), with
// detection of errors in the first decoding cycles (MLDD).
//
// Datapath: the codeword is loaded into a cyclic shift register; each cycle
// the XOR matrix forms the J check sums orthogonal on the last tap, the
// majority gate decides whether that bit is wrong, and the bit is corrected
// by an XOR as it rotates back into tap 0. A plain decoder of this kind
// always needs N cycles. Here an error detector ORs the check sums of the
// first DETECT_CYCLES (3) cycles; if all of them were zero the word holds no
// error and the decode ends early. For the (15,7) EG-LDPC code this holds
// for every error of up to four flipped bits; for the (73,45) DSCC no error
// of up to five bits was seen to escape.
// Since most words read from a memory are error-free, the average decoding
// time drops from about N cycles to about 3.
//
// After an early stop the register has been rotated DETECT_CYCLES times, and
// the output is rotated back by wiring; after a full decode it is aligned.
// Interface: start_i/codeword_i are taken while ready_o is high; valid_o is a
// one-cycle pulse with codeword_o, data_o (systematic data bits, the top K),
// error_o (an error was seen in the detection window) and early_o.
// Latency from the start cycle: DETECT_CYCLES+1 clocks for an error-free word,
// N+1 otherwise. The four decoder parts and the three-cycle detection come
// from the document; widths, handshake and the realignment are this design's.
module mldd_decoder
  import eg_ldpc_pkg::*;
#(
  parameter code_family_e FAMILY        = CODE_EG,
  parameter int           S             = 2,
  parameter int           DETECT_CYCLES = 3
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start_i,
  input  logic [code_n(FAMILY, S)-1:0] codeword_i,
  output logic                 ready_o,
  output logic                 valid_o,
  output logic [code_n(FAMILY, S)-1:0] codeword_o,
  output logic [code_k(FAMILY, S)-1:0] data_o,
  output logic                 error_o,
  output logic                 early_o
);
  localparam int N = code_n(FAMILY, S);
  localparam int K = code_k(FAMILY, S);
  localparam int J = code_j(FAMILY, S);

  logic [N-1:0] taps;
  logic [J-1:0] sums;
  logic         maj, load, shift, sample, error_now;

  cyclic_shift_register #(.N(N)) u_reg (
    .clk, .rst_n,
    .load_i(load), .codeword_i, .shift_i(shift), .correct_i(maj), .taps_o(taps)
  );

  xor_matrix #(.FAMILY(FAMILY), .S(S)) u_xor (.taps_i(taps), .sums_o(sums));

  majority_gate #(.J(J)) u_maj (.in_i(sums), .maj_o(maj));

  error_detector #(.J(J)) u_det (
    .clk, .rst_n,
    .clear_i(load), .sample_i(sample), .sums_i(sums),
    .error_now_o(error_now), .error_o(error_o)
  );

  mldd_control #(.N(N), .DETECT_CYCLES(DETECT_CYCLES)) u_ctl (
    .clk, .rst_n,
    .start_i, .ready_o, .error_now_i(error_now),
    .load_o(load), .shift_o(shift), .sample_o(sample),
    .done_o(valid_o), .early_o
  );

  // Undo the DETECT_CYCLES rotations of an early stop.
  always_comb begin
    for (int i = 0; i < N; i++)
      codeword_o[i] = early_o ? taps[(i + DETECT_CYCLES) % N] : taps[i];
  end

  assign data_o = codeword_o[N-1 -: K];

  // A word that stopped early never had a check sum set in the window.
  a_early_clean : assert property (@(posedge clk) 
    valid_o && early_o |-> !error_o);

endmodule

// xor_matrix - the check-sum network of a Type-II one-step majority-logic
// decoder.
//
// It computes, directly from the N register taps and without forming a
// syndrome, the J parity-check sums B_j that are orthogonal on tap N-1: each
// sum is the XOR of the taps in one parity-check row that contains bit N-1,
// and no other bit appears in more than one sum. For a codeword all sums are
// 0; an error in bit N-1 sets every sum, an error elsewhere at most one.
// The rows come from eg_ldpc_pkg::check_mask. Purely combinational.
//
// The document describes this XOR matrix and the Type-II form; the actual
// equations are those of the code selected by FAMILY and S (eg_ldpc_pkg):
// 4 sums for the default (15,7) EG-LDPC code, 9 for the (73,45) DSCC.
module xor_matrix
  import eg_ldpc_pkg::*;
#(
  parameter code_family_e FAMILY = CODE_EG,
  parameter int           S      = 2
) (
  input  logic [code_n(FAMILY, S)-1:0] taps_i,
  output logic [code_j(FAMILY, S)-1:0] sums_o
);
  localparam int N = code_n(FAMILY, S);
  localparam int J = code_j(FAMILY, S);

  for (genvar j = 0; j < J; j++) begin : g_sum
    localparam poly_t ROW = check_mask(FAMILY, S, j);
    assign sums_o[j] = ^(taps_i & ROW[N-1:0]);
  end

endmodule

// eg_encoder - systematic encoder for the cyclic majority-logic decodable
// codes of eg_ldpc_pkg: EG-LDPC EG(2,2^S) (default, FAMILY=CODE_EG) or the
// difference-set cyclic codes (FAMILY=CODE_DSCC).
//
// The K data bits d(x) are placed in the top K positions of the codeword and
// the N-K parity bits are the remainder of d(x)*x^(N-K) divided by the
// generator polynomial g(x) from eg_ldpc_pkg, so every codeword is a multiple
// of g(x) and satisfies all N cyclic parity checks. The division is written
// as the usual bit-serial LFSR recurrence, unrolled into one combinational
// block (K steps of shift and conditional XOR).
//
// Interface: data_i (K bits) in, codeword_o (N bits) out, purely
// combinational. The document only states that data words are encoded before
// they are stored; the systematic layout and the division circuit are this
// design's choice.
module eg_encoder
  import eg_ldpc_pkg::*;
#(
  parameter code_family_e FAMILY = CODE_EG,
  parameter int           S      = 2
) (
  input  logic [code_k(FAMILY, S)-1:0] data_i,
  output logic [code_n(FAMILY, S)-1:0] codeword_o
);
  localparam int N = code_n(FAMILY, S);
  localparam int K = code_k(FAMILY, S);
  localparam int P = N - K;
  localparam poly_t G = gen_poly(FAMILY, S);
  localparam logic [P-1:0] G_LOW = G[P-1:0];  // g(x) without its x^P term

  logic [P-1:0] rem;

  always_comb begin
    rem = '0;
    for (int i = K - 1; i >= 0; i--) begin
      logic fb;
      fb  = data_i[i] ^ rem[P-1];
      rem = {rem[P-2:0], 1'b0} ^ (fb ? G_LOW : '0);
    end
  end

  assign codeword_o = {data_i, rem};

endmodule

// cyclic_shift_register - the N-tap rotating register of the one-step
// majority-logic decoder, with the correcting XOR on its feedback.
//
// load captures codeword_i into the taps. Each shift moves tap i to tap i+1
// and feeds tap N-1, the bit under decoding, back into tap 0 after XORing it
// with correct_i, the majority-gate decision. This is multiplication by x
// modulo x^N+1, so a cyclic code stays a codeword and after N shifts every
// bit has passed through the last tap once and the word is back in its
// original alignment. load has priority over shift.
//
// The register and the correcting XOR are two of the four parts of the
// decoder the document describes; the shift direction and the reset are this
// design's choices. Timing: one shift per clock while shift_i is high.
module cyclic_shift_register #(
  parameter int N = 15
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load_i,
  input  logic [N-1:0] codeword_i,
  input  logic         shift_i,
  input  logic         correct_i,
  output logic [N-1:0] taps_o
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      taps_o <= '0;
    else if (load_i)
      taps_o <= codeword_i;
    else if (shift_i)
      taps_o <= {taps_o[N-2:0], taps_o[N-1] ^ correct_i};
  end

endmodule

// error_detector - the early error detector of the majority-logic decoder.
//
// While sample_i is high (the first DETECT_CYCLES decoding cycles) it ORs the
// J check sums into a sticky flag. For a codeword all check sums are zero in
// every cycle; for the EG-LDPC codes any error of up to four bits makes at
// least one of the check sums of the first three cycles nonzero. So if the
// flag is still clear after the window, the word is error-free and decoding
// can stop. error_now_o includes the current cycle's sums (used by the
// controller at the last window cycle); error_o is the registered flag.
// clear_i (asserted when a new word is loaded) resets the flag.
//
// Its size depends only on J, not on N. The document gives the detector's
// function and its three-cycle window; the OR gate plus flag register is
// this design's choice.
module error_detector #(
  parameter int J = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear_i,
  input  logic         sample_i,
  input  logic [J-1:0] sums_i,
  output logic         error_now_o,
  output logic         error_o
);
  assign error_now_o = error_o | (sample_i & (|sums_i));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       error_o <= 1'b0;
    else if (clear_i) error_o <= 1'b0;
    else              error_o <= error_now_o;
  end

endmodule

// majority_gate - decides whether the bit under decoding is wrong.
//
// Counts the ones among its J inputs (the orthogonal check sums) and outputs
// 1 when they outnumber the zeros, i.e. more than J/2 ones. With J even a tie
// gives 0 and the bit is left as it is. With J orthogonal sums this corrects
// up to J/2 errors per word. Purely combinational.
//
// The rule "more ones than zeros" is the document's; the adder-based count is
// this design's choice.
module majority_gate #(
  parameter int J = 4
) (
  input  logic [J-1:0] in_i,
  output logic         maj_o
);
  localparam int CW = $clog2(J + 1);

  logic [CW-1:0] ones;

  always_comb begin
    ones = '0;
    for (int i = 0; i < J; i++) ones = ones + CW'(in_i[i]);
  end

  assign maj_o = (int'(ones) > J / 2);

endmodule

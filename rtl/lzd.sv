// Leading zero detector.
//
// Counts the zeros above the most significant set bit of `in`.  An all-zero
// input gives WIDTH.  The pre-processing stage uses two of these to
// normalise denormal operand mantissas (the count is the left shift and the
// exponent correction).  Purely combinational; the priority-encoder form is
// this design's choice, the function is the one the unit needs.
module lzd #(
  parameter int unsigned WIDTH = 24,
  parameter int unsigned CW    = $clog2(WIDTH + 1)
) (
  input  logic [WIDTH-1:0] in,
  output logic [CW-1:0]    count
);
  always_comb begin
    count = CW'(WIDTH);
    for (int i = 0; i < WIDTH; i++) begin
      if (in[i]) count = CW'(WIDTH - 1 - i);
    end
  end
endmodule

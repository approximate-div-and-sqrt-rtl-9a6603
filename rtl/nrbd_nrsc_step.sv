// One shared radix-2 non-restoring iteration cell for division (NRBD) and
// square root (NRSC).
//
// Each cell produces one result bit.  Both algorithms update a signed
// partial remainder r with a single adder/subtractor: the sign of r picks
// subtraction (r >= 0) or addition (r < 0), and the new result bit is 1
// when the new remainder is non-negative.
//   division:    r' = 2r -/+ d
//   square root: r' = 4r + (next two radicand bits) -/+ (4q + 1 | 4q + 3)
// The radicand x is consumed two bits at a time from its top and shifted
// left.  Only the operand of the adder differs between the two modes, which
// is how the datapath is shared.  Purely combinational; the iteration unit
// chains ITER_PER_CYCLE of these per clock.
module nrbd_nrsc_step #(
  parameter int unsigned RW = 29,   // partial remainder width (signed)
  parameter int unsigned QW = 25,   // quotient / root register width
  parameter int unsigned XW = 50,   // radicand shift register width
  parameter int unsigned DW = 25    // divisor width
) (
  input  logic                 is_sqrt,
  input  logic signed [RW-1:0] r_i,
  input  logic [QW-1:0]        q_i,
  input  logic [XW-1:0]        x_i,
  input  logic [DW-1:0]        d_i,
  output logic signed [RW-1:0] r_o,
  output logic [QW-1:0]        q_o,
  output logic [XW-1:0]        x_o
);
  logic signed [RW-1:0] r_shift;
  logic [RW-1:0]        operand;
  logic                 sub;

  always_comb begin
    sub = ~r_i[RW-1];
    if (is_sqrt) begin
      r_shift = (r_i <<< 2) | RW'(x_i[XW-1 -: 2]);
      operand = RW'({q_i, ~sub, 1'b1});
      x_o     = x_i << 2;
    end else begin
      r_shift = r_i <<< 1;
      operand = RW'(d_i);
      x_o     = x_i;
    end
    r_o = sub ? (r_shift - $signed(operand)) : (r_shift + $signed(operand));
    q_o = {q_i[QW-2:0], ~r_o[RW-1]};
  end
endmodule

// Pre-processing stage of the division / square-root unit (combinational).
//
// Decomposes both IEEE-754 operands into sign, exponent and mantissa, counts
// the leading zeros of each mantissa (two leading zero detectors) so that
// denormal operands are normalised, computes the result exponent and sign,
// and classifies the operands (zero, infinity, NaN).
//
// Exponent (unbiased effective exponent E = max(EXP,1) - LZ):
//   division:    EXP_z = E_a - E_b + BIAS, minus 1 when MANT_a < MANT_b
//   square root: EXP_z = floor((E_a - BIAS) / 2) + BIAS
// Prenormalisation also makes the iteration result land in [1, 2): a
// division whose dividend mantissa is the smaller one, and a square root of
// an odd unbiased exponent, flag `mant_shift`, meaning the dividend /
// radicand mantissa is doubled.  That comparison is this design's choice; the
// stage split, the LZDs, the signal names and the (C_EXP+2)-bit exponent
// follow the published block diagram.
// The unit registers all outputs at the end of the first cycle.
module div_sqrt_preprocess #(
  parameter int unsigned C_EXP  = 8,
  parameter int unsigned C_MANT = 23,
  localparam int unsigned C_OP  = 1 + C_EXP + C_MANT,
  localparam int unsigned LZW   = $clog2(C_MANT + 2)
) (
  input  logic [C_OP-1:0]          op_a,
  input  logic [C_OP-1:0]          op_b,
  input  logic                     is_sqrt,
  output logic                     sign_z,
  output logic signed [C_EXP+1:0]  exp_z,
  output logic [C_MANT:0]          mant_a_norm,
  output logic [C_MANT:0]          mant_b_norm,
  output logic                     mant_shift,
  output logic [5:0]               special,   // {ZERO_a, INF_a, NAN_a, ZERO_b, INF_b, NAN_b}
  output logic                     snan       // a signalling NaN takes part
);
  localparam int signed BIAS = (1 << (C_EXP - 1)) - 1;

  // Decompose
  logic              sign_a, sign_b;
  logic [C_EXP-1:0]  exp_a, exp_b;
  logic [C_MANT-1:0] frac_a, frac_b;
  logic [C_MANT:0]   mant_a, mant_b;
  logic [LZW-1:0]    lz_a, lz_b;

  assign {sign_a, exp_a, frac_a} = op_a;
  assign {sign_b, exp_b, frac_b} = op_b;
  assign mant_a = {exp_a != '0, frac_a};
  assign mant_b = {exp_b != '0, frac_b};

  lzd #(.WIDTH(C_MANT + 1), .CW(LZW)) u_lzd1 (.in(mant_a), .count(lz_a));
  lzd #(.WIDTH(C_MANT + 1), .CW(LZW)) u_lzd2 (.in(mant_b), .count(lz_b));

  // Operand detection
  logic zero_a, inf_a, nan_a, zero_b, inf_b, nan_b;
  always_comb begin
    zero_a = (exp_a == '0) && (frac_a == '0);
    zero_b = (exp_b == '0) && (frac_b == '0);
    inf_a  = (exp_a == '1) && (frac_a == '0);
    inf_b  = (exp_b == '1) && (frac_b == '0);
    nan_a  = (exp_a == '1) && (frac_a != '0);
    nan_b  = (exp_b == '1) && (frac_b != '0);
    special = {zero_a, inf_a, nan_a, zero_b, inf_b, nan_b};
    snan    = (nan_a && !frac_a[C_MANT-1]) || (!is_sqrt && nan_b && !frac_b[C_MANT-1]);
  end

  // Prenormalization, exponent and sign operation
  logic signed [C_EXP+1:0] eff_a, eff_b, unb_a;
  always_comb begin
    mant_a_norm = mant_a << lz_a;
    mant_b_norm = mant_b << lz_b;
    eff_a = $signed({2'b00, (exp_a == '0) ? C_EXP'(1) : exp_a}) - $signed((C_EXP+2)'(lz_a));
    eff_b = $signed({2'b00, (exp_b == '0) ? C_EXP'(1) : exp_b}) - $signed((C_EXP+2)'(lz_b));
    unb_a = eff_a - (C_EXP+2)'(BIAS);
    if (is_sqrt) begin
      mant_shift = unb_a[0];
      exp_z      = (unb_a >>> 1) + (C_EXP+2)'(BIAS);
      sign_z     = sign_a;
    end else begin
      mant_shift = mant_a_norm < mant_b_norm;
      exp_z      = eff_a - eff_b + (C_EXP+2)'(BIAS) - (C_EXP+2)'(mant_shift);
      sign_z     = sign_a ^ sign_b;
    end
  end
endmodule

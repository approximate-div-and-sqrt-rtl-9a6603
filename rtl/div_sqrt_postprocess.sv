// Post-processing stage of the division / square-root unit (combinational).
//
// Takes the final iteration state and produces the IEEE-754 result:
//  1. One more non-restoring cell computes the guard bit; the partial
//     remainder is then corrected to its restoring value and any non-zero
//     remainder (or unconsumed radicand) becomes the sticky bit.
//  2. The n_bits computed result bits are left-aligned into the mantissa
//     vector MANT_norm = {hidden, C_MANT fraction bits, guard, sticky}
//     (C_MANT+3 bits, as in the published block diagram).
//  3. Normalization: a result exponent at or above the all-ones code
//     overflows to infinity; one at or below zero is shifted right into the
//     denormal range, shifted-out bits joining the sticky bit.
//  4. Rounding and renormalization: round to nearest, ties to even, at the
//     requested precision `prec` (fraction bits kept; the rest are zero).  A
//     carry out of the mantissa moves into the exponent field.  A denormal
//     result smaller than the lowest kept bit therefore becomes zero.
//  5. Compose, with the special-case results of the operand detection
//     (canonical quiet NaN, infinities, zeros) taking priority.
// Round to nearest-even as the only mode and the five-flag output are this
// design's choices; the iteration count per precision follows the
// published latency table.  The unit registers the outputs of this stage.
module div_sqrt_postprocess
  import div_sqrt_pkg::*;
#(
  parameter int unsigned C_EXP          = 8,
  parameter int unsigned C_MANT         = 23,
  parameter int unsigned ITER_PER_CYCLE = 4,
  localparam int unsigned C_OP = 1 + C_EXP + C_MANT,
  localparam int unsigned T    = root_bits(C_MANT, ITER_PER_CYCLE),
  localparam int unsigned RW   = T + 4,
  localparam int unsigned XW   = 2 * T,
  localparam int unsigned DW   = C_MANT + 2,
  localparam int unsigned NW   = $clog2(T + 1),
  localparam int unsigned PW   = $clog2(C_MANT + 1)
) (
  input  logic                     is_sqrt,
  input  logic signed [RW-1:0]     r_i,
  input  logic [T-1:0]             q_i,
  input  logic [XW-1:0]            x_i,
  input  logic [DW-1:0]            d_i,
  input  logic [NW-1:0]            n_bits,   // result bits in q_i (< T)
  input  logic [PW-1:0]            prec,     // fraction bits to keep (<= C_MANT)
  input  logic signed [C_EXP+1:0]  exp_z,
  input  logic                     sign_z,
  input  logic [5:0]               special,  // {ZERO_a, INF_a, NAN_a, ZERO_b, INF_b, NAN_b}
  input  logic                     snan,
  output logic [C_OP-1:0]          result,
  output fflags_t                  flags
);
  localparam int unsigned VW = C_MANT + 3;
  localparam logic signed [C_EXP+1:0] MAXE = (C_EXP+2)'((1 << C_EXP) - 1);

  logic signed [RW-1:0] r1, rc;
  logic [T-1:0]         q1;
  logic [XW-1:0]        x1;

  nrbd_nrsc_step #(.RW(RW), .QW(T), .XW(XW), .DW(DW)) u_guard_step (
    .is_sqrt(is_sqrt), .r_i(r_i), .q_i(q_i), .x_i(x_i), .d_i(d_i),
    .r_o(r1), .q_o(q1), .x_o(x1)
  );

  logic            rem_nz;
  logic [T-1:0]    qa;
  logic [VW-1:0]   v, vd;
  logic            tiny, ovf, g, s, lsb, up;
  logic [C_EXP+1:0] sh;
  logic [C_EXP-1:0]  exp_field;
  logic [C_MANT-1:0] frac, keep;
  logic [C_EXP+C_MANT-1:0] packed_r;
  logic zero_a, inf_a, nan_a, zero_b, inf_b, nan_b;

  always_comb begin
    // 1. remainder correction and sticky
    if (r1[RW-1]) rc = r1 + (is_sqrt ? $signed(RW'({q1, 1'b1})) : $signed(RW'(d_i)));
    else          rc = r1;
    rem_nz = (rc != '0) || (is_sqrt && (x1 != '0));

    // 2. alignment into MANT_norm
    qa = q1 << (T - 1 - int'(n_bits));
    v  = '0;
    v[VW-1:1] = qa[T-1 -: C_MANT+2];
    v[0] = rem_nz;
    for (int i = 0; i < int'(T) - int'(C_MANT) - 2; i++) v[0] |= qa[i];

    // 3. normalization (overflow / denormal shift)
    ovf  = exp_z >= MAXE;
    tiny = exp_z <= 0;
    sh   = '0;
    vd   = v;
    if (tiny) begin
      sh = (C_EXP+2)'(1 - exp_z);
      if (sh >= (C_EXP+2)'(VW)) vd = VW'(v != '0);
      else begin
        vd = v >> sh;
        for (int i = 0; i < int'(VW); i++)
          if (i < int'(sh) && v[i]) vd[0] = 1'b1;
      end
    end
    exp_field = tiny ? '0 : exp_z[C_EXP-1:0];

    // 4. rounding at the requested precision
    g = vd[C_MANT + 1 - int'(prec)];
    lsb = vd[C_MANT + 2 - int'(prec)];
    s = 1'b0;
    for (int i = 0; i < int'(VW); i++)
      if (i < int'(C_MANT) + 1 - int'(prec) && vd[i]) s = 1'b1;
    up   = g && (s || lsb);
    keep = ~(C_MANT'({C_MANT{1'b1}}) >> prec);
    frac = vd[C_MANT+1:2] & keep;
    packed_r = {exp_field, frac} + ((C_EXP+C_MANT)'(up) << (C_MANT - int'(prec)));

    flags = '0;
    flags.nx = g || s;
    flags.uf = tiny && flags.nx;
    result = {sign_z, packed_r};
    if (ovf || (packed_r[C_EXP+C_MANT-1 -: C_EXP] == '1)) begin
      result   = {sign_z, {C_EXP{1'b1}}, {C_MANT{1'b0}}};
      flags.of = 1'b1;
      flags.nx = 1'b1;
    end

    // 5. special cases
    {zero_a, inf_a, nan_a, zero_b, inf_b, nan_b} = special;
    if (is_sqrt) begin
      if (nan_a || (sign_z && !zero_a)) begin
        result = {1'b0, {C_EXP{1'b1}}, 1'b1, {(C_MANT-1){1'b0}}};
        flags  = '0;
        flags.nv = snan || !nan_a;
      end else if (inf_a || zero_a) begin
        result = {sign_z, inf_a ? {C_EXP{1'b1}} : {C_EXP{1'b0}}, {C_MANT{1'b0}}};
        flags  = '0;
      end
    end else begin
      if (nan_a || nan_b || (zero_a && zero_b) || (inf_a && inf_b)) begin
        result = {1'b0, {C_EXP{1'b1}}, 1'b1, {(C_MANT-1){1'b0}}};
        flags  = '0;
        flags.nv = snan || !(nan_a || nan_b);
      end else if (inf_a || zero_b) begin
        result = {sign_z, {C_EXP{1'b1}}, {C_MANT{1'b0}}};
        flags  = '0;
        flags.dv = zero_b && !inf_a;
      end else if (zero_a || inf_b) begin
        result = {sign_z, {C_EXP{1'b0}}, {C_MANT{1'b0}}};
        flags  = '0;
      end
    end
  end
endmodule

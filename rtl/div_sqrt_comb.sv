// Single-cycle division / square-root unit for quarter precision.
//
// The same pre-processing, non-restoring cells and post-processing as the
// iterative unit, but with every cell unrolled into one combinational path
// and the result registered at the next clock edge: latency 1 cycle, and a
// new operation may start every cycle (ready_o is always high).  The default
// format has C_MANT = 2 fraction bits, as published; the 5-bit exponent
// (an 8-bit 1-5-2 format) is this design's choice, since only the mantissa
// width is given.  Precision is fixed at C_MANT.  Interface and flags as in
// the iterative unit.  Reset is active-low and asynchronous.
module div_sqrt_comb
  import div_sqrt_pkg::*;
#(
  parameter int unsigned C_EXP  = 5,
  parameter int unsigned C_MANT = 2,
  localparam int unsigned C_OP  = 1 + C_EXP + C_MANT
) (
  input  logic            clk_i,
  input  logic            rst_ni,
  input  logic            div_start_i,
  input  logic            sqrt_start_i,
  input  logic [C_OP-1:0] op_a_i,
  input  logic [C_OP-1:0] op_b_i,
  output logic            ready_o,
  output logic            done_o,
  output logic [C_OP-1:0] result_o,
  output fflags_t         flags_o
);
  localparam int unsigned IPC = 4;
  localparam int unsigned T   = root_bits(C_MANT, IPC);
  localparam int unsigned NS  = T - 1;            // cells before the guard cell
  localparam int unsigned RW  = T + 4;
  localparam int unsigned XW  = 2 * T;
  localparam int unsigned DW  = C_MANT + 2;
  localparam int unsigned NW  = $clog2(T + 1);
  localparam int unsigned PW  = $clog2(C_MANT + 1);

  logic                    sign_pre, mshift_pre, snan_pre;
  logic signed [C_EXP+1:0] exp_pre;
  logic [C_MANT:0]         ma_pre, mb_pre;
  logic [5:0]              special_pre;

  div_sqrt_preprocess #(.C_EXP(C_EXP), .C_MANT(C_MANT)) u_pre (
    .op_a(op_a_i), .op_b(op_b_i), .is_sqrt(sqrt_start_i),
    .sign_z(sign_pre), .exp_z(exp_pre), .mant_a_norm(ma_pre), .mant_b_norm(mb_pre),
    .mant_shift(mshift_pre), .special(special_pre), .snan(snan_pre)
  );

  logic signed [RW-1:0] r_ch [NS+1];
  logic [T-1:0]         q_ch [NS+1];
  logic [XW-1:0]        x_ch [NS+1];
  logic [DW-1:0]        d;
  logic signed [RW-1:0] r0;
  logic [XW-1:0]        x0;

  always_comb begin
    if (sqrt_start_i) begin
      r0 = '0;
      d  = '0;
      x0 = (XW'(ma_pre) << mshift_pre) << (XW - 2 - C_MANT);
    end else begin
      r0 = RW'(ma_pre) << mshift_pre;
      d  = {mb_pre, 1'b0};
      x0 = '0;
    end
  end

  assign r_ch[0] = r0;
  assign q_ch[0] = '0;
  assign x_ch[0] = x0;

  for (genvar i = 0; i < NS; i++) begin : g_cell
    nrbd_nrsc_step #(.RW(RW), .QW(T), .XW(XW), .DW(DW)) u_cell (
      .is_sqrt(sqrt_start_i), .r_i(r_ch[i]), .q_i(q_ch[i]), .x_i(x_ch[i]), .d_i(d),
      .r_o(r_ch[i+1]), .q_o(q_ch[i+1]), .x_o(x_ch[i+1])
    );
  end

  logic [C_OP-1:0] result_c;
  fflags_t         flags_c;

  div_sqrt_postprocess #(.C_EXP(C_EXP), .C_MANT(C_MANT), .ITER_PER_CYCLE(IPC)) u_post (
    .is_sqrt(sqrt_start_i), .r_i(r_ch[NS]), .q_i(q_ch[NS]), .x_i(x_ch[NS]), .d_i(d),
    .n_bits(NW'(NS)), .prec(PW'(C_MANT)), .exp_z(exp_pre), .sign_z(sign_pre),
    .special(special_pre), .snan(snan_pre), .result(result_c), .flags(flags_c)
  );

  assign ready_o = 1'b1;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      done_o   <= 1'b0;
      result_o <= '0;
      flags_o  <= '0;
    end else begin
      done_o <= div_start_i || sqrt_start_i;
      if (div_start_i || sqrt_start_i) begin
        result_o <= result_c;
        flags_o  <= flags_c;
      end
    end
  end

  a_one_start: assert property (@(posedge clk_i) disable iff (!rst_ni)
    !(div_start_i && sqrt_start_i))
    else $error("div and sqrt start together");
endmodule

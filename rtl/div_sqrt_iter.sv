// Iterative division / square-root unit with run-time precision control
// (transprecision).  This is the unit shared by the cores of the cluster.
//
// Three stages share one datapath:
//  - cycle 1: the pre-processing stage decomposes and normalises the
//    operands and registers the iteration start state;
//  - cycles 2 .. 1+N: ITER_PER_CYCLE non-restoring cells per clock, one
//    result bit each, N = ceil((P+1)/ITER_PER_CYCLE) for P fraction bits;
//  - cycle 2+N: the post-processing stage normalises, rounds and composes
//    the result, which is registered together with `done_o`.
// With the defaults (single precision, four cells) the latency is 8 cycles
// at full precision and 5, 6, 7, 8 cycles for Precision_ctl = 8-11, 12-15,
// 16-19, 20-23 fraction bits, as in the published latency table.  With
// TRANSPRECISION = 0 the precision is fixed at C_MANT; C_EXP = 5, C_MANT = 10
// gives the 5-cycle half-precision unit.
//
// Interface: a one-cycle pulse on div_start_i or sqrt_start_i, with the
// operands and precision_ctl_i, starts an operation; it is accepted only
// while ready_o is high (the unit is idle).  done_o pulses for one cycle,
// exactly LATENCY clock edges after the edge that sampled the start; result_o
// and flags_o hold their value until the next done_o.  precision_ctl_i is
// the number of fraction bits wanted; values below MIN_PREC or above C_MANT
// are clamped (this clamping is this design's choice).  Reset is
// active-low and asynchronous.
module div_sqrt_iter
  import div_sqrt_pkg::*;
#(
  parameter int unsigned C_EXP          = 8,
  parameter int unsigned C_MANT         = 23,
  parameter int unsigned ITER_PER_CYCLE = 4,
  parameter bit          TRANSPRECISION = 1'b1,
  parameter int unsigned MIN_PREC       = 8,
  localparam int unsigned C_OP = 1 + C_EXP + C_MANT,
  localparam int unsigned PW   = $clog2(C_MANT + 1)
) (
  input  logic            clk_i,
  input  logic            rst_ni,
  input  logic            div_start_i,
  input  logic            sqrt_start_i,
  input  logic [C_OP-1:0] op_a_i,
  input  logic [C_OP-1:0] op_b_i,
  input  logic [PW-1:0]   precision_ctl_i,
  output logic            ready_o,
  output logic            done_o,
  output logic [C_OP-1:0] result_o,
  output fflags_t         flags_o
);
  localparam int unsigned T   = root_bits(C_MANT, ITER_PER_CYCLE);
  localparam int unsigned RW  = T + 4;
  localparam int unsigned XW  = 2 * T;
  localparam int unsigned DW  = C_MANT + 2;
  localparam int unsigned NW  = $clog2(T + 1);
  localparam int unsigned CNW = $clog2(iter_cycles(C_MANT, ITER_PER_CYCLE) + 1);

  typedef enum logic [1:0] {S_IDLE, S_ITER, S_POST} state_e;
  state_e state_q;

  // registered start state / iteration state
  logic                    is_sqrt_q, sign_q, snan_q;
  logic signed [C_EXP+1:0] exp_q;
  logic [5:0]              special_q;
  logic [PW-1:0]           prec_q;
  logic signed [RW-1:0]    r_q;
  logic [T-1:0]            q_q;
  logic [XW-1:0]           x_q;
  logic [DW-1:0]           d_q;
  logic [NW-1:0]           nbits_q;
  logic [CNW-1:0]          cnt_q;

  // ---------------- pre-processing ----------------
  logic                    start, is_sqrt_in, sign_pre, mshift_pre, snan_pre;
  logic signed [C_EXP+1:0] exp_pre;
  logic [C_MANT:0]         ma_pre, mb_pre;
  logic [5:0]              special_pre;
  logic [PW-1:0]           prec_eff;

  assign start      = (div_start_i || sqrt_start_i) && ready_o;
  assign is_sqrt_in = sqrt_start_i;

  div_sqrt_preprocess #(.C_EXP(C_EXP), .C_MANT(C_MANT)) u_pre (
    .op_a(op_a_i), .op_b(op_b_i), .is_sqrt(is_sqrt_in),
    .sign_z(sign_pre), .exp_z(exp_pre), .mant_a_norm(ma_pre), .mant_b_norm(mb_pre),
    .mant_shift(mshift_pre), .special(special_pre), .snan(snan_pre)
  );

  always_comb begin
    if (!TRANSPRECISION)                       prec_eff = PW'(C_MANT);
    else if (precision_ctl_i < PW'(MIN_PREC))  prec_eff = PW'(MIN_PREC);
    else if (precision_ctl_i > PW'(C_MANT))    prec_eff = PW'(C_MANT);
    else                                       prec_eff = precision_ctl_i;
  end

  // ---------------- iteration: ITER_PER_CYCLE chained cells ----------------
  logic signed [RW-1:0] r_ch [ITER_PER_CYCLE+1];
  logic [T-1:0]         q_ch [ITER_PER_CYCLE+1];
  logic [XW-1:0]        x_ch [ITER_PER_CYCLE+1];

  assign r_ch[0] = r_q;
  assign q_ch[0] = q_q;
  assign x_ch[0] = x_q;

  for (genvar i = 0; i < ITER_PER_CYCLE; i++) begin : g_cell
    nrbd_nrsc_step #(.RW(RW), .QW(T), .XW(XW), .DW(DW)) u_cell (
      .is_sqrt(is_sqrt_q), .r_i(r_ch[i]), .q_i(q_ch[i]), .x_i(x_ch[i]), .d_i(d_q),
      .r_o(r_ch[i+1]), .q_o(q_ch[i+1]), .x_o(x_ch[i+1])
    );
  end

  // ---------------- post-processing ----------------
  logic [C_OP-1:0] result_post;
  fflags_t         flags_post;

  div_sqrt_postprocess #(.C_EXP(C_EXP), .C_MANT(C_MANT), .ITER_PER_CYCLE(ITER_PER_CYCLE)) u_post (
    .is_sqrt(is_sqrt_q), .r_i(r_q), .q_i(q_q), .x_i(x_q), .d_i(d_q), .n_bits(nbits_q),
    .prec(prec_q), .exp_z(exp_q), .sign_z(sign_q), .special(special_q), .snan(snan_q),
    .result(result_post), .flags(flags_post)
  );

  // ---------------- control and registers ----------------
  assign ready_o = (state_q == S_IDLE);

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      state_q   <= S_IDLE;
      is_sqrt_q <= 1'b0;
      sign_q    <= 1'b0;
      snan_q    <= 1'b0;
      exp_q     <= '0;
      special_q <= '0;
      prec_q    <= PW'(C_MANT);
      r_q       <= '0;
      q_q       <= '0;
      x_q       <= '0;
      d_q       <= '0;
      nbits_q   <= '0;
      cnt_q     <= '0;
      done_o    <= 1'b0;
      result_o  <= '0;
      flags_o   <= '0;
    end else begin
      done_o <= 1'b0;
      unique case (state_q)
        S_IDLE: if (start) begin
          state_q   <= S_ITER;
          is_sqrt_q <= is_sqrt_in;
          sign_q    <= sign_pre;
          snan_q    <= snan_pre;
          exp_q     <= exp_pre;
          special_q <= special_pre;
          prec_q    <= prec_eff;
          q_q       <= '0;
          nbits_q   <= '0;
          cnt_q     <= CNW'(iter_cycles(32'(prec_eff), ITER_PER_CYCLE));
          if (is_sqrt_in) begin
            r_q <= '0;
            d_q <= '0;
            x_q <= (XW'(ma_pre) << mshift_pre) << (XW - 2 - C_MANT);
          end else begin
            r_q <= RW'(ma_pre) << mshift_pre;
            d_q <= {mb_pre, 1'b0};
            x_q <= '0;
          end
        end
        S_ITER: begin
          r_q     <= r_ch[ITER_PER_CYCLE];
          q_q     <= q_ch[ITER_PER_CYCLE];
          x_q     <= x_ch[ITER_PER_CYCLE];
          nbits_q <= nbits_q + NW'(ITER_PER_CYCLE);
          cnt_q   <= cnt_q - 1'b1;
          if (cnt_q == CNW'(1)) state_q <= S_POST;
        end
        S_POST: begin
          state_q  <= S_IDLE;
          done_o   <= 1'b1;
          result_o <= result_post;
          flags_o  <= flags_post;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // Handshake rules: one operation at a time, never both starts together.
  a_start_when_ready: assert property (@(posedge clk_i) disable iff (!rst_ni)
    (div_start_i || sqrt_start_i) |-> ready_o)
    else $error("start while busy");
  a_one_start: assert property (@(posedge clk_i) disable iff (!rst_ni)
    !(div_start_i && sqrt_start_i))
    else $error("div and sqrt start together");
endmodule

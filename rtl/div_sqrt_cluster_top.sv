// Shared transprecision division / square-root unit integrated in an
// N_CORES-core cluster, with the half- and quarter-precision units of the
// same family alongside.
//
// Shared path: every core has a dispatcher (fpu_dispatcher) that offloads
// its divisions and square roots.  A round-robin arbiter grants one request
// per cycle, and only while the shared unit is idle; the granted core's
// operands, operation and precision setting are multiplexed to the unit,
// and the core index is kept as the tag.  When the unit signals done, the
// result is broadcast with the tag and only the matching dispatcher writes
// it back and releases its core.  Losing or busy-declined requests retry in
// the following cycle.  From a grant, the result arrives after the unit's
// latency (5-8 cycles with the default single-precision transprecision unit,
// depending on the precision requested).
//
// Side by side, and not connected to the cores: the iterative
// half-precision unit (5-cycle latency) and the single-cycle
// quarter-precision unit, each with its own ports.
//
// The cores, their register files, memories and interconnect are outside
// this RTL; the core-side ports stand for the decoder / forwarding outputs
// and the register-file write port of each core.  Reset is active-low and
// asynchronous.
module div_sqrt_cluster_top
  import div_sqrt_pkg::*;
#(
  parameter int unsigned N_CORES        = 8,
  parameter int unsigned C_EXP          = 8,
  parameter int unsigned C_MANT         = 23,
  parameter int unsigned ITER_PER_CYCLE = 4,
  localparam int unsigned C_OP  = 1 + C_EXP + C_MANT,
  localparam int unsigned PW    = $clog2(C_MANT + 1),
  localparam int unsigned TAG_W = (N_CORES > 1) ? $clog2(N_CORES) : 1
) (
  input  logic                          clk_i,
  input  logic                          rst_ni,
  // per-core dispatch interface
  input  logic         [N_CORES-1:0]    core_op_valid_i,
  input  div_sqrt_op_e [N_CORES-1:0]    core_op_i,
  input  logic [N_CORES-1:0][C_OP-1:0]  core_opa_i,
  input  logic [N_CORES-1:0][C_OP-1:0]  core_opb_i,
  input  logic [N_CORES-1:0][PW-1:0]    core_prec_i,
  output logic         [N_CORES-1:0]    core_stall_o,
  output logic         [N_CORES-1:0]    core_wb_valid_o,
  output logic [N_CORES-1:0][C_OP-1:0]  core_wb_data_o,
  output fflags_t      [N_CORES-1:0]    core_wb_flags_o,
  // half-precision unit
  input  logic                          hp_div_start_i,
  input  logic                          hp_sqrt_start_i,
  input  logic [15:0]                   hp_op_a_i,
  input  logic [15:0]                   hp_op_b_i,
  output logic                          hp_ready_o,
  output logic                          hp_done_o,
  output logic [15:0]                   hp_result_o,
  output fflags_t                       hp_flags_o,
  // quarter-precision unit
  input  logic                          qp_div_start_i,
  input  logic                          qp_sqrt_start_i,
  input  logic [7:0]                    qp_op_a_i,
  input  logic [7:0]                    qp_op_b_i,
  output logic                          qp_ready_o,
  output logic                          qp_done_o,
  output logic [7:0]                    qp_result_o,
  output fflags_t                       qp_flags_o
);
  // ---------------- dispatchers ----------------
  logic         [N_CORES-1:0]   req, gnt;
  div_sqrt_op_e [N_CORES-1:0]   req_op;
  logic [N_CORES-1:0][C_OP-1:0] req_opa, req_opb;
  logic [N_CORES-1:0][PW-1:0]   req_prec;

  logic            unit_ready, unit_done;
  logic [C_OP-1:0] unit_result;
  fflags_t         unit_flags;
  logic [TAG_W-1:0] tag_q;

  for (genvar c = 0; c < N_CORES; c++) begin : g_core
    fpu_dispatcher #(.C_OP(C_OP), .PW(PW), .TAG_W(TAG_W), .ID(c)) u_disp (
      .clk_i(clk_i), .rst_ni(rst_ni),
      .op_valid_i(core_op_valid_i[c]), .op_i(core_op_i[c]),
      .opa_i(core_opa_i[c]), .opb_i(core_opb_i[c]), .prec_i(core_prec_i[c]),
      .stall_o(core_stall_o[c]), .wb_valid_o(core_wb_valid_o[c]),
      .wb_data_o(core_wb_data_o[c]), .wb_flags_o(core_wb_flags_o[c]),
      .req_o(req[c]), .req_op_o(req_op[c]), .req_opa_o(req_opa[c]),
      .req_opb_o(req_opb[c]), .req_prec_o(req_prec[c]), .gnt_i(gnt[c]),
      .resp_valid_i(unit_done), .resp_tag_i(tag_q),
      .resp_data_i(unit_result), .resp_flags_i(unit_flags)
    );
  end

  // ---------------- arbiter and request multiplexer ----------------
  logic             gnt_valid;
  logic [TAG_W-1:0] gnt_idx;

  rr_arbiter #(.N_REQ(N_CORES)) u_arb (
    .clk_i(clk_i), .rst_ni(rst_ni), .req_i(req), .ready_i(unit_ready),
    .gnt_o(gnt), .gnt_valid_o(gnt_valid), .gnt_idx_o(gnt_idx)
  );

  logic div_start, sqrt_start;
  assign div_start  = gnt_valid && (req_op[gnt_idx] == OP_DIV);
  assign sqrt_start = gnt_valid && (req_op[gnt_idx] == OP_SQRT);

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni)        tag_q <= '0;
    else if (gnt_valid) tag_q <= gnt_idx;
  end

  // ---------------- shared transprecision unit ----------------
  div_sqrt_iter #(
    .C_EXP(C_EXP), .C_MANT(C_MANT), .ITER_PER_CYCLE(ITER_PER_CYCLE), .TRANSPRECISION(1'b1)
  ) u_shared (
    .clk_i(clk_i), .rst_ni(rst_ni), .div_start_i(div_start), .sqrt_start_i(sqrt_start),
    .op_a_i(req_opa[gnt_idx]), .op_b_i(req_opb[gnt_idx]), .precision_ctl_i(req_prec[gnt_idx]),
    .ready_o(unit_ready), .done_o(unit_done), .result_o(unit_result), .flags_o(unit_flags)
  );

  // ---------------- half- and quarter-precision units ----------------
  div_sqrt_iter #(.C_EXP(5), .C_MANT(10), .ITER_PER_CYCLE(4), .TRANSPRECISION(1'b0)) u_hp (
    .clk_i(clk_i), .rst_ni(rst_ni), .div_start_i(hp_div_start_i), .sqrt_start_i(hp_sqrt_start_i),
    .op_a_i(hp_op_a_i), .op_b_i(hp_op_b_i), .precision_ctl_i(4'd10),
    .ready_o(hp_ready_o), .done_o(hp_done_o), .result_o(hp_result_o), .flags_o(hp_flags_o)
  );

  div_sqrt_comb #(.C_EXP(5), .C_MANT(2)) u_qp (
    .clk_i(clk_i), .rst_ni(rst_ni), .div_start_i(qp_div_start_i), .sqrt_start_i(qp_sqrt_start_i),
    .op_a_i(qp_op_a_i), .op_b_i(qp_op_b_i),
    .ready_o(qp_ready_o), .done_o(qp_done_o), .result_o(qp_result_o), .flags_o(qp_flags_o)
  );
endmodule

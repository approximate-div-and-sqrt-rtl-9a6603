// Per-core dispatcher for the shared division / square-root unit.
//
// Sits in a core's execute stage next to its other functional units.  When
// the decoder presents a division or square root (op_valid_i, with the
// operands from the forwarding multiplexers), the dispatcher raises a
// request to the round-robin arbiter and stalls the core's pipeline.  A
// declined request (contention or busy unit) is simply repeated in the next
// cycle.  Once granted, it waits for the shared unit's result whose tag
// equals this core's ID and returns it for write-back to the register file
// in that same cycle (wb_valid_o), which also releases the stall.
//
// Core-side handshake (this design's choice): the core holds op_valid_i and
// the operands stable while stall_o is high; stall_o = op_valid_i and not
// wb_valid_o.  Request signals are combinational from the core inputs;
// the state (requesting / waiting for the result) is one register.  Reset is
// active-low and asynchronous.
module fpu_dispatcher
  import div_sqrt_pkg::*;
#(
  parameter int unsigned C_OP  = 32,
  parameter int unsigned PW    = 5,
  parameter int unsigned TAG_W = 3,
  parameter int unsigned ID    = 0
) (
  input  logic             clk_i,
  input  logic             rst_ni,
  // core side
  input  logic             op_valid_i,
  input  div_sqrt_op_e     op_i,
  input  logic [C_OP-1:0]  opa_i,
  input  logic [C_OP-1:0]  opb_i,
  input  logic [PW-1:0]    prec_i,
  output logic             stall_o,
  output logic             wb_valid_o,
  output logic [C_OP-1:0]  wb_data_o,
  output fflags_t          wb_flags_o,
  // shared-unit side
  output logic             req_o,
  output div_sqrt_op_e     req_op_o,
  output logic [C_OP-1:0]  req_opa_o,
  output logic [C_OP-1:0]  req_opb_o,
  output logic [PW-1:0]    req_prec_o,
  input  logic             gnt_i,
  input  logic             resp_valid_i,
  input  logic [TAG_W-1:0] resp_tag_i,
  input  logic [C_OP-1:0]  resp_data_i,
  input  fflags_t          resp_flags_i
);
  logic waiting_q;   // granted, result not yet back

  assign req_o      = op_valid_i && !waiting_q;
  assign req_op_o   = op_i;
  assign req_opa_o  = opa_i;
  assign req_opb_o  = opb_i;
  assign req_prec_o = prec_i;

  assign wb_valid_o = waiting_q && resp_valid_i && (resp_tag_i == TAG_W'(ID));
  assign wb_data_o  = resp_data_i;
  assign wb_flags_o = resp_flags_i;
  assign stall_o    = op_valid_i && !wb_valid_o;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni)               waiting_q <= 1'b0;
    else if (req_o && gnt_i)   waiting_q <= 1'b1;
    else if (wb_valid_o)       waiting_q <= 1'b0;
  end

  a_gnt_only_on_req: assert property (@(posedge clk_i) disable iff (!rst_ni) gnt_i |-> req_o)
    else $error("grant without request");
  a_hold_while_stalled: assert property (@(posedge clk_i) disable iff (!rst_ni)
    (waiting_q && !wb_valid_o) |=> op_valid_i)
    else $error("core withdrew an operation in flight");
endmodule

// Round-robin arbiter in front of the shared division / square-root unit.
//
// Grants at most one of N_REQ requests per cycle, and only while the shared
// unit is ready (idle): a request that finds the unit busy, or that loses
// to another core, is declined and the requesting dispatcher retries in the
// next cycle.  The search for a grant starts at the requester after the one
// granted last, so every core is served within N_REQ grants.  gnt_o is
// one-hot, gnt_idx_o is its index (the tag of the operation).  The pointer
// register is this design's implementation of the fair policy; reset is
// active-low and asynchronous and gives requester 0 first priority.
module rr_arbiter #(
  parameter int unsigned N_REQ = 8,
  localparam int unsigned IW   = (N_REQ > 1) ? $clog2(N_REQ) : 1
) (
  input  logic             clk_i,
  input  logic             rst_ni,
  input  logic [N_REQ-1:0] req_i,
  input  logic             ready_i,
  output logic [N_REQ-1:0] gnt_o,
  output logic             gnt_valid_o,
  output logic [IW-1:0]    gnt_idx_o
);
  logic [IW-1:0] ptr_q;

  logic [IW-1:0] cand;

  always_comb begin
    cand        = '0;
    gnt_o       = '0;
    gnt_valid_o = 1'b0;
    gnt_idx_o   = '0;
    if (ready_i) begin
      for (int k = N_REQ - 1; k >= 0; k--) begin
        // candidate (ptr + k) mod N_REQ; the lowest k that requests wins
        cand = IW'((int'(ptr_q) + k) % N_REQ);
        if (req_i[cand]) begin
          gnt_idx_o   = cand;
          gnt_valid_o = 1'b1;
        end
      end
      if (gnt_valid_o) gnt_o[gnt_idx_o] = 1'b1;
    end
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni)          ptr_q <= '0;
    else if (gnt_valid_o) ptr_q <= (gnt_idx_o == IW'(N_REQ - 1)) ? '0 : gnt_idx_o + 1'b1;
  end

  a_onehot: assert property (@(posedge clk_i) disable iff (!rst_ni) $onehot0(gnt_o))
    else $error("more than one grant");
  a_grant_requested: assert property (@(posedge clk_i) disable iff (!rst_ni)
    (gnt_o & ~req_i) == '0)
    else $error("grant without request");
endmodule

// Self-checking testbench of the per-core dispatcher (core ID 3 of 8).
// The testbench plays both the core and the shared side.  The core issues
// random operations with random gaps and holds them while stalled.  The
// shared side grants each request after a random number of declined
// cycles, then answers after a random delay, broadcasting results tagged
// for other cores in between.  Checks: the request is raised with the
// core's operands and operation while not yet granted and dropped after a
// grant; the core is stalled from issue until write-back; the write-back
// happens exactly in the cycle the result with tag 3 is broadcast and
// carries its data and flags; results for other tags never write back.
module tb_fpu_dispatcher;
  import div_sqrt_pkg::*;
  localparam int ID = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  logic op_valid = 1'b0;
  div_sqrt_op_e op = OP_DIV;
  logic [31:0] opa = '0, opb = '0, wb_data, req_opa, req_opb, resp_data = '0;
  logic [4:0] prec = '0, req_prec;
  logic stall, wb_valid, req, gnt = 1'b0, resp_valid = 1'b0;
  div_sqrt_op_e req_op;
  logic [2:0] resp_tag = '0;
  fflags_t wb_flags, resp_flags = '0;
  int checks = 0, failures = 0, n_decl = 0, n_foreign = 0;

  always #5 clk = ~clk;

  fpu_dispatcher #(.C_OP(32), .PW(5), .TAG_W(3), .ID(ID)) dut (
    .clk_i(clk), .rst_ni(rst_n), .op_valid_i(op_valid), .op_i(op), .opa_i(opa), .opb_i(opb),
    .prec_i(prec), .stall_o(stall), .wb_valid_o(wb_valid), .wb_data_o(wb_data),
    .wb_flags_o(wb_flags), .req_o(req), .req_op_o(req_op), .req_opa_o(req_opa),
    .req_opb_o(req_opb), .req_prec_o(req_prec), .gnt_i(gnt), .resp_valid_i(resp_valid),
    .resp_tag_i(resp_tag), .resp_data_i(resp_data), .resp_flags_i(resp_flags)
  );

  initial begin
    repeat (50000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(input string what);
    failures++;
    if (failures < 10) $display("FAIL %s at %0t", what, $time);
  endtask

  initial begin
    logic [31:0] data;
    fflags_t fl;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    for (int n = 0; n < 1000; n++) begin
      repeat ($urandom_range(0, 3)) begin
        @(posedge clk); #1;
        checks++; if (req || stall || wb_valid) fail("activity while idle");
      end
      op = $urandom_range(0, 1) ? OP_SQRT : OP_DIV;
      opa = $urandom; opb = $urandom; prec = 5'($urandom);
      op_valid = 1'b1;
      // declined cycles
      repeat ($urandom_range(0, 4)) begin
        #1;
        checks++;
        if (!req || !stall || req_op != op || req_opa != opa || req_opb != opb || req_prec != prec)
          fail("request not raised");
        n_decl++;
        @(posedge clk); #1;
      end
      #1;
      checks++; if (!req) fail("request missing at grant");
      gnt = 1'b1;
      @(posedge clk); #1;
      gnt = 1'b0;
      // waiting for the result, with results for other cores going by
      repeat ($urandom_range(1, 8)) begin
        resp_valid = $urandom_range(0, 1);
        resp_tag = 3'($urandom_range(0, 6));
        if (resp_tag >= 3'(ID)) resp_tag++;
        resp_data = $urandom;
        #1;
        checks++;
        if (req || !stall || wb_valid) fail("wrong state while waiting");
        if (resp_valid) n_foreign++;
        @(posedge clk); #1;
      end
      data = $urandom; fl = fflags_t'($urandom);
      resp_valid = 1'b1; resp_tag = 3'(ID); resp_data = data; resp_flags = fl;
      #1;
      checks++;
      if (!wb_valid || stall || wb_data != data || wb_flags != fl) fail("write-back");
      @(posedge clk); #1;
      resp_valid = 1'b0;
      op_valid = 1'b0;
      #1;
      checks++; if (wb_valid || req || stall) fail("not idle after write-back");
    end
    checks++; if (n_decl == 0 || n_foreign == 0) fail("declines or foreign results never seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// End-to-end testbench of the cluster integration at its default size
// (8 cores, shared single-precision transprecision unit) plus the half- and
// quarter-precision units beside it.
//
// Each of the eight cores is modelled by a process that issues random
// divisions and square roots at random precisions, with random gaps, and
// holds the operation while its stall output is high.  Every write-back is
// compared with the wide-integer reference model; the time from a core's
// grant to its write-back must equal the unit latency for the requested
// precision (5-8 cycles); a waiting core must be granted before any other
// core is granted twice (round-robin fairness); and a write-back must
// arrive only for an operation in flight.  The test also counts how often
// each mechanism occurs (contention between cores, requests declined
// because the unit is busy, each latency class, each operation, special
// operands, and operations on the half- and quarter-precision units) and
// counts a failure for any that never happened.  A watchdog ends a hung run.
module tb_div_sqrt_cluster_top;
  import div_sqrt_pkg::*;
  import fp_ref_pkg::*;

  localparam int N = 8, CE = 8, CM = 23, OPS_PER_CORE = 300;

  logic clk = 1'b0, rst_n = 1'b0;
  logic         [N-1:0]       op_valid = '0;
  div_sqrt_op_e [N-1:0]       op = '{default: OP_DIV};
  logic [N-1:0][31:0]         opa = '0, opb = '0;
  logic [N-1:0][4:0]          prec = '0;
  logic         [N-1:0]       stall, wb_valid;
  logic [N-1:0][31:0]         wb_data;
  fflags_t      [N-1:0]       wb_flags;

  logic hp_div = 0, hp_sqrt = 0, qp_div = 0, qp_sqrt = 0;
  logic [15:0] hp_a = 0, hp_b = 0, hp_res;
  logic [7:0]  qp_a = 0, qp_b = 0, qp_res;
  logic hp_ready, hp_done, qp_ready, qp_done;
  fflags_t hp_fl, qp_fl;

  int checks = 0, failures = 0;
  int n_contention = 0, n_busy_decline = 0, n_div = 0, n_sqrt = 0, n_special = 0;
  int n_lat [9];
  int n_hp = 0, n_qp = 0;
  int done_cores = 0;
  int cycle = 0;
  int grant_cycle [N];
  int want_lat [N];
  int others_granted [N];

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  div_sqrt_cluster_top dut (
    .clk_i(clk), .rst_ni(rst_n),
    .core_op_valid_i(op_valid), .core_op_i(op), .core_opa_i(opa), .core_opb_i(opb),
    .core_prec_i(prec), .core_stall_o(stall), .core_wb_valid_o(wb_valid),
    .core_wb_data_o(wb_data), .core_wb_flags_o(wb_flags),
    .hp_div_start_i(hp_div), .hp_sqrt_start_i(hp_sqrt), .hp_op_a_i(hp_a), .hp_op_b_i(hp_b),
    .hp_ready_o(hp_ready), .hp_done_o(hp_done), .hp_result_o(hp_res), .hp_flags_o(hp_fl),
    .qp_div_start_i(qp_div), .qp_sqrt_start_i(qp_sqrt), .qp_op_a_i(qp_a), .qp_op_b_i(qp_b),
    .qp_ready_o(qp_ready), .qp_done_o(qp_done), .qp_result_o(qp_res), .qp_flags_o(qp_fl)
  );

  initial begin
    repeat (N * OPS_PER_CORE * 12 + 2000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // arbitration observers: contention, busy declines, fairness, grant time
  always @(posedge clk) if (rst_n) begin
    if ($countones(dut.req) > 1) n_contention++;
    if (dut.req != '0 && !dut.unit_ready) n_busy_decline++;
    for (int c = 0; c < N; c++) begin
      if (dut.gnt[c]) begin
        grant_cycle[c] = cycle;
        others_granted[c] = 0;
      end else if (dut.req[c] && dut.gnt != '0) begin
        others_granted[c]++;
        checks++;
        if (others_granted[c] > N - 1) begin
          failures++;
          $display("core %0d starved", c);
        end
      end
    end
  end

  // one process per core
  for (genvar gc = 0; gc < N; gc++) begin : g_core
    initial begin
      int p;
      bit sq;
      wait (rst_n);
      @(posedge clk); #1;
      for (int n = 0; n < OPS_PER_CORE; n++) begin
        repeat ($urandom_range(0, 12)) begin @(posedge clk); #1; end
        sq = $urandom_range(0, 1);
        opa[gc] = rand_op(CE, CM);
        opb[gc] = rand_op(CE, CM);
        if (sq && $urandom_range(0, 3) != 0) opa[gc][31] = 1'b0;
        prec[gc] = 5'($urandom_range(8, 23));
        p = int'(prec[gc]);
        op[gc] = sq ? OP_SQRT : OP_DIV;
        want_lat[gc] = 2 + (p + 4) / 4;
        op_valid[gc] = 1'b1;
        #1;
        // the write-back cycle is the one in which wb_valid is high; the core
        // leaves the operation at the end of that cycle
        while (!wb_valid[gc]) begin
          checks++;
          if (!stall[gc]) begin failures++; $display("core %0d not stalled", gc); end
          @(posedge clk); #2;
          if (cycle > N * OPS_PER_CORE * 12 + 1000) break;
        end
        checks++;
        if (stall[gc]) begin failures++; $display("core %0d stalled during write-back", gc); end
        @(posedge clk); #1;
        op_valid[gc] = 1'b0;
        if (sq) n_sqrt++; else n_div++;
      end
      done_cores++;
    end

    // write-back checker, sampled at the clock edge where wb_valid is high
    always @(posedge clk) if (rst_n && wb_valid[gc]) begin
      logic [31:0] er;
      logic [4:0]  ef;
      bit sq;
      int lat;
      sq = (op[gc] == OP_SQRT);
      ref_op(sq, opa[gc], opb[gc], CE, CM, int'(prec[gc]), er, ef);
      checks++;
      if (!op_valid[gc] || wb_data[gc] != er || wb_flags[gc] != fflags_t'(ef)) begin
        failures++;
        if (failures < 20)
          $display("core %0d MISMATCH %s a=%h b=%h p=%0d got %h/%b want %h/%b", gc,
                   sq ? "sqrt" : "div", opa[gc], opb[gc], prec[gc], wb_data[gc], wb_flags[gc], er, ef);
      end
      if (ef[4] || ef[3] || (opa[gc][30:23] == 8'hff) || (opb[gc][30:23] == 8'hff && !sq)) n_special++;
      lat = cycle - grant_cycle[gc];
      checks++;
      if (lat != want_lat[gc]) begin
        failures++;
        $display("core %0d latency %0d want %0d", gc, lat, want_lat[gc]);
      end else n_lat[lat]++;
    end
  end

  // half- and quarter-precision units, exercised beside the shared one
  initial begin
    logic [31:0] er;
    logic [4:0]  ef;
    bit sq;
    int cyc;
    wait (rst_n);
    @(posedge clk); #1;
    for (int n = 0; n < 500; n++) begin
      sq = $urandom_range(0, 1);
      hp_a = 16'(rand_op(5, 10)); hp_b = 16'(rand_op(5, 10));
      hp_div = !sq; hp_sqrt = sq;
      @(posedge clk); #1;
      hp_div = 0; hp_sqrt = 0;
      cyc = 1;
      while (!hp_done && cyc < 20) begin @(posedge clk); #1; cyc++; end
      ref_op(sq, 32'(hp_a), 32'(hp_b), 5, 10, 10, er, ef);
      checks++;
      if (hp_res != er[15:0] || hp_fl != fflags_t'(ef) || cyc != 5) begin
        failures++; $display("HP mismatch a=%h b=%h got %h cyc %0d", hp_a, hp_b, hp_res, cyc);
      end else n_hp++;
      sq = $urandom_range(0, 1);
      qp_a = 8'($urandom); qp_b = 8'($urandom);
      qp_div = !sq; qp_sqrt = sq;
      @(posedge clk); #1;
      qp_div = 0; qp_sqrt = 0;
      ref_op(sq, 32'(qp_a), 32'(qp_b), 5, 2, 2, er, ef);
      checks++;
      if (!qp_done || qp_res != er[7:0] || qp_fl != fflags_t'(ef)) begin
        failures++; $display("QP mismatch a=%h b=%h got %h", qp_a, qp_b, qp_res);
      end else n_qp++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (done_cores == N);
    repeat (20) @(posedge clk);
    $display("contention cycles %0d, busy declines %0d, div %0d, sqrt %0d, special %0d, hp %0d, qp %0d",
             n_contention, n_busy_decline, n_div, n_sqrt, n_special, n_hp, n_qp);
    for (int l = 5; l <= 8; l++) $display("latency %0d: %0d", l, n_lat[l]);
    checks++; if (n_contention == 0)   begin failures++; $display("no contention seen"); end
    checks++; if (n_busy_decline == 0) begin failures++; $display("no busy decline seen"); end
    checks++; if (n_div == 0 || n_sqrt == 0) begin failures++; $display("an operation never ran"); end
    checks++; if (n_special == 0)      begin failures++; $display("no special operand seen"); end
    checks++; if (n_hp == 0 || n_qp == 0) begin failures++; $display("HP or QP never ran"); end
    for (int l = 5; l <= 8; l++) begin
      checks++;
      if (n_lat[l] == 0) begin failures++; $display("latency class %0d never seen", l); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

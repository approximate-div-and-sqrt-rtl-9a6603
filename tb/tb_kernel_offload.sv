// Kernel-level run of the shared unit in the 8-core cluster: the division
// and square-root streams of four benchmark kernels, replayed at full size,
// at four precision settings.
//
// Kernel sizes (instructions, divisions and square roots over ten runs of
// each kernel) are those of the four benchmarks: Chol 24 564 / 90 / 100,
// QR 155 909 / 710 / 170, Dist3D 12 133 / 0 / 1 000, ProjErr2D
// 82 778 / 2 530 / 0.  The cores themselves are modelled: each kernel's work
// is split evenly over the eight cores; a core executes one other
// instruction per cycle and issues its divisions and square roots evenly
// spread through its instruction stream, stalling until each result is
// written back.  Operands are random normal single-precision values
// (positive for square roots).  For each kernel the run is repeated at
// precision 23, 19, 15 and 11 bits (unit latency 8, 7, 6, 5), and the
// cycles until all cores finish are reported with the reduction relative to
// 23 bits.  Checks: every write-back against the reference model, every
// operation written back exactly once, and a run time that never grows when
// the latency shrinks.  The runtime model (one instruction per cycle, no
// other stalls) is this testbench's own simplification.
module tb_kernel_offload;
  import div_sqrt_pkg::*;
  import fp_ref_pkg::*;

  localparam int N = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  logic         [N-1:0]       op_valid = '0;
  div_sqrt_op_e [N-1:0]       op = '{default: OP_DIV};
  logic [N-1:0][31:0]         opa = '0, opb = '0;
  logic [N-1:0][4:0]          prec = '0;
  logic         [N-1:0]       stall, wb_valid;
  logic [N-1:0][31:0]         wb_data;
  fflags_t      [N-1:0]       wb_flags;
  logic hp_ready, hp_done, qp_ready, qp_done;
  logic [15:0] hp_res;
  logic [7:0]  qp_res;
  fflags_t hp_fl, qp_fl;

  int checks = 0, failures = 0;
  int cycle = 0;
  int done_ops = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  div_sqrt_cluster_top dut (
    .clk_i(clk), .rst_ni(rst_n),
    .core_op_valid_i(op_valid), .core_op_i(op), .core_opa_i(opa), .core_opb_i(opb),
    .core_prec_i(prec), .core_stall_o(stall), .core_wb_valid_o(wb_valid),
    .core_wb_data_o(wb_data), .core_wb_flags_o(wb_flags),
    .hp_div_start_i(1'b0), .hp_sqrt_start_i(1'b0), .hp_op_a_i(16'd0), .hp_op_b_i(16'd0),
    .hp_ready_o(hp_ready), .hp_done_o(hp_done), .hp_result_o(hp_res), .hp_flags_o(hp_fl),
    .qp_div_start_i(1'b0), .qp_sqrt_start_i(1'b0), .qp_op_a_i(8'd0), .qp_op_b_i(8'd0),
    .qp_ready_o(qp_ready), .qp_done_o(qp_done), .qp_result_o(qp_res), .qp_flags_o(qp_fl)
  );

  initial begin
    repeat (3_000_000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] rand_normal(input bit positive);
    return {positive ? 1'b0 : 1'($urandom), 8'($urandom_range(64, 190)), 23'($urandom)};
  endfunction

  // one core: n_instr instructions, of which n_div + n_sqrt are offloaded
  task automatic run_core(input int c, input int n_instr, input int n_div, input int n_sqrt,
                          input int p);
    int n_ops = n_div + n_sqrt;
    int others = n_instr - n_ops;
    int divs_left = n_div, sqrts_left = n_sqrt;
    logic [31:0] er;
    logic [4:0]  ef;
    bit sq;
    for (int k = 0; k < n_ops; k++) begin
      // other instructions before this operation
      repeat (others / n_ops + ((k < others % n_ops) ? 1 : 0)) begin @(posedge clk); #1; end
      sq = ($urandom_range(1, divs_left + sqrts_left) <= sqrts_left);
      if (sq) sqrts_left--; else divs_left--;
      op[c] = sq ? OP_SQRT : OP_DIV;
      opa[c] = rand_normal(sq);
      opb[c] = rand_normal(1'b0);
      prec[c] = 5'(p);
      op_valid[c] = 1'b1;
      #1;
      while (!wb_valid[c]) begin @(posedge clk); #2; end
      ref_op(sq, opa[c], opb[c], 8, 23, p, er, ef);
      checks++;
      if (wb_data[c] != er || wb_flags[c] != fflags_t'(ef)) begin
        failures++;
        if (failures < 10) $display("core %0d wrong result %h want %h", c, wb_data[c], er);
      end
      done_ops++;
      @(posedge clk); #1;
      op_valid[c] = 1'b0;
    end
    if (n_ops == 0) repeat (n_instr) begin @(posedge clk); #1; end
  endtask

  task automatic run_kernel(input string name, input int instr, input int divs, input int sqrts);
    int precs [4] = '{23, 19, 15, 11};
    int runtime [4];
    int t0;
    for (int i = 0; i < 4; i++) begin
      done_ops = 0;
      @(posedge clk); #1;
      t0 = cycle;
      for (int c = 0; c < N; c++) begin
        fork
          automatic int cc = c;
          automatic int pp = precs[i];
          run_core(cc, instr / N + ((cc < instr % N) ? 1 : 0), divs / N + ((cc < divs % N) ? 1 : 0),
                   sqrts / N + ((cc < sqrts % N) ? 1 : 0), pp);
        join_none
      end
      wait fork;
      runtime[i] = cycle - t0;
      checks++;
      if (done_ops != divs + sqrts) begin
        failures++; $display("%s: %0d operations written back, want %0d", name, done_ops, divs + sqrts);
      end
      $display("%-9s precision %2d (latency %0d): %0d cycles, runtime reduction %.2f%%", name,
               precs[i], 2 + (precs[i] + 4) / 4, runtime[i],
               100.0 * real'(runtime[0] - runtime[i]) / real'(runtime[0]));
      if (i > 0) begin
        checks++;
        if (runtime[i] > runtime[i-1]) begin
          failures++; $display("%s: run time grew at lower latency", name);
        end
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run_kernel("Chol", 24564, 90, 100);
    run_kernel("QR", 155909, 710, 170);
    run_kernel("Dist3D", 12133, 0, 1000);
    run_kernel("ProjErr2D", 82778, 2530, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

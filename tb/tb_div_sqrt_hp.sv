// Self-checking testbench of the iterative unit configured as the
// half-precision unit: 5-bit exponent, 10-bit fraction, precision fixed
// (the precision input is driven with random values and must be ignored).
// Random operands of every class are divided and square-rooted; results
// and flags are compared with the wide-integer reference model, and every
// operation must take exactly 5 cycles from start to done.  A watchdog
// ends a hung run.
module tb_div_sqrt_hp;
  import div_sqrt_pkg::*;
  import fp_ref_pkg::*;

  localparam int CE = 5, CM = 10, NOPS = 20000;
  localparam bit TP = 1'b0;

  logic clk = 1'b0, rst_n = 1'b0;
  logic div_start = 1'b0, sqrt_start = 1'b0;
  logic [CE+CM:0] op_a = '0, op_b = '0, result;
  logic [$clog2(CM+1)-1:0] prec = '0;
  logic ready, done;
  fflags_t flags;
  int checks = 0, failures = 0;
  int lat_hist [9];

  always #5 clk = ~clk;

  div_sqrt_iter #(.C_EXP(CE), .C_MANT(CM), .TRANSPRECISION(TP)) dut (
    .clk_i(clk), .rst_ni(rst_n), .div_start_i(div_start), .sqrt_start_i(sqrt_start),
    .op_a_i(op_a), .op_b_i(op_b), .precision_ctl_i(prec),
    .ready_o(ready), .done_o(done), .result_o(result), .flags_o(flags)
  );

  initial begin
    repeat (NOPS * 12 + 100) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] exp_res;
    logic [4:0]  exp_fl;
    bit          sq;
    int          p, cyc, want_lat;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    for (int n = 0; n < NOPS; n++) begin
      sq = $urandom_range(0, 1);
      op_a = rand_op(CE, CM);
      op_b = rand_op(CE, CM);
      if (TP) begin
        prec = $urandom_range(0, 15) == 0 ? $urandom_range(0, 31) : $urandom_range(8, CM);
        p = (prec < 8) ? 8 : (prec > CM) ? CM : int'(prec);
      end else begin
        prec = $urandom;
        p = CM;
      end
      if (!ready) begin
        failures++; $display("unit not ready at op %0d", n);
      end
      div_start = !sq; sqrt_start = sq;
      @(posedge clk); #1;
      div_start = 1'b0; sqrt_start = 1'b0;
      cyc = 1;
      while (!done) begin
        @(posedge clk); #1;
        cyc++;
        if (cyc > 20) break;
      end
      ref_op(sq, 32'(op_a), 32'(op_b), CE, CM, p, exp_res, exp_fl);
      want_lat = 2 + (p + 4) / 4;
      checks++;
      if (result != exp_res[CE+CM:0] || flags != fflags_t'(exp_fl)) begin
        failures++;
        if (failures < 20)
          $display("MISMATCH %s a=%h b=%h p=%0d got %h/%b want %h/%b",
                   sq ? "sqrt" : "div", op_a, op_b, p, result, flags, exp_res[CE+CM:0], exp_fl);
      end
      checks++;
      if (cyc != want_lat) begin
        failures++;
        if (failures < 20) $display("LATENCY p=%0d got %0d want %0d", p, cyc, want_lat);
      end else lat_hist[cyc]++;
      // the unit is idle again in the cycle it reports done
      checks++;
      if (!ready) begin failures++; $display("not idle after done"); end
    end
    for (int l = 5; l <= 8; l++) $display("latency %0d cycles: %0d operations", l, lat_hist[l]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

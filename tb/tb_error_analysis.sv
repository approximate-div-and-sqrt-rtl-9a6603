// Accuracy-versus-latency run of the transprecision unit, the random-vector
// error analysis at reduced size (4000 divisions and 4000 square roots per
// precision setting, instead of a million).
//
// Random single-precision operands with normal (non-denormal) results are
// fed to the unit at precision settings 8 to 23 fraction bits.  For each
// setting the mean relative error against a double-precision computation
// is accumulated and printed with the measured latency.  Checks: every
// relative error is at most 2^-P (the maximum mantissa error of
// 2^(23-P) ULP of single precision), the mean error does not grow when the
// precision grows by four bits, and the latency is 5, 6, 7 or 8 cycles for
// 8-11, 12-15, 16-19, 20-23 bits.
module tb_error_analysis;
  import div_sqrt_pkg::*;

  localparam int NV = 4000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic div_start = 1'b0, sqrt_start = 1'b0;
  logic [31:0] op_a = '0, op_b = '0, result;
  logic [4:0] prec = '0;
  logic ready, done;
  fflags_t flags;
  int checks = 0, failures = 0;
  real mean_err [24];

  always #5 clk = ~clk;

  div_sqrt_iter dut (
    .clk_i(clk), .rst_ni(rst_n), .div_start_i(div_start), .sqrt_start_i(sqrt_start),
    .op_a_i(op_a), .op_b_i(op_b), .precision_ctl_i(prec),
    .ready_o(ready), .done_o(done), .result_o(result), .flags_o(flags)
  );

  initial begin
    repeat (16 * 2 * NV * 10 + 100) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real to_real(input logic [31:0] v);
    // normal single-precision values only: widen the fields to double
    return $bitstoreal({v[31], 11'(int'(v[30:23]) + 896), v[22:0], 29'd0});
  endfunction

  function automatic logic [31:0] rand_normal(input int emin, input int emax);
    return {1'b0, 8'($urandom_range(emin, emax)), 23'($urandom)};
  endfunction

  initial begin
    real exact, err, sum;
    int cyc, want;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    for (int p = 8; p <= 23; p++) begin
      sum = 0.0;
      want = 2 + (p + 4) / 4;
      for (int n = 0; n < 2 * NV; n++) begin
        bit sq;
        sq = n >= NV;
        op_a = rand_normal(80, 170);
        op_b = rand_normal(80, 170);
        prec = 5'(p);
        div_start = !sq; sqrt_start = sq;
        @(posedge clk); #1;
        div_start = 1'b0; sqrt_start = 1'b0;
        cyc = 1;
        while (!done && cyc < 20) begin @(posedge clk); #1; cyc++; end
        exact = sq ? $sqrt(to_real(op_a)) : to_real(op_a) / to_real(op_b);
        err = (to_real(result) - exact) / exact;
        if (err < 0.0) err = -err;
        sum += err;
        checks++;
        if (err > $bitstoreal({1'b0, 11'(1023 - p), 52'd0}) || cyc != want) begin
          failures++;
          if (failures < 10) $display("p=%0d a=%h b=%h err=%e cyc=%0d", p, op_a, op_b, err, cyc);
        end
      end
      mean_err[p] = sum / real'(2 * NV);
      $display("precision %2d bits: latency %0d cycles, mean relative error %e", p, want, mean_err[p]);
    end
    for (int p = 8; p <= 19; p++) begin
      checks++;
      if (mean_err[p + 4] > mean_err[p]) begin
        failures++; $display("mean error grows from %0d to %0d bits", p, p + 4);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

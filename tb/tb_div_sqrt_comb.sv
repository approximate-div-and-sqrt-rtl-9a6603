// Exhaustive self-checking testbench of the single-cycle quarter-precision
// unit (1-5-2 format).  Every one of the 65536 operand pairs is divided and
// every one of the 256 operands is square-rooted, one operation started per
// cycle back to back.  Each result must appear with done one cycle after its
// start, and it and its flags are compared with the wide-integer reference
// model.  A watchdog ends a hung run.
module tb_div_sqrt_comb;
  import div_sqrt_pkg::*;
  import fp_ref_pkg::*;

  localparam int CE = 5, CM = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  logic div_start = 1'b0, sqrt_start = 1'b0;
  logic [7:0] op_a = '0, op_b = '0, result;
  logic ready, done;
  fflags_t flags;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  div_sqrt_comb dut (
    .clk_i(clk), .rst_ni(rst_n), .div_start_i(div_start), .sqrt_start_i(sqrt_start),
    .op_a_i(op_a), .op_b_i(op_b), .ready_o(ready), .done_o(done),
    .result_o(result), .flags_o(flags)
  );

  initial begin
    repeat (70000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input bit sq, input logic [7:0] a, input logic [7:0] b);
    logic [31:0] er;
    logic [4:0]  ef;
    op_a = a; op_b = b; div_start = !sq; sqrt_start = sq;
    checks++;
    if (!ready) failures++;
    @(posedge clk); #1;
    ref_op(sq, 32'(a), 32'(b), CE, CM, CM, er, ef);
    checks++;
    if (!done || result != er[7:0] || flags != fflags_t'(ef)) begin
      failures++;
      if (failures < 20)
        $display("MISMATCH %s a=%h b=%h got %b %h/%b want %h/%b", sq ? "sqrt" : "div",
                 a, b, done, result, flags, er[7:0], ef);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    for (int a = 0; a < 256; a++)
      for (int b = 0; b < 256; b++) run(1'b0, 8'(a), 8'(b));
    for (int a = 0; a < 256; a++) run(1'b1, 8'(a), 8'($urandom));
    div_start = 1'b0; sqrt_start = 1'b0;
    @(posedge clk); #1;
    checks++;
    if (done) begin failures++; $display("done without start"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Self-checking testbench of the leading zero detector (24-bit, the
// single-precision mantissa width).  Checks every single-bit input, the
// all-zero input and random inputs against a count computed by scanning
// the bits from the top.
module tb_lzd;
  localparam int W = 24;
  logic [W-1:0] in = '0;
  logic [$clog2(W+1)-1:0] count;
  int checks = 0, failures = 0;

  lzd #(.WIDTH(W)) dut (.in(in), .count(count));

  initial begin
    #100000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [W-1:0] v);
    int z = 0;
    in = v;
    #1;
    while (z < W && !v[W-1-z]) z++;
    checks++;
    if (int'(count) != z) begin
      failures++;
      $display("MISMATCH in=%h got %0d want %0d", v, count, z);
    end
  endtask

  initial begin
    check('0);
    for (int i = 0; i < W; i++) check(W'(1) << i);
    for (int n = 0; n < 2000; n++) check(W'($urandom) >> $urandom_range(0, W));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

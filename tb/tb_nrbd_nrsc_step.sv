// Self-checking testbench of the shared non-restoring iteration cell.
// The cell is iterated by the testbench, feeding each output back as the
// next input, exactly as the iteration unit chains it:
//  - division: random normalised mantissas a >= b (24-bit); after 25 steps
//    the quotient register must equal floor(a * 2^24 / b), computed with an
//    integer division;
//  - square root: random 50-bit radicands; after 25 steps the root register
//    must equal the integer square root found by binary search.
// Both also check the final remainder after the restoring correction.
module tb_nrbd_nrsc_step;
  localparam int RW = 29, QW = 25, XW = 50, DW = 25;

  logic                 is_sqrt = 1'b0;
  logic signed [RW-1:0] r_i = '0, r_o;
  logic [QW-1:0]        q_i = '0, q_o;
  logic [XW-1:0]        x_i = '0, x_o;
  logic [DW-1:0]        d_i = '0;
  int checks = 0, failures = 0;

  nrbd_nrsc_step #(.RW(RW), .QW(QW), .XW(XW), .DW(DW)) dut (
    .is_sqrt(is_sqrt), .r_i(r_i), .q_i(q_i), .x_i(x_i), .d_i(d_i),
    .r_o(r_o), .q_o(q_o), .x_o(x_o)
  );

  initial begin
    #10000000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] a, b, qref, rref, x, lo, hi, mid;
    logic signed [RW-1:0] rfin;
    for (int n = 0; n < 2000; n++) begin
      // division: quotient bits of weight 2^0 .. 2^-24
      b = 64'($urandom_range(0, (1 << 23) - 1)) | (64'd1 << 23);
      a = 64'($urandom_range(0, (1 << 23) - 1)) | (64'd1 << 23);
      if (a < b) a = a << 1;
      is_sqrt = 1'b0; r_i = RW'(a); q_i = '0; x_i = '0; d_i = DW'(b << 1);
      for (int s = 0; s < QW; s++) begin
        #1; r_i = r_o; q_i = q_o; x_i = x_o;
      end
      qref = (a << 24) / b;
      rref = (a << 24) % b;
      rfin = r_i[RW-1] ? r_i + RW'(b << 1) : r_i;
      checks++;
      if (64'(q_i) != qref || 64'(rfin) != (rref << 1)) begin
        failures++;
        if (failures < 10) $display("DIV a=%h b=%h got q=%h r=%0d want q=%h r=%0d", a, b, q_i, rfin, qref, rref << 1);
      end
      // square root
      x = {$urandom, $urandom} & ((64'd1 << 50) - 1);
      x[49 - $urandom_range(0, 1)] = 1'b1;
      is_sqrt = 1'b1; r_i = '0; q_i = '0; x_i = XW'(x); d_i = '0;
      for (int s = 0; s < QW; s++) begin
        #1; r_i = r_o; q_i = q_o; x_i = x_o;
      end
      lo = 0; hi = 64'd1 << 26;
      while (hi - lo > 1) begin
        mid = (lo + hi) >> 1;
        if (mid * mid <= x) lo = mid; else hi = mid;
      end
      rfin = r_i[RW-1] ? r_i + $signed(RW'({q_i, 1'b1})) : r_i;
      checks++;
      if (64'(q_i) != lo || 64'(rfin) != x - lo * lo) begin
        failures++;
        if (failures < 10) $display("SQRT x=%h got q=%h r=%0d want q=%h r=%0d", x, q_i, rfin, lo, x - lo * lo);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Self-checking testbench of the post-processing stage, single precision.
// The stage is driven with division end states: a quotient register q of
// n = 12, 16, 20 or 24 computed bits (top bit set), a divisor d and a
// partial remainder r anywhere in [-d, d).  The exact value such a state
// stands for is q + r'/d units of the last bit, r' being the restoring
// remainder; the testbench rounds that value with the reference model at a
// random precision and a random result exponent spanning the denormal and
// overflow ranges, and compares result and flags.  Three in ten of these
// states are exact or exactly halfway, to exercise ties-to-even.  A fifth of the vectors
// instead carry special operands (zero, infinity, NaN, negative square
// root), whose results are checked against the reference's special rules.
module tb_div_sqrt_postprocess;
  import div_sqrt_pkg::*;
  import fp_ref_pkg::*;
  localparam int CE = 8, CM = 23, BIAS = 127, T = 25, RW = 29;

  logic is_sqrt = 1'b0, sign_z = 1'b0, snan = 1'b0;
  logic signed [RW-1:0] r = '0;
  logic [T-1:0] q = '0;
  logic [2*T-1:0] x = '0;
  logic [24:0] d = '0;
  logic [4:0] nbits = '0, prec = '0;
  logic signed [9:0] exp_z = '0;
  logic [5:0] special = '0;
  logic [31:0] result;
  fflags_t flags;
  int checks = 0, failures = 0, n_denorm = 0, n_ovf = 0;

  div_sqrt_postprocess #(.C_EXP(CE), .C_MANT(CM), .ITER_PER_CYCLE(4)) dut (
    .is_sqrt(is_sqrt), .r_i(r), .q_i(q), .x_i(x), .d_i(d), .n_bits(nbits), .prec(prec),
    .exp_z(exp_z), .sign_z(sign_z), .special(special), .snan(snan),
    .result(result), .flags(flags)
  );

  initial begin
    #1000000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] m, num, rr;
    logic [31:0] er, a, b;
    logic [4:0] ef;
    int n, p, ez;
    for (int k = 0; k < 20000; k++) begin
      if ($urandom_range(0, 4) != 0) begin
        n  = 4 * $urandom_range(3, 6);
        p  = $urandom_range(8, 23);
        if (n < p + 1) n = 4 * ((p + 4) / 4);
        ez = $urandom_range(0, 9) < 3 ? $urandom_range(0, 60) - 40 : $urandom_range(0, 9) < 2 ?
             $urandom_range(240, 270) : $urandom_range(1, 254);
        is_sqrt = 1'b0; special = '0; snan = 1'b0;
        sign_z = $urandom_range(0, 1);
        d = {1'b1, 23'($urandom), 1'b0};
        q = T'({$urandom, $urandom} & ((64'd1 << n) - 1)) | (T'(1) << (n - 1));
        r = RW'($signed(33'($urandom_range(0, 2 * d - 1))) - $signed(33'(d)));
        // exact results and exact halfway cases (ties)
        case ($urandom_range(0, 9))
          0: r = '0;
          1: r = RW'(d >> 1);
          2: r = -$signed(RW'(d >> 1));
          default: ;
        endcase
        x = '0;
        nbits = 5'(n); prec = 5'(p); exp_z = 10'(ez);
        #1;
        rr = 128'(longint'(r) + ((r < 0) ? longint'(d) : 64'sd0));
        num = (128'(q) * 128'(d) + rr) << 40;
        m = num / 128'(d);
        round_pack(sign_z, m, ez - BIAS - (n - 1) - 40, (num % 128'(d)) != 0, CE, CM, p, er, ef);
        if (ez <= 0) n_denorm++;
        if (ez >= 255) n_ovf++;
      end else begin
        // special operands
        is_sqrt = $urandom_range(0, 1);
        do begin
          a = rand_op(CE, CM); b = rand_op(CE, CM);
        end while (!(a[30:23] == 8'hff || a[30:0] == 0 || (is_sqrt && a[31]) ||
                     (!is_sqrt && (b[30:23] == 8'hff || b[30:0] == 0))));
        special = {a[30:0] == 0, a[30:23] == 8'hff && a[22:0] == 0, a[30:23] == 8'hff && a[22:0] != 0,
                   b[30:0] == 0, b[30:23] == 8'hff && b[22:0] == 0, b[30:23] == 8'hff && b[22:0] != 0};
        snan = (special[3] && !a[22]) || (!is_sqrt && special[0] && !b[22]);
        sign_z = is_sqrt ? a[31] : a[31] ^ b[31];
        q = T'(1) << 23; d = {1'b1, 24'd0}; r = '0; x = '0; nbits = 5'd24; prec = 5'd23; exp_z = 10'd127;
        #1;
        ref_op(is_sqrt, a, b, CE, CM, CM, er, ef);
      end
      checks++;
      if (result != er || flags != fflags_t'(ef)) begin
        failures++;
        if (failures < 10)
          $display("MISMATCH sqrt=%0d q=%h r=%0d d=%h n=%0d p=%0d ez=%0d got %h/%b want %h/%b",
                   is_sqrt, q, r, d, nbits, prec, exp_z, result, flags, er, ef);
      end
    end
    checks++;
    if (n_denorm == 0 || n_ovf == 0) begin failures++; $display("range not covered"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

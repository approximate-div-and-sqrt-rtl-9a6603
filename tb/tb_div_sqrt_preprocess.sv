// Self-checking testbench of the pre-processing stage, single precision.
// For random operands of every class, the testbench normalises each
// mantissa by shifting it left one bit at a time until the hidden-bit
// position is set, derives the effective exponents from that, and checks
// the stage's normalised mantissas, result exponent (division and square
// root), doubling flag, sign, operand classes and signalling-NaN flag.
module tb_div_sqrt_preprocess;
  import fp_ref_pkg::*;
  localparam int CE = 8, CM = 23, BIAS = 127;

  logic [31:0] op_a = '0, op_b = '0;
  logic is_sqrt = 1'b0;
  logic sign_z, mant_shift, snan;
  logic signed [9:0] exp_z;
  logic [23:0] ma, mb;
  logic [5:0] special;
  int checks = 0, failures = 0;

  div_sqrt_preprocess #(.C_EXP(CE), .C_MANT(CM)) dut (
    .op_a(op_a), .op_b(op_b), .is_sqrt(is_sqrt), .sign_z(sign_z), .exp_z(exp_z),
    .mant_a_norm(ma), .mant_b_norm(mb), .mant_shift(mant_shift), .special(special), .snan(snan)
  );

  initial begin
    #1000000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void norm(input logic [31:0] v, output logic [23:0] m, output int e);
    m = {v[30:23] != 0, v[22:0]};
    e = (v[30:23] == 0) ? 1 : int'(v[30:23]);
    if (m == 0) return;
    while (!m[23]) begin m = m << 1; e--; end
  endfunction

  initial begin
    logic [23:0] wa, wb;
    int ea, eb, ez, ua;
    bit sh, ok;
    logic [5:0] sp;
    for (int n = 0; n < 5000; n++) begin
      op_a = rand_op(CE, CM);
      op_b = rand_op(CE, CM);
      is_sqrt = $urandom_range(0, 1);
      #1;
      norm(op_a, wa, ea);
      norm(op_b, wb, eb);
      if (is_sqrt) begin
        ua = ea - BIAS;
        sh = (ua % 2) != 0;
        ez = (sh ? ua - 1 : ua) / 2 + BIAS;
      end else begin
        sh = wa < wb;
        ez = ea - eb + BIAS - int'(sh);
      end
      sp = {op_a[30:0] == 0, op_a[30:23] == 8'hff && op_a[22:0] == 0, op_a[30:23] == 8'hff && op_a[22:0] != 0,
            op_b[30:0] == 0, op_b[30:23] == 8'hff && op_b[22:0] == 0, op_b[30:23] == 8'hff && op_b[22:0] != 0};
      ok = (ma == wa) && (mb == wb) && (special == sp) &&
           (snan == ((sp[3] && !op_a[22]) || (!is_sqrt && sp[0] && !op_b[22]))) &&
           (sign_z == (is_sqrt ? op_a[31] : op_a[31] ^ op_b[31]));
      // exponent and doubling only matter for non-zero finite operands
      if (wa != 0 && (is_sqrt || wb != 0)) ok = ok && (int'(exp_z) == ez) && (mant_shift == sh);
      checks++;
      if (!ok) begin
        failures++;
        if (failures < 10)
          $display("MISMATCH a=%h b=%h sqrt=%0d exp %0d/%0d shift %0d/%0d ma %h/%h mb %h/%h sp %b/%b",
                   op_a, op_b, is_sqrt, exp_z, ez, mant_shift, sh, ma, wa, mb, wb, special, sp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

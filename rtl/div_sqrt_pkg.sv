// Shared types and sizing functions for the transprecision division /
// square-root units and their cluster integration.
//
// The units compute a radix-2 non-restoring division or square root, one
// result bit per iteration cell, with ITER_PER_CYCLE cells per clock.  The
// functions below derive the register sizes and the cycle counts from the
// format (C_MANT fraction bits) and from the requested precision.  The
// latency rule (one pre-processing cycle, ceil((precision+1)/4) iteration
// cycles, one post-processing cycle) follows the published latency table;
// the exception flag set and the operation encoding are this design's own.
package div_sqrt_pkg;

  // Operation selected by a core's dispatcher.
  typedef enum logic [0:0] {
    OP_DIV  = 1'b0,
    OP_SQRT = 1'b1
  } div_sqrt_op_e;

  // Exception flags, in the order of the RISC-V fflags CSR.
  // dv is "divide by zero" (DZ), nv "invalid", nx "inexact".
  typedef struct packed {
    logic nv;
    logic dv;
    logic of;
    logic uf;
    logic nx;
  } fflags_t;

  // Iteration cycles needed for PREC fraction bits plus the hidden bit.
  function automatic int unsigned iter_cycles(int unsigned prec, int unsigned ipc);
    return (prec + ipc) / ipc;
  endfunction

  // Width of the quotient / root register: every bit the iteration stage
  // can produce at full precision, plus the guard bit produced by the
  // extra cell in the post-processing stage.
  function automatic int unsigned root_bits(int unsigned c_mant, int unsigned ipc);
    return ipc * iter_cycles(c_mant, ipc) + 1;
  endfunction

endpackage

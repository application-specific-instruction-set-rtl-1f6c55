// asip_pkg: types and helpers shared by every block of the parametric
// VLIW/multi-SIMD processor.
//
// The operation set is the eight integer operations of the design
// (multiply, add, subtract, and, or, bitwise invert, right shift, left
// shift) carried in a 4-bit operation field. The numeric encoding is this
// design's own choice: code 0 is a no-operation that the instruction fetch
// stage drops, the eight operations take codes 1 to 8 and the remaining
// codes behave like no-operations.
//
// Instruction and data words are built from parameters (data width,
// register file address width, permutation address width), so they are
// passed between modules as flat vectors; the bit layout of each one is
// given by the field helpers below, most significant field first, in the
// order of the instruction formats:
//   scalar instruction : op | address1 | address2 | result address
//   SIMD instruction   : op | address1 | perm address1 | address2 |
//                        perm address2 | result address
package asip_pkg;

  localparam int OP_W = 4;

  typedef enum logic [OP_W-1:0] {
    OP_NOP = 4'd0,
    OP_MUL = 4'd1,
    OP_ADD = 4'd2,
    OP_SUB = 4'd3,
    OP_AND = 4'd4,
    OP_OR  = 4'd5,
    OP_NOT = 4'd6,
    OP_SHR = 4'd7,
    OP_SHL = 4'd8
  } op_e;

  // ceil(log2(n)) but never below one bit, so that a field always exists.
  function automatic int clog2_min1(input int n);
    return (n <= 2) ? 1 : $clog2(n);
  endfunction

  // Number of register file banks: one per SIMD element of every SIMD
  // pipeline plus one per scalar pipeline (equation 3.1 argument).
  function automatic int num_banks(input int num_simd, input int simd_w,
                                   input int num_scalar);
    return num_simd * simd_w + num_scalar;
  endfunction

  // True when an operation code writes a result (a real operation).
  function automatic logic op_is_real(input logic [OP_W-1:0] op);
    return (op >= OP_MUL) && (op <= OP_SHL);
  endfunction

endpackage

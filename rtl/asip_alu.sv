// asip_alu: execute unit of a scalar pipeline (and one lane of a SIMD
// execute unit).
//
// Performs the eight integer operations of the instruction set on two
// DATA_W-bit signed operands; the result has the operand width (the
// product keeps its low DATA_W bits). Bitwise invert uses operand1 only.
// The shifts move operand1 by the amount in the low bits of operand2;
// the right shift is arithmetic because the data words are signed
// integers. Those two details, and the treatment of a shift amount of
// DATA_W or more (the result is then all sign bits or zero), are this
// design's choices. Purely combinational: the stage's FIFOs give the
// pipeline its timing.
module asip_alu
  import asip_pkg::*;
#(
  parameter int DATA_W = 32
) (
  input  logic [OP_W-1:0]   op,
  input  logic [DATA_W-1:0] a,
  input  logic [DATA_W-1:0] b,
  output logic [DATA_W-1:0] y
);

  localparam int SH_W = (DATA_W <= 2) ? 1 : $clog2(DATA_W);
  localparam logic [DATA_W-1:0] DW_VEC = DATA_W;

  logic              big_shift;
  logic [SH_W-1:0]   sh;

  assign sh        = b[SH_W-1:0];
  assign big_shift = (b >= DW_VEC) || (b[DATA_W-1] == 1'b1);

  always_comb begin
    unique case (op)
      OP_MUL:  y = a * b;
      OP_ADD:  y = a + b;
      OP_SUB:  y = a - b;
      OP_AND:  y = a & b;
      OP_OR:   y = a | b;
      OP_NOT:  y = ~a;
      OP_SHR:  y = big_shift ? {DATA_W{a[DATA_W-1]}} : DATA_W'($signed(a) >>> sh);
      OP_SHL:  y = big_shift ? '0 : (a << sh);
      default: y = '0;
    endcase
  end

endmodule

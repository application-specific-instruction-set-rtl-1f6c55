// tb_asip_alu: self-checking test of the execute unit.
// Applies every operation to random and corner-case operands and compares
// with a reference computed here from 64-bit arithmetic.
module tb_asip_alu;
  import asip_pkg::*;
  localparam int DW = 32;
  logic [OP_W-1:0] op;
  logic [DW-1:0]   a, b, y;
  int checks = 0, failures = 0;

  asip_alu #(.DATA_W(DW)) dut (.*);

  function automatic logic [DW-1:0] ref_op(input logic [OP_W-1:0] o,
                                          input logic [DW-1:0] x, input logic [DW-1:0] z);
    longint sx, sz;
    sx = longint'($signed(x));
    sz = longint'($signed(z));
    case (o)
      OP_MUL: return DW'(sx * sz);
      OP_ADD: return DW'(sx + sz);
      OP_SUB: return DW'(sx - sz);
      OP_AND: return x & z;
      OP_OR:  return x | z;
      OP_NOT: return ~x;
      OP_SHR: return (z >= 32) ? (x[DW-1] ? '1 : '0) : DW'(sx / (longint'(1) << z) - ((sx < 0 && (sx % (longint'(1) << z)) != 0) ? 1 : 0));
      OP_SHL: return (z >= 32) ? '0 : DW'(longint'(x) * (longint'(1) << z));
      default: return '0;
    endcase
  endfunction

  initial begin
    for (int i = 0; i < 4000; i++) begin
      op = OP_W'(i % 10);
      case ($urandom_range(0, 3))
        0: a = $urandom;
        1: a = 32'h8000_0000;
        2: a = 32'hFFFF_FFFF;
        default: a = $urandom_range(0, 100);
      endcase
      b = (op == OP_SHR || op == OP_SHL) ? 32'($urandom_range(0, 40)) : $urandom;
      #1;
      checks++;
      if (y !== ref_op(op, a, b)) begin
        failures++;
        $display("FAIL op %0d a %h b %h y %h exp %h", op, a, b, y, ref_op(op, a, b));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

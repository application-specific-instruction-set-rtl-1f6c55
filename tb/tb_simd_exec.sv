// tb_simd_exec: self-checking test of the SIMD execute unit.
// Random vectors and operations; each element is compared with the
// element-wise result computed here.
module tb_simd_exec;
  import asip_pkg::*;
  localparam int W = 4, DW = 32;
  logic [OP_W-1:0]          op;
  logic [W-1:0][DW-1:0]     va, vb, vy;
  logic [DW-1:0]            e;
  int checks = 0, failures = 0;

  simd_exec #(.SIMD_W(W), .DATA_W(DW)) dut (.*);

  initial begin
    for (int i = 0; i < 2000; i++) begin
      op = OP_W'($urandom_range(1, 8));
      for (int k = 0; k < W; k++) begin
        va[k] = $urandom;
        vb[k] = (op == OP_SHR || op == OP_SHL) ? 32'($urandom_range(0, 31)) : $urandom;
      end
      #1;
      for (int k = 0; k < W; k++) begin
        case (op)
          OP_MUL: e = va[k] * vb[k];
          OP_ADD: e = va[k] + vb[k];
          OP_SUB: e = va[k] - vb[k];
          OP_AND: e = va[k] & vb[k];
          OP_OR:  e = va[k] | vb[k];
          OP_NOT: e = ~va[k];
          OP_SHR: e = DW'($signed(va[k]) >>> vb[k]);
          default: e = va[k] << vb[k];
        endcase
        checks++;
        if (vy[k] !== e) begin
          failures++;
          $display("FAIL op %0d lane %0d got %h exp %h", op, k, vy[k], e);
        end
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

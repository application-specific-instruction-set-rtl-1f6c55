// tb_scalar_pipe: self-checking test of a scalar pipeline.
// The test plays the register file: it answers read requests from a model
// array and grants reads and writes at random. Instructions read only the
// lower half of the address space and write the upper half, so every
// expected result can be worked out when the instruction is sent. Checks:
// results and result addresses in program order, three cycles from
// acceptance to write-back request, one instruction per cycle when never
// refused, and that refused requests (stalls) lose nothing.
module tb_scalar_pipe;
  import asip_pkg::*;
  localparam int DW = 32, AW = 10, IW = 4 + 3 * AW, N = 400;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready;
  logic [IW-1:0] in_instr;
  logic rd_valid, rd_grant, wr_valid, wr_grant, busy, rd_stall, wr_stall;
  logic [AW-1:0] rd_addr1, rd_addr2, wr_addr;
  logic [DW-1:0] rd_data1, rd_data2, wr_data;
  logic [DW-1:0] mem [1 << AW];
  logic [AW-1:0] exp_addr [$];
  logic [DW-1:0] exp_data [$];
  int checks = 0, failures = 0;
  int n_rd_stall = 0, n_wr_stall = 0;
  logic random_grants;

  scalar_pipe #(.DATA_W(DW), .ADDR_W(AW)) dut (.*);

  always #5 clk = ~clk;

  // a refused read returns garbage, as a real register file would
  assign rd_data1 = rd_grant ? mem[rd_addr1] : 32'hBAD0_0001;
  assign rd_data2 = rd_grant ? mem[rd_addr2] : 32'hBAD0_0002;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic logic [DW-1:0] ref_op(input logic [3:0] op, input logic [DW-1:0] a,
                                           input logic [DW-1:0] b);
    case (op)
      OP_MUL: return a * b;
      OP_ADD: return a + b;
      OP_SUB: return a - b;
      OP_AND: return a & b;
      OP_OR:  return a | b;
      OP_NOT: return ~a;
      OP_SHR: return (b > 31) ? {DW{a[DW-1]}} : DW'($signed(a) >>> b[4:0]);
      default: return (b > 31) ? '0 : a << b[4:0];
    endcase
  endfunction

  // write-back side: compare against expectations
  int writes = 0;
  always @(posedge clk) begin
    if (rst_n && wr_valid && wr_grant) begin
      check(exp_addr.size() > 0, "unexpected write");
      if (exp_addr.size() > 0) begin
        check(wr_addr == exp_addr.pop_front(), "result address");
        check(wr_data == exp_data.pop_front(), "result value");
      end
      mem[wr_addr] <= wr_data;
      writes++;
    end
    if (rst_n && rd_stall) n_rd_stall++;
    if (rst_n && wr_stall) n_wr_stall++;
  end

  always @(negedge clk) begin
    rd_grant = !random_grants || ($urandom_range(0, 2) != 0);
    wr_grant = !random_grants || ($urandom_range(0, 2) != 0);
  end

  logic [3:0] op;
  logic [AW-1:0] a1, a2, ra;
  int sent, t0, t1;

  initial begin
    in_valid = 0; in_instr = '0; random_grants = 1; rd_grant = 0; wr_grant = 0;
    for (int i = 0; i < (1 << AW); i++) mem[i] = (i % 4 == 0) ? 32'($urandom_range(0, 31)) : $urandom;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // random traffic with random refusals
    sent = 0;
    while (sent < N) begin
      @(negedge clk);
      #1;
      in_valid = $urandom_range(0, 3) != 0;
      op = 4'($urandom_range(1, 8));
      a1 = AW'($urandom_range(0, 511)); a2 = AW'($urandom_range(0, 511));
      ra = AW'($urandom_range(512, 1023));
      in_instr = {op, a1, a2, ra};
      #1;
      if (in_valid && in_ready) begin
        exp_addr.push_back(ra);
        exp_data.push_back(ref_op(op, mem[a1], mem[a2]));
        sent++;
      end
    end
    @(negedge clk);
    in_valid = 0;
    wait (!busy);
    check(writes == N && exp_addr.size() == 0, "all results written");
    // timing: grants always given
    random_grants = 0;
    @(negedge clk);
    #2;
    in_valid = 1; in_instr = {OP_ADD, 10'd1, 10'd2, 10'd600};
    exp_addr.push_back(10'd600); exp_data.push_back(mem[1] + mem[2]);
    t0 = $time;
    @(negedge clk);
    #2;
    in_valid = 0;
    wait (wr_valid);
    t1 = $time;
    // presented just before edge 1; write-back request after edge 3
    check(t1 - t0 == 23, "three cycles to write-back");
    wait (!busy);
    // throughput: 50 instructions back to back
    writes = 0;
    @(negedge clk);
    #2;
    for (int i = 0; i < 50; i++) begin
      in_valid = 1;
      in_instr = {OP_OR, AW'(i), AW'(i + 1), AW'(700 + i)};
      exp_addr.push_back(AW'(700 + i)); exp_data.push_back(mem[i] | mem[i + 1]);
      #1;
      check(in_ready, "accepts every cycle");
      @(negedge clk);
      #2;
    end
    in_valid = 0;
    repeat (3) @(negedge clk);
    check(writes == 50, "50 results in 53 cycles");
    check(n_rd_stall > 0 && n_wr_stall > 0, "stalls exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

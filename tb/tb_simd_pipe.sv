// tb_simd_pipe: self-checking test of a SIMD pipeline (width 4).
// The test plays the register file: a vector read at address A returns
// words A..A+3 of a model array, and reads and writes are granted at
// random. Instructions read the lower half and write the upper half, so
// expected result vectors are worked out when an instruction is sent,
// including the permutation of each operand (reset table: rotations,
// broadcasts, reversal; entry 15 is reloaded with the order 2,3,1,0).
// Checks results in order, four cycles from acceptance to write-back
// request, one instruction per cycle when never refused, and stalls.
module tb_simd_pipe;
  import asip_pkg::*;
  localparam int W = 4, DW = 32, AW = 10, PD = 16, IW = 4 + 3 * AW + 2 * 4, N = 300;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready;
  logic [IW-1:0] in_instr;
  logic pm_we;
  logic [3:0] pm_waddr;
  logic [W-1:0][1:0] pm_wdata;
  logic rd_valid, rd_grant, wr_valid, wr_grant, busy, rd_stall, wr_stall;
  logic [AW-1:0] rd_addr1, rd_addr2, wr_addr;
  logic [W-1:0][DW-1:0] rd_data1, rd_data2, wr_data;
  logic [DW-1:0] mem [(1 << AW) + W];
  logic [AW-1:0] exp_addr [$];
  logic [W-1:0][DW-1:0] exp_data [$];
  int checks = 0, failures = 0;
  int n_rd_stall = 0, n_wr_stall = 0;
  logic random_grants;

  simd_pipe #(.SIMD_W(W), .DATA_W(DW), .ADDR_W(AW), .PERM_DEPTH(PD)) dut (.*);

  always #5 clk = ~clk;

  always_comb begin
    for (int e = 0; e < W; e++) begin
      // a refused read returns garbage, as a real register file would
      rd_data1[e] = rd_grant ? mem[int'(rd_addr1) + e] : 32'hBAD0_0001;
      rd_data2[e] = rd_grant ? mem[int'(rd_addr2) + e] : 32'hBAD0_0002;
    end
  end

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

  function automatic int src(input int p, input int i);
    if (p == 15) return (i == 0) ? 2 : (i == 1) ? 3 : (i == 2) ? 1 : 0;
    if (p < W) return (i + p) % W;
    if (p < 2 * W) return p - W;
    return W - 1 - i;
  endfunction

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

  int writes = 0;
  always @(posedge clk) begin
    if (rst_n && wr_valid && wr_grant) begin
      check(exp_addr.size() > 0, "unexpected write");
      if (exp_addr.size() > 0) begin
        check(wr_addr == exp_addr.pop_front(), "result address");
        check(wr_data == exp_data.pop_front(), "result vector");
      end
      for (int e = 0; e < W; e++) mem[int'(wr_addr) + e] <= wr_data[e];
      writes++;
    end
    if (rst_n && rd_stall) n_rd_stall++;
    if (rst_n && wr_stall) n_wr_stall++;
  end

  always @(negedge clk) begin
    rd_grant = !random_grants || ($urandom_range(0, 2) != 0);
    wr_grant = !random_grants || ($urandom_range(0, 2) != 0);
  end

  logic [3:0] op, p1, p2;
  logic [AW-1:0] a1, a2, ra;
  logic [W-1:0][DW-1:0] ev;
  int sent, t0, t1;

  task automatic expect_instr();
    for (int e = 0; e < W; e++)
      ev[e] = ref_op(op, mem[int'(a1) + src(int'(p1), e)], mem[int'(a2) + src(int'(p2), e)]);
    exp_addr.push_back(ra);
    exp_data.push_back(ev);
  endtask

  initial begin
    in_valid = 0; in_instr = '0; random_grants = 1; rd_grant = 0; wr_grant = 0;
    pm_we = 0; pm_waddr = '0; pm_wdata = '0;
    for (int i = 0; i < (1 << AW) + W; i++) mem[i] = (i % 4 == 0) ? 32'($urandom_range(0, 31)) : $urandom;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    pm_we = 1; pm_waddr = 4'd15; pm_wdata = {2'd0, 2'd1, 2'd3, 2'd2};
    @(negedge clk);
    pm_we = 0;
    sent = 0;
    while (sent < N) begin
      @(negedge clk);
      #1;
      in_valid = $urandom_range(0, 3) != 0;
      op = 4'($urandom_range(1, 8));
      a1 = AW'($urandom_range(0, 500)); a2 = AW'($urandom_range(0, 500));
      p1 = 4'($urandom); p2 = 4'($urandom);
      ra = AW'($urandom_range(512, 1020));
      in_instr = {op, a1, p1, a2, p2, ra};
      #1;
      if (in_valid && in_ready) begin expect_instr(); sent++; end
    end
    @(negedge clk);
    in_valid = 0;
    wait (!busy);
    check(writes == N && exp_addr.size() == 0, "all results written");
    random_grants = 0;
    @(negedge clk);
    #2;
    op = OP_ADD; a1 = 10'd4; p1 = 4'd15; a2 = 10'd8; p2 = 4'd0; ra = 10'd600;
    in_valid = 1; in_instr = {op, a1, p1, a2, p2, ra};
    expect_instr();
    t0 = $time;
    @(negedge clk);
    #2;
    in_valid = 0;
    wait (wr_valid);
    t1 = $time;
    // presented just before edge 1; write-back request after edge 4
    check(t1 - t0 == 33, "four cycles to write-back");
    wait (!busy);
    writes = 0;
    @(negedge clk);
    #2;
    for (int i = 0; i < 50; i++) begin
      op = OP_MUL; a1 = AW'(i); p1 = 4'(i % 16); a2 = AW'(i + 7); p2 = 4'((i + 3) % 16);
      ra = AW'(700 + 4 * i);
      in_valid = 1; in_instr = {op, a1, p1, a2, p2, ra};
      expect_instr();
      #1;
      check(in_ready, "accepts every cycle");
      @(negedge clk);
      #2;
    end
    in_valid = 0;
    repeat (4) @(negedge clk);
    check(writes == 50, "50 results in 54 cycles");
    check(n_rd_stall > 0 && n_wr_stall > 0, "stalls exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

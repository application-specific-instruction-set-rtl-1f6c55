// tb_matmult_simd: the 4x4 matrix product workload on the (1, 4, 0)
// configuration: one SIMD unit of width 4, no scalar unit, four register
// banks. Row i of A fills slot i of banks 0..3. The product is loop
// vectorised: 16 multiplies of a broadcast element a[i][k] (permutation
// entry 4+k of the reset table) with row k, then 8 + 4 vector adds, 28
// bundles issued in 28 cycles. The rows of C = A*A are compared with a
// reference computed here.
module tb_matmult_simd;
  import asip_pkg::*;
  localparam int NB = 4;
  logic clk = 0, rst_n = 0;
  logic start, busy, done;
  logic [12:0] prog_len;
  logic [31:0] cycle_count;
  logic ld_we;
  logic [0:0] ld_slot;
  logic [11:0] ld_addr;
  logic [38:0] ld_data;
  logic pm_we;
  logic [0:0] pm_unit;
  logic [3:0] pm_waddr;
  logic [3:0][1:0] pm_wdata;
  logic host_we;
  logic [8:0] host_waddr, host_raddr;
  logic [31:0] host_wdata, host_rdata;
  logic rd_conflict, wr_conflict, fetch_stall;

  asip_top #(.NUM_SIMD(1), .SIMD_W(4), .NUM_SCALAR(0)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_conf = 0, n_issue = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (rd_conflict || wr_conflict || fetch_stall) n_conf++;
    if (dut.u_fetch.issue) n_issue++;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic logic [8:0] A(input int slot, input int bank);
    return {7'(slot), 2'(bank)};
  endfunction

  logic [38:0] prog [$];
  int amat [4][4], cmat [4][4];

  task automatic put(input int op, input logic [8:0] a1, input int p1, input logic [8:0] a2,
                     input int p2, input logic [8:0] ra);
    prog.push_back({4'(op), a1, 4'(p1), a2, 4'(p2), ra});
  endtask

  initial begin
    start = 0; prog_len = '0; ld_we = 0; ld_slot = '0; ld_addr = '0; ld_data = '0;
    pm_we = 0; pm_unit = '0; pm_waddr = '0; pm_wdata = '0;
    host_we = 0; host_waddr = '0; host_wdata = '0; host_raddr = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        amat[i][j] = i + j + 1;
        @(negedge clk);
        host_we = 1; host_waddr = A(i, j); host_wdata = 32'(amat[i][j]);
      end
    @(negedge clk);
    host_we = 0;
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        cmat[i][j] = 0;
        for (int k = 0; k < 4; k++) cmat[i][j] += amat[i][k] * amat[k][j];
      end
    for (int i = 0; i < 4; i++)
      for (int k = 0; k < 4; k++)
        put(OP_MUL, A(i, 0), 4 + k, A(k, 0), 0, A(10 + 4 * i + k, 0));
    for (int i = 0; i < 4; i++) begin
      put(OP_ADD, A(10 + 4 * i, 0), 0, A(11 + 4 * i, 0), 0, A(30 + 2 * i, 0));
      put(OP_ADD, A(12 + 4 * i, 0), 0, A(13 + 4 * i, 0), 0, A(31 + 2 * i, 0));
    end
    for (int i = 0; i < 4; i++)
      put(OP_ADD, A(30 + 2 * i, 0), 0, A(31 + 2 * i, 0), 0, A(40 + i, 0));
    for (int k = 0; k < prog.size(); k++) begin
      @(negedge clk);
      ld_we = 1; ld_slot = 1'b0; ld_addr = 12'(k); ld_data = prog[k];
    end
    @(negedge clk);
    ld_we = 0;
    prog_len = 13'(prog.size());
    start = 1;
    @(negedge clk);
    start = 0;
    wait (done);
    @(negedge clk);
    check(prog.size() == 28, "28 bundles");
    check(n_issue == 28, "28 bundles issued");
    check(cycle_count == 28 + 4, "28 issue cycles plus four to drain");
    check(n_conf == 0, "no port conflict or stall");
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        host_raddr = A(40 + i, j);
        #1;
        check(host_rdata == 32'(cmat[i][j]), "C element");
      end
    $display("matmult (1,4,0): %0d bundles, %0d cycles", n_issue, cycle_count);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

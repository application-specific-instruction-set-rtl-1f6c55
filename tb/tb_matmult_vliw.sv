// tb_matmult_vliw: the 4x4 matrix product workload on the (0, 0, 4)
// configuration: four scalar pipelines, no SIMD unit, four register banks.
// A is stored row-major with element a[i][j] in slot i of bank j. The
// 64 multiplies are packed four to a bundle: bundle (i, s) lets slot j
// compute a[i][(j+s)%4] * a[(j+s)%4][j], so every bank serves exactly two
// reads and each slot writes its own bank. 8 + 4 bundles of adds sum the
// four partial products of every element. The whole product takes 28
// bundles, issued in 28 cycles with no port conflict; the result matrix
// is compared with C = A*A computed here.
module tb_matmult_vliw;
  import asip_pkg::*;
  localparam int NB = 4, NS = 4;
  logic clk = 0, rst_n = 0;
  logic start, busy, done;
  logic [12:0] prog_len;
  logic [31:0] cycle_count;
  logic ld_we;
  logic [1:0] ld_slot;
  logic [11:0] ld_addr;
  logic [38:0] ld_data;
  logic pm_we;
  logic [0:0] pm_unit;
  logic [3:0] pm_waddr;
  logic [0:0][0:0] pm_wdata;
  logic host_we;
  logic [8:0] host_waddr, host_raddr;
  logic [31:0] host_wdata, host_rdata;
  logic rd_conflict, wr_conflict, fetch_stall;

  asip_top #(.NUM_SIMD(0), .SIMD_W(0), .NUM_SCALAR(4)) dut (.*);

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

  logic [30:0] prog [NS][$];
  int amat [4][4], cmat [4][4];

  task automatic put(input int q, input int op, input logic [8:0] a1, input logic [8:0] a2,
                     input logic [8:0] ra);
    prog[q].push_back({4'(op), a1, a2, ra});
  endtask

  initial begin
    start = 0; prog_len = '0; ld_we = 0; ld_slot = '0; ld_addr = '0; ld_data = '0;
    pm_we = 0; pm_unit = '0; pm_waddr = '0; pm_wdata = '0;
    host_we = 0; host_waddr = '0; host_wdata = '0; host_raddr = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        amat[i][j] = i + j + 1;   // the matrix of the reference C program
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
    // products: P(i,j,s) -> slot 10+4i+s, bank j
    for (int i = 0; i < 4; i++)
      for (int s = 0; s < 4; s++)
        for (int j = 0; j < 4; j++)
          put(j, OP_MUL, A(i, (j + s) % 4), A((j + s) % 4, j), A(10 + 4 * i + s, j));
    // partial sums: slot 30+2i (+1), bank j
    for (int i = 0; i < 4; i++)
      for (int h = 0; h < 2; h++)
        for (int j = 0; j < 4; j++)
          put(j, OP_ADD, A(10 + 4 * i + 2 * h, j), A(11 + 4 * i + 2 * h, j), A(30 + 2 * i + h, j));
    // C[i][j] -> slot 40+i, bank j
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++)
        put(j, OP_ADD, A(30 + 2 * i, j), A(31 + 2 * i, j), A(40 + i, j));
    for (int q = 0; q < NS; q++)
      for (int k = 0; k < prog[q].size(); k++) begin
        @(negedge clk);
        ld_we = 1; ld_slot = 2'(q); ld_addr = 12'(k); ld_data = {8'd0, prog[q][k]};
      end
    @(negedge clk);
    ld_we = 0;
    prog_len = 13'(prog[0].size());
    start = 1;
    @(negedge clk);
    start = 0;
    wait (done);
    @(negedge clk);
    check(prog[0].size() == 28, "28 bundles");
    check(n_issue == 28, "28 bundles issued");
    check(cycle_count == 28 + 3, "28 issue cycles plus three to drain");
    check(n_conf == 0, "no port conflict or stall");
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        host_raddr = A(40 + i, j);
        #1;
        check(host_rdata == 32'(cmat[i][j]), "C element");
      end
    $display("matmult (0,0,4): %0d bundles, %0d cycles", n_issue, cycle_count);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

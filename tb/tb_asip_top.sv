// tb_asip_top: end-to-end test of the processor at its default
// configuration (1 SIMD unit of width 4, 1 scalar unit, 32-bit data,
// 5 register banks of 128 words, 16 permutation entries, 4096 bundles).
//
// Program 1 is the 4x4 matrix product C = A*A, loop-vectorised on the
// SIMD unit: 16 vector multiplies of a broadcast element of row i
// (permutation entry 4+k) with row k, then 12 vector adds; the scalar slot
// runs independent work on bank 4 at the same time. It must issue one
// bundle per cycle (28 bundles in 28 cycles, 32 cycles to the last
// write-back) and leave the correct C rows in the register file.
//
// Program 2 provokes every mechanism of the design: a read-port conflict
// (the scalar unit stalls, then fetch stalls), a write-port conflict, a
// vector that starts in the middle of a slot row and wraps into the next
// slot (read and write), rotations and broadcasts through the
// permutation memory, empty (NOP) slots, all eight operations, and a read
// of a word in the same cycle it is written (the old value is returned).
// Expected results come from a sequential model kept here; at the end the
// whole register file is compared with it through the host port.
module tb_asip_top;
  import asip_pkg::*;
  localparam int NB = 5, NW = NB * 128, W = 4;
  localparam int SVW = 42, SCW = 34;
  logic clk = 0, rst_n = 0;
  logic start, busy, done;
  logic [12:0] prog_len;
  logic [31:0] cycle_count;
  logic ld_we;
  logic [0:0] ld_slot;
  logic [11:0] ld_addr;
  logic [41:0] ld_data;
  logic pm_we;
  logic [0:0] pm_unit;
  logic [3:0] pm_waddr;
  logic [3:0][1:0] pm_wdata;
  logic host_we;
  logic [9:0] host_waddr, host_raddr;
  logic [31:0] host_wdata, host_rdata;
  logic rd_conflict, wr_conflict, fetch_stall;

  asip_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_rd_conf = 0, n_wr_conf = 0, n_fetch_stall = 0, n_issue = 0;
  int n_nop_slots = 0, n_wrap = 0, n_perm = 0, n_rdw = 0;
  bit ops_seen [9];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (rd_conflict) n_rd_conf++;
    if (wr_conflict) n_wr_conf++;
    if (fetch_stall) n_fetch_stall++;
    if (dut.u_fetch.issue) n_issue++;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // ---- model ------------------------------------------------------------------
  logic [31:0] model [NW];
  logic [41:0] prog_sv [$];
  logic [41:0] prog_sc [$];

  function automatic logic [9:0] A(input int l);
    return {7'(l / NB), 3'(l % NB)};
  endfunction

  function automatic int psrc(input int p, input int i);
    if (p < W) return (i + p) % W;
    if (p < 2 * W) return p - W;
    return W - 1 - i;
  endfunction

  function automatic logic [31:0] alu(input int op, input logic [31:0] a, input logic [31:0] b);
    case (op)
      1: return a * b;
      2: return a + b;
      3: return a - b;
      4: return a & b;
      5: return a | b;
      6: return ~a;
      7: return (b > 31) ? {32{a[31]}} : 32'($signed(a) >>> b[4:0]);
      default: return (b > 31) ? 32'd0 : a << b[4:0];
    endcase
  endfunction

  // append one bundle; op 0 leaves a slot empty. The model is updated at
  // once unless `defer` (the result is then applied by apply_deferred).
  logic [31:0] dvals [$];
  int          daddr [$];
  task automatic bundle(input int vop, input int va1, input int vp1, input int va2,
                        input int vp2, input int vra,
                        input int sop, input int sa1, input int sa2, input int sra);
    logic [31:0] r [W];
    prog_sv.push_back({4'(vop), A(va1), 4'(vp1), A(va2), 4'(vp2), A(vra)});
    prog_sc.push_back({8'd0, 4'(sop), A(sa1), A(sa2), A(sra)});
    if (vop == 0) n_nop_slots++;
    if (sop == 0) n_nop_slots++;
    if (vop != 0) begin
      ops_seen[vop] = 1;
      if (va1 % NB != 0 || va2 % NB != 0 || vra % NB != 0) n_wrap++;
      if (vp1 != 0 || vp2 != 0) n_perm++;
      for (int e = 0; e < W; e++) r[e] = alu(vop, model[va1 + psrc(vp1, e)], model[va2 + psrc(vp2, e)]);
    end
    if (sop != 0) begin
      ops_seen[sop] = 1;
      model[sra] = alu(sop, model[sa1], model[sa2]);
    end
    if (vop != 0) for (int e = 0; e < W; e++) model[vra + e] = r[e];
  endtask

  task automatic load_and_run(input int expect_cycles);
    for (int k = 0; k < prog_sv.size(); k++) begin
      @(negedge clk);
      ld_we = 1; ld_slot = 1'b0; ld_addr = 12'(k); ld_data = prog_sv[k];
      @(negedge clk);
      ld_slot = 1'b1; ld_data = prog_sc[k];
    end
    @(negedge clk);
    ld_we = 0;
    n_issue = 0;
    prog_len = 13'(prog_sv.size());
    start = 1;
    @(negedge clk);
    start = 0;
    wait (done);
    @(negedge clk);
    check(n_issue == prog_sv.size(), "every bundle issued once");
    if (expect_cycles > 0) check(cycle_count == 32'(expect_cycles), "cycle count");
    $display("program of %0d bundles: %0d cycles", prog_sv.size(), cycle_count);
    prog_sv.delete();
    prog_sc.delete();
  endtask

  task automatic compare_all(input string what);
    for (int l = 0; l < NW; l++) begin
      host_raddr = A(l);
      #1;
      check(host_rdata == model[l], what);
      if (host_rdata != model[l]) $display("  word %0d (slot %0d bank %0d): %h expected %h",
                                           l, l / NB, l % NB, host_rdata, model[l]);
    end
  endtask

  // ---- matrix product reference (independent of the model) -------------------
  int amat [4][4];
  int cmat [4][4];

  int row_l [4];   // linear address of matrix row i: slot i, bank 0
  int rdw_old, rdw_res;
  logic [31:0] rdw_expect;

  initial begin
    start = 0; prog_len = '0; ld_we = 0; ld_slot = '0; ld_addr = '0; ld_data = '0;
    pm_we = 0; pm_unit = '0; pm_waddr = '0; pm_wdata = '0;
    host_we = 0; host_waddr = '0; host_wdata = '0; host_raddr = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // preload: random words everywhere, the matrix A (a[i][j] = i + j + 1)
    // in slots 0..3 of banks 0..3, small shift amounts in slot 5 of bank 4
    for (int l = 0; l < NW; l++) model[l] = $urandom;
    for (int i = 0; i < 4; i++) begin
      row_l[i] = NB * i;
      for (int j = 0; j < 4; j++) begin
        amat[i][j] = i + j + 1;
        model[row_l[i] + j] = 32'(amat[i][j]);
      end
    end
    model[NB * 5 + 4] = 32'd3;
    model[NB * 6 + 4] = 32'd7;
    for (int l = 0; l < NW; l++) begin
      @(negedge clk);
      host_we = 1; host_waddr = A(l); host_wdata = model[l];
    end
    @(negedge clk);
    host_we = 0;
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        cmat[i][j] = 0;
        for (int k = 0; k < 4; k++) cmat[i][j] += amat[i][k] * amat[k][j];
      end

    // ---- program 1: matrix product --------------------------------------------
    // P(i,k) = broadcast(A[i][k]) * row k   -> slot 10+4i+k, bank 0
    for (int i = 0; i < 4; i++)
      for (int k = 0; k < 4; k++)
        bundle(OP_MUL, row_l[i], 4 + k, row_l[k], 0, NB * (10 + 4 * i + k),
               (k == 0) ? OP_ADD : (k == 1) ? OP_SUB : 0,
               NB * (40 + i) + 4, NB * (50 + k) + 4, NB * (60 + 4 * i + k) + 4);
    // S(i,0) = P(i,0)+P(i,1), S(i,1) = P(i,2)+P(i,3) -> slots 30+2i, 31+2i
    for (int i = 0; i < 4; i++) begin
      bundle(OP_ADD, NB * (10 + 4 * i), 0, NB * (11 + 4 * i), 0, NB * (30 + 2 * i),
             0, 0, 0, 0);
      bundle(OP_ADD, NB * (12 + 4 * i), 0, NB * (13 + 4 * i), 0, NB * (31 + 2 * i),
             0, 0, 0, 0);
    end
    // C row i = S(i,0) + S(i,1) -> slot 40+i
    for (int i = 0; i < 4; i++)
      bundle(OP_ADD, NB * (30 + 2 * i), 0, NB * (31 + 2 * i), 0, NB * (40 + i),
             0, 0, 0, 0);
    // 28 bundles, one per cycle, then four more cycles to the last write-back
    load_and_run(32);
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        host_raddr = A(NB * (40 + i) + j);
        #1;
        check(host_rdata == 32'(cmat[i][j]), "matrix product element");
      end
    compare_all("register file after program 1");

    // ---- program 2: mechanisms ------------------------------------------------
    // b0: the vector add reads banks 0..3 twice; the scalar add also needs
    //     bank 0 -> read conflict, the scalar unit waits a cycle
    bundle(OP_ADD, row_l[0], 0, row_l[0], 0, NB * 70, OP_ADD, NB * 1 + 0, NB * 5 + 4, NB * 71 + 4);
    // b1: scalar instruction behind the stalled one -> fetch stall
    bundle(0, 0, 0, 0, 0, 0, OP_SUB, NB * 6 + 4, NB * 7 + 4, NB * 72 + 4);
    bundle(0, 0, 0, 0, 0, 0, 0, 0, 0, 0);
    bundle(0, 0, 0, 0, 0, 0, 0, 0, 0, 0);
    // b4/b5: vector result (banks 0..3) and scalar result to bank 1 reach
    //        write-back in the same cycle -> write conflict
    bundle(OP_MUL, row_l[1], 1, row_l[2], 2, NB * 73, 0, 0, 0, 0);
    bundle(0, 0, 0, 0, 0, 0, OP_OR, NB * 8 + 4, NB * 9 + 4, NB * 74 + 1);
    // b6: vectors starting in bank 2 and bank 3 wrap into the next slot
    bundle(OP_SUB, NB * 2 + 2, 3, row_l[3], 6, NB * 75 + 3, 0, 0, 0, 0);
    // b7..b9: b9 reads the word b7 writes, in b7's write-back cycle
    rdw_expect = model[NB * 76 + 4];  // value before b7
    bundle(0, 0, 0, 0, 0, 0, OP_AND, NB * 10 + 4, NB * 11 + 4, NB * 76 + 4);
    bundle(0, 0, 0, 0, 0, 0, 0, 0, 0, 0);
    rdw_old = NB * 76 + 4;
    rdw_res = NB * 77 + 4;
    bundle(0, 0, 0, 0, 0, 0, OP_NOT, rdw_old, rdw_old, rdw_res);
    // b10..: remaining operations on both units
    bundle(OP_OR,  row_l[0], 8, row_l[1], 0, NB * 80, OP_SHR, NB * 12 + 4, NB * 5 + 4, NB * 78 + 4);
    bundle(OP_AND, row_l[2], 0, row_l[3], 9, NB * 81, OP_SHL, NB * 13 + 4, NB * 6 + 4, NB * 79 + 4);
    bundle(OP_NOT, row_l[1], 2, row_l[1], 0, NB * 82, OP_MUL, NB * 14 + 4, NB * 15 + 4, NB * 80 + 4);
    bundle(OP_SHR, NB * 90, 0, NB * 91, 0, NB * 83, 0, 0, 0, 0);
    bundle(OP_SHL, NB * 92, 0, NB * 93, 0, NB * 84, 0, 0, 0, 0);
    load_and_run(0);
    // b9 read the word in the cycle b7 wrote it: it saw the value from
    // before b7, so its result is ~old; the sequential model has ~new
    check(model[rdw_res] == ~model[rdw_old], "model consistency");
    host_raddr = A(rdw_res);
    #1;
    if (host_rdata == ~rdw_expect && rdw_expect != model[rdw_old]) n_rdw++;
    check(host_rdata == ~rdw_expect, "read in the write cycle returns the old value");
    model[rdw_res] = ~rdw_expect;
    compare_all("register file after program 2");

    // ---- mechanism coverage -------------------------------------------------------
    check(n_rd_conf > 0, "read port conflict happened");
    check(n_wr_conf > 0, "write port conflict happened");
    check(n_fetch_stall > 0, "fetch stall happened");
    check(n_wrap > 0, "wrapped vector executed");
    check(n_perm > 0, "permutation used");
    check(n_nop_slots > 0, "empty slots skipped");
    check(n_rdw > 0, "read during write happened");
    for (int o = 1; o <= 8; o++) check(ops_seen[o], "operation used");
    $display("read conflicts %0d, write conflicts %0d, fetch stalls %0d, wrapped %0d, permuted %0d, nop slots %0d, read-during-write %0d",
             n_rd_conf, n_wr_conf, n_fetch_stall, n_wrap, n_perm, n_nop_slots, n_rdw);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_dct_vliw: the two 8x8 transform workloads on the (0, 0, 4)
// configuration: the JPEG forward DCT (integer "slow but accurate"
// algorithm: rows then columns, 13-bit constants, two extra fraction bits
// between the passes) and the MPEG-2 style integer inverse DCT, whose
// input is the DCT of a random block.
//
// For each kernel the test builds a list of three-address operations on
// values (the 8x8 inputs and the constants for multipliers, rounding terms
// and shift counts are preloaded; every constant has a copy in each bank)
// and schedules it with a greedy list scheduler (longest remaining path
// first) that keeps the hardware's rules: four operations per bundle, a
// result readable three bundles after its producer, at most two operand
// reads per register bank per bundle, one result write per bank per
// bundle, and a register reused only after its last reader has issued.
// The schedule is run on the processor and the 64 results are compared
// with a direct computation of the same transform. The run must see no
// port conflict and must take the scheduled number of bundles plus the
// pipeline drain.
module tb_dct_vliw;
  import asip_pkg::*;
  localparam int NB = 4, NS = 4, DEPTH = 128;
  localparam int CONST_BITS = 13, PASS1_BITS = 2;
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
    repeat (200000) @(posedge clk);
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

  // ---- reference: direct 2-D DCT ----------------------------------------------
  function automatic int descale(input int x, input int n);
    return (x + (1 <<< (n - 1))) >>> n;
  endfunction

  int blk [64];
  int ref_out [64];

  task automatic ref_fdct_1d(inout int d [8], input bit second);
    int t0, t1, t2, t3, t4, t5, t6, t7, t10, t11, t12, t13, z1, z2, z3, z4, z5, sh;
    sh = second ? CONST_BITS + PASS1_BITS : CONST_BITS - PASS1_BITS;
    t0 = d[0] + d[7]; t7 = d[0] - d[7]; t1 = d[1] + d[6]; t6 = d[1] - d[6];
    t2 = d[2] + d[5]; t5 = d[2] - d[5]; t3 = d[3] + d[4]; t4 = d[3] - d[4];
    t10 = t0 + t3; t13 = t0 - t3; t11 = t1 + t2; t12 = t1 - t2;
    if (second) begin
      d[0] = descale(t10 + t11, PASS1_BITS); d[4] = descale(t10 - t11, PASS1_BITS);
    end else begin
      d[0] = (t10 + t11) <<< PASS1_BITS; d[4] = (t10 - t11) <<< PASS1_BITS;
    end
    z1 = (t12 + t13) * 4433;
    d[2] = descale(z1 + t13 * 6270, sh);
    d[6] = descale(z1 + t12 * (-15137), sh);
    z1 = t4 + t7; z2 = t5 + t6; z3 = t4 + t6; z4 = t5 + t7;
    z5 = (z3 + z4) * 9633;
    t4 = t4 * 2446; t5 = t5 * 16819; t6 = t6 * 25172; t7 = t7 * 12299;
    z1 = z1 * (-7373); z2 = z2 * (-20995); z3 = z3 * (-16069); z4 = z4 * (-3196);
    z3 = z3 + z5; z4 = z4 + z5;
    d[7] = descale(t4 + z1 + z3, sh); d[5] = descale(t5 + z2 + z4, sh);
    d[3] = descale(t6 + z2 + z3, sh); d[1] = descale(t7 + z1 + z4, sh);
  endtask

  // MPEG-2 style integer IDCT (Chen-Wang butterflies, 11-bit constants);
  // the final saturation of the column pass to [-256, 255] is not part of
  // this kernel, the test inputs never reach it
  localparam int W1 = 2841, W2 = 2676, W3 = 2408, W5 = 1609, W6 = 1108, W7 = 565;

  task automatic ref_idct_1d(inout int d [8], input bit col);
    int x0, x1, x2, x3, x4, x5, x6, x7, x8, r, sh;
    r  = col ? 4 : 0;
    sh = col ? 3 : 0;
    x1 = d[4] <<< (col ? 8 : 11); x2 = d[6]; x3 = d[2]; x4 = d[1]; x5 = d[7];
    x6 = d[5]; x7 = d[3];
    x0 = (d[0] <<< (col ? 8 : 11)) + (col ? 8192 : 128);
    x8 = W7 * (x4 + x5) + r;
    x4 = (x8 + (W1 - W7) * x4) >>> sh; x5 = (x8 - (W1 + W7) * x5) >>> sh;
    x8 = W3 * (x6 + x7) + r;
    x6 = (x8 - (W3 - W5) * x6) >>> sh; x7 = (x8 - (W3 + W5) * x7) >>> sh;
    x8 = x0 + x1; x0 = x0 - x1;
    x1 = W6 * (x3 + x2) + r;
    x2 = (x1 - (W2 + W6) * x2) >>> sh; x3 = (x1 + (W2 - W6) * x3) >>> sh;
    x1 = x4 + x6; x4 = x4 - x6; x6 = x5 + x7; x5 = x5 - x7;
    x7 = x8 + x3; x8 = x8 - x3; x3 = x0 + x2; x0 = x0 - x2;
    x2 = (181 * (x4 + x5) + 128) >>> 8; x4 = (181 * (x4 - x5) + 128) >>> 8;
    sh = col ? 14 : 8;
    d[0] = (x7 + x1) >>> sh; d[1] = (x3 + x2) >>> sh; d[2] = (x0 + x4) >>> sh;
    d[3] = (x8 + x6) >>> sh; d[4] = (x8 - x6) >>> sh; d[5] = (x0 - x4) >>> sh;
    d[6] = (x3 - x2) >>> sh; d[7] = (x7 - x1) >>> sh;
  endtask

  int kernel;   // 0: FDCT, 1: IDCT

  // rows, then columns, of blk into ref_out
  task automatic ref_2d();
    int d [8];
    for (int i = 0; i < 64; i++) ref_out[i] = blk[i];
    for (int r = 0; r < 8; r++) begin
      for (int c = 0; c < 8; c++) d[c] = ref_out[r * 8 + c];
      if (kernel == 0) ref_fdct_1d(d, 1'b0); else ref_idct_1d(d, 1'b0);
      for (int c = 0; c < 8; c++) ref_out[r * 8 + c] = d[c];
    end
    for (int c = 0; c < 8; c++) begin
      for (int r = 0; r < 8; r++) d[r] = ref_out[r * 8 + c];
      if (kernel == 0) ref_fdct_1d(d, 1'b1); else ref_idct_1d(d, 1'b1);
      for (int r = 0; r < 8; r++) ref_out[r * 8 + c] = d[r];
    end
  endtask


  int orig [64];

  // kernel 0 gets a random 8-bit block; kernel 1 gets the DCT of one at
  // the IDCT's scale (the FDCT above returns eight times the coefficients)
  task automatic make_input();
    int k = kernel;
    for (int i = 0; i < 64; i++) orig[i] = $urandom_range(0, 255) - 128;
    blk = orig;
    if (k == 1) begin
      kernel = 0;
      ref_2d();
      kernel = 1;
      for (int i = 0; i < 64; i++) blk[i] = (ref_out[i] + 4) >>> 3;
    end
    ref_2d();
    if (k == 1) begin
      int worst = 0;
      for (int i = 0; i < 64; i++)
        if ((ref_out[i] - orig[i]) * (ref_out[i] - orig[i]) > worst)
          worst = (ref_out[i] - orig[i]) * (ref_out[i] - orig[i]);
      check(worst <= 4, "IDCT of the DCT gives back the block within 2");
    end
  endtask

  // ---- kernel as a value graph ----------------------------------------------------
  int v_init  [$];   // preload value, for inputs and constants
  bit v_pre   [$];   // preloaded (input or constant)
  bit v_keep  [$];   // never freed (constants and final outputs)
  int v_uses  [$];
  op_e op_code [$];
  int op_a [$], op_b [$], op_d [$];

  function automatic int new_value(input bit pre, input int init);
    v_init.push_back(init); v_pre.push_back(pre); v_keep.push_back(pre);
    v_uses.push_back(0);
    return v_init.size() - 1;
  endfunction

  int const_ids [int];
  function automatic int K(input int c);
    if (!const_ids.exists(c)) begin
      const_ids[c] = new_value(1'b1, c);
      v_const[const_ids[c]] = 1'b1;
    end
    return const_ids[c];
  endfunction

  function automatic int emit(input op_e op, input int a, input int b);
    int d = new_value(1'b0, 0);
    op_code.push_back(op); op_a.push_back(a); op_b.push_back(b); op_d.push_back(d);
    v_uses[a]++; v_uses[b]++;
    return d;
  endfunction

  function automatic int g_descale(input int x, input int n);
    return emit(OP_SHR, emit(OP_ADD, x, K(1 << (n - 1))), K(n));
  endfunction

  task automatic g_fdct_1d(inout int d [8], input bit second);
    int t0, t1, t2, t3, t4, t5, t6, t7, t10, t11, t12, t13, z1, z2, z3, z4, z5, sh;
    sh = second ? CONST_BITS + PASS1_BITS : CONST_BITS - PASS1_BITS;
    t0 = emit(OP_ADD, d[0], d[7]); t7 = emit(OP_SUB, d[0], d[7]);
    t1 = emit(OP_ADD, d[1], d[6]); t6 = emit(OP_SUB, d[1], d[6]);
    t2 = emit(OP_ADD, d[2], d[5]); t5 = emit(OP_SUB, d[2], d[5]);
    t3 = emit(OP_ADD, d[3], d[4]); t4 = emit(OP_SUB, d[3], d[4]);
    t10 = emit(OP_ADD, t0, t3); t13 = emit(OP_SUB, t0, t3);
    t11 = emit(OP_ADD, t1, t2); t12 = emit(OP_SUB, t1, t2);
    if (second) begin
      d[0] = g_descale(emit(OP_ADD, t10, t11), PASS1_BITS);
      d[4] = g_descale(emit(OP_SUB, t10, t11), PASS1_BITS);
    end else begin
      d[0] = emit(OP_SHL, emit(OP_ADD, t10, t11), K(PASS1_BITS));
      d[4] = emit(OP_SHL, emit(OP_SUB, t10, t11), K(PASS1_BITS));
    end
    z1 = emit(OP_MUL, emit(OP_ADD, t12, t13), K(4433));
    d[2] = g_descale(emit(OP_ADD, z1, emit(OP_MUL, t13, K(6270))), sh);
    d[6] = g_descale(emit(OP_ADD, z1, emit(OP_MUL, t12, K(-15137))), sh);
    z1 = emit(OP_ADD, t4, t7); z2 = emit(OP_ADD, t5, t6);
    z3 = emit(OP_ADD, t4, t6); z4 = emit(OP_ADD, t5, t7);
    z5 = emit(OP_MUL, emit(OP_ADD, z3, z4), K(9633));
    t4 = emit(OP_MUL, t4, K(2446));  t5 = emit(OP_MUL, t5, K(16819));
    t6 = emit(OP_MUL, t6, K(25172)); t7 = emit(OP_MUL, t7, K(12299));
    z1 = emit(OP_MUL, z1, K(-7373));  z2 = emit(OP_MUL, z2, K(-20995));
    z3 = emit(OP_MUL, z3, K(-16069)); z4 = emit(OP_MUL, z4, K(-3196));
    z3 = emit(OP_ADD, z3, z5); z4 = emit(OP_ADD, z4, z5);
    d[7] = g_descale(emit(OP_ADD, emit(OP_ADD, t4, z1), z3), sh);
    d[5] = g_descale(emit(OP_ADD, emit(OP_ADD, t5, z2), z4), sh);
    d[3] = g_descale(emit(OP_ADD, emit(OP_ADD, t6, z2), z3), sh);
    d[1] = g_descale(emit(OP_ADD, emit(OP_ADD, t7, z1), z4), sh);
  endtask

  task automatic g_idct_1d(inout int d [8], input bit col);
    int x0, x1, x2, x3, x4, x5, x6, x7, x8, sh;
    x1 = emit(OP_SHL, d[4], K(col ? 8 : 11)); x2 = d[6]; x3 = d[2]; x4 = d[1];
    x5 = d[7]; x6 = d[5]; x7 = d[3];
    x0 = emit(OP_ADD, emit(OP_SHL, d[0], K(col ? 8 : 11)), K(col ? 8192 : 128));
    x8 = emit(OP_MUL, emit(OP_ADD, x4, x5), K(W7));
    if (col) x8 = emit(OP_ADD, x8, K(4));
    x4 = emit(OP_ADD, x8, emit(OP_MUL, x4, K(W1 - W7)));
    x5 = emit(OP_SUB, x8, emit(OP_MUL, x5, K(W1 + W7)));
    if (col) begin x4 = emit(OP_SHR, x4, K(3)); x5 = emit(OP_SHR, x5, K(3)); end
    x8 = emit(OP_MUL, emit(OP_ADD, x6, x7), K(W3));
    if (col) x8 = emit(OP_ADD, x8, K(4));
    x6 = emit(OP_SUB, x8, emit(OP_MUL, x6, K(W3 - W5)));
    x7 = emit(OP_SUB, x8, emit(OP_MUL, x7, K(W3 + W5)));
    if (col) begin x6 = emit(OP_SHR, x6, K(3)); x7 = emit(OP_SHR, x7, K(3)); end
    x8 = emit(OP_ADD, x0, x1); x0 = emit(OP_SUB, x0, x1);
    x1 = emit(OP_MUL, emit(OP_ADD, x3, x2), K(W6));
    if (col) x1 = emit(OP_ADD, x1, K(4));
    x2 = emit(OP_SUB, x1, emit(OP_MUL, x2, K(W2 + W6)));
    x3 = emit(OP_ADD, x1, emit(OP_MUL, x3, K(W2 - W6)));
    if (col) begin x2 = emit(OP_SHR, x2, K(3)); x3 = emit(OP_SHR, x3, K(3)); end
    x1 = emit(OP_ADD, x4, x6); x4 = emit(OP_SUB, x4, x6);
    x6 = emit(OP_ADD, x5, x7); x5 = emit(OP_SUB, x5, x7);
    x7 = emit(OP_ADD, x8, x3); x8 = emit(OP_SUB, x8, x3);
    x3 = emit(OP_ADD, x0, x2); x0 = emit(OP_SUB, x0, x2);
    x2 = emit(OP_SHR, emit(OP_ADD, emit(OP_MUL, emit(OP_ADD, x4, x5), K(181)), K(128)), K(8));
    x4 = emit(OP_SHR, emit(OP_ADD, emit(OP_MUL, emit(OP_SUB, x4, x5), K(181)), K(128)), K(8));
    sh = col ? 14 : 8;
    d[0] = emit(OP_SHR, emit(OP_ADD, x7, x1), K(sh));
    d[1] = emit(OP_SHR, emit(OP_ADD, x3, x2), K(sh));
    d[2] = emit(OP_SHR, emit(OP_ADD, x0, x4), K(sh));
    d[3] = emit(OP_SHR, emit(OP_ADD, x8, x6), K(sh));
    d[4] = emit(OP_SHR, emit(OP_SUB, x8, x6), K(sh));
    d[5] = emit(OP_SHR, emit(OP_SUB, x0, x4), K(sh));
    d[6] = emit(OP_SHR, emit(OP_SUB, x3, x2), K(sh));
    d[7] = emit(OP_SHR, emit(OP_SUB, x7, x1), K(sh));
  endtask

  task automatic g_1d(inout int d [8], input bit second);
    if (kernel == 0) g_fdct_1d(d, second); else g_idct_1d(d, second);
  endtask

  int in_id [64];
  int out_id [64];

  task automatic build_kernel();
    int w [64];
    int d [8];
    for (int i = 0; i < 64; i++) begin in_id[i] = new_value(1'b1, blk[i]); w[i] = in_id[i]; end
    for (int i = 0; i < 64; i++) v_keep[in_id[i]] = 1'b0;
    for (int r = 0; r < 8; r++) begin
      for (int c = 0; c < 8; c++) d[c] = w[r * 8 + c];
      g_1d(d, 1'b0);
      for (int c = 0; c < 8; c++) w[r * 8 + c] = d[c];
    end
    for (int c = 0; c < 8; c++) begin
      for (int r = 0; r < 8; r++) d[r] = w[r * 8 + c];
      g_1d(d, 1'b1);
      for (int r = 0; r < 8; r++) w[r * 8 + c] = d[r];
    end
    for (int i = 0; i < 64; i++) begin out_id[i] = w[i]; v_keep[w[i]] = 1'b1; end
  endtask

  // ---- list scheduler and register allocator -------------------------------------
  int  v_bank [$], v_slot [$], v_ready [$];
  bit  reg_used [NB][DEPTH];
  bit  op_done [$];
  logic [30:0] prog [NS][$];
  int  n_ops_left, n_bundles, max_live, live;

  bit v_const [int];
  int c_slot [int][NB];     // slot of each bank's copy of a constant

  function automatic logic [8:0] RAB(input int b, input int slot);
    return {7'(slot), 2'(b)};
  endfunction

  // register address of operand v when read from bank b
  function automatic logic [8:0] RA_IN(input int v, input int b);
    return v_const.exists(v) ? RAB(b, c_slot[v][b]) : RA(v);
  endfunction

  function automatic logic [8:0] RA(input int v);
    return {7'(v_slot[v]), 2'(v_bank[v])};
  endfunction

  // place a value in a free register, in a bank not in `avoid`; 0 if none
  function automatic bit alloc(input int v, input bit avoid [NB]);
    int best_b = -1, best_free = 0, nfree;
    for (int b = 0; b < NB; b++) begin
      if (avoid[b]) continue;
      nfree = 0;
      for (int s = 0; s < DEPTH; s++) if (!reg_used[b][s]) nfree++;
      if (nfree > best_free) begin best_free = nfree; best_b = b; end
    end
    if (best_b < 0) return 1'b0;
    for (int s = 0; s < DEPTH; s++)
      if (!reg_used[best_b][s]) begin
        reg_used[best_b][s] = 1'b1;
        v_bank[v] = best_b; v_slot[v] = s;
        live++;
        if (live > max_live) max_live = live;
        return 1'b1;
      end
    return 1'b0;
  endfunction

  task automatic drop_use(input int v);
    v_uses[v]--;
    if (v_uses[v] == 0 && !v_keep[v]) begin
      reg_used[v_bank[v]][v_slot[v]] = 1'b0;
      live--;
    end
  endtask

  bit produced [int];
  int op_height [];
  function automatic bit op_is_sched(input int v);
    return produced.exists(v);
  endfunction

  // bank an operand is read from: constants use the least loaded bank
  function automatic int pick_bank(input int v, input int rd [NB]);
    int best;
    if (!v_const.exists(v)) return v_bank[v];
    best = 0;
    for (int b = 1; b < NB; b++) if (rd[b] < rd[best]) best = b;
    return best;
  endfunction

  task automatic schedule();
    bit none [NB];
    bit wbank [NB];
    int rd [NB];
    int used_slots, first;
    int cand [$];
    int h_val [];
    for (int b = 0; b < NB; b++) none[b] = 1'b0;
    for (int v = 0; v < v_init.size(); v++) begin
      v_bank.push_back(0); v_slot.push_back(0); v_ready.push_back(0);
    end
    live = 0; max_live = 0;
    for (int v = 0; v < v_init.size(); v++)
      if (v_pre[v] && !v_const.exists(v)) void'(alloc(v, none));
    foreach (v_const[v])
      for (int b = 0; b < NB; b++) begin
        bit only [NB];
        for (int k = 0; k < NB; k++) only[k] = (k != b);
        void'(alloc(v, only));
        c_slot[v][b] = v_slot[v];
      end
    for (int o = 0; o < op_code.size(); o++) op_done.push_back(1'b0);
    // priority: longest latency path from an operation to the end
    h_val = new[v_init.size()];
    foreach (h_val[v]) h_val[v] = 0;
    op_height = new[op_code.size()];
    for (int o = op_code.size() - 1; o >= 0; o--) begin
      op_height[o] = 3 + h_val[op_d[o]];
      if (op_height[o] > h_val[op_a[o]]) h_val[op_a[o]] = op_height[o];
      if (op_height[o] > h_val[op_b[o]]) h_val[op_b[o]] = op_height[o];
    end
    n_ops_left = op_code.size();
    first = 0;
    n_bundles = 0;
    while (n_ops_left > 0) begin
      for (int b = 0; b < NB; b++) begin rd[b] = 0; wbank[b] = 1'b0; end
      used_slots = 0;
      while (first < op_code.size() && op_done[first]) first++;
      cand.delete();
      for (int o = first; o < op_code.size(); o++)
        if (!op_done[o] && (v_pre[op_a[o]] || produced.exists(op_a[o]))
            && (v_pre[op_b[o]] || produced.exists(op_b[o]))
            && v_ready[op_a[o]] <= n_bundles && v_ready[op_b[o]] <= n_bundles)
          cand.push_back(o);
      cand.sort() with (-op_height[item] * 4096 + item);
      foreach (cand[k]) begin
        int o = cand[k];
        int ba, bb;
        if (used_slots == NS) break;
        ba = pick_bank(op_a[o], rd);
        rd[ba]++;
        bb = pick_bank(op_b[o], rd);
        rd[bb]++;
        if (rd[ba] > 2 || rd[bb] > 2) begin
          rd[ba]--; rd[bb]--;
          continue;
        end
        if (!alloc(op_d[o], wbank)) begin
          rd[ba]--; rd[bb]--;
          continue;
        end
        wbank[v_bank[op_d[o]]] = 1'b1;
        v_ready[op_d[o]] = n_bundles + 3;
        prog[used_slots].push_back({4'(op_code[o]), RA_IN(op_a[o], ba), RA_IN(op_b[o], bb), RA(op_d[o])});
        used_slots++;
        op_done[o] = 1'b1;
        produced[op_d[o]] = 1'b1;
        n_ops_left--;
        drop_use(op_a[o]);
        drop_use(op_b[o]);
      end
      for (int q = used_slots; q < NS; q++) prog[q].push_back('0);
      n_bundles++;
    end
  endtask

  task automatic reset_state();
    v_init.delete(); v_pre.delete(); v_keep.delete(); v_uses.delete();
    op_code.delete(); op_a.delete(); op_b.delete(); op_d.delete();
    const_ids.delete(); v_const.delete(); c_slot.delete(); produced.delete();
    v_bank.delete(); v_slot.delete(); v_ready.delete(); op_done.delete();
    for (int q = 0; q < NS; q++) prog[q].delete();
    for (int b = 0; b < NB; b++) for (int s = 0; s < DEPTH; s++) reg_used[b][s] = 1'b0;
  endtask

  // ---- run ---------------------------------------------------------------------------
  initial begin
    int issue0, conf0;
    string name;
    start = 0; prog_len = '0; ld_we = 0; ld_slot = '0; ld_addr = '0; ld_data = '0;
    pm_we = 0; pm_unit = '0; pm_waddr = '0; pm_wdata = '0;
    host_we = 0; host_waddr = '0; host_wdata = '0; host_raddr = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (kernel = 0; kernel < 2; kernel++) begin
      name = (kernel == 0) ? "jpeg_fdct" : "mpeg_idct";
      reset_state();
      make_input();
      build_kernel();
      schedule();
      $display("%s: %0d operations, %0d bundles, at most %0d live registers",
               name, op_code.size(), n_bundles, max_live);
      for (int v = 0; v < v_init.size(); v++)
        if (v_pre[v])
          for (int b = 0; b < (v_const.exists(v) ? NB : 1); b++) begin
            @(negedge clk);
            host_we = 1; host_waddr = RA_IN(v, b); host_wdata = 32'(v_init[v]);
          end
      for (int q = 0; q < NS; q++)
        for (int k = 0; k < prog[q].size(); k++) begin
          @(negedge clk);
          host_we = 0;
          ld_we = 1; ld_slot = 2'(q); ld_addr = 12'(k); ld_data = {8'd0, prog[q][k]};
        end
      @(negedge clk);
      ld_we = 0; host_we = 0;
      prog_len = 13'(n_bundles);
      issue0 = n_issue; conf0 = n_conf;
      start = 1;
      @(negedge clk);
      start = 0;
      wait (done);
      @(negedge clk);
      check(n_issue - issue0 == n_bundles, "every bundle issued");
      check(cycle_count == 32'(n_bundles + 3), "bundles plus three cycles of drain");
      check(n_conf == conf0, "no port conflict or stall");
      for (int i = 0; i < 64; i++) begin
        host_raddr = RA(out_id[i]);
        #1;
        check($signed(host_rdata) == ref_out[i], "transform result");
        if ($signed(host_rdata) != ref_out[i])
          $display("  result %0d: %0d expected %0d", i, $signed(host_rdata), ref_out[i]);
      end
      $display("%s (0,0,4): %0d bundles, %0d cycles", name, n_issue - issue0, cycle_count);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

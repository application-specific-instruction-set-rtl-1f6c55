// tb_dct_simd_only: the 8x8 forward and inverse DCT workloads (the
// integer algorithms of tb_dct_vliw) loop-vectorised on the SIMD-only
// configuration (1 SIMD unit of width 4, no scalar unit, 4 register banks).
//
// The row pass runs over four rows at a time (vector (g, c) holds column c
// of rows 4g..4g+3). Without a scalar unit the transpose for the column
// pass is done on the SIMD unit with staggered writes: to gather element j
// of four vectors into one, each source is read through permutation entry
// j (a rotation that brings element j to position 0) and written, in
// order, to base x, x+1, x+2 and x+3; each write overwrites the tail of
// the previous one, leaving the four gathered elements in words x..x+3.
// The four writes of one gather must stay in order, which the in-order
// pipeline guarantees.
//
// A greedy list scheduler (longest remaining path first) places one
// vector operation per bundle; results are readable 4 bundles after issue
// and a register is reused only after its last reader has issued. The run
// must see no port conflict and every result must match a direct
// computation.
module tb_dct_simd_only;
  import asip_pkg::*;
  localparam int NB = 4, DEPTH = 128, NW = NB * DEPTH, W = 4;
  localparam int CONST_BITS = 13, PASS1_BITS = 2;
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

  asip_top #(.NUM_SCALAR(0)) dut (.*);

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

  // ---- kernel as a graph of vector values and element moves -------------------
  // values are vectors of W words; preloaded ones carry their contents
  int v_init  [$][W];
  bit v_pre   [$];
  bit v_keep  [$];
  int v_uses  [$];
  int v_pend  [$];   // element moves still to be scheduled into the value
  // operations: kind 0 = vector op (a op b -> d), kind 1 = staged write
  // number ed of a gather into d, taking element ea of a
  bit  op_kind [$];
  op_e op_code [$];
  int  op_a [$], op_b [$], op_d [$], op_ea [$], op_ed [$];

  function automatic int new_value(input bit pre, input int init [W]);
    v_init.push_back(init); v_pre.push_back(pre); v_keep.push_back(pre);
    v_uses.push_back(0); v_pend.push_back(0);
    return v_pre.size() - 1;
  endfunction

  int const_ids [int];
  function automatic int K(input int c);
    int init [W];
    foreach (init[e]) init[e] = c;
    if (!const_ids.exists(c)) const_ids[c] = new_value(1'b1, init);
    return const_ids[c];
  endfunction

  function automatic int emit(input op_e op, input int a, input int b);
    int zero [W] = '{default: 0};
    int d = new_value(1'b0, zero);
    op_kind.push_back(1'b0); op_code.push_back(op);
    op_a.push_back(a); op_b.push_back(b); op_d.push_back(d);
    op_ea.push_back(0); op_ed.push_back(0);
    v_uses[a]++; v_uses[b]++;
    return d;
  endfunction

  task automatic emit_move(input int a, input int ea, input int d, input int ed);
    op_kind.push_back(1'b1); op_code.push_back(OP_SHL);
    op_a.push_back(a); op_b.push_back(K(0)); op_d.push_back(d);
    op_ea.push_back(ea); op_ed.push_back(ed);
    v_uses[a]++; v_uses[K(0)]++;
    v_pend[d]++;
  endtask

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

  int in_id [2][8];    // [row group][column]
  int out_id [2][8];   // [column group][row]

  task automatic build_kernel();
    int y [2][8];
    int z [2][8];
    int d [8];
    int init [W];
    int zero [W] = '{default: 0};
    for (int g = 0; g < 2; g++)
      for (int c = 0; c < 8; c++) begin
        foreach (init[e]) init[e] = blk[(4 * g + e) * 8 + c];
        in_id[g][c] = new_value(1'b1, init);
        v_keep[in_id[g][c]] = 1'b0;
      end
    for (int g = 0; g < 2; g++) begin
      for (int c = 0; c < 8; c++) d[c] = in_id[g][c];
      g_1d(d, 1'b0);
      for (int k = 0; k < 8; k++) y[g][k] = d[k];
    end
    // transpose: z[h][r] element e = row r, column 4h+e = y[r/4][4h+e] element r%4
    for (int h = 0; h < 2; h++)
      for (int r = 0; r < 8; r++) z[h][r] = new_value(1'b0, zero);
    for (int h = 0; h < 2; h++)
      for (int r = 0; r < 8; r++)
        for (int e = 0; e < W; e++) emit_move(y[r / 4][4 * h + e], r % 4, z[h][r], e);
    for (int h = 0; h < 2; h++) begin
      for (int r = 0; r < 8; r++) d[r] = z[h][r];
      g_1d(d, 1'b1);
      for (int k = 0; k < 8; k++) begin out_id[h][k] = d[k]; v_keep[d[k]] = 1'b1; end
    end
  endtask

  // ---- scheduler -----------------------------------------------------------------
  localparam int MAXB = 2048;
  int  v_base [$], v_ready [$], v_size [$];
  bit  v_alloc [$];
  bit  word_used [NW];
  bit  op_done [$];
  int  op_height [];
  logic [38:0] prog_sv [$];
  int  n_bundles, last_write, n_moves_sched;

  function automatic logic [8:0] A(input int l);
    return {7'(l / NB), 2'(l % NB)};
  endfunction

  int words_live, max_words;

  function automatic bit alloc_vec(input int v);
    for (int l = 0; l + v_size[v] <= NW; l++) begin
      bit ok = 1'b1;
      for (int e = 0; e < v_size[v]; e++) if (word_used[l + e]) ok = 1'b0;
      if (ok) begin
        for (int e = 0; e < v_size[v]; e++) word_used[l + e] = 1'b1;
        v_base[v] = l; v_alloc[v] = 1'b1;
        words_live += v_size[v];
        if (words_live > max_words) max_words = words_live;
        return 1'b1;
      end
    end
    return 1'b0;
  endfunction

  task automatic drop_use(input int v);
    v_uses[v]--;
    if (v_uses[v] == 0 && !v_keep[v]) begin
      for (int e = 0; e < v_size[v]; e++) word_used[v_base[v] + e] = 1'b0;
      words_live -= v_size[v];
    end
  endtask

  function automatic bit avail(input int v, input int t);
    return v_alloc[v] && v_pend[v] == 0 && v_ready[v] <= t;
  endfunction

  task automatic schedule();
    int h_val [];
    int best, n_left;
    for (int v = 0; v < v_pre.size(); v++) begin
      v_base.push_back(0); v_ready.push_back(0); v_alloc.push_back(1'b0);
      v_size.push_back(v_pend[v] > 0 ? 2 * W - 1 : W);
    end
    // the preloaded vectors
    for (int v = 0; v < v_pre.size(); v++)
      if (v_pre[v]) void'(alloc_vec(v));
    h_val = new[v_pre.size()];
    foreach (h_val[v]) h_val[v] = 0;
    op_height = new[op_kind.size()];
    for (int o = op_kind.size() - 1; o >= 0; o--) begin
      op_height[o] = 4 + h_val[op_d[o]];
      if (op_height[o] > h_val[op_a[o]]) h_val[op_a[o]] = op_height[o];
      if (op_height[o] > h_val[op_b[o]]) h_val[op_b[o]] = op_height[o];
    end
    for (int o = 0; o < op_kind.size(); o++) op_done.push_back(1'b0);
    n_left = op_kind.size();
    n_bundles = 0; last_write = 0; n_moves_sched = 0;
    while (n_left > 0 && n_bundles < MAXB) begin
      int t = n_bundles;
      logic [38:0] sv_word = '0;
      // the vector slot: the ready operation on the longest path; a staged
      // write is ready when the writes before it in its gather have issued
      best = -1;
      for (int o = 0; o < op_kind.size(); o++)
        if (!op_done[o] && avail(op_a[o], t) && avail(op_b[o], t)
            && (!op_kind[o] || v_pend[op_d[o]] == W - op_ed[o])
            && (best < 0 || op_height[o] > op_height[best]))
          best = o;
      if (best >= 0 && (v_alloc[op_d[best]] || alloc_vec(op_d[best]))) begin
        int o = best;
        if (!op_kind[o]) begin
          sv_word = 39'({4'(op_code[o]), A(v_base[op_a[o]]), 4'd0, A(v_base[op_b[o]]), 4'd0,
                         A(v_base[op_d[o]])});
          v_ready[op_d[o]] = t + 4;
        end else begin
          sv_word = 39'({4'(op_code[o]), A(v_base[op_a[o]]), 4'(op_ea[o]), A(v_base[op_b[o]]),
                         4'd0, A(v_base[op_d[o]] + op_ed[o])});
          v_pend[op_d[o]]--;
          n_moves_sched++;
          if (v_pend[op_d[o]] == 0) v_ready[op_d[o]] = t + 4;
        end
        if (t + 4 > last_write) last_write = t + 4;
        op_done[o] = 1'b1; n_left--;
        drop_use(op_a[o]); drop_use(op_b[o]);
      end
      prog_sv.push_back(sv_word);
      n_bundles++;
    end
  endtask

  task automatic reset_state();
    v_init.delete(); v_pre.delete(); v_keep.delete(); v_uses.delete(); v_pend.delete();
    op_kind.delete(); op_code.delete(); op_a.delete(); op_b.delete(); op_d.delete();
    op_ea.delete(); op_ed.delete(); const_ids.delete();
    v_base.delete(); v_ready.delete(); v_alloc.delete(); op_done.delete(); prog_sv.delete();
    foreach (word_used[w]) word_used[w] = 1'b0;
    words_live = 0; max_words = 0;
    v_size.delete();
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
      check(n_bundles < MAXB, "schedule completes");
      $display("%s: %0d vector operations, %0d staged transpose writes, %0d bundles", name,
               op_kind.size() - n_moves_sched, n_moves_sched, n_bundles);
      for (int v = 0; v < v_pre.size(); v++)
        if (v_pre[v])
          for (int e = 0; e < W; e++) begin
            @(negedge clk);
            host_we = 1; host_waddr = A(v_base[v] + e); host_wdata = 32'(v_init[v][e]);
          end
      for (int k = 0; k < n_bundles; k++) begin
        @(negedge clk);
        host_we = 0;
        ld_we = 1; ld_slot = 1'b0; ld_addr = 12'(k); ld_data = prog_sv[k];
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
      check(cycle_count == 32'(last_write + 1), "one bundle per cycle, then the drain");
      check(n_conf == conf0, "no port conflict or stall");
      for (int h = 0; h < 2; h++)
        for (int k = 0; k < 8; k++)
          for (int e = 0; e < W; e++) begin
            host_raddr = A(v_base[out_id[h][k]] + e);
            #1;
            check($signed(host_rdata) == ref_out[k * 8 + 4 * h + e], "transform result");
          end
      $display("%s: at most %0d of %0d register words in use", name, max_words, NW);
      $display("%s (1,4,0): %0d bundles, %0d cycles", name, n_issue - issue0, cycle_count);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

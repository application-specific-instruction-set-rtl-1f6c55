// asip_top: parametric VLIW / multi-SIMD application specific processor.
//
// One instruction fetch stage issues a bundle per cycle to NUM_SIMD SIMD
// pipelines (SIMD_W elements wide) and NUM_SCALAR scalar pipelines. All of
// them read and write one shared register file made of
// SIMD_W*NUM_SIMD + NUM_SCALAR banks. A configuration is named
// (SIMD units, SIMD width, scalar units); the default is (1, 4, 1) with
// 32-bit data, 128 words per register bank, 16 permutation entries and
// 4096 bundles of instruction memory. (1, 4, 0) and (0, 0, 4) are obtained
// by changing the three unit parameters. Every pipeline stage is separated
// by a one-entry FIFO. There are no load/store or branch instructions:
// data is preloaded into the register file and a program runs straight
// through.
//
// Use: load the bundles with ld_* (slot order: SIMD slots, then scalar
// slots), optionally the permutation tables with pm_* (at reset they hold
// the PERM_INIT hex file, or a default table when it is empty), the data with
// host_we, then pulse `start` with prog_len set. `busy` stays high until
// the last instruction has been written back; `done` pulses in the cycle
// busy falls and cycle_count then holds the number of cycles from start to
// the last write-back. Results are read with host_raddr/host_rdata while
// idle. rd_conflict / wr_conflict / fetch_stall flag cycles in which a
// register bank's ports were oversubscribed or fetch waited.
//
// The run control, host ports and status outputs are this design's own;
// the pipeline structure, formats and register file organisation follow
// the processor model it implements.
module asip_top
  import asip_pkg::*;
#(
  parameter int NUM_SIMD   = 1,
  parameter int SIMD_W     = 4,
  parameter int NUM_SCALAR = 1,
  parameter int DATA_W     = 32,
  parameter int RF_DEPTH   = 128,
  parameter int PERM_DEPTH = 16,
  parameter string PERM_INIT = "",
  parameter int IMEM_DEPTH = 4096,
  localparam int NB      = num_banks(NUM_SIMD, SIMD_W, NUM_SCALAR),
  localparam int IDX_W   = clog2_min1(NB),
  localparam int ADDR_W  = clog2_min1(RF_DEPTH) + IDX_W,
  localparam int VW      = (SIMD_W > 0) ? SIMD_W : 1,
  localparam int PIDX_W  = clog2_min1(VW),
  localparam int PADDR_W = clog2_min1(PERM_DEPTH),
  localparam int SV_IW   = OP_W + 3 * ADDR_W + 2 * PADDR_W,
  localparam int SC_IW   = OP_W + 3 * ADDR_W,
  localparam int NS_A    = (NUM_SIMD > 0) ? NUM_SIMD : 1,
  localparam int NC_A    = (NUM_SCALAR > 0) ? NUM_SCALAR : 1,
  localparam int SLOT_W  = clog2_min1(NUM_SIMD + NUM_SCALAR),
  localparam int PC_W    = clog2_min1(IMEM_DEPTH),
  localparam int LD_W    = (SV_IW > SC_IW) ? SV_IW : SC_IW,
  localparam int UNIT_W  = clog2_min1(NS_A)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // run control
  input  logic                      start,
  input  logic [PC_W:0]             prog_len,
  output logic                      busy,
  output logic                      done,
  output logic [31:0]               cycle_count,
  // program load
  input  logic                      ld_we,
  input  logic [SLOT_W-1:0]         ld_slot,
  input  logic [PC_W-1:0]           ld_addr,
  input  logic [LD_W-1:0]           ld_data,
  // permutation table load (per SIMD unit)
  input  logic                      pm_we,
  input  logic [UNIT_W-1:0]         pm_unit,
  input  logic [PADDR_W-1:0]        pm_waddr,
  input  logic [VW-1:0][PIDX_W-1:0] pm_wdata,
  // register file host access
  input  logic                      host_we,
  input  logic [ADDR_W-1:0]         host_waddr,
  input  logic [DATA_W-1:0]         host_wdata,
  input  logic [ADDR_W-1:0]         host_raddr,
  output logic [DATA_W-1:0]         host_rdata,
  // status
  output logic                      rd_conflict,
  output logic                      wr_conflict,
  output logic                      fetch_stall
);

  // ---- instruction fetch -------------------------------------------------------
  logic             running, issue;
  logic             sv_valid [NS_A];
  logic             sv_ready [NS_A];
  logic [SV_IW-1:0] sv_instr [NS_A];
  logic             sc_valid [NC_A];
  logic             sc_ready [NC_A];
  logic [SC_IW-1:0] sc_instr [NC_A];

  instr_fetch #(
    .NUM_SIMD (NUM_SIMD), .NUM_SCALAR (NUM_SCALAR), .DEPTH (IMEM_DEPTH),
    .SV_IW (SV_IW), .SC_IW (SC_IW)
  ) u_fetch (
    .clk, .rst_n, .start, .prog_len,
    .running (running), .issue (issue), .stall (fetch_stall),
    .ld_we, .ld_slot, .ld_addr, .ld_data,
    .sv_valid, .sv_ready, .sv_instr,
    .sc_valid, .sc_ready, .sc_instr
  );

  // ---- register file --------------------------------------------------------------
  logic                      sv_rd_valid [NS_A];
  logic [ADDR_W-1:0]         sv_rd_addr1 [NS_A];
  logic [ADDR_W-1:0]         sv_rd_addr2 [NS_A];
  logic [VW-1:0][DATA_W-1:0] sv_rd_data1 [NS_A];
  logic [VW-1:0][DATA_W-1:0] sv_rd_data2 [NS_A];
  logic                      sv_rd_grant [NS_A];
  logic                      sv_wr_valid [NS_A];
  logic [ADDR_W-1:0]         sv_wr_addr  [NS_A];
  logic [VW-1:0][DATA_W-1:0] sv_wr_data  [NS_A];
  logic                      sv_wr_grant [NS_A];
  logic                      sv_busy     [NS_A];
  logic                      sc_rd_valid [NC_A];
  logic [ADDR_W-1:0]         sc_rd_addr1 [NC_A];
  logic [ADDR_W-1:0]         sc_rd_addr2 [NC_A];
  logic [DATA_W-1:0]         sc_rd_data1 [NC_A];
  logic [DATA_W-1:0]         sc_rd_data2 [NC_A];
  logic                      sc_rd_grant [NC_A];
  logic                      sc_wr_valid [NC_A];
  logic [ADDR_W-1:0]         sc_wr_addr  [NC_A];
  logic [DATA_W-1:0]         sc_wr_data  [NC_A];
  logic                      sc_wr_grant [NC_A];
  logic                      sc_busy     [NC_A];

  regfile #(
    .NUM_SIMD (NUM_SIMD), .SIMD_W (VW), .NUM_SCALAR (NUM_SCALAR),
    .DATA_W (DATA_W), .DEPTH (RF_DEPTH)
  ) u_rf (
    .clk,
    .sv_rd_valid, .sv_rd_addr1, .sv_rd_addr2, .sv_rd_data1, .sv_rd_data2, .sv_rd_grant,
    .sc_rd_valid, .sc_rd_addr1, .sc_rd_addr2, .sc_rd_data1, .sc_rd_data2, .sc_rd_grant,
    .sv_wr_valid, .sv_wr_addr, .sv_wr_data, .sv_wr_grant,
    .sc_wr_valid, .sc_wr_addr, .sc_wr_data, .sc_wr_grant,
    .host_we, .host_waddr, .host_wdata, .host_raddr, .host_rdata,
    .rd_conflict, .wr_conflict
  );

  // ---- SIMD pipelines ------------------------------------------------------------
  for (genvar p = 0; p < NS_A; p++) begin : g_simd
    if (p < NUM_SIMD) begin : g_pipe
      logic unused_stall_rd, unused_stall_wr;
      simd_pipe #(
        .SIMD_W (VW), .DATA_W (DATA_W), .ADDR_W (ADDR_W), .PERM_DEPTH (PERM_DEPTH),
        .PERM_INIT (PERM_INIT)
      ) u_pipe (
        .clk, .rst_n,
        .in_valid (sv_valid[p]), .in_ready (sv_ready[p]), .in_instr (sv_instr[p]),
        .pm_we (pm_we && (pm_unit == UNIT_W'(p))), .pm_waddr, .pm_wdata,
        .rd_valid (sv_rd_valid[p]), .rd_addr1 (sv_rd_addr1[p]), .rd_addr2 (sv_rd_addr2[p]),
        .rd_data1 (sv_rd_data1[p]), .rd_data2 (sv_rd_data2[p]), .rd_grant (sv_rd_grant[p]),
        .wr_valid (sv_wr_valid[p]), .wr_addr (sv_wr_addr[p]), .wr_data (sv_wr_data[p]),
        .wr_grant (sv_wr_grant[p]),
        .busy (sv_busy[p]), .rd_stall (unused_stall_rd), .wr_stall (unused_stall_wr)
      );
    end else begin : g_none
      assign sv_ready[p]    = 1'b0;
      assign sv_rd_valid[p] = 1'b0;
      assign sv_rd_addr1[p] = '0;
      assign sv_rd_addr2[p] = '0;
      assign sv_wr_valid[p] = 1'b0;
      assign sv_wr_addr[p]  = '0;
      assign sv_wr_data[p]  = '0;
      assign sv_busy[p]     = 1'b0;
    end
  end

  // ---- scalar pipelines ----------------------------------------------------------
  for (genvar q = 0; q < NC_A; q++) begin : g_scalar
    if (q < NUM_SCALAR) begin : g_pipe
      logic unused_stall_rd, unused_stall_wr;
      scalar_pipe #(.DATA_W (DATA_W), .ADDR_W (ADDR_W)) u_pipe (
        .clk, .rst_n,
        .in_valid (sc_valid[q]), .in_ready (sc_ready[q]), .in_instr (sc_instr[q]),
        .rd_valid (sc_rd_valid[q]), .rd_addr1 (sc_rd_addr1[q]), .rd_addr2 (sc_rd_addr2[q]),
        .rd_data1 (sc_rd_data1[q]), .rd_data2 (sc_rd_data2[q]), .rd_grant (sc_rd_grant[q]),
        .wr_valid (sc_wr_valid[q]), .wr_addr (sc_wr_addr[q]), .wr_data (sc_wr_data[q]),
        .wr_grant (sc_wr_grant[q]),
        .busy (sc_busy[q]), .rd_stall (unused_stall_rd), .wr_stall (unused_stall_wr)
      );
    end else begin : g_none
      assign sc_ready[q]    = 1'b0;
      assign sc_rd_valid[q] = 1'b0;
      assign sc_rd_addr1[q] = '0;
      assign sc_rd_addr2[q] = '0;
      assign sc_wr_valid[q] = 1'b0;
      assign sc_wr_addr[q]  = '0;
      assign sc_wr_data[q]  = '0;
      assign sc_busy[q]     = 1'b0;
    end
  end

  // ---- run status ------------------------------------------------------------------
  logic busy_q;

  always_comb begin
    busy = running;
    for (int p = 0; p < NS_A; p++) busy = busy || sv_busy[p];
    for (int q = 0; q < NC_A; q++) busy = busy || sc_busy[q];
  end

  assign done = busy_q && !busy;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy_q      <= 1'b0;
      cycle_count <= '0;
    end else begin
      busy_q <= busy;
      if (!running && start)  cycle_count <= '0;
      else if (busy)          cycle_count <= cycle_count + 1;
    end
  end

  // A bundle is only issued while the processor runs.
  a_issue_running: assert property (@(posedge clk) disable iff (!rst_n) issue |-> running);

endmodule

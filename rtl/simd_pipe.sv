// simd_pipe: one SIMD pipeline after instruction fetch.
//
// Stages, each separated by a one-entry FIFO:
//   input FIFO -> register fetch -> FIFO -> permutation -> FIFO ->
//   execute -> FIFO -> write-back
// Register fetch takes {op, address1, perm address1, address2, perm
// address2, result address}, reads the two operand vectors (SIMD_W
// consecutive register addresses from each start address) and forwards
// them with the permutation addresses. The permutation stage (perm_stage)
// rearranges both vectors through its permutation memory (loaded at reset
// from the PERM_INIT hex file, or a default table) and forwards
// {op, vector1, vector2, result address}. Execute (simd_exec) works
// element-wise and forwards {result vector, result address}; write-back
// writes the vector to SIMD_W consecutive addresses.
//
// A refused register file request stalls the stage for the cycle
// (rd_stall / wr_stall). A dependent instruction must be fetched four
// cycles after the one it depends on; the program, not the hardware,
// keeps to that. busy is high while any FIFO holds an instruction.
module simd_pipe
  import asip_pkg::*;
#(
  parameter int SIMD_W     = 4,
  parameter int DATA_W     = 32,
  parameter int ADDR_W     = 10,
  parameter int PERM_DEPTH = 16,
  parameter string PERM_INIT = "",
  localparam int PIDX_W  = (SIMD_W <= 2) ? 1 : $clog2(SIMD_W),
  localparam int PADDR_W = (PERM_DEPTH <= 2) ? 1 : $clog2(PERM_DEPTH),
  localparam int IW      = OP_W + 3 * ADDR_W + 2 * PADDR_W
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // from instruction fetch
  input  logic                          in_valid,
  output logic                          in_ready,
  input  logic [IW-1:0]                 in_instr,
  // permutation memory load port
  input  logic                          pm_we,
  input  logic [PADDR_W-1:0]            pm_waddr,
  input  logic [SIMD_W-1:0][PIDX_W-1:0] pm_wdata,
  // register file read port
  output logic                          rd_valid,
  output logic [ADDR_W-1:0]             rd_addr1,
  output logic [ADDR_W-1:0]             rd_addr2,
  input  logic [SIMD_W-1:0][DATA_W-1:0] rd_data1,
  input  logic [SIMD_W-1:0][DATA_W-1:0] rd_data2,
  input  logic                          rd_grant,
  // register file write port
  output logic                          wr_valid,
  output logic [ADDR_W-1:0]             wr_addr,
  output logic [SIMD_W-1:0][DATA_W-1:0] wr_data,
  input  logic                          wr_grant,
  // status
  output logic                          busy,
  output logic                          rd_stall,
  output logic                          wr_stall
);

  typedef logic [SIMD_W-1:0][DATA_W-1:0] vec_t;

  typedef struct packed {
    logic [OP_W-1:0]    op;
    logic [ADDR_W-1:0]  a1;
    logic [PADDR_W-1:0] p1;
    logic [ADDR_W-1:0]  a2;
    logic [PADDR_W-1:0] p2;
    logic [ADDR_W-1:0]  ra;
  } instr_t;

  typedef struct packed {
    logic [OP_W-1:0]    op;
    vec_t               v1;
    logic [PADDR_W-1:0] p1;
    vec_t               v2;
    logic [PADDR_W-1:0] p2;
    logic [ADDR_W-1:0]  ra;
  } perm_t;

  typedef struct packed {
    logic [OP_W-1:0]   op;
    vec_t              v1;
    vec_t              v2;
    logic [ADDR_W-1:0] ra;
  } ex_t;

  typedef struct packed {
    vec_t              res;
    logic [ADDR_W-1:0] ra;
  } wb_t;

  logic   f0_valid, f0_ready;
  instr_t f0_data;
  logic   f1_in_valid, f1_in_ready, f1_valid, f1_ready;
  perm_t  f1_in, f1_data;
  logic   f2_in_valid, f2_in_ready, f2_valid, f2_ready;
  ex_t    f2_in, f2_data;
  logic   f3_in_valid, f3_in_ready, f3_valid, f3_ready;
  wb_t    f3_in, f3_data;

  // ---- input FIFO ----------------------------------------------------------
  pipe_fifo #(.WIDTH($bits(instr_t))) u_f0 (
    .clk, .rst_n,
    .in_valid (in_valid), .in_ready (in_ready), .in_data (in_instr),
    .out_valid (f0_valid), .out_ready (f0_ready), .out_data (f0_data)
  );

  // ---- register fetch --------------------------------------------------------
  assign rd_valid    = f0_valid && f1_in_ready;
  assign rd_addr1    = f0_data.a1;
  assign rd_addr2    = f0_data.a2;
  assign f1_in_valid = rd_valid && rd_grant;
  assign f0_ready    = f1_in_valid;
  assign rd_stall    = rd_valid && !rd_grant;
  assign f1_in       = '{op: f0_data.op, v1: rd_data1, p1: f0_data.p1,
                         v2: rd_data2, p2: f0_data.p2, ra: f0_data.ra};

  pipe_fifo #(.WIDTH($bits(perm_t))) u_f1 (
    .clk, .rst_n,
    .in_valid (f1_in_valid), .in_ready (f1_in_ready), .in_data (f1_in),
    .out_valid (f1_valid), .out_ready (f1_ready), .out_data (f1_data)
  );

  // ---- permutation -----------------------------------------------------------
  vec_t pv1, pv2;

  perm_stage #(.SIMD_W(SIMD_W), .DATA_W(DATA_W), .PERM_DEPTH(PERM_DEPTH),
               .INIT_FILE(PERM_INIT)) u_perm (
    .clk, .rst_n,
    .pm_we, .pm_waddr, .pm_wdata,
    .paddr1 (f1_data.p1), .paddr2 (f1_data.p2),
    .vin1 (f1_data.v1), .vin2 (f1_data.v2),
    .vout1 (pv1), .vout2 (pv2)
  );

  assign f2_in_valid = f1_valid;
  assign f1_ready    = f2_in_ready;
  assign f2_in       = '{op: f1_data.op, v1: pv1, v2: pv2, ra: f1_data.ra};

  pipe_fifo #(.WIDTH($bits(ex_t))) u_f2 (
    .clk, .rst_n,
    .in_valid (f2_in_valid), .in_ready (f2_in_ready), .in_data (f2_in),
    .out_valid (f2_valid), .out_ready (f2_ready), .out_data (f2_data)
  );

  // ---- execute -------------------------------------------------------------
  vec_t ex_res;

  simd_exec #(.SIMD_W(SIMD_W), .DATA_W(DATA_W)) u_exec (
    .op (f2_data.op), .va (f2_data.v1), .vb (f2_data.v2), .vy (ex_res)
  );

  assign f3_in_valid = f2_valid;
  assign f2_ready    = f3_in_ready;
  assign f3_in       = '{res: ex_res, ra: f2_data.ra};

  pipe_fifo #(.WIDTH($bits(wb_t))) u_f3 (
    .clk, .rst_n,
    .in_valid (f3_in_valid), .in_ready (f3_in_ready), .in_data (f3_in),
    .out_valid (f3_valid), .out_ready (f3_ready), .out_data (f3_data)
  );

  // ---- write-back ----------------------------------------------------------
  assign wr_valid = f3_valid;
  assign wr_addr  = f3_data.ra;
  assign wr_data  = f3_data.res;
  assign f3_ready = wr_grant;
  assign wr_stall = wr_valid && !wr_grant;

  assign busy = f0_valid || f1_valid || f2_valid || f3_valid;

endmodule

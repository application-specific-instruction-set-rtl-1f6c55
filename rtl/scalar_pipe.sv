// scalar_pipe: one scalar (VLIW slot) pipeline after instruction fetch.
//
// Stages, each separated by a one-entry FIFO:
//   input FIFO -> register fetch -> FIFO -> execute -> FIFO -> write-back
// Register fetch takes the instruction {op, address1, address2, result
// address}, reads both operands from the shared register file and
// forwards {op, operand1, operand2, result address}. Execute applies the
// operation (asip_alu) and forwards {result, result address}. Write-back
// hands that pair to the register file's write port.
//
// The register file may refuse a request when another pipeline holds the
// ports of the same bank (see regfile); the stage then stalls and retries
// the next cycle, and rd_stall / wr_stall report it. A dependent
// instruction must be fetched three cycles after the one it depends on
// (fetch, register fetch, execute, write-back: the result is written at
// the end of the write-back cycle and readable in the next); the
// processor does not check dependencies, the program must respect them.
//
// busy is high while any FIFO of the pipeline holds an instruction.
module scalar_pipe
  import asip_pkg::*;
#(
  parameter int DATA_W = 32,
  parameter int ADDR_W = 10,
  localparam int IW    = OP_W + 3 * ADDR_W
) (
  input  logic              clk,
  input  logic              rst_n,
  // from instruction fetch
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [IW-1:0]     in_instr,
  // register file read port
  output logic              rd_valid,
  output logic [ADDR_W-1:0] rd_addr1,
  output logic [ADDR_W-1:0] rd_addr2,
  input  logic [DATA_W-1:0] rd_data1,
  input  logic [DATA_W-1:0] rd_data2,
  input  logic              rd_grant,
  // register file write port
  output logic              wr_valid,
  output logic [ADDR_W-1:0] wr_addr,
  output logic [DATA_W-1:0] wr_data,
  input  logic              wr_grant,
  // status
  output logic              busy,
  output logic              rd_stall,
  output logic              wr_stall
);

  typedef struct packed {
    logic [OP_W-1:0]   op;
    logic [ADDR_W-1:0] a1;
    logic [ADDR_W-1:0] a2;
    logic [ADDR_W-1:0] ra;
  } instr_t;

  typedef struct packed {
    logic [OP_W-1:0]   op;
    logic [DATA_W-1:0] d1;
    logic [DATA_W-1:0] d2;
    logic [ADDR_W-1:0] ra;
  } ex_t;

  typedef struct packed {
    logic [DATA_W-1:0] res;
    logic [ADDR_W-1:0] ra;
  } wb_t;

  // ---- input FIFO ----------------------------------------------------------
  logic   f0_valid, f0_ready;
  instr_t f0_data;
  logic   f1_in_valid, f1_in_ready, f1_valid, f1_ready;
  ex_t    f1_in, f1_data;
  logic   f2_in_valid, f2_in_ready, f2_valid, f2_ready;
  wb_t    f2_in, f2_data;

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
  assign f1_in       = '{op: f0_data.op, d1: rd_data1, d2: rd_data2, ra: f0_data.ra};

  pipe_fifo #(.WIDTH($bits(ex_t))) u_f1 (
    .clk, .rst_n,
    .in_valid (f1_in_valid), .in_ready (f1_in_ready), .in_data (f1_in),
    .out_valid (f1_valid), .out_ready (f1_ready), .out_data (f1_data)
  );

  // ---- execute -------------------------------------------------------------
  logic [DATA_W-1:0] ex_res;

  asip_alu #(.DATA_W(DATA_W)) u_alu (
    .op (f1_data.op), .a (f1_data.d1), .b (f1_data.d2), .y (ex_res)
  );

  assign f2_in_valid = f1_valid;
  assign f1_ready    = f2_in_ready;
  assign f2_in       = '{res: ex_res, ra: f1_data.ra};

  pipe_fifo #(.WIDTH($bits(wb_t))) u_f2 (
    .clk, .rst_n,
    .in_valid (f2_in_valid), .in_ready (f2_in_ready), .in_data (f2_in),
    .out_valid (f2_valid), .out_ready (f2_ready), .out_data (f2_data)
  );

  // ---- write-back ----------------------------------------------------------
  assign wr_valid = f2_valid;
  assign wr_addr  = f2_data.ra;
  assign wr_data  = f2_data.res;
  assign f2_ready = wr_grant;
  assign wr_stall = wr_valid && !wr_grant;

  assign busy = f0_valid || f1_valid || f2_valid;

endmodule

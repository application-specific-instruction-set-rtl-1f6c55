// instr_fetch: instruction fetch stage of the processor.
//
// The program is a sequence of bundles. A bundle has one slot per
// pipeline: the SIMD instructions first (slot 0 .. NUM_SIMD-1), then the
// scalar instructions (slot NUM_SIMD .. NUM_SIMD+NUM_SCALAR-1). Each slot
// has an instruction memory of its own (instr_mem), so a whole bundle is
// read in one cycle, and each slot's instruction goes into the input FIFO
// of its pipeline. A slot holding a no-operation is not sent on.
//
// Control (this design's choice; the processor has no branches): a pulse
// on `start` while idle sets the program counter to 0; the stage then
// issues one bundle per cycle and stops after prog_len bundles. A bundle
// is issued only when every pipeline that receives an instruction from it
// can accept one, so the slots never get out of step; otherwise the stage
// waits (stall). `issue` pulses for every issued bundle.
//
// Load port: ld_we writes ld_data (low bits used) into slot ld_slot at
// ld_addr while the processor is idle.
module instr_fetch
  import asip_pkg::*;
#(
  parameter int NUM_SIMD   = 1,
  parameter int NUM_SCALAR = 1,
  parameter int DEPTH      = 4096,
  parameter int SV_IW      = 42,
  parameter int SC_IW      = 34,
  localparam int NS_A   = (NUM_SIMD > 0) ? NUM_SIMD : 1,
  localparam int NC_A   = (NUM_SCALAR > 0) ? NUM_SCALAR : 1,
  localparam int NSLOT  = NUM_SIMD + NUM_SCALAR,
  localparam int SLOT_W = clog2_min1(NSLOT),
  localparam int PC_W   = clog2_min1(DEPTH),
  localparam int LD_W   = (SV_IW > SC_IW) ? SV_IW : SC_IW
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [PC_W:0]    prog_len,
  output logic             running,
  output logic             issue,
  output logic             stall,
  // program load
  input  logic             ld_we,
  input  logic [SLOT_W-1:0] ld_slot,
  input  logic [PC_W-1:0]  ld_addr,
  input  logic [LD_W-1:0]  ld_data,
  // to the SIMD pipelines
  output logic             sv_valid [NS_A],
  input  logic             sv_ready [NS_A],
  output logic [SV_IW-1:0] sv_instr [NS_A],
  // to the scalar pipelines
  output logic             sc_valid [NC_A],
  input  logic             sc_ready [NC_A],
  output logic [SC_IW-1:0] sc_instr [NC_A]
);

  logic [PC_W-1:0] pc;
  logic            sv_real [NS_A];
  logic            sc_real [NC_A];
  logic            can_issue;

  // ---- per-slot instruction memories ----------------------------------------
  for (genvar s = 0; s < NS_A; s++) begin : g_sv_mem
    if (s < NUM_SIMD) begin : g_mem
      instr_mem #(.DEPTH(DEPTH), .WIDTH(SV_IW)) u_mem (
        .clk   (clk),
        .we    (ld_we && (ld_slot == SLOT_W'(s))),
        .waddr (ld_addr),
        .wdata (ld_data[SV_IW-1:0]),
        .raddr (pc),
        .rdata (sv_instr[s])
      );
    end else begin : g_none
      assign sv_instr[s] = '0;
    end
    assign sv_real[s] = op_is_real(sv_instr[s][SV_IW-1 -: OP_W]);
  end

  for (genvar s = 0; s < NC_A; s++) begin : g_sc_mem
    if (s < NUM_SCALAR) begin : g_mem
      instr_mem #(.DEPTH(DEPTH), .WIDTH(SC_IW)) u_mem (
        .clk   (clk),
        .we    (ld_we && (ld_slot == SLOT_W'(NUM_SIMD + s))),
        .waddr (ld_addr),
        .wdata (ld_data[SC_IW-1:0]),
        .raddr (pc),
        .rdata (sc_instr[s])
      );
    end else begin : g_none
      assign sc_instr[s] = '0;
    end
    assign sc_real[s] = op_is_real(sc_instr[s][SC_IW-1 -: OP_W]);
  end

  // ---- issue -------------------------------------------------------------------
  always_comb begin
    can_issue = running;
    for (int s = 0; s < NUM_SIMD; s++)   if (sv_real[s] && !sv_ready[s]) can_issue = 1'b0;
    for (int s = 0; s < NUM_SCALAR; s++) if (sc_real[s] && !sc_ready[s]) can_issue = 1'b0;
    for (int s = 0; s < NS_A; s++) sv_valid[s] = can_issue && sv_real[s] && (s < NUM_SIMD);
    for (int s = 0; s < NC_A; s++) sc_valid[s] = can_issue && sc_real[s] && (s < NUM_SCALAR);
  end

  assign issue = can_issue;
  assign stall = running && !can_issue;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pc      <= '0;
      running <= 1'b0;
    end else if (!running) begin
      if (start) begin
        pc      <= '0;
        running <= (prog_len != '0);
      end
    end else if (can_issue) begin
      if ({1'b0, pc} == prog_len - 1'b1) running <= 1'b0;
      else                               pc      <= pc + 1'b1;
    end
  end

endmodule

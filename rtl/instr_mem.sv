// instr_mem: instruction memory of one issue slot.
//
// The fetch stage keeps one of these per pipeline (one per SIMD unit and
// one per scalar unit), so every slot of a bundle is read in the same
// cycle. Like the library register files the design is built from, the
// read is combinational (asynchronous, maps to LUT RAM) and the write is
// synchronous. The write port is how a program is loaded before it runs;
// the memory is not reset, and its depth (4096 words) is the depth used
// for every evaluated configuration.
//
// Interface: we/waddr/wdata write one word at the clock edge; raddr
// returns rdata in the same cycle.
module instr_mem #(
  parameter int DEPTH = 4096,
  parameter int WIDTH = 34,
  localparam int AW = (DEPTH <= 2) ? 1 : $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];

endmodule

// rf_bank: one register file of the banked register file module.
//
// A bank holds DEPTH data words. It has NRD combinational read ports and
// one synchronous write port. Two read ports serve the pipelines; the
// register file module adds a third one for host (debug) access, which is
// this design's own addition. A read in the cycle of a write to the same
// address returns the old word (the value at the start of the cycle), as
// the design requires, because the write only lands at the clock edge.
// Contents are not reset; they are loaded through the write port.
module rf_bank #(
  parameter int DEPTH  = 128,
  parameter int DATA_W = 32,
  parameter int NRD    = 2,
  localparam int AW = (DEPTH <= 2) ? 1 : $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic [AW-1:0]     raddr [NRD],
  output logic [DATA_W-1:0] rdata [NRD],
  input  logic              we,
  input  logic [AW-1:0]     waddr,
  input  logic [DATA_W-1:0] wdata
);

  logic [DATA_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_comb begin
    for (int p = 0; p < NRD; p++) rdata[p] = mem[raddr[p]];
  end

endmodule

// pipe_fifo: one-entry FIFO placed between two pipeline stages.
//
// Every stage of the processor hands its result to the next stage through
// a FIFO of depth one, so a stage only fires when its input holds an item
// and its output has room; nothing is ever read from an empty FIFO or
// written into a full one. The FIFO may be written in the same cycle in
// which its single item is taken (in_ready follows out_ready), so a chain
// of stages streams one item per cycle; that pass-through of the ready
// signal is this design's choice, made so that a bundle can issue every
// cycle.
//
// Interface: valid/ready on both sides. in_valid && in_ready writes
// in_data at the clock edge; out_valid && out_ready removes the item.
// out_data is the stored item (registered, one cycle after the write).
// Reset (active low, synchronous) empties the FIFO.
module pipe_fifo #(
  parameter int WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [WIDTH-1:0] in_data,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [WIDTH-1:0] out_data
);

  logic             full;
  logic [WIDTH-1:0] data_q;

  assign in_ready  = !full || out_ready;
  assign out_valid = full;
  assign out_data  = data_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      full   <= 1'b0;
      data_q <= '0;
    end else begin
      if (in_valid && in_ready) begin
        full   <= 1'b1;
        data_q <= in_data;
      end else if (out_ready) begin
        full   <= 1'b0;
      end
    end
  end

  // An item that is offered but not taken must not change while it waits.
  property p_hold;
    @(posedge clk) disable iff (!rst_n)
      (out_valid && !out_ready) |=> (out_valid && $stable(out_data));
  endproperty
  a_hold: assert property (p_hold);

endmodule

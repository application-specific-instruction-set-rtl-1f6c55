// simd_exec: execute unit of a SIMD pipeline.
//
// Applies one operation element-wise to two operand vectors of SIMD_W
// elements: result[i] = a[i] op b[i], using one asip_alu per element, so
// a vector multiply needs SIMD_W multipliers. The result vector has the
// operand format. Combinational; the pipeline FIFOs register it.
module simd_exec
  import asip_pkg::*;
#(
  parameter int SIMD_W = 4,
  parameter int DATA_W = 32
) (
  input  logic [OP_W-1:0]               op,
  input  logic [SIMD_W-1:0][DATA_W-1:0] va,
  input  logic [SIMD_W-1:0][DATA_W-1:0] vb,
  output logic [SIMD_W-1:0][DATA_W-1:0] vy
);

  for (genvar i = 0; i < SIMD_W; i++) begin : g_lane
    asip_alu #(.DATA_W(DATA_W)) u_alu (
      .op (op),
      .a  (va[i]),
      .b  (vb[i]),
      .y  (vy[i])
    );
  end

endmodule

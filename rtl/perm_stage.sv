// perm_stage: permutation stage of a SIMD pipeline.
//
// A small permutation memory holds PERM_DEPTH entries; each entry gives,
// for every element position i of a vector, the index of the source
// element: out[i] = in[entry[i]]. Both operand vectors of an instruction
// carry their own permutation address, so both are rearranged in the same
// cycle (for example the entry 2,3,1,0 turns v into v[2],v[3],v[1],v[0]).
// An entry whose indices repeat broadcasts an element.
//
// Reset loads the table from INIT_FILE, a hex file with one entry per line
// (element 0 in the least significant bits), as the original model
// preloads it. With INIT_FILE empty, reset loads a default table, a choice
// of this design: entry p < SIMD_W rotates the vector by p (entry 0 is the
// identity, out[i] = in[(i+p) mod SIMD_W]), entry SIMD_W+j < 2*SIMD_W
// broadcasts element j, and every further entry reverses the vector. The
// table can also be rewritten at run time through pm_we/pm_waddr/pm_wdata,
// an addition of this design.
//
// Timing: the permutation is combinational; the surrounding FIFOs
// register it. Memory writes land at the clock edge.
module perm_stage #(
  parameter int SIMD_W     = 4,
  parameter int DATA_W     = 32,
  parameter int PERM_DEPTH = 16,
  parameter string INIT_FILE = "",
  localparam int PIDX_W  = (SIMD_W <= 2) ? 1 : $clog2(SIMD_W),
  localparam int PADDR_W = (PERM_DEPTH <= 2) ? 1 : $clog2(PERM_DEPTH)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // permutation memory load port
  input  logic                          pm_we,
  input  logic [PADDR_W-1:0]            pm_waddr,
  input  logic [SIMD_W-1:0][PIDX_W-1:0] pm_wdata,
  // operand vectors and their permutation addresses
  input  logic [PADDR_W-1:0]            paddr1,
  input  logic [PADDR_W-1:0]            paddr2,
  input  logic [SIMD_W-1:0][DATA_W-1:0] vin1,
  input  logic [SIMD_W-1:0][DATA_W-1:0] vin2,
  output logic [SIMD_W-1:0][DATA_W-1:0] vout1,
  output logic [SIMD_W-1:0][DATA_W-1:0] vout2
);

  logic [SIMD_W-1:0][PIDX_W-1:0] pmem [PERM_DEPTH];

  function automatic logic [SIMD_W-1:0][PIDX_W-1:0] default_entry(input int p);
    logic [SIMD_W-1:0][PIDX_W-1:0] ent;
    for (int i = 0; i < SIMD_W; i++) begin
      if (p < SIMD_W)          ent[i] = PIDX_W'((i + p) % SIMD_W);
      else if (p < 2 * SIMD_W) ent[i] = PIDX_W'(p - SIMD_W);
      else                     ent[i] = PIDX_W'(SIMD_W - 1 - i);
    end
    return ent;
  endfunction

  // reset contents: the file if one is given, else the default table
  logic [SIMD_W-1:0][PIDX_W-1:0] init_tab [PERM_DEPTH];

  initial begin
    for (int p = 0; p < PERM_DEPTH; p++) init_tab[p] = default_entry(p);
    if (INIT_FILE != "") $readmemh(INIT_FILE, init_tab);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int p = 0; p < PERM_DEPTH; p++) pmem[p] <= init_tab[p];
    end else if (pm_we) begin
      pmem[pm_waddr] <= pm_wdata;
    end
  end

  logic [SIMD_W-1:0][PIDX_W-1:0] sel1, sel2;
  assign sel1 = pmem[paddr1];
  assign sel2 = pmem[paddr2];

  always_comb begin
    for (int i = 0; i < SIMD_W; i++) begin
      vout1[i] = vin1[sel1[i]];
      vout2[i] = vin2[sel2[i]];
    end
  end

endmodule

// regfile: the shared register file module of the processor.
//
// The module is built from NB = SIMD_W*NUM_SIMD + NUM_SCALAR banks
// (rf_bank), each with two read ports and one write port for the
// pipelines. A register address is {slot index, bank index}: the bank
// index takes N = ceil(log2(NB)) bits (equation 3.1), the slot index
// log2(DEPTH) bits. Addresses are consecutive across banks first: element
// e of a vector whose address is {s, i} lives in bank (i+e) mod NB, slot
// s + (i+e) div NB. A vector that starts in bank 0 therefore sits in one
// slot row, and a vector that starts higher wraps into the next slot of the
// first banks. One vector operand touches each bank at most once, so two
// operand vectors need at most the two read ports of every bank, and a
// result vector at most the single write port.
//
// Port switching. Every cycle each pipeline may present one read request
// (two operand addresses) and one write request. Requests are served in a
// fixed order, SIMD pipelines before scalar pipelines and lower numbers
// first (host writes before all). A pipeline's request is granted whole
// when the ports it needs in every bank are still free, and the switch
// then connects its elements to those ports; otherwise the request is not
// granted and the pipeline stalls for that cycle and tries again. The
// design states only that each bank serves at most two reads and one write
// per cycle through switches; the fixed priority and the stall are this
// design's choices (a well scheduled program never causes a conflict).
//
// Timing: reads are combinational (same cycle as the request); writes
// land at the clock edge, so a read of a word written in the same cycle
// returns the old word.
//
// Host port (this design's addition, used to preload data and read
// results): host_we writes one word; host_raddr reads one word through a
// third read port of every bank.
module regfile
  import asip_pkg::*;
#(
  parameter int NUM_SIMD   = 1,
  parameter int SIMD_W     = 4,
  parameter int NUM_SCALAR = 1,
  parameter int DATA_W     = 32,
  parameter int DEPTH      = 128,
  localparam int NB     = num_banks(NUM_SIMD, SIMD_W, NUM_SCALAR),
  localparam int IDX_W  = clog2_min1(NB),
  localparam int SLOT_W = clog2_min1(DEPTH),
  localparam int ADDR_W = SLOT_W + IDX_W,
  localparam int NS_A   = (NUM_SIMD > 0) ? NUM_SIMD : 1,
  localparam int NC_A   = (NUM_SCALAR > 0) ? NUM_SCALAR : 1,
  localparam int VW     = (SIMD_W > 0) ? SIMD_W : 1
) (
  input  logic                       clk,
  // SIMD pipeline read requests (two operand vectors)
  input  logic                       sv_rd_valid [NS_A],
  input  logic [ADDR_W-1:0]          sv_rd_addr1 [NS_A],
  input  logic [ADDR_W-1:0]          sv_rd_addr2 [NS_A],
  output logic [VW-1:0][DATA_W-1:0]  sv_rd_data1 [NS_A],
  output logic [VW-1:0][DATA_W-1:0]  sv_rd_data2 [NS_A],
  output logic                       sv_rd_grant [NS_A],
  // scalar pipeline read requests (two operands)
  input  logic                       sc_rd_valid [NC_A],
  input  logic [ADDR_W-1:0]          sc_rd_addr1 [NC_A],
  input  logic [ADDR_W-1:0]          sc_rd_addr2 [NC_A],
  output logic [DATA_W-1:0]          sc_rd_data1 [NC_A],
  output logic [DATA_W-1:0]          sc_rd_data2 [NC_A],
  output logic                       sc_rd_grant [NC_A],
  // SIMD pipeline write requests (one result vector)
  input  logic                       sv_wr_valid [NS_A],
  input  logic [ADDR_W-1:0]          sv_wr_addr  [NS_A],
  input  logic [VW-1:0][DATA_W-1:0]  sv_wr_data  [NS_A],
  output logic                       sv_wr_grant [NS_A],
  // scalar pipeline write requests (one result)
  input  logic                       sc_wr_valid [NC_A],
  input  logic [ADDR_W-1:0]          sc_wr_addr  [NC_A],
  input  logic [DATA_W-1:0]          sc_wr_data  [NC_A],
  output logic                       sc_wr_grant [NC_A],
  // host access
  input  logic                       host_we,
  input  logic [ADDR_W-1:0]          host_waddr,
  input  logic [DATA_W-1:0]          host_wdata,
  input  logic [ADDR_W-1:0]          host_raddr,
  output logic [DATA_W-1:0]          host_rdata,
  // a request was refused this cycle because a bank ran out of ports
  output logic                       rd_conflict,
  output logic                       wr_conflict
);

  // Element-level request numbering. Reads: SIMD pipe p, operand o,
  // element e -> (p*2+o)*VW+e; scalar pipe q, operand o -> NS_A*2*VW+q*2+o.
  localparam int NRD_SV = NS_A * 2 * VW;
  localparam int NRD    = NRD_SV + NC_A * 2;
  // Writes: host -> 0, SIMD pipe p element e -> 1+p*VW+e,
  // scalar pipe q -> 1+NS_A*VW+q.
  localparam int NWR    = 1 + NS_A * VW + NC_A;
  localparam int NRDG   = NS_A + NC_A;      // read groups (one per pipe)
  localparam int NWRG   = 1 + NS_A + NC_A;  // write groups (host first)

  typedef struct packed {
    logic [IDX_W-1:0]  bank;
    logic [SLOT_W-1:0] slot;
  } loc_t;

  // Location of word `off` past address `addr`.
  function automatic loc_t locate(input logic [ADDR_W-1:0] addr, input int off);
    loc_t l;
    int   lin;
    lin    = int'(addr[IDX_W-1:0]) + off;
    l.bank = IDX_W'(lin % NB);
    l.slot = addr[ADDR_W-1:IDX_W] + SLOT_W'(lin / NB);
    return l;
  endfunction

  // ---- element request tables --------------------------------------------
  loc_t rd_loc   [NRD];
  logic rd_req   [NRD];
  int   rd_group [NRD];
  loc_t wr_loc   [NWR];
  logic wr_req   [NWR];
  int   wr_group [NWR];
  logic [DATA_W-1:0] wr_val [NWR];

  always_comb begin
    for (int p = 0; p < NS_A; p++) begin
      for (int e = 0; e < VW; e++) begin
        rd_loc[(p*2)*VW+e]     = locate(sv_rd_addr1[p], e);
        rd_loc[(p*2+1)*VW+e]   = locate(sv_rd_addr2[p], e);
        rd_req[(p*2)*VW+e]     = sv_rd_valid[p] && (p < NUM_SIMD) && (e < SIMD_W);
        rd_req[(p*2+1)*VW+e]   = sv_rd_valid[p] && (p < NUM_SIMD) && (e < SIMD_W);
        rd_group[(p*2)*VW+e]   = p;
        rd_group[(p*2+1)*VW+e] = p;
      end
    end
    for (int q = 0; q < NC_A; q++) begin
      rd_loc[NRD_SV+q*2]     = locate(sc_rd_addr1[q], 0);
      rd_loc[NRD_SV+q*2+1]   = locate(sc_rd_addr2[q], 0);
      rd_req[NRD_SV+q*2]     = sc_rd_valid[q] && (q < NUM_SCALAR);
      rd_req[NRD_SV+q*2+1]   = sc_rd_valid[q] && (q < NUM_SCALAR);
      rd_group[NRD_SV+q*2]   = NS_A + q;
      rd_group[NRD_SV+q*2+1] = NS_A + q;
    end
  end

  always_comb begin
    wr_loc[0]   = locate(host_waddr, 0);
    wr_req[0]   = host_we;
    wr_group[0] = 0;
    wr_val[0]   = host_wdata;
    for (int p = 0; p < NS_A; p++) begin
      for (int e = 0; e < VW; e++) begin
        wr_loc[1+p*VW+e]   = locate(sv_wr_addr[p], e);
        wr_req[1+p*VW+e]   = sv_wr_valid[p] && (p < NUM_SIMD) && (e < SIMD_W);
        wr_group[1+p*VW+e] = 1 + p;
        wr_val[1+p*VW+e]   = sv_wr_data[p][e];
      end
    end
    for (int q = 0; q < NC_A; q++) begin
      wr_loc[1+NS_A*VW+q]   = locate(sc_wr_addr[q], 0);
      wr_req[1+NS_A*VW+q]   = sc_wr_valid[q] && (q < NUM_SCALAR);
      wr_group[1+NS_A*VW+q] = 1 + NS_A + q;
      wr_val[1+NS_A*VW+q]   = sc_wr_data[q];
    end
  end

  // ---- read port switch ----------------------------------------------------
  // Each group (pipeline) is checked against the ports already handed out;
  // a granted group's element requests take the next free ports of their
  // banks, in request order.
  logic [SLOT_W-1:0] bank_raddr [NB][3];
  logic [DATA_W-1:0] bank_rdata [NB][3];
  logic              rd_gnt_g   [NRDG];
  logic [1:0]        rd_port    [NRD];
  logic              rd_gnt     [NRD];

  always_comb begin
    int   used [NB];
    int   need;
    logic fits, any;
    for (int b = 0; b < NB; b++) used[b] = 0;
    for (int r = 0; r < NRD; r++) begin
      rd_port[r] = '0;
      rd_gnt[r]  = 1'b0;
    end
    rd_conflict = 1'b0;
    for (int g = 0; g < NRDG; g++) begin
      any  = 1'b0;
      fits = 1'b1;
      for (int b = 0; b < NB; b++) begin
        need = 0;
        for (int r = 0; r < NRD; r++)
          if (rd_req[r] && rd_group[r] == g && int'(rd_loc[r].bank) == b) need = need + 1;
        if (need > 0) any = 1'b1;
        if (used[b] + need > 2) fits = 1'b0;
      end
      rd_gnt_g[g] = any && fits;
      if (any && !fits) rd_conflict = 1'b1;
      if (any && fits) begin
        for (int b = 0; b < NB; b++) begin
          for (int r = 0; r < NRD; r++) begin
            if (rd_req[r] && rd_group[r] == g && int'(rd_loc[r].bank) == b) begin
              rd_port[r] = 2'(used[b]);
              rd_gnt[r]  = 1'b1;
              used[b]    = used[b] + 1;
            end
          end
        end
      end
    end
  end

  // Bank port addresses: the granted request holding each port, the host
  // read on the third port.
  always_comb begin
    for (int b = 0; b < NB; b++) begin
      for (int k = 0; k < 2; k++) begin
        bank_raddr[b][k] = '0;
        for (int r = 0; r < NRD; r++)
          if (rd_gnt[r] && int'(rd_loc[r].bank) == b && int'(rd_port[r]) == k)
            bank_raddr[b][k] = rd_loc[r].slot;
      end
      bank_raddr[b][2] = host_raddr[ADDR_W-1:IDX_W];
    end
  end

  logic [DATA_W-1:0] rd_val [NRD];
  logic [IDX_W-1:0]  host_bank;
  always_comb begin
    for (int r = 0; r < NRD; r++)
      rd_val[r] = bank_rdata[rd_loc[r].bank][rd_port[r]];
    host_bank  = IDX_W'(int'(host_raddr[IDX_W-1:0]) % NB);
    host_rdata = bank_rdata[host_bank][2];
  end

  always_comb begin
    for (int p = 0; p < NS_A; p++) begin
      sv_rd_grant[p] = rd_gnt_g[p];
      for (int e = 0; e < VW; e++) begin
        sv_rd_data1[p][e] = rd_val[(p*2)*VW+e];
        sv_rd_data2[p][e] = rd_val[(p*2+1)*VW+e];
      end
    end
    for (int q = 0; q < NC_A; q++) begin
      sc_rd_grant[q] = rd_gnt_g[NS_A+q];
      sc_rd_data1[q] = rd_val[NRD_SV+q*2];
      sc_rd_data2[q] = rd_val[NRD_SV+q*2+1];
    end
  end

  // ---- write port switch ---------------------------------------------------
  // One write per bank and cycle; a group is granted when none of its
  // banks is taken yet and it does not hit one bank twice.
  logic              bank_we    [NB];
  logic [SLOT_W-1:0] bank_waddr [NB];
  logic [DATA_W-1:0] bank_wdata [NB];
  logic              wr_gnt_g   [NWRG];
  logic              wr_gnt     [NWR];

  always_comb begin
    logic taken [NB];
    int   hits;
    logic fits, any;
    for (int b = 0; b < NB; b++) taken[b] = 1'b0;
    for (int w = 0; w < NWR; w++) wr_gnt[w] = 1'b0;
    wr_conflict = 1'b0;
    for (int g = 0; g < NWRG; g++) begin
      any  = 1'b0;
      fits = 1'b1;
      for (int b = 0; b < NB; b++) begin
        hits = 0;
        for (int w = 0; w < NWR; w++)
          if (wr_req[w] && wr_group[w] == g && int'(wr_loc[w].bank) == b) hits = hits + 1;
        if (hits > 0) any = 1'b1;
        if (hits > 1 || (hits == 1 && taken[b])) fits = 1'b0;
      end
      wr_gnt_g[g] = any && fits;
      if (any && !fits) wr_conflict = 1'b1;
      if (any && fits) begin
        for (int b = 0; b < NB; b++)
          for (int w = 0; w < NWR; w++)
            if (wr_req[w] && wr_group[w] == g && int'(wr_loc[w].bank) == b) begin
              taken[b]  = 1'b1;
              wr_gnt[w] = 1'b1;
            end
      end
    end
  end

  always_comb begin
    for (int b = 0; b < NB; b++) begin
      bank_we[b]    = 1'b0;
      bank_waddr[b] = '0;
      bank_wdata[b] = '0;
      for (int w = 0; w < NWR; w++) begin
        if (wr_gnt[w] && int'(wr_loc[w].bank) == b) begin
          bank_we[b]    = 1'b1;
          bank_waddr[b] = wr_loc[w].slot;
          bank_wdata[b] = wr_val[w];
        end
      end
    end
  end

  always_comb begin
    for (int p = 0; p < NS_A; p++) sv_wr_grant[p] = wr_gnt_g[1+p];
    for (int q = 0; q < NC_A; q++) sc_wr_grant[q] = wr_gnt_g[1+NS_A+q];
  end

  // ---- banks ---------------------------------------------------------------
  for (genvar b = 0; b < NB; b++) begin : g_bank
    rf_bank #(.DEPTH(DEPTH), .DATA_W(DATA_W), .NRD(3)) u_bank (
      .clk   (clk),
      .raddr (bank_raddr[b]),
      .rdata (bank_rdata[b]),
      .we    (bank_we[b]),
      .waddr (bank_waddr[b]),
      .wdata (bank_wdata[b])
    );
  end

endmodule

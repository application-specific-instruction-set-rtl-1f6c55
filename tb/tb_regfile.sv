// tb_regfile: self-checking test of the banked register file module in
// the (1 SIMD unit, width 4, 1 scalar unit) configuration: 5 banks of 128
// words, addresses {slot, bank}. A linear model holds word L at slot L/5,
// bank L%5, so a vector at L covers words L..L+3, wrapping into the next
// slot. Each cycle a random vector read, scalar read, vector write and
// scalar write are offered; the test predicts which are granted (two
// reads and one write per bank, SIMD first), checks the read data (old
// value when the same word is written in that cycle), the grants and the
// conflict flags, and finally reads every word back through the host port.
module tb_regfile;
  localparam int NB = 5, DEPTH = 128, DW = 32, AW = 10, NW = NB * DEPTH;
  logic clk = 0;
  logic                 sv_rd_valid [1];
  logic [AW-1:0]        sv_rd_addr1 [1], sv_rd_addr2 [1];
  logic [3:0][DW-1:0]   sv_rd_data1 [1], sv_rd_data2 [1];
  logic                 sv_rd_grant [1];
  logic                 sc_rd_valid [1];
  logic [AW-1:0]        sc_rd_addr1 [1], sc_rd_addr2 [1];
  logic [DW-1:0]        sc_rd_data1 [1], sc_rd_data2 [1];
  logic                 sc_rd_grant [1];
  logic                 sv_wr_valid [1];
  logic [AW-1:0]        sv_wr_addr  [1];
  logic [3:0][DW-1:0]   sv_wr_data  [1];
  logic                 sv_wr_grant [1];
  logic                 sc_wr_valid [1];
  logic [AW-1:0]        sc_wr_addr  [1];
  logic [DW-1:0]        sc_wr_data  [1];
  logic                 sc_wr_grant [1];
  logic                 host_we;
  logic [AW-1:0]        host_waddr, host_raddr;
  logic [DW-1:0]        host_wdata, host_rdata;
  logic                 rd_conflict, wr_conflict;
  logic [DW-1:0]        model [NW];
  int checks = 0, failures = 0;
  int n_rd_conf = 0, n_wr_conf = 0, n_wrap = 0;

  regfile #(.NUM_SIMD(1), .SIMD_W(4), .NUM_SCALAR(1), .DATA_W(DW), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic logic [AW-1:0] addr_of(input int l);
    return {7'(l / NB), 3'(l % NB)};
  endfunction

  int lv1, lv2, ls1, ls2, lvw, lsw;
  int use_rd [NB];
  logic sc_rd_exp, sc_wr_exp;
  logic sv_rd_on, sc_rd_on, sv_wr_on, sc_wr_on;

  initial begin
    sv_rd_valid[0] = 0; sc_rd_valid[0] = 0; sv_wr_valid[0] = 0; sc_wr_valid[0] = 0;
    sv_rd_addr1[0] = '0; sv_rd_addr2[0] = '0; sc_rd_addr1[0] = '0; sc_rd_addr2[0] = '0;
    sv_wr_addr[0] = '0; sv_wr_data[0] = '0; sc_wr_addr[0] = '0; sc_wr_data[0] = '0;
    host_we = 0; host_waddr = '0; host_wdata = '0; host_raddr = '0;
    // preload through the host port
    for (int l = 0; l < NW; l++) begin
      @(negedge clk);
      host_we = 1; host_waddr = addr_of(l); host_wdata = $urandom; model[l] = host_wdata;
    end
    @(negedge clk);
    host_we = 0;
    for (int l = 0; l < NW; l += 7) begin
      host_raddr = addr_of(l);
      #1;
      check(host_rdata == model[l], "host read after preload");
    end
    // random traffic
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      sv_rd_on = $urandom_range(0, 3) != 0;
      sc_rd_on = $urandom_range(0, 3) != 0;
      sv_wr_on = $urandom_range(0, 2) == 0;
      sc_wr_on = $urandom_range(0, 2) == 0;
      lv1 = $urandom_range(0, NW - 4); lv2 = $urandom_range(0, NW - 4);
      ls1 = $urandom_range(0, NW - 1); ls2 = $urandom_range(0, NW - 1);
      lvw = $urandom_range(0, NW - 4); lsw = $urandom_range(0, NW - 1);
      if (n % 50 == 0) begin ls1 = lvw; sc_rd_on = 1; sv_wr_on = 1; end
      sv_rd_valid[0] = sv_rd_on; sv_rd_addr1[0] = addr_of(lv1); sv_rd_addr2[0] = addr_of(lv2);
      sc_rd_valid[0] = sc_rd_on; sc_rd_addr1[0] = addr_of(ls1); sc_rd_addr2[0] = addr_of(ls2);
      sv_wr_valid[0] = sv_wr_on; sv_wr_addr[0] = addr_of(lvw);
      for (int e = 0; e < 4; e++) sv_wr_data[0][e] = $urandom;
      sc_wr_valid[0] = sc_wr_on; sc_wr_addr[0] = addr_of(lsw); sc_wr_data[0] = $urandom;
      // expected grants
      for (int b = 0; b < NB; b++) use_rd[b] = 0;
      if (sv_rd_on) for (int e = 0; e < 4; e++) begin
        use_rd[(lv1 + e) % NB]++;
        use_rd[(lv2 + e) % NB]++;
      end
      use_rd[ls1 % NB]++;
      use_rd[ls2 % NB]++;
      sc_rd_exp = 1'b1;
      for (int b = 0; b < NB; b++) if (use_rd[b] > 2) sc_rd_exp = 1'b0;
      sc_wr_exp = 1'b1;
      if (sv_wr_on) for (int e = 0; e < 4; e++) if ((lvw + e) % NB == lsw % NB) sc_wr_exp = 1'b0;
      #1;
      if (sv_rd_on) begin
        check(sv_rd_grant[0], "vector read granted");
        if ((lv1 % NB) != 0) n_wrap++;
        for (int e = 0; e < 4; e++) begin
          check(sv_rd_data1[0][e] == model[lv1 + e], "vector read data 1");
          check(sv_rd_data2[0][e] == model[lv2 + e], "vector read data 2");
        end
      end
      if (sc_rd_on) begin
        check(sc_rd_grant[0] == sc_rd_exp, "scalar read grant");
        if (sc_rd_grant[0]) begin
          check(sc_rd_data1[0] == model[ls1], "scalar read data 1");
          check(sc_rd_data2[0] == model[ls2], "scalar read data 2");
        end
      end
      check(rd_conflict == (sc_rd_on && !sc_rd_exp), "read conflict flag");
      if (sv_wr_on) check(sv_wr_grant[0], "vector write granted");
      if (sc_wr_on) check(sc_wr_grant[0] == sc_wr_exp, "scalar write grant");
      check(wr_conflict == (sc_wr_on && !sc_wr_exp), "write conflict flag");
      if (rd_conflict) n_rd_conf++;
      if (wr_conflict) n_wr_conf++;
      @(posedge clk);
      if (sv_wr_on) for (int e = 0; e < 4; e++) model[lvw + e] = sv_wr_data[0][e];
      if (sc_wr_on && sc_wr_exp) model[lsw] = sc_wr_data[0];
    end
    @(negedge clk);
    sv_rd_valid[0] = 0; sc_rd_valid[0] = 0; sv_wr_valid[0] = 0; sc_wr_valid[0] = 0;
    for (int l = 0; l < NW; l++) begin
      host_raddr = addr_of(l);
      #1;
      check(host_rdata == model[l], "final contents");
    end
    check(n_rd_conf > 0 && n_wr_conf > 0 && n_wrap > 0, "conflicts and wrapped vectors seen");
    $display("read conflicts %0d write conflicts %0d wrapped vectors %0d", n_rd_conf, n_wr_conf, n_wrap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

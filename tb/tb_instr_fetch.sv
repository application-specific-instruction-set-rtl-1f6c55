// tb_instr_fetch: self-checking test of the instruction fetch stage with
// one SIMD slot and two scalar slots. A random program (with no-operation
// slots) is loaded; the pipelines' ready signals are random. The test
// checks that every slot receives exactly its non-NOP instructions in
// program order, that the slots of one bundle leave in the same cycle,
// that the stage stops after prog_len bundles, and that with all
// pipelines ready it issues one bundle per cycle.
module tb_instr_fetch;
  import asip_pkg::*;
  localparam int NS = 1, NC = 2, DEPTH = 4096, SVW = 42, SCW = 34, P = 200;
  logic clk = 0, rst_n = 0;
  logic start, running, issue, stall;
  logic [12:0] prog_len;
  logic ld_we;
  logic [1:0] ld_slot;
  logic [11:0] ld_addr;
  logic [41:0] ld_data;
  logic sv_valid [NS], sv_ready [NS];
  logic [SVW-1:0] sv_instr [NS];
  logic sc_valid [NC], sc_ready [NC];
  logic [SCW-1:0] sc_instr [NC];
  logic [41:0] prog [3][P];
  int checks = 0, failures = 0;

  instr_fetch #(.NUM_SIMD(NS), .NUM_SCALAR(NC), .DEPTH(DEPTH), .SV_IW(SVW), .SC_IW(SCW)) dut (.*);

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

  function automatic logic real_op(input logic [3:0] op);
    return op >= 1 && op <= 8;
  endfunction

  int exp_ptr [3];
  int issued, cyc, run;
  logic rdy_all;

  // bundle position of the next expected instruction of each slot
  function automatic int next_real(input int s, input int from);
    int k = from;
    while (k < P && !real_op(prog[s][k][(s == 0 ? SVW : SCW) - 1 -: 4])) k++;
    return k;
  endfunction

  initial begin
    start = 0; prog_len = '0; ld_we = 0; ld_slot = '0; ld_addr = '0; ld_data = '0;
    sv_ready[0] = 0; sc_ready[0] = 0; sc_ready[1] = 0; rdy_all = 0;
    for (int k = 0; k < P; k++) begin
      prog[0][k] = {4'($urandom_range(0, 10)), 38'({$urandom, $urandom})};
      prog[1][k] = {8'h0, 4'($urandom_range(0, 10)), 30'($urandom)};
      prog[2][k] = {8'h0, 4'($urandom_range(0, 10)), 30'($urandom)};
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 3; s++)
      for (int k = 0; k < P; k++) begin
        @(negedge clk);
        ld_we = 1; ld_slot = 2'(s); ld_addr = 12'(k); ld_data = prog[s][k];
      end
    @(negedge clk);
    ld_we = 0;
    for (run = 0; run < 2; run++) begin
      rdy_all = (run == 1);
      for (int s = 0; s < 3; s++) exp_ptr[s] = next_real(s, 0);
      prog_len = 13'(P);
      start = 1;
      @(negedge clk);
      start = 0;
      issued = 0; cyc = 0;
      while (running) begin
        sv_ready[0] = rdy_all || ($urandom_range(0, 3) != 0);
        sc_ready[0] = rdy_all || ($urandom_range(0, 3) != 0);
        sc_ready[1] = rdy_all || ($urandom_range(0, 3) != 0);
        #1;
        if (sv_valid[0]) begin
          check(sv_ready[0], "no write into a full FIFO");
          check(exp_ptr[0] < P && sv_instr[0] == prog[0][exp_ptr[0]][SVW-1:0], "SIMD slot order");
        end
        for (int q = 0; q < NC; q++) if (sc_valid[q]) begin
          check(sc_ready[q], "no write into a full FIFO");
          check(exp_ptr[q+1] < P && sc_instr[q] == prog[q+1][exp_ptr[q+1]][SCW-1:0], "scalar slot order");
        end
        if (issue) begin
          // every slot whose next real instruction is in this bundle must send it
          if (exp_ptr[0] == issued) check(sv_valid[0], "bundle slot 0 together");
          if (exp_ptr[1] == issued) check(sc_valid[0], "bundle slot 1 together");
          if (exp_ptr[2] == issued) check(sc_valid[1], "bundle slot 2 together");
          for (int s = 0; s < 3; s++) if (exp_ptr[s] == issued) exp_ptr[s] = next_real(s, issued + 1);
          issued++;
        end
        @(negedge clk);
        cyc++;
      end
      check(issued == P, "prog_len bundles issued");
      for (int s = 0; s < 3; s++) check(exp_ptr[s] == P, "all instructions delivered");
      if (run == 1) check(cyc == P, "one bundle per cycle when ready");
      repeat (3) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

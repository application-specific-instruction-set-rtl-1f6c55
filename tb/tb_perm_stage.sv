// tb_perm_stage: self-checking test of the permutation stage.
// Checks the reset table (rotations, broadcasts, reversal), then loads a
// table from tb/perm_example.hex through the write port (entry 1 is the
// order 2,3,1,0) and checks out[i] = in[entry[i]] for both operands with
// random vectors and addresses. A second instance is preloaded from the
// same file at reset (INIT_FILE) and must hold the same table.
module tb_perm_stage;
  localparam int W = 4, DW = 32, PD = 16;
  logic clk = 0, rst_n = 0;
  logic                pm_we;
  logic [3:0]          pm_waddr, paddr1, paddr2;
  logic [W-1:0][1:0]   pm_wdata;
  logic [W-1:0][DW-1:0] vin1, vin2, vout1, vout2;
  logic [7:0]          table_q [PD];
  int checks = 0, failures = 0;

  logic [W-1:0][DW-1:0] vf1, vf2;

  perm_stage #(.SIMD_W(W), .DATA_W(DW), .PERM_DEPTH(PD)) dut (.*);

  perm_stage #(.SIMD_W(W), .DATA_W(DW), .PERM_DEPTH(PD), .INIT_FILE("tb/perm_example.hex")) dut_f (
    .clk, .rst_n, .pm_we(1'b0), .pm_waddr('0), .pm_wdata('0),
    .paddr1, .paddr2, .vin1, .vin2, .vout1(vf1), .vout2(vf2)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // source index of output element i for default entry p
  function automatic int def_src(input int p, input int i);
    if (p < W) return (i + p) % W;
    if (p < 2 * W) return p - W;
    return W - 1 - i;
  endfunction

  initial begin
    pm_we = 0; pm_waddr = '0; pm_wdata = '0; paddr1 = '0; paddr2 = '0;
    for (int i = 0; i < W; i++) begin vin1[i] = 32'(100 + i); vin2[i] = 32'(200 + i); end
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int p = 0; p < PD; p++) begin
      paddr1 = 4'(p); paddr2 = 4'((p + 5) % PD);
      #1;
      for (int i = 0; i < W; i++) begin
        check(vout1[i] == 32'(100 + def_src(p, i)), "default table op1");
        check(vout2[i] == 32'(200 + def_src((p + 5) % PD, i)), "default table op2");
      end
    end
    // the instance preloaded from the file holds the file's table from reset
    $readmemh("tb/perm_example.hex", table_q);
    for (int p = 0; p < PD; p++) begin
      paddr1 = 4'(p); paddr2 = 4'((p + 3) % PD);
      #1;
      for (int i = 0; i < W; i++) begin
        check(vf1[i] == vin1[table_q[p][2*i +: 2]], "preloaded table op1");
        check(vf2[i] == vin2[table_q[(p + 3) % PD][2*i +: 2]], "preloaded table op2");
      end
    end
    // load the same table through the write port
    for (int p = 0; p < PD; p++) begin
      @(negedge clk);
      pm_we = 1; pm_waddr = 4'(p); pm_wdata = table_q[p];
    end
    @(negedge clk);
    pm_we = 0;
    // the example from the description: 2,3,1,0
    paddr1 = 4'd1; paddr2 = 4'd0;
    #1;
    check(vout1[0] == 102 && vout1[1] == 103 && vout1[2] == 101 && vout1[3] == 100, "2,3,1,0");
    check(vout2[0] == 200 && vout2[3] == 203, "identity");
    for (int n = 0; n < 500; n++) begin
      for (int i = 0; i < W; i++) begin vin1[i] = $urandom; vin2[i] = $urandom; end
      paddr1 = 4'($urandom); paddr2 = 4'($urandom);
      #1;
      for (int i = 0; i < W; i++) begin
        check(vout1[i] == vin1[table_q[paddr1][2*i +: 2]], "loaded table op1");
        check(vout2[i] == vin2[table_q[paddr2][2*i +: 2]], "loaded table op2");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_rf_bank: self-checking test of one register bank.
// Fills the bank, reads it through both read ports against a model, and
// checks that a read in the cycle of a write to the same address returns
// the old value while the next cycle returns the new one.
module tb_rf_bank;
  localparam int DEPTH = 128, DW = 32, NRD = 2;
  logic clk = 0;
  logic [6:0]    raddr [NRD];
  logic [DW-1:0] rdata [NRD];
  logic          we;
  logic [6:0]    waddr;
  logic [DW-1:0] wdata;
  logic [DW-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  rf_bank #(.DEPTH(DEPTH), .DATA_W(DW), .NRD(NRD)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    we = 0; waddr = '0; wdata = '0; raddr[0] = '0; raddr[1] = '0;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1; waddr = 7'(a); wdata = $urandom; model[a] = wdata;
    end
    @(negedge clk);
    we = 0;
    for (int i = 0; i < 300; i++) begin
      raddr[0] = 7'($urandom_range(0, DEPTH - 1));
      raddr[1] = 7'($urandom_range(0, DEPTH - 1));
      #1;
      check(rdata[0] == model[raddr[0]], "port 0 read");
      check(rdata[1] == model[raddr[1]], "port 1 read");
      @(negedge clk);
    end
    // read during write
    we = 1; waddr = 7'd17; wdata = 32'hDEAD_BEEF; raddr[0] = 7'd17; raddr[1] = 7'd17;
    #1;
    check(rdata[0] == model[17] && rdata[1] == model[17], "old value during write");
    @(negedge clk);
    we = 0;
    #1;
    check(rdata[0] == 32'hDEAD_BEEF, "new value after write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

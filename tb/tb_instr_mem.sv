// tb_instr_mem: self-checking test of a slot's instruction memory.
// Writes random words at random addresses through the load port, keeps a
// model copy, and reads every written address back combinationally.
module tb_instr_mem;
  localparam int DEPTH = 4096, W = 42;
  logic clk = 0;
  logic we;
  logic [11:0] waddr, raddr;
  logic [W-1:0] wdata, rdata;
  logic [W-1:0] model [int];
  int checks = 0, failures = 0;

  instr_mem #(.DEPTH(DEPTH), .WIDTH(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = '0; raddr = '0; wdata = '0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      we    = 1;
      waddr = 12'($urandom_range(0, DEPTH - 1));
      wdata = {10'($urandom), $urandom};
      model[int'(waddr)] = wdata;
    end
    @(negedge clk);
    we = 0;
    foreach (model[a]) begin
      raddr = 12'(a);
      #1;
      checks++;
      if (rdata !== model[a]) begin
        failures++;
        $display("FAIL addr %0d got %h exp %h", a, rdata, model[a]);
      end
    end
    // write then read in the next cycle
    @(negedge clk);
    we = 1; waddr = 12'd4095; wdata = 42'h2AB_CDEF_0123;
    @(negedge clk);
    we = 0; raddr = 12'd4095;
    #1;
    checks++;
    if (rdata !== 42'h2AB_CDEF_0123) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_program_memory: self-checking test of the 1024 x 32-bit program memory:
// writes through the load port over the whole address range, reads with a
// one-cycle latency, and the read register holding its word while `ren` is
// low.
module tb_program_memory;
  logic        clk = 0, ren = 0, we = 0;
  logic [9:0]  raddr = '0, waddr = '0;
  logic [31:0] wdata = '0, rdata;
  logic [31:0] model [1024];
  int checks = 0, failures = 0;

  program_memory #(.W(32), .DEPTH(1024)) dut (
    .clk(clk), .ren(ren), .raddr(raddr), .rdata(rdata), .we(we), .waddr(waddr), .wdata(wdata));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] held;
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk);
      we = 1; waddr = 10'(i); wdata = $urandom; model[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      ren = 1; raddr = 10'($urandom);
      @(posedge clk); #1;
      checks++;
      if (rdata !== model[raddr]) begin failures++; $display("FAIL read %0d", raddr); end
      held = rdata;
      @(negedge clk);
      ren = 0; raddr = raddr + 1'b1;
      @(posedge clk); #1;
      checks++;
      if (rdata !== held) begin failures++; $display("FAIL hold"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

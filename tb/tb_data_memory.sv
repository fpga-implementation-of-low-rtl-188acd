// tb_data_memory: self-checking test of the 16-bit data memory: initial
// contents zero, random writes and reads against a reference array, one-cycle
// read latency (data appear after the rising edge that samples the address).
module tb_data_memory;
  logic        clk = 0, we = 0;
  logic [7:0]  addr = '0;
  logic [15:0] wdata = '0, rdata;
  logic [15:0] model [256];
  int checks = 0, failures = 0;

  data_memory #(.W(16), .DEPTH(256)) dut (.clk(clk), .we(we), .addr(addr), .wdata(wdata), .rdata(rdata));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] expect_q;
    foreach (model[i]) model[i] = '0;
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      we = (n < 100) || ($urandom % 3 == 0);
      addr = (n < 100) ? 8'($urandom % 16) : 8'($urandom % 24);
      wdata = 16'($urandom);
      @(posedge clk);
      expect_q = model[addr];          // read-before-write
      if (we) model[addr] = wdata;
      #1;
      if (!we || n >= 100) begin
        checks++;
        if (rdata !== expect_q) begin
          failures++;
          $display("FAIL addr=%0d rdata=%h exp=%h", addr, rdata, expect_q);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

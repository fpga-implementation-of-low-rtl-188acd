// tb_register_file: self-checking test of the four 16-bit registers: reset
// to zero, random writes with both read ports checked against a reference
// array, and the write-through of a register written in the same cycle.
module tb_register_file;
  logic        clk = 0, rst_n = 0, we = 0;
  logic [1:0]  waddr = '0, raddr1 = '0, raddr2 = '0;
  logic [15:0] wdata = '0, rdata1, rdata2;
  logic [15:0] model [4];
  int checks = 0, failures = 0;

  register_file #(.W(16), .NREG(4)) dut (
    .clk(clk), .rst_n(rst_n), .we(we), .waddr(waddr), .wdata(wdata),
    .raddr1(raddr1), .rdata1(rdata1), .raddr2(raddr2), .rdata2(rdata2));

  always #5 clk = ~clk;

  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (model[i]) model[i] = '0;
    #12 rst_n = 1;
    for (int i = 0; i < 4; i++) begin
      raddr1 = 2'(i); raddr2 = 2'(3 - i); #1;
      chk(rdata1 == 16'h0 && rdata2 == 16'h0, "reset value");
    end
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      we = $urandom % 2; waddr = 2'($urandom); wdata = 16'($urandom);
      raddr1 = 2'($urandom); raddr2 = 2'($urandom);
      #1;
      chk(rdata1 == ((we && waddr == raddr1) ? wdata : model[raddr1]), "read port 1");
      chk(rdata2 == ((we && waddr == raddr2) ? wdata : model[raddr2]), "read port 2");
      @(posedge clk);
      if (we) model[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_lfsr_tpg: self-checking test of the test pattern generator. The
// sequence is compared with a reference written as a Galois-free bit loop
// (new bit = b31 ^ b21 ^ b1 ^ b0, shifted in at the bottom), the register
// must not change while `en` is low, `load` must restart at the seed, and
// no state of the first 5000 may repeat the seed early or be zero.
module tb_lfsr_tpg;
  logic        clk = 0, rst_n = 0, load = 0, en = 0;
  logic [31:0] pattern, model;
  int checks = 0, failures = 0;

  lfsr_tpg #(.W(32), .SEED(32'h1BAD_5EED)) dut (.clk(clk), .rst_n(rst_n), .load(load), .en(en), .pattern(pattern));

  always #5 clk = ~clk;

  function automatic logic [31:0] step(logic [31:0] s);
    logic b = s[31] ^ s[21] ^ s[1] ^ s[0];
    return {s[30:0], b};
  endfunction

  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s pattern=%h model=%h", what, pattern, model); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = 32'h1BAD_5EED;
    #12 rst_n = 1;
    #1 chk(pattern == model, "seed after reset");
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      en = (n % 7) != 3;
      @(posedge clk);
      if (en) model = step(model);
      #1;
      if (n % 50 == 0 || !en) chk(pattern == model, "sequence");
      if (en && n > 0) chk(pattern != 32'h1BAD_5EED && pattern != 0, "no short cycle");
    end
    @(negedge clk); load = 1;
    @(posedge clk); #1 chk(pattern == 32'h1BAD_5EED, "reload");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_misr_compactor: self-checking test of the 40-bit MISR against a
// reference update (shift left, feedback b39^b37^b20^b18, XOR the inputs),
// with random enables, a clear in the middle, and a check that one flipped
// response bit changes the final signature.
module tb_misr_compactor;
  logic        clk = 0, rst_n = 0, clr = 0, en = 0;
  logic [39:0] d = '0, sig, model;
  logic [39:0] resp [200];
  int checks = 0, failures = 0;

  misr_compactor #(.W(40)) dut (.clk(clk), .rst_n(rst_n), .clr(clr), .en(en), .d(d), .sig(sig));

  always #5 clk = ~clk;

  function automatic logic [39:0] step(logic [39:0] m, logic [39:0] x);
    logic fb = m[39] ^ m[37] ^ m[20] ^ m[18];
    return {m[38:0], fb} ^ x;
  endfunction

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int flip, output logic [39:0] final_sig);
    @(negedge clk); clr = 1; en = 0;
    @(negedge clk); clr = 0;
    model = '0;
    for (int n = 0; n < 200; n++) begin
      en = (n % 5) != 2;
      d  = resp[n] ^ ((n == flip) ? 40'h1 << 7 : 40'h0);
      @(posedge clk);
      if (en) model = step(model, d);
      #1;
      checks++;
      if (sig !== model) begin failures++; $display("FAIL n=%0d sig=%h model=%h", n, sig, model); end
      @(negedge clk);
    end
    en = 0;
    final_sig = sig;
  endtask

  initial begin
    logic [39:0] s_good, s_bad;
    foreach (resp[i]) resp[i] = {8'($urandom), 32'($urandom)};
    #12 rst_n = 1;
    run(-1, s_good);
    run(100, s_bad);
    checks++;
    if (s_good == s_bad) begin failures++; $display("FAIL single-bit error not detected"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

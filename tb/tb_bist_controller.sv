// tb_bist_controller: self-checking test of the BIST test controller with a
// small pattern count (N_PATTERNS = 8, 4 passes). The environment is modelled
// in the testbench: random Razor error cycles, a signature input and golden
// signatures. Checked: bist_mode covers the whole test; each pass clears the
// accumulator and reloads the generator once, advances the generator exactly
// N_PATTERNS times and enables the MISR exactly N_PATTERNS times, never during
// a Razor error cycle; a signature mismatch in pass 2 sets only fail_mask[2]
// and clears `pass`; a second run with matching signatures passes.
module tb_bist_controller;
  import ptmac_pkg::*;
  logic        clk = 0, rst_n = 0, start = 0, razor_err = 0;
  logic [39:0] sig = '0, rom_sig;
  logic [1:0]  rom_addr;
  logic        bist_mode, tpg_load, tpg_en, misr_clr, misr_en, done, pass;
  acc_op_e     acc_op;
  logic [3:0]  fail_mask;
  int checks = 0, failures = 0;
  int n_clr [4], n_load [4], n_tpg [4], n_misr [4];
  int bad_level = 2;

  bist_controller #(.N_PATTERNS(8), .N_LEVELS(4), .SIG_W(40)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .razor_err(razor_err), .sig(sig),
    .rom_sig(rom_sig), .rom_addr(rom_addr), .bist_mode(bist_mode), .acc_op(acc_op),
    .tpg_load(tpg_load), .tpg_en(tpg_en), .misr_clr(misr_clr), .misr_en(misr_en),
    .done(done), .pass(pass), .fail_mask(fail_mask));

  always #5 clk = ~clk;

  // Golden value per level; the "MISR" returns it except in the bad level.
  assign rom_sig = 40'h10_0000_0000 + 40'(rom_addr);
  always_comb sig = (int'(rom_addr) == bad_level) ? rom_sig ^ 40'h1 : rom_sig;

  always @(posedge clk) if (rst_n) begin
    if (acc_op == ACC_CLR && !razor_err) n_clr[rom_addr]++;
    if (tpg_load) n_load[rom_addr]++;
    if (tpg_en) n_tpg[rom_addr]++;
    if (misr_en) n_misr[rom_addr]++;
    if (misr_en && razor_err) begin failures++; $display("FAIL MISR enabled during Razor error"); end
    if (tpg_en && acc_op != ACC_ADD) begin failures++; $display("FAIL step without accumulate"); end
    if ((tpg_en || misr_en || acc_op != ACC_NOP) && !bist_mode) begin failures++; $display("FAIL activity outside bist_mode"); end
  end

  // Random Razor error cycles (never two in a row, as in the accumulator).
  always @(negedge clk) razor_err <= !razor_err && ($urandom % 5 == 0);

  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run_test(int bad, int exp_mask);
    bad_level = bad;
    foreach (n_clr[i]) begin n_clr[i] = 0; n_load[i] = 0; n_tpg[i] = 0; n_misr[i] = 0; end
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    chk(bist_mode, "bist_mode after start");
    wait (done);
    @(negedge clk);
    chk(!bist_mode, "bist_mode released");
    for (int i = 0; i < 4; i++) begin
      chk(n_clr[i] == 1 && n_load[i] >= 1, "one clear per pass");
      chk(n_tpg[i] == 8, "N_PATTERNS generator steps");
      chk(n_misr[i] == 8, "N_PATTERNS MISR steps");
    end
    chk(int'(fail_mask) == exp_mask, "fail mask");
    chk(pass == (exp_mask == 0), "pass flag");
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12 rst_n = 1;
    repeat (3) @(posedge clk);
    chk(!bist_mode && !done, "idle after reset");
    run_test(2, 4'b0100);
    run_test(-1, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

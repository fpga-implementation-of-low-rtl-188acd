// tb_lt_ptmac_top: end-to-end test of the low-power testable Razor PTMAC at
// its default parameters.
//
//  1. A program is loaded through the SPI port (bit-banged mode 0 master).
//  2. The processor runs it while the accumulator's captures are randomly
//     made late: it reads the input port, accumulates four products in a
//     counted loop, switches the truncation level, multiplies again, goes to
//     sleep, is woken, writes the output port and halts. The output values
//     are checked against values computed here.
//  3. The built-in self-test is started twice, without and with late
//     captures; both runs must report pass, and the second must have had
//     Razor corrections.
//  4. The status word is read back through SPI.
// Every mechanism is counted (SPI writes, hazard stalls, taken branches,
// truncation switches, Razor corrections in program and in test mode,
// sleep, wake, halt, BIST passes, status readback); one that never happened
// counts as a failure.
module tb_lt_ptmac_top;
  import ptmac_pkg::*;

  logic        clk = 0, rst_n = 0, run = 0, wake = 0, tv_late = 0;
  logic [15:0] in_port = 16'h3A5C;
  logic [39:0] out_port;
  logic        out_valid;
  logic        spi_sclk = 0, spi_cs_n = 1, spi_mosi = 0, spi_miso;
  logic        bist_start = 0, bist_done, bist_pass;
  logic [3:0]  bist_fail_mask;
  logic        razor_err, sleeping, halted;
  logic [15:0] razor_err_count;
  logic [9:0]  pc;

  lt_ptmac_top dut (
    .clk(clk), .rst_n(rst_n), .run(run), .wake(wake), .tv_late(tv_late),
    .in_port(in_port), .out_port(out_port), .out_valid(out_valid),
    .spi_sclk(spi_sclk), .spi_cs_n(spi_cs_n), .spi_mosi(spi_mosi), .spi_miso(spi_miso),
    .bist_start(bist_start), .bist_done(bist_done), .bist_pass(bist_pass),
    .bist_fail_mask(bist_fail_mask), .razor_err(razor_err),
    .razor_err_count(razor_err_count), .sleeping(sleeping), .halted(halted), .pc(pc));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_spi_wr = 0, n_hazard = 0, n_branch = 0, n_trn = 0, n_err_prog = 0, n_err_bist = 0;
  int n_sleep = 0, n_wake = 0, n_halt = 0, n_bist_pass = 0, n_status = 0;
  int late_pct = 0;
  logic [39:0] got [$];

  always @(negedge clk) tv_late <= ($urandom % 100) < late_pct;

  always @(posedge clk) begin
    if (out_valid) got.push_back(out_port);
    if (dut.pm_we) n_spi_wr++;
    if (dut.u_core.hazard && !dut.u_core.stall_e) n_hazard++;
    if (dut.u_core.branch_taken && dut.u_core.r_ins.op == OP_BNZ) n_branch++;
    if (dut.u_core.e_commit && dut.u_core.e_ins.op == OP_TRN) n_trn++;
    if (razor_err && !dut.bist_mode) n_err_prog++;
    if (razor_err && dut.bist_mode) n_err_bist++;
  end

  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  task automatic spi_frame(logic [47:0] word, output logic [47:0] rx);
    spi_cs_n = 0;
    repeat (8) @(posedge clk);
    for (int i = 47; i >= 0; i--) begin
      spi_mosi = word[i];
      repeat (4) @(posedge clk);
      spi_sclk = 1;
      rx = {rx[46:0], spi_miso};
      repeat (4) @(posedge clk);
      spi_sclk = 0;
    end
    repeat (4) @(posedge clk);
    spi_cs_n = 1;
    repeat (6) @(posedge clk);
  endtask

  // Truncated product: exact product minus the Baugh-Wooley partial-product
  // bits of the removed columns (inverted terms where one index is 15), plus
  // the compensation C(T), low T bits cleared.
  function automatic logic [31:0] tmul(logic [15:0] x, logic [15:0] y, int t);
    longint r = longint'($signed(x)) * longint'($signed(y));
    logic b;
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        b = x[i] & y[j];
        if ((i == 15) != (j == 15)) b = !b;
        if (i + j < t && b) r -= longint'(1) << (i + j);
      end
    if (t > 0) r += ((longint'(t - 1) << t) + 1) / 4;
    r = r & ~((longint'(1) << t) - 1);
    return r[31:0];
  endfunction

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    instr_t prog [$];
    logic [47:0] rx;
    logic [39:0] exp_out [3];
    int c, e_before;

    prog.push_back(mk_instr(OP_TRN,  0, 0, 0, 16'd0));
    prog.push_back(mk_instr(OP_CLRA, 0, 0, 0, 16'd0));
    prog.push_back(mk_instr(OP_LDI,  2, 0, 0, 16'd4));
    prog.push_back(mk_instr(OP_IN,   0, 0, 0, 16'd0));
    prog.push_back(mk_instr(OP_LDI,  1, 0, 0, 16'h4000));
    prog.push_back(mk_instr(OP_MAC,  0, 0, 1, 16'd0));     // 5: loop
    prog.push_back(mk_instr(OP_ADDI, 2, 2, 0, 16'hFFFF));
    prog.push_back(mk_instr(OP_BNZ,  0, 2, 0, 16'd5));
    prog.push_back(mk_instr(OP_OUTA, 0, 0, 0, 16'd0));
    prog.push_back(mk_instr(OP_TRN,  0, 0, 0, 16'd16));
    prog.push_back(mk_instr(OP_MUL,  0, 0, 1, 16'd0));
    prog.push_back(mk_instr(OP_OUTA, 0, 0, 0, 16'd0));
    prog.push_back(mk_instr(OP_SLEEP, 0, 0, 0, 16'd0));
    prog.push_back(mk_instr(OP_OUT,  0, 0, 0, 16'd0));
    prog.push_back(mk_instr(OP_HALT, 0, 0, 0, 16'd0));
    exp_out[0] = 40'(longint'($signed(in_port)) * 16384 * 4);
    exp_out[1] = 40'($signed(tmul(in_port, 16'h4000, 16)));
    exp_out[2] = 40'($signed(in_port));

    #22 rst_n = 1;
    repeat (4) @(posedge clk);

    // 1. load the program through SPI
    foreach (prog[i]) spi_frame({16'(i), 32'(prog[i])}, rx);
    chk(n_spi_wr == prog.size(), "SPI program writes");

    // 2. run it with late captures
    late_pct = 30;
    @(negedge clk) run = 1;
    c = 0;
    do begin @(posedge clk); #1; c++; end while (!sleeping && c < 2000);
    chk(sleeping, "reached sleep");
    if (sleeping) n_sleep++;
    repeat (10) @(posedge clk);
    chk(got.size() == 2, "no output while asleep beyond the first two");
    @(negedge clk) wake = 1;
    @(negedge clk) wake = 0;
    n_wake++;
    c = 0;
    do begin @(posedge clk); #1; c++; end while (!halted && c < 2000);
    chk(halted, "reached halt");
    if (halted) n_halt++;
    late_pct = 0;
    repeat (5) @(posedge clk);
    chk(got.size() == 3, "three outputs");
    for (int i = 0; i < 3; i++) begin
      checks++;
      if (i >= got.size() || got[i] !== exp_out[i]) begin
        failures++;
        $display("FAIL output %0d got %h expected %h", i, (i < got.size()) ? got[i] : 40'h0, exp_out[i]);
      end
    end
    @(negedge clk) run = 0;

    // 3. built-in self-test, clean and with late captures
    for (int pass_i = 0; pass_i < 2; pass_i++) begin
      e_before = n_err_bist;
      late_pct = pass_i ? 25 : 0;
      @(negedge clk) bist_start = 1;
      @(negedge clk) bist_start = 0;
      c = 0;
      do begin @(posedge clk); #1; c++; end while (!bist_done && c < 5000);
      late_pct = 0;
      $display("BIST run %0d: %0d cycles, %0d Razor error cycles, pass=%b mask=%b",
               pass_i, c, n_err_bist - e_before, bist_pass, bist_fail_mask);
      chk(c == 4 * (256 + 4) + (n_err_bist - e_before), "BIST duration: one extra cycle per Razor error");
      chk(bist_done && bist_pass && bist_fail_mask == 4'b0, "BIST pass");
      if (bist_pass) n_bist_pass++;
      if (pass_i == 0) chk(c == 4 * (256 + 4), "BIST duration without errors");
    end

    // 4. status word through SPI (rewrites the last program word with NOP)
    repeat (3) @(posedge clk);
    spi_frame({16'd1023, 32'h0}, rx);
    chk(rx[47] == 1'b1 && rx[46] == 1'b1 && rx[45:42] == 4'b0, "status: BIST done and passed");
    chk(rx[39:24] == razor_err_count, "status: Razor error count");
    chk(rx[23:0] == exp_out[2][23:0], "status: output port");
    n_status++;

    $display("mechanisms: spi writes %0d, hazard stalls %0d, taken branches %0d, truncation switches %0d,",
             n_spi_wr, n_hazard, n_branch, n_trn);
    $display("            Razor corrections program %0d / BIST %0d, sleep %0d, wake %0d, halt %0d, BIST passes %0d, status reads %0d",
             n_err_prog, n_err_bist, n_sleep, n_wake, n_halt, n_bist_pass, n_status);
    chk(n_spi_wr > 0, "SPI load happened");
    chk(n_hazard > 0, "hazard stall happened");
    chk(n_branch > 0, "taken branch happened");
    chk(n_trn >= 2, "truncation switch happened");
    chk(n_err_prog > 0, "Razor correction in program happened");
    chk(n_err_bist > 0, "Razor correction during BIST happened");
    chk(n_sleep > 0 && n_wake > 0 && n_halt > 0, "sleep, wake and halt happened");
    chk(n_bist_pass == 2, "both BIST runs passed");
    chk(n_status > 0, "status readback happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_fir_truncation: a filtering workload of the kind the PTMAC is meant for
// (ECG-style smoothing), run on ptmac_core at its default parameters with the
// multiplier at four truncation levels and with random Razor timing errors.
//
// The program computes an 8-tap FIR filter, y[n] = sum_k x[n+k] * h[k], for
// 64 outputs. The samples sit in data memory (preloaded by the testbench),
// the coefficients are immediates, and each output leaves through OUTA as the
// full 40-bit accumulator. The same program runs four times; only its first
// word (TRN) changes, selecting T = 0, 8, 12 and 16 truncated columns.
// About a fifth of the accumulator captures of MAC instructions are made
// late, so the Razor correction runs throughout.
//
// Checks:
//   * every output equals the sum of the truncated products computed here
//     from the Baugh-Wooley partial-product array (independent of the RTL);
//   * exactly 64 outputs per run, and the run halts;
//   * at T = 0 the outputs are the exact convolution;
//   * the error against the exact convolution stays within 8 times the
//     worst-case error of one truncated product;
//   * the error energy grows with T (the signal-to-noise ratio falls, the
//     price paid for the shorter multiplier delay);
//   * Razor errors occurred in every run and changed no result;
//   * the run takes the cycles the pipeline rules give, plus exactly one
//     per Razor error.
module tb_fir_truncation;
  import ptmac_pkg::*;

  localparam int NTAP = 8;
  localparam int NOUT = 64;
  localparam int NLEV = 4;

  logic        clk = 0, rst_n = 0, run = 0, tv_late;
  logic [39:0] out_port, acc;
  logic        out_valid, razor_err, sleeping, halted;
  logic        pm_we = 0;
  logic [9:0]  pm_waddr = '0, pc;
  logic [31:0] pm_wdata = '0;
  logic [15:0] razor_err_count;
  logic        late_rand = 0;

  ptmac_core dut (
    .clk(clk), .rst_n(rst_n), .run(run), .wake(1'b0), .tv_late(tv_late),
    .in_port(16'h0), .out_port(out_port), .out_valid(out_valid),
    .pm_we(pm_we), .pm_waddr(pm_waddr), .pm_wdata(pm_wdata),
    .bist_mode(1'b0), .bist_op(ACC_NOP), .bist_a('0), .bist_b('0), .bist_trunc('0),
    .acc(acc), .razor_err(razor_err), .sleeping(sleeping), .halted(halted), .pc(pc),
    .razor_err_count(razor_err_count));

  always #5 clk = ~clk;

  // Late accumulator captures on about 20 % of the MAC execute cycles.
  always @(negedge clk) late_rand <= ($urandom_range(99) < 20);
  assign tv_late = late_rand && dut.e_valid && dut.e_ins.op == OP_MAC && !razor_err;

  int checks = 0, failures = 0;

  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  // Truncated product: drop the partial-product bits of the Baugh-Wooley
  // array in columns below t, add the constant ((t-1)*2^t + 1)/4 and clear
  // the bits below column t.
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

  // Capture the output port.
  logic [39:0] got [$];
  always @(posedge clk) if (out_valid) got.push_back(out_port);

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int          levels [NLEV] = '{0, 8, 12, 16};
    logic [15:0] h [NTAP] = '{16'd1310, 16'd2621, 16'd4588, 16'd6554,
                              16'd6554, 16'd4588, 16'd2621, 16'd1310};
    logic [15:0] x [NOUT + NTAP];
    instr_t      prog [$];
    longint      exact [NOUT];
    real         err_energy [NLEV];
    real         sig_energy;
    longint      bound, y, e;
    logic [39:0] model;
    logic        in_bound, exact_ok, model_ok;
    int          e0, cyc;

    // Test signal: a slow wave with a sharp peak every 24 samples and some
    // noise, in 16-bit two's complement.
    for (int i = 0; i < NOUT + NTAP; i++) begin
      real v;
      v = 9000.0 * $sin(2.0 * 3.14159265 * i / 40.0);
      if (i % 24 == 5) v += 14000.0;
      if (i % 24 == 6) v -= 6000.0;
      v += real'($urandom_range(1600)) - 800.0;
      x[i] = 16'($rtoi(v));
    end

    // Program: TRN T; R0 = 0 (sample pointer); R3 = NOUT (counter);
    // loop: CLRA; 8 x {LDI R2,h[k]; LD R1,[R0+k]; MAC R1,R2}; OUTA;
    //       R0 += 1; R3 -= 1; BNZ R3,loop; HALT.
    prog.push_back(mk_instr(OP_TRN, 0, 0, 0, 16'd0));
    prog.push_back(mk_instr(OP_LDI, 0, 0, 0, 16'd0));
    prog.push_back(mk_instr(OP_LDI, 3, 0, 0, 16'(NOUT)));
    prog.push_back(mk_instr(OP_CLRA, 0, 0, 0, 16'd0));      // word 3: loop
    for (int k = 0; k < NTAP; k++) begin
      prog.push_back(mk_instr(OP_LDI, 2, 0, 0, h[k]));
      prog.push_back(mk_instr(OP_LD,  1, 0, 0, 16'(k)));
      prog.push_back(mk_instr(OP_MAC, 0, 1, 2, 16'd0));
    end
    prog.push_back(mk_instr(OP_OUTA, 0, 0, 0, 16'd0));
    prog.push_back(mk_instr(OP_ADDI, 0, 0, 0, 16'd1));
    prog.push_back(mk_instr(OP_ADDI, 3, 3, 0, 16'hFFFF));
    prog.push_back(mk_instr(OP_BNZ,  0, 3, 0, 16'd3));
    prog.push_back(mk_instr(OP_HALT, 0, 0, 0, 16'd0));

    #12 rst_n = 1;
    for (int i = 0; i < NOUT + NTAP; i++) dut.u_dmem.mem[i] = x[i];
    for (int i = 0; i < prog.size(); i++) begin
      @(negedge clk);
      pm_we = 1; pm_waddr = 10'(i); pm_wdata = prog[i];
    end
    @(negedge clk) pm_we = 0;

    sig_energy = 0.0;
    for (int n = 0; n < NOUT; n++) begin
      exact[n] = 0;
      for (int k = 0; k < NTAP; k++)
        exact[n] += longint'($signed(x[n + k])) * longint'($signed(h[k]));
      sig_energy += real'(exact[n]) * real'(exact[n]);
    end

    for (int l = 0; l < NLEV; l++) begin
      int t;
      t = levels[l];
      // Select the truncation level in the first word and run the program.
      @(negedge clk);
      pm_we = 1; pm_waddr = 10'd0; pm_wdata = mk_instr(OP_TRN, 0, 0, 0, 16'(t));
      @(negedge clk);
      pm_we = 0;
      got.delete();
      e0 = int'(razor_err_count);
      run = 1;
      cyc = 0;
      while (!halted && cyc < 20000) begin
        @(posedge clk); cyc++;
      end
      @(negedge clk) run = 0;
      chk(halted, $sformatf("T=%0d: program halted", t));
      chk(got.size() == NOUT, $sformatf("T=%0d: %0d outputs", t, got.size()));

      // A safe bound on the error of one truncated product: t*2^t + 1
      // covers every dropped column, 2^t the clearing of the low bits.
      bound = NTAP * (((longint'(t) << t) + 1) + (longint'(1) << t));
      err_energy[l] = 0.0;
      model_ok = 1; exact_ok = 1; in_bound = 1;
      for (int n = 0; n < NOUT && n < got.size(); n++) begin
        model = '0;
        for (int k = 0; k < NTAP; k++)
          model += 40'(signed'(tmul(x[n + k], h[k], t)));
        y = longint'($signed(got[n]));
        e = y - exact[n];
        if (got[n] != model) begin
          model_ok = 0;
          $display("FAIL T=%0d output %0d: %h, expected %h", t, n, got[n], model);
        end
        if (e != 0) exact_ok = 0;
        if (e > bound || -e > bound) in_bound = 0;
        err_energy[l] += real'(e) * real'(e);
      end
      chk(model_ok, $sformatf("T=%0d: outputs equal the truncated-product sums", t));
      chk(in_bound, $sformatf("T=%0d: error within %0d", t, bound));
      if (t == 0) chk(exact_ok, "T=0: outputs are the exact convolution");
      chk(int'(razor_err_count) > e0, $sformatf("T=%0d: Razor errors occurred", t));
      // Cycles to HALT: 4 to reach Read, one per instruction before HALT,
      // one hazard stall per MAC (its LD just before) and per BNZ (its
      // ADDI), two bubbles per taken branch, one per Razor error.
      chk(cyc == 4 + (3 + NOUT * (3 * NTAP + 5)) + NOUT * (NTAP + 1) + (NOUT - 1) * 2
                 + (int'(razor_err_count) - e0),
          $sformatf("T=%0d: cycle count %0d", t, cyc));
      if (err_energy[l] > 0.0)
        $display("T=%0d: %0d cycles, %0d Razor errors, SNR %0.1f dB", t, cyc,
                 int'(razor_err_count) - e0, 10.0 * $log10(sig_energy / err_energy[l]));
      else
        $display("T=%0d: %0d cycles, %0d Razor errors, exact", t, cyc,
                 int'(razor_err_count) - e0);
    end
    for (int l = 1; l < NLEV; l++)
      chk(err_energy[l] > err_energy[l - 1],
          $sformatf("error energy grows from T=%0d to T=%0d", levels[l - 1], levels[l]));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

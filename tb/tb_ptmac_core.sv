// tb_ptmac_core: self-checking program-level test of the PTMAC processor.
//
// The testbench assembles a program (a dot product of 8 samples and 8
// coefficients held in data memory, computed in a counted loop, first exactly
// and then with 12 truncated columns; shifts, accumulator moves, an input
// port read, sleep, wake and halt), loads it through the program memory
// write port and runs it. An instruction-level reference model in the
// testbench executes the same program and predicts every output port value
// and the number of cycles:
//   - one cycle per executed instruction,
//   - one extra cycle when an instruction reads a register written by the
//     instruction just before it (data hazard),
//   - two extra cycles per taken branch,
//   - SLEEP leaves the Read stage 3 + k + stalls cycles after `run` is first
//     sampled, k being its position in the executed stream.
// The program is run twice: without and with randomly emulated late captures
// of the accumulator. Outputs must be identical, and the second run must be
// longer by exactly the number of Razor error cycles. The testbench counts
// how often each mechanism happened (hazard stall, taken branch, Razor
// correction, truncation switch, sleep, wake, halt) and fails any that did
// not happen.
module tb_ptmac_core;
  import ptmac_pkg::*;

  logic               clk = 0, rst_n = 0, run = 0, wake = 0, tv_late = 0;
  logic [15:0]        in_port = 16'hF00D;
  logic [39:0]        out_port, acc;
  logic               out_valid, razor_err, sleeping, halted;
  logic               pm_we = 0;
  logic [9:0]         pm_waddr = '0, pc;
  logic [31:0]        pm_wdata = '0;
  logic [15:0]        razor_err_count;

  ptmac_core dut (
    .clk(clk), .rst_n(rst_n), .run(run), .wake(wake), .tv_late(tv_late),
    .in_port(in_port), .out_port(out_port), .out_valid(out_valid),
    .pm_we(pm_we), .pm_waddr(pm_waddr), .pm_wdata(pm_wdata),
    .bist_mode(1'b0), .bist_op(ACC_NOP), .bist_a('0), .bist_b('0), .bist_trunc('0),
    .acc(acc), .razor_err(razor_err), .sleeping(sleeping), .halted(halted), .pc(pc),
    .razor_err_count(razor_err_count));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  instr_t prog [$];
  logic [15:0] xs [8], hs [8];

  // -------------------------------------------------- reference model
  logic [39:0] exp_out [$];
  int          exp_cyc_sleep, exp_cyc_halt;
  int          n_hazard = 0, n_taken = 0, n_trn = 0;

  function automatic logic [31:0] tmul(logic [15:0] x, logic [15:0] y, int t);
    longint r = longint'($signed(x)) * longint'($signed(y));
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++)
        if (i + j < t && x[i] && y[j]) r -= longint'(1) << (i + j);
    if (t > 0) r += ((longint'(t - 1) << t) + 1) / 4;
    r = r & ~((longint'(1) << t) - 1);
    return r[31:0];
  endfunction

  function automatic logic wr(opcode_e op);
    return op inside {OP_LDI, OP_IN, OP_LD, OP_ADDI, OP_ACCH, OP_ACCL};
  endfunction
  function automatic logic rd1(opcode_e op);
    return op inside {OP_LD, OP_ST, OP_ADDI, OP_MUL, OP_MAC, OP_MSU, OP_OUT, OP_BNZ};
  endfunction
  function automatic logic rd2(opcode_e op);
    return op inside {OP_ST, OP_MUL, OP_MAC, OP_MSU};
  endfunction

  task automatic model();
    logic [15:0] r [4] = '{default: '0};
    logic [15:0] mem [256];
    logic [39:0] a = '0;
    int t = 0, p = 0, k = 0, stalls = 0, prev_rd = -1;
    bit after_sleep = 0;
    foreach (mem[i]) mem[i] = '0;
    forever begin
      instr_t i = prog[p];
      int np = p + 1;
      if ((rd1(i.op) && int'(i.rs1) == prev_rd) || (rd2(i.op) && int'(i.rs2) == prev_rd)) begin
        stalls++; n_hazard++;
      end
      prev_rd = wr(i.op) ? int'(i.rd) : -1;
      case (i.op)
        OP_LDI:  r[i.rd] = i.imm;
        OP_IN:   r[i.rd] = in_port;
        OP_LD:   r[i.rd] = mem[8'(r[i.rs1] + i.imm)];
        OP_ST:   mem[8'(r[i.rs1] + i.imm)] = r[i.rs2];
        OP_ADDI: r[i.rd] = r[i.rs1] + i.imm;
        OP_MUL:  a = 40'($signed(tmul(r[i.rs1], r[i.rs2], t)));
        OP_MAC:  a = a + 40'($signed(tmul(r[i.rs1], r[i.rs2], t)));
        OP_MSU:  a = a - 40'($signed(tmul(r[i.rs1], r[i.rs2], t)));
        OP_CLRA: a = '0;
        OP_SHL:  a = a << i.imm[5:0];
        OP_SHR:  a = 40'($signed(a) >>> i.imm[5:0]);
        OP_ACCH: r[i.rd] = a[31:16];
        OP_ACCL: r[i.rd] = a[15:0];
        OP_OUT:  exp_out.push_back(40'($signed(r[i.rs1])));
        OP_OUTA: exp_out.push_back(a);
        OP_TRN:  begin t = int'(i.imm[4:0]); n_trn++; end
        OP_JMP:  begin np = int'(i.imm); stalls += 2; n_taken++; end
        OP_BNZ:  if (r[i.rs1] != 0) begin np = int'(i.imm); stalls += 2; n_taken++; end
        default: ;
      endcase
      if (i.op == OP_SLEEP) begin
        exp_cyc_sleep = 3 + k + stalls;
        k = 0; stalls = 0; prev_rd = -1; after_sleep = 1;
      end else if (i.op == OP_HALT) begin
        exp_cyc_halt = 4 + k + stalls;
        break;
      end else begin
        k++;
      end
      p = np;
    end
  endtask

  // -------------------------------------------------- program
  task automatic emit(opcode_e op, int rd = 0, int rs1 = 0, int rs2 = 0, int imm = 0);
    prog.push_back(mk_instr(op, 2'(rd), 2'(rs1), 2'(rs2), 16'(imm)));
  endtask

  task automatic dot_loop();
    int top;
    emit(OP_CLRA);
    emit(OP_LDI, 2, 0, 0, 8);         // r2 = count
    emit(OP_LDI, 3, 0, 0, 0);         // r3 = pointer
    top = prog.size();
    emit(OP_LD, 0, 3, 0, 0);          // r0 = x[p]
    emit(OP_LD, 1, 3, 0, 16);         // r1 = h[p]
    emit(OP_MAC, 0, 0, 1, 0);         // acc += r0*r1   (hazard on r1)
    emit(OP_ADDI, 3, 3, 0, 1);
    emit(OP_ADDI, 2, 2, 0, 16'hFFFF); // r2 -= 1
    emit(OP_BNZ, 0, 2, 0, top);       // hazard on r2, taken 7 times
  endtask

  task automatic build();
    foreach (xs[i]) begin xs[i] = 16'($urandom); hs[i] = 16'($urandom); end
    xs[0] = 16'h8000; hs[0] = 16'h8000;
    emit(OP_LDI, 3, 0, 0, 0);
    for (int i = 0; i < 8; i++) begin
      emit(OP_LDI, 0, 0, 0, xs[i]);
      emit(OP_ST, 0, 3, 0, i);        // hazard on r0
      emit(OP_LDI, 1, 0, 0, hs[i]);
      emit(OP_NOP);
      emit(OP_ST, 0, 3, 1, 16 + i);
    end
    emit(OP_TRN, 0, 0, 0, 0);
    dot_loop();
    emit(OP_OUTA);
    emit(OP_ACCH, 1);
    emit(OP_OUT, 0, 1);
    emit(OP_ACCL, 1);
    emit(OP_OUT, 0, 1);
    emit(OP_SHR, 0, 0, 0, 5);
    emit(OP_OUTA);
    emit(OP_SHL, 0, 0, 0, 9);
    emit(OP_OUTA);
    emit(OP_TRN, 0, 0, 0, 12);
    dot_loop();
    emit(OP_OUTA);
    emit(OP_MSU, 0, 0, 1, 0);
    emit(OP_OUTA);
    emit(OP_IN, 0);
    emit(OP_MUL, 0, 0, 0, 0);
    emit(OP_OUTA);
    emit(OP_JMP, 0, 0, 0, prog.size() + 2);
    emit(OP_OUTA);                    // skipped
    emit(OP_SLEEP);
    emit(OP_LDI, 0, 0, 0, 16'h1234);
    emit(OP_OUT, 0, 0);
    emit(OP_HALT);
    emit(OP_OUTA);                    // never reached
  endtask

  // -------------------------------------------------- run
  logic [39:0] got [$];
  always @(posedge clk) if (out_valid) got.push_back(out_port);

  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  int late_pct = 0;
  always @(negedge clk) tv_late <= ($urandom % 100) < late_pct;

  task automatic run_prog(int pct, output int cyc_sleep, output int cyc_halt, output int errs);
    int c;
    int e0;
    got.delete();
    late_pct = pct;
    e0 = int'(razor_err_count);
    @(negedge clk) run = 1;
    c = 0;
    do begin @(posedge clk); #1; c++; end while (!sleeping && c < 5000);
    cyc_sleep = c;
    repeat (20) @(posedge clk);
    chk(sleeping && !halted, "stays asleep");
    @(negedge clk) wake = 1;
    @(negedge clk) wake = 0;
    c = 1;
    do begin @(posedge clk); #1; c++; end while (!halted && c < 5000);
    cyc_halt = c;
    repeat (10) @(posedge clk);
    late_pct = 0;
    repeat (4) @(posedge clk);
    errs = int'(razor_err_count) - e0;
    @(negedge clk) run = 0;
    repeat (3) @(posedge clk);
    chk(got.size() == exp_out.size(), "number of outputs");
    foreach (exp_out[i]) begin
      checks++;
      if (i >= got.size() || got[i] !== exp_out[i]) begin
        failures++;
        $display("FAIL output %0d got %h expected %h", i, (i < got.size()) ? got[i] : 40'h0, exp_out[i]);
      end
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s0, h0, e0, s1, h1, e1;
    build();
    model();
    #12 rst_n = 1;
    foreach (prog[i]) begin
      @(negedge clk);
      pm_we = 1; pm_waddr = 10'(i); pm_wdata = prog[i];
    end
    @(negedge clk) pm_we = 0;

    run_prog(0, s0, h0, e0);
    $display("clean run: %0d cycles to sleep (model %0d), %0d to halt (model %0d)", s0, exp_cyc_sleep, h0, exp_cyc_halt);
    chk(s0 == exp_cyc_sleep, "cycles to SLEEP");
    chk(h0 == exp_cyc_halt, "cycles from wake to HALT");
    chk(e0 == 0, "no Razor error without late captures");

    run_prog(40, s1, h1, e1);
    $display("late-capture run: %0d + %0d cycles, %0d Razor errors", s1, h1, e1);
    chk((s1 + h1) - (s0 + h0) == e1, "one extra cycle per Razor error");

    $display("mechanisms: hazard stalls %0d, taken branches %0d, truncation switches %0d, Razor corrections %0d",
             n_hazard, n_taken, n_trn, e1);
    chk(n_hazard > 0, "hazard stall happened");
    chk(n_taken > 0, "taken branch happened");
    chk(n_trn > 1, "truncation switch happened");
    chk(e1 > 0, "Razor correction happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

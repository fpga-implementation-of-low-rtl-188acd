// tb_razor_pipeline_example: the five-instruction Razor pipeline example,
// reproduced cycle by cycle on ptmac_core at its default parameters.
//
// Five multiply-accumulate instructions run back to back; the second one
// suffers a late capture of the accumulator. The expected stage occupancy
// (cycle numbers counted from the fetch of instruction 1):
//   instr 1: F1 D2 R3 E4 W5
//   instr 2: F2 D3 R4 E5 W6            error detected/corrected in cycle 6
//   instr 3: F3 D4 R5 E6 E7 W8         Execute repeated
//   instr 4: F4 D5 R6 R7 E8 W9         stalls in Read
//   instr 5: F5 D6 D7 R8 E9 W10        stalls in Decode
// The testbench records, every cycle, which instruction sits in Decode,
// Read and Execute (each instruction carries its number in the otherwise
// unused immediate field), and compares with this table. It also checks the
// final accumulator against the sum of the five exact products and that
// exactly one Razor error occurred.
module tb_razor_pipeline_example;
  import ptmac_pkg::*;

  logic        clk = 0, rst_n = 0, run = 0, tv_late = 0;
  logic [39:0] out_port, acc;
  logic        out_valid, razor_err, sleeping, halted;
  logic        pm_we = 0;
  logic [9:0]  pm_waddr = '0, pc;
  logic [31:0] pm_wdata = '0;
  logic [15:0] razor_err_count;

  ptmac_core dut (
    .clk(clk), .rst_n(rst_n), .run(run), .wake(1'b0), .tv_late(tv_late),
    .in_port(16'h0), .out_port(out_port), .out_valid(out_valid),
    .pm_we(pm_we), .pm_waddr(pm_waddr), .pm_wdata(pm_wdata),
    .bist_mode(1'b0), .bist_op(ACC_NOP), .bist_a('0), .bist_b('0), .bist_trunc('0),
    .acc(acc), .razor_err(razor_err), .sleeping(sleeping), .halted(halted), .pc(pc),
    .razor_err_count(razor_err_count));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  // Expected instruction number in Decode, Read, Execute per cycle 1..10
  // (0 = none of the five).
  int exp_d [11] = '{0, 0, 1, 2, 3, 4, 5, 5, 0, 0, 0};
  int exp_r [11] = '{0, 0, 0, 1, 2, 3, 4, 4, 5, 0, 0};
  int exp_e [11] = '{0, 0, 0, 0, 1, 2, 3, 3, 4, 5, 0};

  // Make the accumulator capture of instruction 2 late.
  always_comb tv_late = dut.e_valid && dut.e_ins.op == OP_MAC && dut.e_ins.imm == 16'd2 && !razor_err;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] ra [4] = '{16'h1234, 16'hF00D, 16'h7FFF, 16'h8001};
    logic [39:0] expect_acc;
    int base, cyc, d_now, r_now, e_now;
    instr_t dw;
    base = 0;
    // Set-up: registers, then the five MACs (tag = instruction number).
    #12 rst_n = 1;
    for (int i = 0; i < 4; i++) begin
      @(negedge clk);
      pm_we = 1; pm_waddr = 10'(i); pm_wdata = mk_instr(OP_LDI, 2'(i), 0, 0, ra[i]);
    end
    @(negedge clk); pm_waddr = 10'd4; pm_wdata = mk_instr(OP_CLRA, 0, 0, 0, 0);
    @(negedge clk); pm_waddr = 10'd5; pm_wdata = mk_instr(OP_NOP, 0, 0, 0, 0);
    for (int i = 1; i <= 5; i++) begin
      @(negedge clk);
      pm_waddr = 10'(5 + i);
      pm_wdata = mk_instr(OP_MAC, 0, 2'(i % 4), 2'((i + 1) % 4), 16'(i));
    end
    @(negedge clk); pm_waddr = 10'd11; pm_wdata = mk_instr(OP_HALT, 0, 0, 0, 0);
    @(negedge clk); pm_we = 0;

    expect_acc = '0;
    for (int i = 1; i <= 5; i++)
      expect_acc += 40'(longint'($signed(ra[i % 4])) * longint'($signed(ra[(i + 1) % 4])));

    @(negedge clk) run = 1;
    // Instruction 1 is at word 6: its fetch cycle is the one in which pc == 6.
    cyc = 0;
    while (cyc < 200) begin
      @(posedge clk); #1;
      cyc++;
      if (pc == 10'd6 && base == 0) base = cyc;
      if (base != 0 && cyc - base + 1 <= 10) begin
        int k;
        k = cyc - base + 1;           // cycle number of the example (after this edge)
        dw = dut.pm_rdata;
        d_now = (dut.d_valid && dw.op == OP_MAC) ? int'(dw.imm) : 0;
        r_now = (dut.r_valid && dut.r_ins.op == OP_MAC) ? int'(dut.r_ins.imm) : 0;
        e_now = (dut.e_valid && dut.e_ins.op == OP_MAC) ? int'(dut.e_ins.imm) : 0;
        checks++;
        if (d_now != exp_d[k] || r_now != exp_r[k] || e_now != exp_e[k]) begin
          failures++;
          $display("FAIL cycle %0d: D=%0d R=%0d E=%0d, expected D=%0d R=%0d E=%0d",
                   k, d_now, r_now, e_now, exp_d[k], exp_r[k], exp_e[k]);
        end else begin
          $display("cycle %0d: D=%0d R=%0d E=%0d%s", k, d_now, r_now, e_now, razor_err ? "  (repeated after the Razor correction)" : "");
        end
      end
      if (halted) break;
    end
    chk(base != 0, "program reached the example");
    chk(halted, "program halted");
    chk(acc == expect_acc, "accumulator equals the sum of the exact products");
    chk(razor_err_count == 16'd1, "exactly one Razor error");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

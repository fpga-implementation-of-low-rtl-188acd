// ptmac_core: the Razor-augmented programmable truncated multiply-accumulate
// processor (PTMAC), the circuit under test of the low-power test scheme.
//
// Organisation (after the processor block diagram): a Harvard machine with a
// 32-bit x 1024 program memory and a 16-bit data memory, four 16-bit
// registers R0-R3, an input port, a 16-bit programmable truncated multiplier
// feeding a 40-bit adder and a 40-bit Razor accumulator, a barrel shifter on
// the accumulator, and an output port. The control unit runs the five-stage
// pipeline Fetch, Decode, Read, Execute, Write. The instruction set (see
// ptmac_pkg) and all pipeline details below are this design's own.
//
// Pipeline:
//   Fetch   pc drives the program memory (synchronous read)
//   Decode  instruction word from the program memory
//   Read    register operands (write-through from Write); BNZ/JMP, SLEEP and
//           HALT are resolved here, a taken branch flushes Fetch and Decode
//           (two bubbles)
//   Execute multiply/accumulate into the Razor accumulator, barrel shift,
//           data memory access, output port, truncation level
//   Write   register write-back (ALU value or data memory read data)
// Stalls:
//   * data hazard: an instruction in Read that needs a register written by
//     the instruction in Execute waits one cycle (a bubble enters Execute);
//   * Razor error: while the accumulator reports a late capture (`razor_err`),
//     the instruction in Execute is not committed, Fetch to Execute hold and a
//     bubble enters Write. The accumulator is restored from its shadow
//     flip-flops in that cycle and the held instruction executes again in the
//     next one, as in the reference five-instruction pipeline example;
//   * BIST: while `bist_mode` is high the pipeline is frozen and the
//     accumulator, multiplier and truncation level are driven by the BIST
//     through the input multiplexer (the input MUX of the BIST structure).
// Sleep mode: SLEEP stops instruction fetch after the pipeline drains; the
// data path then does not switch. `wake` resumes at the next instruction.
// HALT stops until `run` is dropped. While `run` is low the pipeline is empty
// and pc is 0; registers, memories and the accumulator keep their contents.
//
// `tv_late` makes the accumulator's main flip-flops miss the value being
// captured (an emulated timing failure under voltage overscaling), see
// razor_reg. `razor_err_count` counts Razor error cycles (saturating), the
// error-rate observation that a supply-voltage controller would use.
module ptmac_core
  import ptmac_pkg::*;
#(
  parameter int unsigned DMEM_DEPTH = 256
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                run,
  input  logic                wake,
  input  logic                tv_late,
  // input and output ports
  input  logic [DATA_W-1:0]   in_port,
  output logic [ACC_W-1:0]    out_port,
  output logic                out_valid,
  // program memory load port (from SPI)
  input  logic                pm_we,
  input  logic [PC_W-1:0]     pm_waddr,
  input  logic [INSTR_W-1:0]  pm_wdata,
  // BIST access to the MAC unit
  input  logic                bist_mode,
  input  acc_op_e             bist_op,
  input  logic [DATA_W-1:0]   bist_a,
  input  logic [DATA_W-1:0]   bist_b,
  input  logic [TRUNC_W-1:0]  bist_trunc,
  output logic [ACC_W-1:0]    acc,
  output logic                razor_err,
  // status
  output logic                sleeping,
  output logic                halted,
  output logic [PC_W-1:0]     pc,
  output logic [15:0]         razor_err_count
);

  localparam int unsigned DM_AW = $clog2(DMEM_DEPTH);

  // ---------------------------------------------------------------- state
  logic                d_valid;
  logic [PC_W-1:0]     d_pc;
  logic [INSTR_W-1:0]  pm_rdata;

  logic                r_valid;
  instr_t              r_ins;
  logic [PC_W-1:0]     r_pc;

  logic                e_valid;
  instr_t              e_ins;
  logic [DATA_W-1:0]   e_a, e_b;

  logic                w_valid;
  logic                w_we;
  logic                w_from_mem;
  logic [REG_AW-1:0]   w_rd;
  logic [DATA_W-1:0]   w_val;

  logic [TRUNC_W-1:0]  trunc_q;

  // ------------------------------------------------------ decode helpers
  function automatic logic writes_reg(opcode_e op);
    return op inside {OP_LDI, OP_IN, OP_LD, OP_ADDI, OP_ACCH, OP_ACCL};
  endfunction
  function automatic logic uses_rs1(opcode_e op);
    return op inside {OP_LD, OP_ST, OP_ADDI, OP_MUL, OP_MAC, OP_MSU, OP_OUT, OP_BNZ};
  endfunction
  function automatic logic uses_rs2(opcode_e op);
    return op inside {OP_ST, OP_MUL, OP_MAC, OP_MSU};
  endfunction

  // ------------------------------------------------------ register bank
  logic [DATA_W-1:0] rf_rdata1, rf_rdata2, rf_wdata, dm_rdata;

  assign rf_wdata = w_from_mem ? dm_rdata : w_val;

  register_file #(.W(DATA_W), .NREG(NREG)) u_rf (
    .clk   (clk),
    .rst_n (rst_n),
    .we    (w_valid && w_we),
    .waddr (w_rd),
    .wdata (rf_wdata),
    .raddr1(r_ins.rs1),
    .rdata1(rf_rdata1),
    .raddr2(r_ins.rs2),
    .rdata2(rf_rdata2)
  );

  // ---------------------------------------------------- stall and flush
  logic hazard, stall_e, stall_r, branch_taken, stop_fetch;
  logic [PC_W-1:0] branch_target;

  always_comb begin
    hazard = r_valid && e_valid && writes_reg(e_ins.op) &&
             ((uses_rs1(r_ins.op) && r_ins.rs1 == e_ins.rd) ||
              (uses_rs2(r_ins.op) && r_ins.rs2 == e_ins.rd));
    stall_e = razor_err || bist_mode;
    stall_r = stall_e || hazard;

    branch_taken  = 1'b0;
    stop_fetch    = 1'b0;
    branch_target = r_pc + 1'b1;
    if (r_valid && !stall_r) begin
      unique case (r_ins.op)
        OP_JMP: begin
          branch_taken  = 1'b1;
          branch_target = r_ins.imm[PC_W-1:0];
        end
        OP_BNZ: begin
          branch_taken  = (rf_rdata1 != '0);
          branch_target = r_ins.imm[PC_W-1:0];
        end
        OP_SLEEP, OP_HALT: begin
          // Flush what was fetched behind it and restart at the next word.
          branch_taken = 1'b1;
          stop_fetch   = 1'b1;
        end
        default: ;
      endcase
    end
  end

  wire fetch_on = run && !sleeping && !halted && !stop_fetch;

  // ---------------------------------------------------- Fetch / Decode
  program_memory #(.W(INSTR_W), .DEPTH(PMEM_DEPTH)) u_pmem (
    .clk  (clk),
    .ren  (!stall_r),
    .raddr(pc),
    .rdata(pm_rdata),
    .we   (pm_we),
    .waddr(pm_waddr),
    .wdata(pm_wdata)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc       <= '0;
      d_valid  <= 1'b0;
      d_pc     <= '0;
      sleeping <= 1'b0;
      halted   <= 1'b0;
    end else if (!run) begin
      pc       <= '0;
      d_valid  <= 1'b0;
      sleeping <= 1'b0;
      halted   <= 1'b0;
    end else begin
      if (r_valid && !stall_r && r_ins.op == OP_SLEEP) sleeping <= 1'b1;
      else if (wake) sleeping <= 1'b0;
      if (r_valid && !stall_r && r_ins.op == OP_HALT) halted <= 1'b1;

      if (branch_taken) begin
        pc      <= branch_target;
        d_valid <= 1'b0;
      end else if (!stall_r) begin
        d_valid <= fetch_on;
        d_pc    <= pc;
        if (fetch_on) pc <= pc + 1'b1;
      end
    end
  end

  // ---------------------------------------------------- Decode -> Read
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_valid <= 1'b0;
      r_ins   <= '0;
      r_pc    <= '0;
    end else if (!run || branch_taken) begin
      r_valid <= 1'b0;
    end else if (!stall_r) begin
      r_valid <= d_valid;
      r_ins   <= instr_t'(pm_rdata);
      r_pc    <= d_pc;
    end
  end

  // ---------------------------------------------------- Read -> Execute
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e_valid <= 1'b0;
      e_ins   <= '0;
      e_a     <= '0;
      e_b     <= '0;
    end else if (!run) begin
      e_valid <= 1'b0;
    end else if (!stall_e) begin
      e_valid <= r_valid && !hazard;
      e_ins   <= r_ins;
      e_a     <= rf_rdata1;
      e_b     <= rf_rdata2;
    end
  end

  // ---------------------------------------------------- Execute
  logic              e_commit;
  acc_op_e           core_op, mac_op;
  logic [DATA_W-1:0] mul_a, mul_b;
  logic [TRUNC_W-1:0] mul_trunc;
  logic [PROD_W-1:0] prod;
  logic [ACC_W-1:0]  shifted;
  logic [DATA_W-1:0] e_addr;

  assign e_commit = e_valid && !stall_e;
  assign e_addr   = e_a + e_ins.imm;

  always_comb begin
    core_op = ACC_NOP;
    if (e_valid) begin
      unique case (e_ins.op)
        OP_MUL:         core_op = ACC_LOAD;
        OP_MAC:         core_op = ACC_ADD;
        OP_MSU:         core_op = ACC_SUB;
        OP_CLRA:        core_op = ACC_CLR;
        OP_SHL, OP_SHR: core_op = ACC_SHFT;
        default:        core_op = ACC_NOP;
      endcase
    end
  end

  // Input multiplexer: normal operands or BIST test patterns.
  assign mac_op    = bist_mode ? bist_op    : core_op;
  assign mul_a     = bist_mode ? bist_a     : e_a;
  assign mul_b     = bist_mode ? bist_b     : e_b;
  assign mul_trunc = bist_mode ? bist_trunc : trunc_q;

  pt_multiplier #(.N(DATA_W), .TRUNC_W(TRUNC_W)) u_mul (
    .a    (mul_a),
    .b    (mul_b),
    .trunc(mul_trunc),
    .p    (prod)
  );

  barrel_shifter #(.W(ACC_W), .SHAMT_W(SHAMT_W)) u_shift (
    .din (acc),
    .amt (e_ins.imm[SHAMT_W-1:0]),
    .left(e_ins.op == OP_SHL),
    .dout(shifted)
  );

  razor_accumulator #(.AW(ACC_W), .PW(PROD_W)) u_acc (
    .clk      (clk),
    .rst_n    (rst_n),
    .op       (mac_op),
    .prod     (prod),
    .shift_val(shifted),
    .late     (tv_late),
    .acc      (acc),
    .err      (razor_err)
  );

  data_memory #(.W(DATA_W), .DEPTH(DMEM_DEPTH)) u_dmem (
    .clk  (clk),
    .we   (e_commit && e_ins.op == OP_ST),
    .addr (e_addr[DM_AW-1:0]),
    .wdata(e_b),
    .rdata(dm_rdata)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      trunc_q   <= '0;
      out_port  <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (e_commit) begin
        unique case (e_ins.op)
          OP_TRN: trunc_q <= e_ins.imm[TRUNC_W-1:0];
          OP_OUT: begin
            out_port  <= {{(ACC_W - DATA_W){e_a[DATA_W-1]}}, e_a};
            out_valid <= 1'b1;
          end
          OP_OUTA: begin
            out_port  <= acc;
            out_valid <= 1'b1;
          end
          default: ;
        endcase
      end
    end
  end

  // ---------------------------------------------------- Execute -> Write
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      w_valid    <= 1'b0;
      w_we       <= 1'b0;
      w_from_mem <= 1'b0;
      w_rd       <= '0;
      w_val      <= '0;
    end else begin
      w_valid    <= e_commit;
      w_we       <= writes_reg(e_ins.op);
      w_from_mem <= (e_ins.op == OP_LD);
      w_rd       <= e_ins.rd;
      unique case (e_ins.op)
        OP_LDI:  w_val <= e_ins.imm;
        OP_IN:   w_val <= in_port;
        OP_ADDI: w_val <= e_addr;
        OP_ACCH: w_val <= acc[2*DATA_W-1:DATA_W];
        OP_ACCL: w_val <= acc[DATA_W-1:0];
        default: w_val <= '0;
      endcase
    end
  end

  // ---------------------------------------------------- Razor error rate
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) razor_err_count <= '0;
    else if (razor_err && razor_err_count != '1) razor_err_count <= razor_err_count + 1'b1;
  end

endmodule

// ptmac_pkg: widths, opcodes and the instruction format shared by the
// low-power testable Razor PTMAC processor and its built-in self-test.
//
// The 16-bit data path, the four registers R0-R3, the 40-bit accumulator and
// the 32-bit x 1024 program memory follow the processor block diagram. The
// instruction set and its encoding are this design's own: the design description names
// the instruction pipeline but publishes no instruction set.
//
// Instruction word (32 bits):
//   [31:26] opcode   [25:24] rd   [23:22] rs1   [21:20] rs2
//   [19:16] unused (zero)         [15:0]  imm (address, constant or shift)
package ptmac_pkg;

  localparam int unsigned DATA_W     = 16;    // register / data memory width
  localparam int unsigned ACC_W      = 40;    // accumulator and adder width
  localparam int unsigned PROD_W     = 2 * DATA_W;
  localparam int unsigned INSTR_W    = 32;    // program memory word
  localparam int unsigned PMEM_DEPTH = 1024;  // program memory words
  localparam int unsigned PC_W       = $clog2(PMEM_DEPTH);
  localparam int unsigned NREG       = 4;     // R0-R3
  localparam int unsigned REG_AW     = $clog2(NREG);
  localparam int unsigned TRUNC_W    = 5;     // truncated columns 0..31
  localparam int unsigned SHAMT_W    = 6;     // barrel shift amount 0..63

  typedef enum logic [5:0] {
    OP_NOP   = 6'd0,   // no operation
    OP_LDI   = 6'd1,   // rd  <= imm
    OP_IN    = 6'd2,   // rd  <= input port
    OP_LD    = 6'd3,   // rd  <= dmem[rs1 + imm]
    OP_ST    = 6'd4,   // dmem[rs1 + imm] <= rs2
    OP_ADDI  = 6'd5,   // rd  <= rs1 + imm
    OP_MUL   = 6'd6,   // acc <= P(rs1, rs2)
    OP_MAC   = 6'd7,   // acc <= acc + P(rs1, rs2)
    OP_MSU   = 6'd8,   // acc <= acc - P(rs1, rs2)
    OP_CLRA  = 6'd9,   // acc <= 0
    OP_SHL   = 6'd10,  // acc <= acc << imm[5:0]
    OP_SHR   = 6'd11,  // acc <= acc >>> imm[5:0] (arithmetic)
    OP_ACCH  = 6'd12,  // rd  <= acc[31:16]
    OP_ACCL  = 6'd13,  // rd  <= acc[15:0]
    OP_OUT   = 6'd14,  // output port <= sign-extended rs1
    OP_OUTA  = 6'd15,  // output port <= acc
    OP_TRN   = 6'd16,  // truncation level <= imm[4:0]
    OP_JMP   = 6'd17,  // pc  <= imm
    OP_BNZ   = 6'd18,  // if (rs1 != 0) pc <= imm
    OP_SLEEP = 6'd19,  // stop fetching and gate the data path until wake
    OP_HALT  = 6'd20   // stop for good (until reset)
  } opcode_e;

  typedef struct packed {
    opcode_e             op;
    logic [REG_AW-1:0]   rd;
    logic [REG_AW-1:0]   rs1;
    logic [REG_AW-1:0]   rs2;
    logic [3:0]          spare;
    logic [DATA_W-1:0]   imm;
  } instr_t;

  // Operation applied to the Razor accumulator in the Execute stage.
  typedef enum logic [2:0] {
    ACC_NOP  = 3'd0,
    ACC_LOAD = 3'd1,   // acc <= product
    ACC_ADD  = 3'd2,   // acc <= acc + product
    ACC_SUB  = 3'd3,   // acc <= acc - product
    ACC_CLR  = 3'd4,   // acc <= 0
    ACC_SHFT = 3'd5    // acc <= barrel shifter output
  } acc_op_e;

  // Assemble one instruction word.
  function automatic instr_t mk_instr(opcode_e op, logic [REG_AW-1:0] rd,
                                      logic [REG_AW-1:0] rs1, logic [REG_AW-1:0] rs2,
                                      logic [DATA_W-1:0] imm);
    instr_t i;
    i.op    = op;
    i.rd    = rd;
    i.rs1   = rs1;
    i.rs2   = rs2;
    i.spare = '0;
    i.imm   = imm;
    return i;
  endfunction

endpackage

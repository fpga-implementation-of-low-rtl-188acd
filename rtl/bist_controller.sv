// bist_controller: test controller and signature comparator of the
// built-in self-test around the PTMAC's MAC unit.
//
// On `start` the controller takes the MAC unit over (`bist_mode`) and runs
// N_LEVELS passes, one per golden-ROM entry. Each pass:
//   CLEAR  clear the accumulator, reload the pattern generator, clear the MISR
//   RUN    N_PATTERNS multiply-accumulate steps on generator patterns, at the
//          truncation level of the ROM entry; the MISR absorbs every new
//          accumulator value
//   DRAIN  wait for the last accumulator value to be absorbed
//   CHECK  compare the MISR with the golden signature (the comparator) and
//          record the result in fail_mask
// then DONE: `done` is high, `pass` is high when every pass matched.
// A Razor error of the accumulator (`razor_err`) is handled like a pipeline
// stall: the step presented in that cycle is not counted and is repeated, and
// the MISR waits for the restored value. A test therefore passes while timing
// errors are being corrected, and fails only when a result is wrong.
// The original test controller appears only as a block with Start BIST and
// Status; this sequence, the passes over several truncation levels and the
// handling of Razor stalls are this design's own.
//
// Interface: start (pulse), razor_err, sig (MISR), rom_trunc / rom_sig (ROM
// entry); outputs drive the MAC input multiplexer, the generator, the MISR
// and the ROM address. Timing: N_LEVELS * (N_PATTERNS + 4) cycles plus one
// cycle per Razor error.
module bist_controller
  import ptmac_pkg::*;
#(
  parameter int unsigned N_PATTERNS = 256,
  parameter int unsigned N_LEVELS   = 4,
  parameter int unsigned SIG_W      = 40,
  localparam int unsigned LV_W      = $clog2(N_LEVELS),
  localparam int unsigned CNT_W     = $clog2(N_PATTERNS + 1)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic                razor_err,
  input  logic [SIG_W-1:0]    sig,
  input  logic [SIG_W-1:0]    rom_sig,
  output logic [LV_W-1:0]     rom_addr,
  output logic                bist_mode,
  output acc_op_e             acc_op,
  output logic                tpg_load,
  output logic                tpg_en,
  output logic                misr_clr,
  output logic                misr_en,
  output logic                done,
  output logic                pass,
  output logic [N_LEVELS-1:0] fail_mask
);

  typedef enum logic [2:0] {
    S_IDLE, S_CLEAR, S_RUN, S_DRAIN, S_CHECK, S_DONE
  } state_e;

  state_e           state;
  logic [CNT_W-1:0] cnt;
  logic [LV_W-1:0]  level;
  logic             fire;
  logic             absorb_pend;

  assign rom_addr  = level;
  assign bist_mode = state inside {S_CLEAR, S_RUN, S_DRAIN, S_CHECK};
  assign fire      = (state == S_RUN) && !razor_err;
  assign tpg_load  = (state == S_CLEAR);
  assign tpg_en    = fire;
  assign misr_clr  = (state == S_CLEAR);
  assign misr_en   = absorb_pend && !razor_err;
  assign done      = (state == S_DONE);
  assign pass      = done && (fail_mask == '0);

  always_comb begin
    unique case (state)
      S_CLEAR: acc_op = ACC_CLR;
      S_RUN:   acc_op = ACC_ADD;
      default: acc_op = ACC_NOP;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      cnt         <= '0;
      level       <= '0;
      absorb_pend <= 1'b0;
      fail_mask   <= '0;
    end else begin
      if (!razor_err) absorb_pend <= fire;
      unique case (state)
        S_IDLE, S_DONE: begin
          if (start) begin
            state     <= S_CLEAR;
            level     <= '0;
            fail_mask <= '0;
          end
        end
        S_CLEAR: begin
          cnt <= '0;
          if (!razor_err) state <= S_RUN;
        end
        S_RUN: begin
          if (fire) begin
            cnt <= cnt + 1'b1;
            if (cnt == CNT_W'(N_PATTERNS - 1)) state <= S_DRAIN;
          end
        end
        S_DRAIN: begin
          if (!absorb_pend) state <= S_CHECK;
        end
        S_CHECK: begin
          fail_mask[level] <= (sig != rom_sig);
          if (level == LV_W'(N_LEVELS - 1)) begin
            state <= S_DONE;
          end else begin
            level <= level + 1'b1;
            state <= S_CLEAR;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule

// lt_ptmac_top: low-power testable Razor PTMAC (LT-PTMAC).
//
// The PTMAC processor (ptmac_core) is the circuit under test. Around its
// multiply-accumulate unit, the part that holds the critical path and the
// only Razor registers, sits a built-in self-test in the arrangement of the
// general BIST circuit: a hardware test pattern generator (lfsr_tpg) feeds
// the MAC through an input multiplexer that otherwise carries the normal
// operands, an output response compactor (misr_compactor) condenses the
// accumulator values into a signature, a ROM (golden_sig_rom) holds the
// golden signatures, and the test controller (bist_controller) sequences the
// test and compares. The SPI interface (spi_slave) loads the program memory
// and reads back a status word.
//
// Interface:
//   clk, rst_n            system clock, asynchronous active-low reset
//   run                   execute the loaded program from address 0 (level)
//   wake                  leave sleep mode
//   tv_late               emulated late capture of the accumulator (Razor)
//   in_port / out_port    16-bit input port, 40-bit output port (+ out_valid)
//   spi_*                 SPI mode 0 slave, 48-bit frames (see spi_slave)
//   bist_start            start the self-test (pulse); bist_done, bist_pass,
//                         bist_fail_mask report it
//   razor_err, razor_err_count, sleeping, halted, pc   status
// SPI readback word (MSB first): {bist_done, bist_pass, bist_fail_mask[3:0],
// sleeping, halted, razor_err_count[15:0], out_port[23:0]}.
// Start the self-test only while the processor is idle (run low, sleeping or
// halted): it freezes the pipeline and overwrites the accumulator.
module lt_ptmac_top
  import ptmac_pkg::*;
#(
  parameter int unsigned DMEM_DEPTH      = 256,
  parameter int unsigned BIST_PATTERNS   = 256
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               run,
  input  logic               wake,
  input  logic               tv_late,
  input  logic [DATA_W-1:0]  in_port,
  output logic [ACC_W-1:0]   out_port,
  output logic               out_valid,
  input  logic               spi_sclk,
  input  logic               spi_cs_n,
  input  logic               spi_mosi,
  output logic               spi_miso,
  input  logic               bist_start,
  output logic               bist_done,
  output logic               bist_pass,
  output logic [3:0]         bist_fail_mask,
  output logic               razor_err,
  output logic [15:0]        razor_err_count,
  output logic               sleeping,
  output logic               halted,
  output logic [PC_W-1:0]    pc
);

  localparam int unsigned N_LEVELS = 4;

  // SPI program loader
  logic               pm_we;
  logic [15:0]        pm_waddr;
  logic [INSTR_W-1:0] pm_wdata;
  logic [47:0]        spi_tx;

  assign spi_tx = {bist_done, bist_pass, bist_fail_mask, sleeping, halted,
                   razor_err_count, out_port[23:0]};

  spi_slave #(.ADDR_W(16), .DATA_W(INSTR_W)) u_spi (
    .clk    (clk),
    .rst_n  (rst_n),
    .sclk   (spi_sclk),
    .cs_n   (spi_cs_n),
    .mosi   (spi_mosi),
    .miso   (spi_miso),
    .tx_word(spi_tx),
    .wr_en  (pm_we),
    .wr_addr(pm_waddr),
    .wr_data(pm_wdata)
  );

  // BIST
  logic                bist_mode, tpg_load, tpg_en, misr_clr, misr_en;
  acc_op_e             bist_op;
  logic [31:0]         pattern;
  logic [ACC_W-1:0]    acc, sig, rom_sig;
  logic [TRUNC_W-1:0]  rom_trunc;
  logic [1:0]          rom_addr;

  lfsr_tpg #(.W(32)) u_tpg (
    .clk    (clk),
    .rst_n  (rst_n),
    .load   (tpg_load),
    .en     (tpg_en),
    .pattern(pattern)
  );

  misr_compactor #(.W(ACC_W)) u_misr (
    .clk  (clk),
    .rst_n(rst_n),
    .clr  (misr_clr),
    .en   (misr_en),
    .d    (acc),
    .sig  (sig)
  );

  golden_sig_rom #(.TRUNC_W(TRUNC_W), .SIG_W(ACC_W)) u_rom (
    .addr (rom_addr),
    .trunc(rom_trunc),
    .sig  (rom_sig)
  );

  bist_controller #(
    .N_PATTERNS(BIST_PATTERNS),
    .N_LEVELS  (N_LEVELS),
    .SIG_W     (ACC_W)
  ) u_bist (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (bist_start),
    .razor_err(razor_err),
    .sig      (sig),
    .rom_sig  (rom_sig),
    .rom_addr (rom_addr),
    .bist_mode(bist_mode),
    .acc_op   (bist_op),
    .tpg_load (tpg_load),
    .tpg_en   (tpg_en),
    .misr_clr (misr_clr),
    .misr_en  (misr_en),
    .done     (bist_done),
    .pass     (bist_pass),
    .fail_mask(bist_fail_mask)
  );

  // Circuit under test
  ptmac_core #(.DMEM_DEPTH(DMEM_DEPTH)) u_core (
    .clk            (clk),
    .rst_n          (rst_n),
    .run            (run),
    .wake           (wake),
    .tv_late        (tv_late),
    .in_port        (in_port),
    .out_port       (out_port),
    .out_valid      (out_valid),
    .pm_we          (pm_we),
    .pm_waddr       (pm_waddr[PC_W-1:0]),
    .pm_wdata       (pm_wdata),
    .bist_mode      (bist_mode),
    .bist_op        (bist_op),
    .bist_a         (pattern[31:16]),
    .bist_b         (pattern[15:0]),
    .bist_trunc     (rom_trunc),
    .acc            (acc),
    .razor_err      (razor_err),
    .sleeping       (sleeping),
    .halted         (halted),
    .pc             (pc),
    .razor_err_count(razor_err_count)
  );

endmodule

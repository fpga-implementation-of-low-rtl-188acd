// tb_spi_slave: self-checking test of the SPI loader. A bit-banged SPI mode 0
// master (SCLK = system clock / 12) sends 48-bit frames; each complete frame
// must produce exactly one write pulse with the sent address and data, while
// MISO returns the 48-bit status word captured at the start of the frame. A
// frame cut short (20 bits) must produce no write.
module tb_spi_slave;
  logic        clk = 0, rst_n = 0, sclk = 0, cs_n = 1, mosi = 0;
  logic        miso, wr_en;
  logic [47:0] tx_word = '0;
  logic [15:0] wr_addr;
  logic [31:0] wr_data;
  int checks = 0, failures = 0, writes = 0;
  logic [15:0] last_addr;
  logic [31:0] last_data;

  spi_slave #(.ADDR_W(16), .DATA_W(32)) dut (
    .clk(clk), .rst_n(rst_n), .sclk(sclk), .cs_n(cs_n), .mosi(mosi), .miso(miso),
    .tx_word(tx_word), .wr_en(wr_en), .wr_addr(wr_addr), .wr_data(wr_data));

  always #5 clk = ~clk;

  always @(posedge clk) if (wr_en) begin
    writes++;
    last_addr = wr_addr;
    last_data = wr_data;
  end

  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  task automatic frame(logic [47:0] word, int nbits, output logic [47:0] rx);
    cs_n = 0;
    repeat (8) @(posedge clk);
    for (int i = 47; i > 47 - nbits; i--) begin
      mosi = word[i];
      repeat (6) @(posedge clk);
      sclk = 1;
      rx = {rx[46:0], miso};
      repeat (6) @(posedge clk);
      sclk = 0;
    end
    repeat (6) @(posedge clk);
    cs_n = 1;
    repeat (8) @(posedge clk);
  endtask

  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [47:0] w, rx;
    #22 rst_n = 1;
    for (int n = 0; n < 12; n++) begin
      int nw0;
      nw0 = writes;
      w = {16'($urandom % 1024), 32'($urandom)};
      tx_word = {16'($urandom), 32'($urandom)};
      frame(w, 48, rx);
      chk(writes == nw0 + 1, "one write per frame");
      chk(last_addr == w[47:32] && last_data == w[31:0], "frame contents");
      chk(rx == tx_word, "MISO status word");
    end
    begin
      int nw0;
      nw0 = writes;
      frame(48'hFFFF_1234_5678, 20, rx);
      chk(writes == nw0, "short frame discarded");
      frame(48'h0003_CAFE_F00D, 48, rx);
      chk(writes == nw0 + 1 && last_addr == 16'h0003 && last_data == 32'hCAFE_F00D, "frame after short frame");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_golden_sig_rom: checks every golden signature of the ROM by recomputing
// the self-test in behavioural code: 256 patterns of the 32-bit LFSR (seed
// 32'h1BAD5EED, new bit = b31^b21^b1^b0), the truncated product written as
// exact product minus the removed low columns plus C(T) with the low T bits
// cleared (the removed bits are all AND terms for T <= 16 only up to column
// 15; columns 15.. hold inverted terms, handled explicitly below), a 40-bit
// accumulator and the 40-bit MISR.
module tb_golden_sig_rom;
  logic [1:0]  addr;
  logic [4:0]  trunc;
  logic [39:0] sig;
  int checks = 0, failures = 0;

  golden_sig_rom #(.TRUNC_W(5), .SIG_W(40)) dut (.addr(addr), .trunc(trunc), .sig(sig));

  // Baugh-Wooley matrix value of the bits in columns below t.
  function automatic longint dropped(logic [15:0] x, logic [15:0] y, int t);
    longint s = 0;
    logic bit_v;
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        bit_v = x[i] & y[j];
        if ((i == 15) != (j == 15)) bit_v = !bit_v;
        if (i + j < t && bit_v) s += longint'(1) << (i + j);
      end
    return s;
  endfunction

  function automatic logic [31:0] tmul(logic [15:0] x, logic [15:0] y, int t);
    longint r = longint'($signed(x)) * longint'($signed(y)) - dropped(x, y, t);
    if (t > 0) r += ((longint'(t - 1) << t) + 1) / 4;
    r = r & ~((longint'(1) << t) - 1);
    return r[31:0];
  endfunction

  function automatic logic [39:0] signature(int t);
    logic [31:0] l = 32'h1BAD_5EED;
    logic [39:0] acc = '0, m = '0;
    logic fb;
    for (int n = 0; n < 256; n++) begin
      acc = acc + 40'($signed(tmul(l[31:16], l[15:0], t)));
      fb = m[39] ^ m[37] ^ m[20] ^ m[18];
      m = {m[38:0], fb} ^ acc;
      l = {l[30:0], l[31] ^ l[21] ^ l[1] ^ l[0]};
    end
    return m;
  endfunction

  initial begin
    int levels [4] = '{0, 8, 12, 16};
    for (int k = 0; k < 4; k++) begin
      addr = 2'(k);
      #1;
      checks++;
      if (int'(trunc) != levels[k]) begin failures++; $display("FAIL level %0d trunc %0d", k, trunc); end
      checks++;
      if (sig !== signature(int'(trunc))) begin
        failures++;
        $display("FAIL level %0d sig %h expected %h", k, sig, signature(int'(trunc)));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

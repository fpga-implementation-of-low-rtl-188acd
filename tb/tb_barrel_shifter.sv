// tb_barrel_shifter: self-checking test of the 40-bit barrel shifter against
// the language's shift operators, for every shift amount 0..63 in both
// directions and random data.
module tb_barrel_shifter;
  logic [39:0] din, dout, expv;
  logic [5:0]  amt;
  logic        left;
  int checks = 0, failures = 0;

  barrel_shifter #(.W(40), .SHAMT_W(6)) dut (.din(din), .amt(amt), .left(left), .dout(dout));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 1024; n++) begin
      din  = {8'($urandom), 32'($urandom)};
      amt  = 6'(n % 64);
      left = n[6];
      #1;
      if (left) expv = (amt >= 40) ? '0 : din << amt;
      else      expv = (amt >= 40) ? {40{din[39]}} : 40'($signed(din) >>> amt);
      checks++;
      if (dout !== expv) begin
        failures++;
        $display("FAIL din=%h amt=%0d left=%b dout=%h exp=%h", din, amt, left, dout, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

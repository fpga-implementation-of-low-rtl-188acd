// tb_razor_reg: self-checking test of the Razor register. Random data are
// captured with random late arrivals; a cycle-level reference of the main and
// shadow flip-flops predicts the outputs:
//   rising edge : if err   -> main = shadow (correction, en ignored)
//                 elif en  -> shadow = d, main = d unless late
//   falling edge: err = (main != shadow)
// The test also checks that every late capture that changes the value costs
// exactly one error cycle, and that no error occurs without a late capture.
module tb_razor_reg;
  logic       clk = 0, rst_n = 0, en = 0, late = 0;
  logic [7:0] d = '0, q;
  logic       err;
  logic [7:0] ref_main, ref_shadow;
  logic       ref_err;
  int checks = 0, failures = 0, n_err = 0, n_late_diff = 0;

  razor_reg #(.W(8)) dut (.clk(clk), .rst_n(rst_n), .en(en), .d(d), .late(late), .q(q), .err(err));

  always #5 clk = ~clk;

  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin
      failures++;
      $display("FAIL %s t=%0t q=%h main=%h shadow=%h err=%b", what, $time, q, ref_main, ref_shadow, err);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_main = '0; ref_shadow = '0; ref_err = 1'b0;
    #12 rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      @(posedge clk);
      if (ref_err) begin
        ref_main = ref_shadow;
        n_err++;
      end else if (en) begin
        if (late && d != ref_main) n_late_diff++;
        ref_shadow = d;
        if (!late) ref_main = d;
      end
      #1;
      chk(q == ref_main, "main flip-flop");
      en   = ($urandom % 4) != 0;
      d    = 8'($urandom);
      late = ($urandom % 5) == 0;
      @(negedge clk); #1;
      ref_err = (ref_main != ref_shadow);
      chk(err == ref_err, "error flag");
    end
    chk(n_err + int'(ref_err) == n_late_diff && n_err > 10, "one error cycle per late capture");
    $display("error cycles %0d, late captures that changed the value %0d", n_err, n_late_diff);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_razor_accumulator: self-checking test of the 40-bit adder and Razor
// accumulator. A random stream of load/add/subtract/clear/shift-load
// operations is applied with random emulated late captures. The driver
// behaves like the pipeline: when `err` is high at a rising edge the
// operation was not taken and is presented again. A reference accumulator
// (plain 40-bit arithmetic) is updated only for operations that were taken;
// whenever `err` is low the accumulator must equal the reference, and every
// error must cost exactly one extra cycle.
module tb_razor_accumulator;
  import ptmac_pkg::*;
  logic        clk = 0, rst_n = 0, late = 0;
  acc_op_e     op = ACC_NOP;
  logic [31:0] prod = '0;
  logic [39:0] shift_val = '0, acc, ref_acc;
  logic        err;
  int checks = 0, failures = 0, n_ops = 0, n_cycles = 0, n_err = 0;

  razor_accumulator #(.AW(40), .PW(32)) dut (
    .clk(clk), .rst_n(rst_n), .op(op), .prod(prod), .shift_val(shift_val),
    .late(late), .acc(acc), .err(err));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [39:0] apply(acc_op_e o, logic [39:0] a, logic [31:0] p, logic [39:0] s);
    logic [39:0] px = 40'($signed(p));
    case (o)
      ACC_LOAD: return px;
      ACC_ADD:  return a + px;
      ACC_SUB:  return a - px;
      ACC_CLR:  return '0;
      ACC_SHFT: return s;
      default:  return a;
    endcase
  endfunction

  task automatic new_op();
    acc_op_e ops [5] = '{ACC_LOAD, ACC_ADD, ACC_SUB, ACC_CLR, ACC_SHFT};
    op        = ($urandom % 5 == 0) ? ops[$urandom % 5] : (($urandom % 2) ? ACC_SUB : ACC_ADD);
    prod      = $urandom;
    shift_val = {8'($urandom), 32'($urandom)};
    late      = ($urandom % 4) == 0;
  endtask

  initial begin
    logic was_err;
    ref_acc = '0;
    #12 rst_n = 1;
    @(posedge clk); #1;
    new_op();
    while (n_ops < 400) begin
      @(posedge clk);
      n_cycles++;
      was_err = err;
      if (was_err) n_err++;
      else begin
        ref_acc = apply(op, ref_acc, prod, shift_val);
        n_ops++;
      end
      #1;
      if (was_err) begin
        checks++;
        if (acc !== ref_acc) begin
          failures++;
          $display("FAIL after correction op %0d acc=%h ref=%h", n_ops, acc, ref_acc);
        end
        late = 1'b0;                  // the repeated operation arrives in time
      end else begin
        new_op();
      end
      @(negedge clk); #1;
      if (!err) begin
        checks++;
        if (acc !== ref_acc) begin
          failures++;
          $display("FAIL op %0d acc=%h ref=%h", n_ops, acc, ref_acc);
        end
      end
    end
    $display("ops %0d cycles %0d razor errors %0d", n_ops, n_cycles, n_err);
    checks++;
    if (n_cycles != n_ops + n_err) begin failures++; $display("FAIL cycle count"); end
    checks++;
    if (n_err < 20) begin failures++; $display("FAIL too few Razor errors"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_pt_multiplier: self-checking test of the programmable truncated
// multiplier. With trunc = 0 the product must equal the exact signed product.
// For 1 <= trunc <= 15 every removed partial-product bit is a plain AND term,
// so the reference is computed as
//   (exact - sum_{i+j<T} a_i b_j 2^(i+j) + C(T)) mod 2^32, low T bits cleared,
// with C(T) = ((T-1)*2^T + 1) / 4, and the error against the exact product
// is also checked to stay below (T+1)*2^T. Corner operands (most negative,
// -1, 0) are included.
module tb_pt_multiplier;
  logic [15:0] a, b;
  logic [4:0]  trunc;
  logic [31:0] p;
  int checks = 0, failures = 0;

  pt_multiplier #(.N(16), .TRUNC_W(5)) dut (.a(a), .b(b), .trunc(trunc), .p(p));

  function automatic logic [31:0] ref_mul(logic [15:0] x, logic [15:0] y, int t);
    longint exact, dropped, comp, r;
    exact = longint'($signed(x)) * longint'($signed(y));
    dropped = 0;
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++)
        if (i + j < t && x[i] && y[j]) dropped += longint'(1) << (i + j);
    comp = (t == 0) ? 0 : ((longint'(t - 1) << t) + 1) / 4;
    r = exact - dropped + comp;
    r = r & ~((longint'(1) << t) - 1);
    return r[31:0];
  endfunction

  task automatic one(logic [15:0] x, logic [15:0] y, int t);
    longint exact, err;
    a = x; b = y; trunc = 5'(t);
    #1;
    checks++;
    if (p !== ref_mul(x, y, t)) begin
      failures++;
      $display("FAIL a=%h b=%h T=%0d p=%h ref=%h", x, y, t, p, ref_mul(x, y, t));
    end
    exact = longint'($signed(x)) * longint'($signed(y));
    err = longint'($signed(p)) - exact;
    if (err < 0) err = -err;
    checks++;
    if (err >= longint'(t + 1) << t) begin
      failures++;
      $display("FAIL bound a=%h b=%h T=%0d err=%0d", x, y, t, err);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] corners [6] = '{16'h8000, 16'h7FFF, 16'hFFFF, 16'h0000, 16'h0001, 16'h5555};
    foreach (corners[i]) foreach (corners[j]) for (int t = 0; t < 16; t += 5) one(corners[i], corners[j], t);
    for (int n = 0; n < 600; n++) one(16'($urandom), 16'($urandom), n % 16);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

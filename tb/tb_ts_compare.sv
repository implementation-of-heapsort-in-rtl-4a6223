// tb_ts_compare: self-checking test of the wrap-around timestamp comparator.
//
// Drives directed corner cases (equal stamps, differences of exactly half a
// period, stamps on both sides of the wrap) and random pairs, and checks
// a_lt_b and a_le_b against a reference that folds the signed difference
// into [-2^15, 2^15) and tests its sign.
module tb_ts_compare;

  localparam int KW = 16;
  localparam int P  = 1 << KW;

  logic [KW-1:0] a, b;
  logic          lt, le;
  int            checks = 0, failures = 0;

  ts_compare #(.KEY_W(KW)) dut (.a(a), .b(b), .a_lt_b(lt), .a_le_b(le));

  function automatic int fold(int d);
    while (d >= P / 2) d -= P;
    while (d < -P / 2) d += P;
    return d;
  endfunction

  task automatic check(int av, int bv);
    bit exp_lt, exp_le;
    a = KW'(av);
    b = KW'(bv);
    #1;
    exp_lt = fold(int'(a) - int'(b)) < 0;
    exp_le = fold(int'(b) - int'(a)) >= 0;
    checks++;
    if (lt !== exp_lt || le !== exp_le) begin
      failures++;
      if (failures < 10)
        $display("FAIL a=%h b=%h lt=%b (exp %b) le=%b (exp %b)", a, b, lt, exp_lt, le, exp_le);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(0, 0);
    check(5, 5);
    check(1, 2);
    check(2, 1);
    check('hffff, 0);       // just before the wrap is older
    check(0, 'hffff);
    check('hfff0, 'h0010);
    check('h0010, 'hfff0);
    check('h8000, 0);       // exactly half a period apart
    check(0, 'h8000);
    check('h7fff, 0);
    check(0, 'h7fff);
    check('h8001, 0);
    for (int i = 0; i < 20000; i++) check(int'($urandom_range(P - 1)), int'($urandom_range(P - 1)));
    // nearby pairs around random points, including across the wrap
    for (int i = 0; i < 20000; i++) begin
      automatic int base = int'($urandom_range(P - 1));
      check(base, (base + int'($urandom_range(200)) - 100) % P);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

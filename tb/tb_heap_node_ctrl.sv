// tb_heap_node_ctrl: self-checking test of the per-layer node controller.
//
// Instantiates an inner stage (LEVEL = 3 of NM = 5) and the last stage
// (LEVEL = NM). The inner stage reads its children from a reference memory
// the testbench models with one cycle of read latency. For random records
// and children (keys drawn close together, partly across the timestamp
// wrap, often equal) the testbench works out independently which of the
// three cases applies and checks the child addresses, the parent write, the
// reported decision, and the record and offset handed to the next stage
// with their two-cycle timing. Each case must occur. A directed part builds
// children whose wrap-around order is cyclic and checks that the record is
// then placed in the slot rather than lost.
module tb_heap_node_ctrl;
  import heap_sort_pkg::*;

  localparam int NM    = 5;
  localparam int LEVEL = 3;
  localparam int HALF  = 1 << (LEVEL - 1);
  localparam int P     = 1 << KEY_W;

  logic          clk = 1'b0;
  logic          rst;
  logic          in_valid;
  sort_rec_t     in_cur;
  logic [NM-1:0] in_offs;
  logic [NM-1:0] ra_l, ra_r, wa, oo;
  sort_rec_t     rd_l, rd_r, wd, oc;
  logic          we, ov;
  node_act_t     act;
  // last stage
  logic [NM-1:0] lf_ra_l, lf_ra_r, lf_wa, lf_oo;
  sort_rec_t     lf_wd, lf_oc;
  logic          lf_we, lf_ov;
  node_act_t     lf_act;

  sort_rec_t mem [1 << LEVEL];
  int        checks = 0, failures = 0;
  int        n_stop = 0, n_left = 0, n_right = 0;

  heap_node_ctrl #(.NM(NM), .LEVEL(LEVEL)) dut (
    .clk, .rst, .in_valid, .in_cur, .in_offs,
    .rd_addr_l(ra_l), .rd_addr_r(ra_r), .rd_data_l(rd_l), .rd_data_r(rd_r),
    .wr_en(we), .wr_addr(wa), .wr_data(wd),
    .out_valid(ov), .out_cur(oc), .out_offs(oo), .act(act));

  heap_node_ctrl #(.NM(NM), .LEVEL(NM)) dut_leaf (
    .clk, .rst, .in_valid, .in_cur, .in_offs,
    .rd_addr_l(lf_ra_l), .rd_addr_r(lf_ra_r), .rd_data_l(REC_ZERO), .rd_data_r(REC_ZERO),
    .wr_en(lf_we), .wr_addr(lf_wa), .wr_data(lf_wd),
    .out_valid(lf_ov), .out_cur(lf_oc), .out_offs(lf_oo), .act(lf_act));

  always #5 clk = !clk;

  // memory model: synchronous read
  always_ff @(posedge clk) begin
    rd_l <= mem[ra_l[LEVEL-1:0]];
    rd_r <= mem[ra_r[LEVEL-1:0]];
  end

  function automatic int fold(int d);
    while (d >= P / 2) d -= P;
    while (d < -P / 2) d += P;
    return d;
  endfunction
  function automatic bit le(key_t a, key_t b);
    return fold(int'(b) - int'(a)) >= 0;
  endfunction
  function automatic bit lt(key_t a, key_t b);
    return fold(int'(b) - int'(a)) > 0 || (fold(int'(b) - int'(a)) == -P / 2);
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    key_t      base;
    sort_rec_t cur, lrec, rrec, exp_w;
    int        offs, exp_next;
    node_act_t exp_act;
    rst = 1'b1; in_valid = 1'b0; in_cur = '0; in_offs = '0;
    @(posedge clk); #1;
    rst = 1'b0;
    check(!ov && act == ACT_NONE && !we, "idle after reset");
    for (int n = 0; n < 3000; n++) begin
      base = KEY_W'($urandom());
      cur.key  = base + KEY_W'($urandom_range(6));
      cur.payload = $urandom();
      offs = int'($urandom_range(HALF - 1));
      lrec.key = base + KEY_W'($urandom_range(6));
      lrec.payload = $urandom();
      rrec.key = base + KEY_W'($urandom_range(6));
      rrec.payload = $urandom();
      mem[offs] = lrec;
      mem[offs + HALF] = rrec;
      for (int i = 0; i < (1 << LEVEL); i++)
        if (i != offs && i != offs + HALF) mem[i] = '1;
      // reference decision
      if (le(cur.key, lrec.key) && le(cur.key, rrec.key)) begin
        exp_act = ACT_STOP; exp_w = cur; exp_next = offs;
      end else if (lt(lrec.key, cur.key) && le(lrec.key, rrec.key)) begin
        exp_act = ACT_LEFT; exp_w = lrec; exp_next = offs;
      end else begin
        exp_act = ACT_RIGHT; exp_w = rrec; exp_next = offs + HALF;
      end
      // cycle n: record at the input, addresses out
      in_valid = 1'b1; in_cur = cur; in_offs = NM'(offs);
      #1;
      check(ra_l == NM'(offs) && ra_r == NM'(offs + HALF), "child addresses");
      check(lf_we && lf_wa == NM'(offs) && lf_wd == cur && lf_act == ACT_STOP && !lf_ov,
            "last stage places the record at once");
      @(posedge clk); #1;
      in_valid = 1'b0;
      // cycle n+1: decision and parent write
      check(we && wa == NM'(offs) && wd == exp_w, "parent write");
      check(act == exp_act, "decision");
      check(!ov, "next stage not yet notified");
      case (exp_act)
        ACT_STOP:  n_stop++;
        ACT_LEFT:  n_left++;
        default:   n_right++;
      endcase
      @(posedge clk); #1;
      // cycle n+2: next stage notified only after a swap
      check(ov == (exp_act != ACT_STOP), "next stage valid");
      if (exp_act != ACT_STOP)
        check(oc == cur && oo == NM'(exp_next), "record and offset to next stage");
      check(!we && act == ACT_NONE, "no write without a record");
      if ($urandom_range(3) == 0) begin @(posedge clk); #1; end
    end
    // Records more than half a period apart can make the wrap-around order
    // cyclic (R < L < T <= R): none of the three cases holds, and T must be
    // written into the slot with the sift-down ending there.
    for (int n = 0; n < 50; n++) begin
      base = KEY_W'($urandom());
      offs = int'($urandom_range(HALF - 1));
      rrec.key = base;          rrec.payload = $urandom();
      lrec.key = base + 'h6000; lrec.payload = $urandom();
      cur.key  = base + 'hb000; cur.payload  = $urandom();
      mem[offs] = lrec;
      mem[offs + HALF] = rrec;
      in_valid = 1'b1; in_cur = cur; in_offs = NM'(offs);
      @(posedge clk); #1;
      in_valid = 1'b0;
      check(we && wa == NM'(offs) && wd == cur && act == ACT_STOP, "cyclic order: T placed");
      @(posedge clk); #1;
      check(!ov, "cyclic order: sift-down ends");
    end
    check(n_stop > 100 && n_left > 100 && n_right > 100, "every case exercised");
    $display("cases: stop=%0d left=%0d right=%0d", n_stop, n_left, n_right);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

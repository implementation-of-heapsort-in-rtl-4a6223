// tb_heap_top_ctrl: self-checking test of the top node controller.
//
// Drives random input records (keys near the current top, partly across the
// timestamp wrap), random output backpressure, random periods of init_busy,
// and random rewrites of the top slot as the layer-1 node controller would
// make them. A cycle-level reference tracks the cycle of the last accepted
// record, the pending output and the top record, and checks in_ready (at
// most one record per 3 cycles, none while busy or blocked), the output
// record (the older of input and top), its hold under backpressure, and the
// hand-off of the input to the sift-down one cycle after a replace.
module tb_heap_top_ctrl;
  import heap_sort_pkg::*;

  localparam int NM = 4;
  localparam int II = 3;
  localparam int P  = 1 << KEY_W;

  logic          clk = 1'b0;
  logic          rst;
  logic          init_busy, in_valid, in_ready, out_valid, out_ready;
  sort_rec_t     in_data, out_data, sift_cur, top_wdata;
  logic          sift_valid, top_we, ev_bypass, ev_replace;
  logic [NM-1:0] sift_offs;
  int            checks = 0, failures = 0;
  int            n_bypass = 0, n_replace = 0, n_stall = 0, n_accept = 0;

  heap_top_ctrl #(.NM(NM), .II(II)) dut (.*);

  always #5 clk = !clk;

  function automatic int fold(int d);
    while (d >= P / 2) d -= P;
    while (d < -P / 2) d += P;
    return d;
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int        cyc, last_acc;
    bit        m_ov, exp_ready, exp_bypass, pend_sift;
    sort_rec_t m_top, m_out, pend_cur;
    rst = 1'b1; init_busy = 1'b1; in_valid = 1'b0; in_data = '0; out_ready = 1'b0;
    top_we = 1'b0; top_wdata = '0;
    @(posedge clk); #1;
    rst = 1'b0;
    m_ov = 1'b0; m_top = REC_ZERO; last_acc = -100; pend_sift = 1'b0;
    for (cyc = 0; cyc < 20000; cyc++) begin
      // drive this cycle
      init_busy = (cyc < 20) || ($urandom_range(19) == 0);
      in_valid  = $urandom_range(3) != 0;
      in_data.key = m_top.key + KEY_W'($urandom_range(40)) - KEY_W'(20);
      in_data.payload = $urandom();
      out_ready = $urandom_range(3) != 0;
      top_we    = $urandom_range(4) == 0;
      top_wdata.key = m_top.key + KEY_W'($urandom_range(30));
      top_wdata.payload = $urandom();
      #1;
      // check combinational outputs
      exp_ready  = !init_busy && (cyc - last_acc >= II) && (!m_ov || out_ready);
      exp_bypass = fold(int'(m_top.key) - int'(in_data.key)) >= 0;
      check(in_ready == exp_ready, "in_ready");
      check(out_valid == m_ov, "out_valid");
      if (m_ov) check(out_data == m_out, "out_data");
      check(ev_bypass == (in_valid && exp_ready && exp_bypass), "bypass pulse");
      check(ev_replace == (in_valid && exp_ready && !exp_bypass), "replace pulse");
      check(sift_valid == pend_sift && sift_offs == '0, "sift hand-off valid");
      if (pend_sift) check(sift_cur == pend_cur, "sift hand-off record");
      if (m_ov && !out_ready) n_stall++;
      // model update at the clock edge
      pend_sift = 1'b0;
      if (in_valid && exp_ready) begin
        n_accept++;
        last_acc = cyc;
        m_out = exp_bypass ? in_data : m_top;
        m_ov  = 1'b1;
        if (exp_bypass) n_bypass++;
        else begin
          n_replace++;
          pend_sift = 1'b1;
          pend_cur  = in_data;
        end
      end else if (out_ready) m_ov = 1'b0;
      if (top_we) m_top = top_wdata;
      @(posedge clk); #1;
    end
    check(n_bypass > 100 && n_replace > 100 && n_stall > 100, "all cases exercised");
    $display("accepted=%0d bypass=%0d replace=%0d stalled=%0d", n_accept, n_bypass, n_replace, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

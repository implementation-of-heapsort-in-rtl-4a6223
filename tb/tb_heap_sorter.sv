// tb_heap_sorter: end-to-end test of the streaming heap sorter at its
// default size (NM = 11, 2047 records, new record every 3 cycles).
//
// Stimulus: a stream of records whose timestamps grow by 0..4 per record
// and wrap around several times; the stream is cut into blocks of 2048
// records and each block is randomly permuted, so no record is overtaken by
// more than 2047 later ones (the heap capacity). The payload carries the
// record's sequence number. Parts of the run hold out_ready low at random
// (backpressure) or leave gaps on the input.
//
// Checks:
//  * every output record equals the one produced by a sequential reference
//    model of the heap (same layout, same three-case decision, evaluated
//    with a separately written wrap-around comparison);
//  * the first 2047 outputs are the all-zero records the heap starts with,
//    and the whole output of the in-capacity stream is in timestamp order;
//  * each record of that stream leaves exactly once once it is pushed out;
//  * output one cycle after acceptance; never two acceptances less than 3
//    cycles apart, and exactly 3 cycles apart while input and output are
//    free;
//  * a final part with blocks of 4096 (disorder beyond the capacity) must
//    produce out-of-order output, as the capacity bound predicts.
// Mechanisms counted, each must occur: bypass of a late record, replace of
// the top, stop/left/right decisions in every layer, records reaching the
// last layer, write-first forwarding between successive sift-downs,
// backpressure stalls, timestamp wrap.
module tb_heap_sorter;
  import heap_sort_pkg::*;

  localparam int NM      = 11;           // must match the sorter default
  localparam int CAP     = (1 << NM) - 1;
  localparam int P       = 1 << KEY_W;
  localparam int N_GOOD  = 204800;       // in-capacity stream (100 blocks)
  localparam int BLK_OK  = 2048;
  localparam int N_BAD   = 8192;         // over-capacity stream
  localparam int BLK_BAD = 4096;
  localparam int N_ALL   = N_GOOD + N_BAD;

  logic      clk = 1'b0;
  logic      rst;
  logic      busy, in_valid, in_ready, out_valid, out_ready;
  sort_rec_t in_data, out_data;

  heap_sorter dut (.*);

  always #5 clk = !clk;

  int checks = 0, failures = 0;
  int cycle = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at cycle %0d", what, cycle);
    end
  endtask

  function automatic int fold(int d);
    while (d >= P / 2) d -= P;
    while (d < -P / 2) d += P;
    return d;
  endfunction
  // a <= b and a < b in wrap-around order
  function automatic bit m_le(key_t a, key_t b);
    return fold(int'(b) - int'(a)) >= 0;
  endfunction
  function automatic bit m_lt(key_t a, key_t b);
    return !m_le(b, a);
  endfunction

  // ---------------------------------------------------------------- stream
  sort_rec_t stream [N_ALL];

  task automatic make_stream();
    int t = 1;
    for (int k = 0; k < N_ALL; k++) begin
      stream[k].key     = KEY_W'(t);
      stream[k].payload = k;
      t += int'($urandom_range(4));
    end
    // permute inside blocks
    for (int b0 = 0; b0 < N_ALL; ) begin
      automatic int bs = (b0 < N_GOOD) ? BLK_OK : BLK_BAD;
      for (int i = bs - 1; i > 0; i--) begin
        automatic int j = int'($urandom_range(i));
        automatic sort_rec_t tmp = stream[b0 + i];
        stream[b0 + i] = stream[b0 + j];
        stream[b0 + j] = tmp;
      end
      if (b0 >= N_GOOD) begin
        // oldest record of an over-capacity block arrives last
        automatic int jmin = 0;
        for (int i = 1; i < bs; i++)
          if (m_lt(stream[b0 + i].key, stream[b0 + jmin].key)) jmin = i;
        begin
          automatic sort_rec_t tmp = stream[b0 + bs - 1];
          stream[b0 + bs - 1] = stream[b0 + jmin];
          stream[b0 + jmin] = tmp;
        end
      end
      b0 += bs;
    end
  endtask

  // ------------------------------------------------------- reference model
  sort_rec_t heap [NM][1 << (NM - 1)];

  function automatic sort_rec_t model_push(sort_rec_t val);
    sort_rec_t res, cur;
    int offs = 0;
    if (m_le(val.key, heap[0][0].key)) return val;
    res = heap[0][0];
    cur = val;
    for (int lev = 1; lev <= NM; lev++) begin
      int half = 1 << (lev - 1);
      if (lev == NM) begin
        heap[lev - 1][offs] = cur;
        break;
      end
      if (m_le(cur.key, heap[lev][offs].key) && m_le(cur.key, heap[lev][offs + half].key)) begin
        heap[lev - 1][offs] = cur;
        break;
      end else if (m_lt(heap[lev][offs].key, cur.key) &&
                   m_le(heap[lev][offs].key, heap[lev][offs + half].key)) begin
        heap[lev - 1][offs] = heap[lev][offs];
      end else if (m_lt(heap[lev][offs + half].key, cur.key)) begin
        heap[lev - 1][offs] = heap[lev][offs + half];
        offs += half;
      end else begin
        heap[lev - 1][offs] = cur;
        break;
      end
    end
    return res;
  endfunction

  // -------------------------------------------------------------- monitors
  sort_rec_t exp_q [$];
  int        n_in = 0, n_out = 0;
  int        last_acc = -100;
  bit        acc_prev = 1'b0;
  bit        free_run = 1'b0;
  int        n_ii3 = 0, n_stall = 0, n_wrap = 0;
  int        n_bypass = 0, n_replace = 0;
  int        n_zero_head = 0, n_order_err_good = 0, n_order_err_bad = 0;
  bit        seen [N_GOOD];
  sort_rec_t prev_out;
  bit        have_prev = 1'b0;

  always @(posedge clk) begin
    if (!rst) begin
      cycle++;
      // latency: output present the cycle after acceptance
      if (acc_prev) check(out_valid, "output one cycle after acceptance");
      acc_prev = 1'b0;
      if (out_valid && !out_ready) n_stall++;
      if (dut.ev_bypass)  n_bypass++;
      if (dut.ev_replace) n_replace++;
      if (in_valid && in_ready) begin
        check(cycle - last_acc >= 3, "acceptances at least 3 cycles apart");
        if (free_run && cycle - last_acc == 3) n_ii3++;
        if (free_run) check(cycle - last_acc == 3, "interval 3 while unobstructed");
        last_acc = cycle;
        acc_prev = 1'b1;
        exp_q.push_back(model_push(in_data));
        n_in++;
      end
      if (out_valid && out_ready) begin
        sort_rec_t e;
        check(exp_q.size() > 0, "output without input");
        e = exp_q.pop_front();
        check(out_data == e, $sformatf("output %0d matches reference", n_out));
        if (n_out < CAP) begin
          if (out_data == REC_ZERO) n_zero_head++;
        end else if (out_data.payload < N_GOOD) begin
          if (seen[out_data.payload]) check(1'b0, "record emitted twice");
          seen[out_data.payload] = 1'b1;
        end
        if (have_prev) begin
          if (prev_out.key > out_data.key && m_le(prev_out.key, out_data.key)) n_wrap++;
          if (!m_le(prev_out.key, out_data.key)) begin
            if (n_in <= N_GOOD) n_order_err_good++;
            else n_order_err_bad++;
          end
        end
        prev_out = out_data;
        have_prev = 1'b1;
        n_out++;
      end
    end
  end

  // mechanism counters inside the pipeline
  int n_stop [1:NM];
  int n_left [1:NM];
  int n_right[1:NM];
  int n_fwd  [1:NM];
  for (genvar s = 1; s <= NM; s++) begin : g_cnt
    initial begin n_stop[s] = 0; n_left[s] = 0; n_right[s] = 0; n_fwd[s] = 0; end
    always @(posedge clk) begin
      case (dut.act[s])
        ACT_STOP:  n_stop[s]++;
        ACT_LEFT:  n_left[s]++;
        ACT_RIGHT: n_right[s]++;
        default: ;
      endcase
    end
    if (s < NM) begin : g_fwd
      always @(posedge clk)
        if (dut.st_valid[s] && dut.wr_en[s+1] &&
            (dut.wr_addr[s+1][s-1:0] == dut.rd_addr_l[s][s-1:0] ||
             dut.wr_addr[s+1][s-1:0] == dut.rd_addr_r[s][s-1:0]))
          n_fwd[s]++;
    end
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- driver
  initial begin
    int busy_cycles;
    bit taken;
    busy_cycles = 0;
    for (int i = 0; i < NM; i++)
      for (int j = 0; j < (1 << (NM - 1)); j++) heap[i][j] = REC_ZERO;
    make_stream();
    rst = 1'b1; in_valid = 1'b0; in_data = '0; out_ready = 1'b1;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    while (busy) begin
      check(!in_ready, "no input taken while clearing");
      @(posedge clk); #1;
      busy_cycles++;
    end
    check(busy_cycles == (1 << (NM - 1)), $sformatf("clear took %0d cycles", busy_cycles));
    for (int k = 0; k < N_ALL; k++) begin
      automatic int phase = (k / 4096) % 4;
      // phase 0: free running; 1: backpressure; 2: input gaps; 3: both
      free_run  = (phase == 0) && (k % 4096 > 0);
      in_valid  = 1'b1;
      in_data   = stream[k];
      do begin
        out_ready = (phase == 1 || phase == 3) ? ($urandom_range(2) != 0) : 1'b1;
        #1 taken = in_ready;
        @(posedge clk); #1;
      end while (!taken);
      if (phase >= 2 && $urandom_range(3) == 0) begin
        in_valid = 1'b0;
        repeat ($urandom_range(4)) @(posedge clk);
        #1;
      end
    end
    // directed records that fall between the top and both of its children,
    // so that the sift-down ends in layer 1
    free_run = 1'b0;
    for (int k = 0; k < 8; k++) begin
      in_valid = 1'b1;
      in_data.key = m_le(heap[1][0].key, heap[1][1].key) ? heap[1][0].key : heap[1][1].key;
      in_data.payload = N_ALL + k;
      do begin
        #1 taken = in_ready;
        @(posedge clk); #1;
      end while (!taken);
    end
    in_valid  = 1'b0;
    out_ready = 1'b1;
    repeat (50) @(posedge clk);
    #1;
    // summary
    check(n_out == N_ALL + 8 && exp_q.size() == 0, "one output per input");
    check(n_zero_head == CAP, $sformatf("%0d initial zero records", n_zero_head));
    check(n_order_err_good == 0, "in-capacity stream leaves sorted");
    check(n_order_err_bad > 0, "over-capacity stream leaves unsorted");
    begin
      automatic int n_seen = 0;
      for (int i = 0; i < N_GOOD; i++) if (seen[i]) n_seen++;
      // all but the last CAP records of the good stream have been pushed out
      check(n_seen >= N_GOOD - CAP, "records of the stream emitted");
    end
    check(n_bypass > 0, "bypass occurred");
    check(n_replace > 0, "replace occurred");
    check(n_ii3 > 1000, "back-to-back records at interval 3");
    check(n_stall > 0, "backpressure occurred");
    check(n_wrap >= 1, "timestamp wrapped");
    for (int s = 1; s <= NM; s++) begin
      check(n_stop[s] > 0, $sformatf("stop in layer %0d", s));
      if (s < NM) begin
        check(n_left[s] > 0, $sformatf("left move in layer %0d", s));
        check(n_right[s] > 0, $sformatf("right move in layer %0d", s));
        // the last layer is written as soon as a record reaches it, two
        // cycles before the next sift-down can read it: no forwarding there
        if (s < NM - 1) check(n_fwd[s] > 0, $sformatf("forwarding into layer %0d", s));
      end
    end
    $display("in=%0d out=%0d bypass=%0d replace=%0d stalls=%0d wraps=%0d ii3=%0d",
             n_in, n_out, n_bypass, n_replace, n_stall, n_wrap, n_ii3);
    $display("order errors: in-capacity=%0d over-capacity=%0d", n_order_err_good, n_order_err_bad);
    for (int s = 1; s <= NM; s++)
      $display("layer %0d: stop=%0d left=%0d right=%0d fwd=%0d", s, n_stop[s], n_left[s],
               n_right[s], n_fwd[s]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

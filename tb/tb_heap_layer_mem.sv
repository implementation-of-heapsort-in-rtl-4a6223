// tb_heap_layer_mem: self-checking test of one heap layer memory.
//
// Uses LEVEL = 3 (8 records). Checks that busy is high for exactly 2^LEVEL
// cycles after reset and that every record then reads as zero, that writes
// made while busy are ignored, and then runs random traffic on both read
// ports and the write port against a reference array, including reads of
// the address being written in the same cycle, which must return the new
// record (write-first).
module tb_heap_layer_mem;
  import heap_sort_pkg::*;

  localparam int LEVEL = 3;
  localparam int DEPTH = 1 << LEVEL;

  logic             clk = 1'b0;
  logic             rst;
  logic             busy;
  logic [LEVEL-1:0] ra_l, ra_r, wa;
  sort_rec_t        rd_l, rd_r, wd;
  logic             we;
  int               checks = 0, failures = 0;
  int               same_cycle_hits = 0;

  sort_rec_t model [DEPTH];
  sort_rec_t exp_l, exp_r;

  heap_layer_mem #(.LEVEL(LEVEL)) dut (
    .clk, .rst, .busy,
    .rd_addr_l(ra_l), .rd_addr_r(ra_r), .rd_data_l(rd_l), .rd_data_r(rd_r),
    .we, .wr_addr(wa), .wr_data(wd));

  always #5 clk = !clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int busy_cycles;
    rst = 1'b1; we = 1'b0; wa = '0; wd = '0; ra_l = '0; ra_r = '0;
    @(posedge clk); #1;
    rst = 1'b0;
    // a write while clearing must be ignored
    we = 1'b1; wa = 3'd5; wd = '1;
    busy_cycles = 0;
    while (busy) begin
      @(posedge clk); #1;
      busy_cycles++;
      we = 1'b0;
    end
    check(busy_cycles == DEPTH, $sformatf("busy lasted %0d cycles", busy_cycles));
    for (int i = 0; i < DEPTH; i++) model[i] = REC_ZERO;
    // every record reads as zero after the clear
    for (int i = 0; i < DEPTH; i += 2) begin
      ra_l = LEVEL'(i); ra_r = LEVEL'(i + 1);
      @(posedge clk); #1;
      check(rd_l == REC_ZERO && rd_r == REC_ZERO, "cleared record not zero");
    end
    // random traffic
    for (int n = 0; n < 1000; n++) begin
      we   = $urandom_range(1) == 1;
      wa   = LEVEL'($urandom_range(DEPTH - 1));
      wd.key = KEY_W'($urandom());
      wd.payload = $urandom();
      ra_l = (n % 4 == 0) ? wa : LEVEL'($urandom_range(DEPTH - 1));
      ra_r = (n % 4 == 1) ? wa : LEVEL'($urandom_range(DEPTH - 1));
      exp_l = (we && wa == ra_l) ? wd : model[ra_l];
      exp_r = (we && wa == ra_r) ? wd : model[ra_r];
      if (we && (wa == ra_l || wa == ra_r)) same_cycle_hits++;
      if (we) model[wa] = wd;
      @(posedge clk); #1;
      check(rd_l == exp_l, "left read port");
      check(rd_r == exp_r, "right read port");
    end
    check(same_cycle_hits > 100, "too few same-cycle read/write cases");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// heap_sorter: streaming heap sorter for timestamped records.
//
// Records from several sources arrive nearly, but not exactly, in timestamp
// order. The sorter keeps the last 2^NM - 1 records in a binary min-heap
// (ordered by wrap-around timestamp) and, for each record that arrives,
// emits the oldest of "the new record and everything stored". A stream in
// which no record is overtaken by more than 2^NM - 1 later records therefore
// leaves the sorter in order. Timestamps may wrap, as long as the records
// in flight span less than half the timestamp period.
//
// Structure: layer 0 (the top) lives in the top node controller
// (heap_top_ctrl); layers 1..NM-1 each have their own memory of 2^s records
// (heap_layer_mem). A node controller per layer (heap_node_ctrl, s = 1..NM)
// moves a replaced top record down the heap, one layer every two cycles.
// Node s reads layer s and writes layer s-1, so the sift-downs of successive
// records overlap in a pipeline, each a few layers behind the previous one.
// Within layer s the children of slot j of layer s-1 are at j and
// j + 2^(s-1).
//
// Interface: valid-ready streams of sort_rec_t (16-bit key, 32-bit payload)
// on input and output. One output per input, one cycle after acceptance; a
// new input at most every II = 3 cycles. After reset, busy stays high (and
// in_ready low) for 2^(NM-1) cycles while the memories are cleared; the heap
// then holds 2^NM - 1 all-zero records, which are the first records to come
// out. The last records of a stream are pushed out by feeding newer ones.
//
// Follows the document: the heap layout and the three-case node decision,
// the per-layer memories, the wrap-around comparison, NM = 11 layers,
// II = 3. This design's own: the two-cycle stage, the write-first memory
// read that lets a sift-down follow the previous one three cycles behind,
// the handshake and the clear-after-reset sequence.
module heap_sorter
  import heap_sort_pkg::*;
#(
  parameter int unsigned NM = 11,
  parameter int unsigned II = 3
) (
  input  logic      clk,
  input  logic      rst,
  output logic      busy,
  input  logic      in_valid,
  output logic      in_ready,
  input  sort_rec_t in_data,
  output logic      out_valid,
  input  logic      out_ready,
  output sort_rec_t out_data
);

  initial begin
    if (NM < 2) $error("heap_sorter: NM must be at least 2");
  end

  // stage s input (s = 1..NM); index 1 is driven by the top controller
  logic          st_valid [1:NM+1];
  sort_rec_t     st_cur   [1:NM+1];
  logic [NM-1:0] st_offs  [1:NM+1];
  // node s ports
  logic [NM-1:0] rd_addr_l [1:NM];
  logic [NM-1:0] rd_addr_r [1:NM];
  sort_rec_t     rd_data_l [1:NM];
  sort_rec_t     rd_data_r [1:NM];
  logic          wr_en     [1:NM];
  logic [NM-1:0] wr_addr   [1:NM];
  sort_rec_t     wr_data   [1:NM];
  node_act_t     act       [1:NM];
  logic          mem_busy  [1:NM-1];
  logic [NM-1:0] busy_vec;
  logic          ev_bypass, ev_replace;

  heap_top_ctrl #(.NM(NM), .II(II)) u_tc (
    .clk, .rst,
    .init_busy (busy),
    .in_valid, .in_ready, .in_data,
    .out_valid, .out_ready, .out_data,
    .sift_valid(st_valid[1]),
    .sift_cur  (st_cur[1]),
    .sift_offs (st_offs[1]),
    .top_we    (wr_en[1]),
    .top_wdata (wr_data[1]),
    .ev_bypass,
    .ev_replace
  );

  for (genvar s = 1; s <= NM; s++) begin : g_stage
    heap_node_ctrl #(.NM(NM), .LEVEL(s)) u_node (
      .clk, .rst,
      .in_valid (st_valid[s]),
      .in_cur   (st_cur[s]),
      .in_offs  (st_offs[s]),
      .rd_addr_l(rd_addr_l[s]),
      .rd_addr_r(rd_addr_r[s]),
      .rd_data_l(rd_data_l[s]),
      .rd_data_r(rd_data_r[s]),
      .wr_en    (wr_en[s]),
      .wr_addr  (wr_addr[s]),
      .wr_data  (wr_data[s]),
      .out_valid(st_valid[s+1]),
      .out_cur  (st_cur[s+1]),
      .out_offs (st_offs[s+1]),
      .act      (act[s])
    );

    if (s < NM) begin : g_mem
      // layer s: read by node s, written by node s+1
      heap_layer_mem #(.LEVEL(s)) u_mem (
        .clk, .rst,
        .busy     (mem_busy[s]),
        .rd_addr_l(rd_addr_l[s][s-1:0]),
        .rd_addr_r(rd_addr_r[s][s-1:0]),
        .rd_data_l(rd_data_l[s]),
        .rd_data_r(rd_data_r[s]),
        .we       (wr_en[s+1]),
        .wr_addr  (wr_addr[s+1][s-1:0]),
        .wr_data  (wr_data[s+1])
      );
      assign busy_vec[s] = mem_busy[s];
    end else begin : g_no_mem
      // the last layer has no children
      assign rd_data_l[s] = REC_ZERO;
      assign rd_data_r[s] = REC_ZERO;
    end
  end

  assign busy_vec[0] = 1'b0;
  assign busy = |busy_vec;

  // An output record that is not taken stays on the port unchanged.
  a_out_hold: assert property (@(posedge clk) disable iff (rst)
    out_valid && !out_ready |=> out_valid && $stable(out_data));

endmodule

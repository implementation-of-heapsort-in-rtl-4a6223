// heap_top_ctrl: top node controller of the streaming heap sorter.
//
// Holds layer 0 of the heap, the single record at its top, which is always
// the oldest record stored. For every accepted input record it decides:
//   input <= top (wrap-around): the input is older than anything stored and
//                               goes straight to the output ("bypass");
//   otherwise                 : the top goes to the output and the input is
//                               handed to the layer-1 node controller, which
//                               starts sifting it down ("replace").
// The top register itself is rewritten two cycles later by the layer-1 node
// controller (top_we/top_wdata), with the input or with one of its children.
//
// Interface: in_valid/in_ready and out_valid/out_ready are valid-ready
// handshakes; a transfer happens in a cycle where both are high. Exactly one
// output record is produced per input record, registered, one cycle after
// the input is accepted. in_ready is low while the heap memories are being
// cleared after reset (init_busy), for II-1 cycles after each accepted
// record, and while an output record is waiting and out_ready is low. The
// sorter thus takes a new record every II cycles at most; the pipeline needs
// II >= 3 (the parent slot written by a sift-down is read by the next one
// three cycles later). The constant interval of 3 follows the document; the
// valid-ready handshake and the output register are this design's choice.
module heap_top_ctrl
  import heap_sort_pkg::*;
#(
  parameter int unsigned NM = 11,
  parameter int unsigned II = 3
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          init_busy,
  // input stream
  input  logic          in_valid,
  output logic          in_ready,
  input  sort_rec_t     in_data,
  // output stream
  output logic          out_valid,
  input  logic          out_ready,
  output sort_rec_t     out_data,
  // to the layer-1 node controller
  output logic          sift_valid,
  output sort_rec_t     sift_cur,
  output logic [NM-1:0] sift_offs,
  // top slot write, from the layer-1 node controller
  input  logic          top_we,
  input  sort_rec_t     top_wdata,
  // status: one pulse per accepted record
  output logic          ev_bypass,
  output logic          ev_replace
);

  localparam int unsigned GW = $clog2(II + 1);

  initial begin
    if (II < 3) $error("heap_top_ctrl: II must be at least 3");
  end

  sort_rec_t top;
  logic [GW-1:0] gap;
  logic in_le_top, unused_in_lt_top;
  logic accept;

  ts_compare #(.KEY_W(KEY_W)) u_cmp_top (
    .a(in_data.key), .b(top.key), .a_lt_b(unused_in_lt_top), .a_le_b(in_le_top));

  always_comb begin
    in_ready   = !init_busy && (gap == '0) && (!out_valid || out_ready);
    accept     = in_valid && in_ready;
    ev_bypass  = accept && in_le_top;
    ev_replace = accept && !in_le_top;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      top        <= REC_ZERO;
      gap        <= '0;
      out_valid  <= 1'b0;
      sift_valid <= 1'b0;
    end else begin
      if (top_we) top <= top_wdata;
      if (accept)           gap <= GW'(II - 1);
      else if (gap != '0)   gap <= gap - 1'b1;
      if (accept)         out_valid <= 1'b1;
      else if (out_ready) out_valid <= 1'b0;
      sift_valid <= ev_replace;
    end
    if (accept) out_data <= in_le_top ? in_data : top;
    sift_cur <= in_data;
  end

  assign sift_offs = '0;

endmodule

// heap_node_ctrl: node controller for one layer of the streaming heap.
//
// A sift-down passes through one of these stages per layer. The stage with
// LEVEL = s receives a record T ("cur") that is to be placed in slot offs of
// layer s-1, whose old content has already moved up. The two children of
// that slot are in layer s at addresses offs (L) and offs + 2^(s-1) (R).
// The stage then does one of three things:
//   T <= L and T <= R : T goes into the slot, the sift-down ends;
//   L <  T and L <= R : L moves up into the slot, T continues to L's place;
//   R <  T and R <  L : R moves up into the slot, T continues to R's place.
// "<" and "<=" are wrap-around timestamp comparisons (ts_compare). If none
// of the cases holds, which wrap-around ordering allows only for records
// more than half a timestamp period apart, T is placed in the slot as in the
// first case so that no record is lost; this fallback is a choice of this
// design. The stage for the last layer (LEVEL = NM) has no children and
// always places T.
//
// Timing (LEVEL < NM): in cycle n the stage presents the child addresses to
// the layer-s memory from its input register; in cycle n+1 the children
// arrive, are compared, the parent slot is written (wr_* is combinational)
// and T with its new offset is registered towards the next stage, which
// therefore starts in cycle n+2. The last stage writes in the cycle its
// input arrives. in_* must come from a register. act reports the decision
// in the cycle the write is made. Address ports are NM bits wide; only the
// low LEVEL bits (reads) and LEVEL-1 bits (write) are meaningful.
module heap_node_ctrl
  import heap_sort_pkg::*;
#(
  parameter int unsigned NM    = 11,
  parameter int unsigned LEVEL = 1
) (
  input  logic          clk,
  input  logic          rst,
  // record moving down, from the stage above
  input  logic          in_valid,
  input  sort_rec_t     in_cur,
  input  logic [NM-1:0] in_offs,
  // read ports of the memory of layer LEVEL (children)
  output logic [NM-1:0] rd_addr_l,
  output logic [NM-1:0] rd_addr_r,
  input  sort_rec_t     rd_data_l,
  input  sort_rec_t     rd_data_r,
  // write port of the memory of layer LEVEL-1 (parent slot)
  output logic          wr_en,
  output logic [NM-1:0] wr_addr,
  output sort_rec_t     wr_data,
  // record moving on, to the stage below
  output logic          out_valid,
  output sort_rec_t     out_cur,
  output logic [NM-1:0] out_offs,
  output node_act_t     act
);

  initial begin
    if (LEVEL < 1 || LEVEL > NM) $error("heap_node_ctrl: LEVEL must be 1..NM");
  end

  if (LEVEL == NM) begin : g_leaf

    always_comb begin
      rd_addr_l = '0;
      rd_addr_r = '0;
      wr_en     = in_valid;
      wr_addr   = in_offs;
      wr_data   = in_cur;
      act       = in_valid ? ACT_STOP : ACT_NONE;
    end

    assign out_valid = 1'b0;
    assign out_cur   = REC_ZERO;
    assign out_offs  = '0;

  end else begin : g_node

    localparam logic [NM-1:0] HALF = NM'(1) << (LEVEL - 1);

    logic          p_valid;
    sort_rec_t     p_cur;
    logic [NM-1:0] p_offs;
    logic          cur_le_l, cur_le_r, l_le_r;
    logic          l_lt_cur, r_lt_cur;
    logic          unused_lt0, unused_lt1, unused_lt2;
    logic          go_left, go_right;

    // cycle n: child addresses
    assign rd_addr_l = in_offs;
    assign rd_addr_r = in_offs + HALF;

    always_ff @(posedge clk) begin
      if (rst) p_valid <= 1'b0;
      else     p_valid <= in_valid;
      p_cur  <= in_cur;
      p_offs <= in_offs;
    end

    // cycle n+1: compare T with its children
    ts_compare #(.KEY_W(KEY_W)) u_cmp_cl (
      .a(p_cur.key), .b(rd_data_l.key), .a_lt_b(unused_lt0), .a_le_b(cur_le_l));
    ts_compare #(.KEY_W(KEY_W)) u_cmp_cr (
      .a(p_cur.key), .b(rd_data_r.key), .a_lt_b(unused_lt1), .a_le_b(cur_le_r));
    ts_compare #(.KEY_W(KEY_W)) u_cmp_lr (
      .a(rd_data_l.key), .b(rd_data_r.key), .a_lt_b(unused_lt2), .a_le_b(l_le_r));

    always_comb begin
      // L < T is the negation of T <= L (likewise for R)
      l_lt_cur = !cur_le_l;
      r_lt_cur = !cur_le_r;
      go_left  = 1'b0;
      go_right = 1'b0;
      if (!(cur_le_l && cur_le_r)) begin
        if (l_lt_cur && l_le_r) go_left  = 1'b1;
        else if (r_lt_cur)      go_right = 1'b1;
      end

      wr_en   = p_valid;
      wr_addr = p_offs;
      if (go_left)       wr_data = rd_data_l;
      else if (go_right) wr_data = rd_data_r;
      else               wr_data = p_cur;

      if (!p_valid)      act = ACT_NONE;
      else if (go_left)  act = ACT_LEFT;
      else if (go_right) act = ACT_RIGHT;
      else               act = ACT_STOP;
    end

    always_ff @(posedge clk) begin
      if (rst) out_valid <= 1'b0;
      else     out_valid <= p_valid && (go_left || go_right);
      out_cur  <= p_cur;
      out_offs <= go_right ? p_offs + HALF : p_offs;
    end

  end

endmodule

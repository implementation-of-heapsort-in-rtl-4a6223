// heap_layer_mem: storage for one layer of the heap.
//
// Layer LEVEL of the heap holds 2^LEVEL records, so every layer gets a memory
// of its own size; this separation per layer is what lets all layers be
// accessed in the same clock cycle. The memory has two synchronous read
// ports, used by the node controller below the layer to fetch the left and
// right child of one node at once, and one write port, used by the node
// controller above it to move a record into this layer.
//
// Timing: an address presented in cycle n gives its record in cycle n+1. A
// read and a write of the same address in the same cycle return the record
// being written (write-first). The sorter pipeline relies on this: with a
// new record every 3 cycles, the next sift-down reads a slot in exactly the
// cycle the previous one writes it.
//
// Reset: rst (synchronous, active high) starts a clear sequence that writes
// the all-zero record to every address, one per cycle; busy is high until
// it is done (2^LEVEL cycles). The heap thus starts full of zero records,
// which are the first 2^NM-1 records the sorter emits. Writes on the write
// port are ignored while busy.
//
// One exactly-sized memory per layer follows the document; the port count,
// the write-first read and the clear sequence are this design's choices.
module heap_layer_mem
  import heap_sort_pkg::*;
#(
  parameter int unsigned LEVEL = 1,
  localparam int unsigned DEPTH = 1 << LEVEL
) (
  input  logic             clk,
  input  logic             rst,
  output logic             busy,
  input  logic [LEVEL-1:0] rd_addr_l,
  input  logic [LEVEL-1:0] rd_addr_r,
  output sort_rec_t        rd_data_l,
  output sort_rec_t        rd_data_r,
  input  logic             we,
  input  logic [LEVEL-1:0] wr_addr,
  input  sort_rec_t        wr_data
);

  sort_rec_t        mem [DEPTH];
  logic [LEVEL-1:0] clr_addr;
  logic             mem_we;
  logic [LEVEL-1:0] mem_waddr;
  sort_rec_t        mem_wdata;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy     <= 1'b1;
      clr_addr <= '0;
    end else if (busy) begin
      clr_addr <= clr_addr + 1'b1;
      if (clr_addr == LEVEL'(DEPTH - 1)) busy <= 1'b0;
    end
  end

  always_comb begin
    if (busy) begin
      mem_we    = 1'b1;
      mem_waddr = clr_addr;
      mem_wdata = REC_ZERO;
    end else begin
      mem_we    = we;
      mem_waddr = wr_addr;
      mem_wdata = wr_data;
    end
  end

  always_ff @(posedge clk) begin
    if (mem_we) mem[mem_waddr] <= mem_wdata;
    rd_data_l <= (mem_we && mem_waddr == rd_addr_l) ? mem_wdata : mem[rd_addr_l];
    rd_data_r <= (mem_we && mem_waddr == rd_addr_r) ? mem_wdata : mem[rd_addr_r];
  end

endmodule

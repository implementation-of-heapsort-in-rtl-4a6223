// heap_sort_pkg: record format shared by the streaming heap sorter.
//
// A record is a 16-bit timestamp (the sort key) and a 32-bit payload that
// travels with it untouched, the format the sorter was evaluated with. The
// key is compared with wrap-around arithmetic (see ts_compare), so a stream
// may run far longer than the 2^16 timestamp period. The packed struct puts
// the key in the upper bits; the all-zero record is the value the heap is
// filled with after reset.
package heap_sort_pkg;

  parameter int unsigned KEY_W = 16;  // timestamp width
  parameter int unsigned PAY_W = 32;  // payload width

  typedef logic [KEY_W-1:0] key_t;
  typedef logic [PAY_W-1:0] payload_t;

  typedef struct packed {
    key_t     key;
    payload_t payload;
  } sort_rec_t;

  localparam sort_rec_t REC_ZERO = '0;

  // What a node controller did with the record moving down (status only).
  typedef enum logic [1:0] {
    ACT_NONE  = 2'd0,  // no record at this stage
    ACT_STOP  = 2'd1,  // record placed in the parent slot, sift-down ends
    ACT_LEFT  = 2'd2,  // left child moved up, record continues to the left
    ACT_RIGHT = 2'd3   // right child moved up, record continues to the right
  } node_act_t;

endpackage

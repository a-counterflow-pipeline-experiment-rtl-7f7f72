// cf_pkg: types and constants shared by the counterflow ring.
//
// A data item is eight bits: one marker bit, a two-bit address and a five-bit
// count value, in that order from the most significant bit (the item format is
// the document's). The count value is advanced by a maximal-length five-bit
// linear feedback shift register, so "increment" means "step to the next of 31
// non-zero states": the count is a counter modulo 31. The feedback polynomial
// x^5 + x^3 + 1 is this design's choice; any maximal-length one would do.
//
// The access selector picks what the external load/unload bus addresses: the
// north or south half of a stage, or one of the two cycle counters.
package cf_pkg;

  localparam int unsigned ADDR_W  = 2;   // item address bits
  localparam int unsigned CNT_W   = 5;   // item count-value bits (LFSR)
  localparam int unsigned ITEM_W  = 1 + ADDR_W + CNT_W;
  localparam int unsigned CYC_W   = 48;  // cycle counter width

  typedef struct packed {
    logic              marker;
    logic [ADDR_W-1:0] addr;
    logic [CNT_W-1:0]  count;
  } item_t;

  // Access bus selector.
  typedef enum logic [1:0] {
    ACC_NORTH  = 2'd0,   // north half of stage acc_idx: {full, item}
    ACC_SOUTH  = 2'd1,   // south half of stage acc_idx: {full, item}
    ACC_NCYC   = 2'd2,   // north cycle counter
    ACC_SCYC   = 2'd3    // south cycle counter
  } acc_sel_e;

  // One step of the Fibonacci LFSR x^5 + x^3 + 1: shift left, feed back
  // bit 4 xor bit 2. Zero maps to zero and is never reached from a non-zero
  // state.
  function automatic logic [CNT_W-1:0] lfsr_next(input logic [CNT_W-1:0] c);
    return {c[CNT_W-2:0], c[4] ^ c[2]};
  endfunction

endpackage

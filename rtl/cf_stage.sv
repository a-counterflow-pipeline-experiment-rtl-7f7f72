// cf_stage: one stage of the counterflow ring.
//
// A stage has a northbound half and a southbound half. Each half has a control
// latch that says whether it is full or empty (the SR latch of the asP* control
// circuit: a move in sets it, a move out resets it) and an eight-bit data latch
// that captures the item moving in. Set and reset never coincide, because a
// half can only be entered while empty and only be left while full. The
// FULL/EMPTY box of the stage and one incrementer per half sit alongside: when
// the stage holds two items with equal addresses, both count values step once
// (the "garnering" stand-in) while the box keeps both items in place.
//
// Clocked reimplementation: full flags and data are flip-flops updated on the
// rising clock edge; a move is a one-clock pulse from the COP on the boundary.
// The load port (wr_n / wr_s with wr_full and wr_item) writes one half
// directly; the ring only lets it through while stopped, so it never meets a
// move. Both halves are empty after reset; the data latches reset to zero.
module cf_stage
  import cf_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  // northbound half
  input  logic  n_in,          // move into this stage from the previous one
  input  item_t n_in_item,
  input  logic  n_out,         // move out to the next stage
  // southbound half
  input  logic  s_in,          // move into this stage from the next one
  input  item_t s_in_item,
  input  logic  s_out,         // move out to the previous stage
  // load port
  input  logic  wr_n,
  input  logic  wr_s,
  input  logic  wr_full,
  input  item_t wr_item,
  // state
  output logic  n_full,
  output logic  s_full,
  output item_t n_item,
  output item_t s_item,
  output logic  n_may_leave,
  output logic  s_may_leave,
  output logic  increment,
  output logic  meet
);

  logic             n_full_nx, s_full_nx;
  item_t            n_item_nx, s_item_nx;
  logic [CNT_W-1:0] n_cnt_inc, s_cnt_inc;

  lfsr_inc u_inc_n (.cnt_i(n_item.count), .cnt_o(n_cnt_inc));
  lfsr_inc u_inc_s (.cnt_i(s_item.count), .cnt_o(s_cnt_inc));

  fe_box u_fe (
    .clk, .rst_n,
    .n_full, .s_full,
    .n_addr(n_item.addr), .s_addr(s_item.addr),
    .n_full_nx, .s_full_nx,
    .clr(wr_n || wr_s),
    .increment, .n_may_leave, .s_may_leave, .meet
  );

  always_comb begin
    // control latches
    n_full_nx = wr_n ? wr_full : ((n_full && !n_out) || n_in);
    s_full_nx = wr_s ? wr_full : ((s_full && !s_out) || s_in);
    // data latches: capture on a move in, step the count on an increment
    n_item_nx = n_item;
    s_item_nx = s_item;
    if (increment) begin
      n_item_nx.count = n_cnt_inc;
      s_item_nx.count = s_cnt_inc;
    end
    if (n_in) n_item_nx = n_in_item;
    if (s_in) s_item_nx = s_in_item;
    if (wr_n) n_item_nx = wr_item;
    if (wr_s) s_item_nx = wr_item;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_full <= 1'b0;
      s_full <= 1'b0;
      n_item <= '0;
      s_item <= '0;
    end else begin
      n_full <= n_full_nx;
      s_full <= s_full_nx;
      n_item <= n_item_nx;
      s_item <= s_item_nx;
    end
  end

  // asP*: a control latch is never set and reset at once, moves in and out of
  // a half alternate, and the data latch is not written during an increment.
  a_n_in_empty:  assert property (@(posedge clk) disable iff (!rst_n) n_in  |-> !n_full);
  a_n_out_full:  assert property (@(posedge clk) disable iff (!rst_n) n_out |->  n_full);
  a_s_in_empty:  assert property (@(posedge clk) disable iff (!rst_n) s_in  |-> !s_full);
  a_s_out_full:  assert property (@(posedge clk) disable iff (!rst_n) s_out |->  s_full);
  a_inc_opaque:  assert property (@(posedge clk) disable iff (!rst_n)
    increment |-> !(n_in || s_in || n_out || s_out));

endmodule

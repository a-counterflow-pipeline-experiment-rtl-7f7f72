// fe_box: the FULL/EMPTY box of one stage.
//
// It watches the north and south control latches of its stage and the two
// address fields. When the stage holds both a northbound and a southbound item
// (the "full" state of the five-state stage behaviour) and their addresses
// match, the two items must interact before either may leave: the box issues
// a one-clock increment pulse to the data path and holds North May Leave and
// South May Leave low during that clock. After the increment the stage is in
// the "interaction complete" state (done) and both items may leave, in either
// order; done is forgotten as soon as the stage no longer holds both items, so
// a later meeting increments again and no meeting increments twice.
//
// Items whose addresses differ interact by comparison alone; in this clocked
// design the comparison is combinational, so such a meeting costs no extra
// clock (this design's choice: the document gives it as a small extra delay of
// about two gate delays, against about 5.5 for a match with increment).
//
// Interface: n_full/s_full from the control latches, n_addr/s_addr from the
// data latches, clr forgets done (used when the stage is loaded externally),
// n_full_nx/s_full_nx are the latches' next values. Outputs are combinational.
module fe_box
  import cf_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              n_full,
  input  logic              s_full,
  input  logic [ADDR_W-1:0] n_addr,
  input  logic [ADDR_W-1:0] s_addr,
  input  logic              n_full_nx,
  input  logic              s_full_nx,
  input  logic              clr,
  output logic              increment,
  output logic              n_may_leave,
  output logic              s_may_leave,
  output logic              meet          // both items present (for statistics)
);

  logic done;

  always_comb begin
    meet        = n_full && s_full;
    increment   = meet && !done && (n_addr == s_addr);
    n_may_leave = !increment;
    s_may_leave = !increment;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) done <= 1'b0;
    else        done <= !clr && n_full_nx && s_full_nx && (done || increment);
  end

  // Leaving both halves of a stage is only allowed once the interaction is over.
  a_no_leave_during_inc: assert property (@(posedge clk) disable iff (!rst_n)
    increment |-> (!n_may_leave && !s_may_leave));

endmodule

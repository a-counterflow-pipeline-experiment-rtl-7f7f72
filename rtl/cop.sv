// cop: the traffic controller on one stage boundary.
//
// A northbound item on one side and a southbound item on the other side of a
// boundary may both want to cross it. Letting both cross at once would swap
// them without their ever sharing a stage, so the boundary admits at most one
// move per clock. As in the document, the COP is a mutual-exclusion element
// (MUTEX) followed by two AND gates: the MUTEX grants one of the two requests,
// and each grant only becomes a move while the "May Leave" signal of the stage
// the item leaves is high. A FULL/EMPTY box lowers May Leave while two items in
// its stage still have to interact, which stretches the blocking of the move
// beyond the arbitration.
//
// Clocked reimplementation (this design's choice; the original is
// asynchronous): requests are levels (source full and destination empty).
// A grant that could not become a move because May Leave was low is held, and
// keeps the other side out, until the move happens, as a MUTEX keeps its grant
// until the request is withdrawn. When both requests arrive in the same clock
// and no grant is held, the side that did not win the last contest wins
// (alternating priority); the document leaves the outcome of a tie to the
// arbiter.
//
// Interface: n_req/s_req requests, n_may_leave/s_may_leave from the source
// stages, n_move/s_move move pulses (one clock each) to both stages. A move is
// combinational from its request in the same clock.
module cop (
  input  logic clk,
  input  logic rst_n,
  input  logic n_req,
  input  logic s_req,
  input  logic n_may_leave,
  input  logic s_may_leave,
  output logic n_move,
  output logic s_move,
  output logic contest        // both requests present and no grant held
);

  logic held_n, held_s;       // grant given but not yet turned into a move
  logic prio_n;               // north wins the next contest
  logic n_grant, s_grant;

  always_comb begin
    contest = n_req && s_req && !held_n && !held_s;
    n_grant = held_n || (!held_s && n_req && (!s_req ||  prio_n));
    s_grant = held_s || (!held_n && s_req && (!n_req || !prio_n));
    n_move  = n_grant && n_req && n_may_leave;
    s_move  = s_grant && s_req && s_may_leave;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      held_n <= 1'b0;
      held_s <= 1'b0;
      prio_n <= 1'b1;
    end else begin
      held_n <= n_grant && n_req && !n_may_leave;
      held_s <= s_grant && s_req && !s_may_leave;
      if (contest) prio_n <= !n_grant;
    end
  end

  // The MUTEX property: never a north and a south move on one boundary.
  a_mutex: assert property (@(posedge clk) disable iff (!rst_n) !(n_move && s_move));
  a_grant: assert property (@(posedge clk) disable iff (!rst_n) !(n_grant && s_grant));

endmodule

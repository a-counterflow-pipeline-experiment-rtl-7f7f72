// tb_cop: checks the boundary controller (MUTEX plus May-Leave gates).
//
// Directed cases first: a lone request moves in its own clock; a tie goes to
// north, then the next tie to south (alternating); a grant blocked by May
// Leave keeps the other side out until the granted move has happened. Then
// a random environment in which each request, once raised, stays up until its
// move (as a full-source/empty-destination request does in the ring) and May
// Leave drops at random. Every clock is compared with a reference arbiter
// kept in the testbench, and the MUTEX property, the gating by May Leave and a
// bound on waiting are checked.
module tb_cop;
  logic clk = 0, rst_n = 0;
  logic n_req = 0, s_req = 0, n_ml = 1, s_ml = 1;
  logic n_move, s_move, contest;
  int checks = 0, failures = 0;

  cop dut (.clk, .rst_n, .n_req, .s_req, .n_may_leave(n_ml), .s_may_leave(s_ml),
           .n_move, .s_move, .contest);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // reference arbiter: 0 none, 1 north, 2 south
  int owner = 0;
  bit ref_prio_n = 1;
  bit exp_n, exp_s;

  task automatic ref_eval();
    int g;
    g = owner;
    if (g == 0) begin
      if (n_req && s_req) g = ref_prio_n ? 1 : 2;
      else if (n_req) g = 1;
      else if (s_req) g = 2;
    end
    exp_n = (g == 1) && n_req && n_ml;
    exp_s = (g == 2) && s_req && s_ml;
  endtask

  task automatic ref_update();
    int g;
    g = owner;
    if (g == 0 && n_req && s_req) begin
      g = ref_prio_n ? 1 : 2;
      ref_prio_n = (g == 2);
    end else if (g == 0 && n_req) g = 1;
    else if (g == 0 && s_req) g = 2;
    if ((g == 1 && n_req && n_ml) || (g == 2 && s_req && s_ml)) owner = 0;
    else if (g == 1 && n_req) owner = 1;
    else if (g == 2 && s_req) owner = 2;
    else owner = 0;
  endtask

  // sample just before the rising edge
  task automatic step_and_check(input string tag);
    @(negedge clk);
    ref_eval();
    check(n_move == exp_n && s_move == exp_s,
          $sformatf("%s: moves n=%0b s=%0b expected n=%0b s=%0b", tag, n_move, s_move, exp_n, exp_s));
    check(!(n_move && s_move), {tag, ": both sides moved"});
    check(!(n_move && !n_ml) && !(s_move && !s_ml), {tag, ": move while May Leave low"});
    ref_update();
    @(posedge clk);
  endtask

  int n_wait, s_wait, ties, blocks;
  bit mv_n, mv_s;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    // lone request
    n_req = 1; @(negedge clk); check(n_move && !s_move, "lone north moves at once");
    ref_update(); @(posedge clk); #1 n_req = 0;
    s_req = 1; @(negedge clk); check(s_move && !n_move, "lone south moves at once");
    ref_update(); @(posedge clk); #1 s_req = 0;
    // two ties: north first, then south
    n_req = 1; s_req = 1; @(negedge clk);
    check(n_move && !s_move && contest, "first tie goes north");
    ref_update(); @(posedge clk); #1 n_req = 0;
    @(negedge clk); check(s_move, "south follows after the tie"); ref_update();
    @(posedge clk); #1 s_req = 0;
    n_req = 1; s_req = 1; @(negedge clk);
    check(s_move && !n_move, "second tie goes south");
    ref_update(); @(posedge clk); #1 s_req = 0;
    @(negedge clk); check(n_move, "north follows"); ref_update();
    @(posedge clk); #1 n_req = 0;
    // blocked grant keeps the boundary
    n_req = 1; n_ml = 0; @(negedge clk); check(!n_move && !s_move, "north granted but blocked");
    ref_update(); @(posedge clk); #1 s_req = 1;
    for (int i = 0; i < 3; i++) begin
      @(negedge clk); check(!s_move && !n_move, "south held out by blocked north grant");
      ref_update(); @(posedge clk); #1;
    end
    n_ml = 1; @(negedge clk); check(n_move && !s_move, "north moves once May Leave rises");
    ref_update(); @(posedge clk); #1 n_req = 0;
    @(negedge clk); check(s_move, "south moves after north"); ref_update();
    @(posedge clk); #1 s_req = 0;

    // random environment
    n_wait = 0; s_wait = 0; ties = 0; blocks = 0;
    for (int t = 0; t < 5000; t++) begin
      #1;
      if (!n_req) n_req = ($urandom_range(0, 2) != 0);
      if (!s_req) s_req = ($urandom_range(0, 2) != 0);
      n_ml = ($urandom_range(0, 3) != 0);
      s_ml = ($urandom_range(0, 3) != 0);
      if (n_req && s_req && owner == 0) ties++;
      if ((n_req && !n_ml) || (s_req && !s_ml)) blocks++;
      @(negedge clk);
      ref_eval();
      check(n_move == exp_n && s_move == exp_s,
            $sformatf("random t=%0d: moves n=%0b s=%0b expected n=%0b s=%0b", t, n_move, s_move, exp_n, exp_s));
      check(!(n_move && s_move), "random: both sides moved");
      n_wait = n_move ? 0 : (n_req ? n_wait + 1 : 0);
      s_wait = s_move ? 0 : (s_req ? s_wait + 1 : 0);
      check(n_wait < 40 && s_wait < 40, "random: request starved");
      mv_n = n_move;
      mv_s = s_move;
      ref_update();
      @(posedge clk);
      #1;
      if (mv_n) n_req = 0;
      if (mv_s) s_req = 0;
    end
    check(ties > 100 && blocks > 100, "random run exercised ties and blocking");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_cf_stage: checks one counterflow stage.
//
// The testbench plays the two neighbouring COPs. It loads a half through the
// load port, moves items in and out, and checks the full flags, the captured
// items, that a meeting with equal addresses steps both counts exactly once
// (values from the reference LFSR) while both May Leave signals are low for
// that one clock, and that a meeting with different addresses changes nothing
// and blocks nothing. A second phase runs random legal traffic and compares
// the stage with a reference model of the stage kept here.
module tb_cf_stage;
  import cf_pkg::*;
  import cf_tb_pkg::*;

  logic clk = 0, rst_n = 0;
  logic n_in = 0, n_out = 0, s_in = 0, s_out = 0, wr_n = 0, wr_s = 0, wr_full = 0;
  item_t n_in_item = '0, s_in_item = '0, wr_item = '0;
  logic n_full, s_full, n_ml, s_ml, increment, meet;
  item_t n_item, s_item;
  int checks = 0, failures = 0;

  cf_stage dut (.clk, .rst_n, .n_in, .n_in_item, .n_out, .s_in, .s_in_item, .s_out,
                .wr_n, .wr_s, .wr_full, .wr_item, .n_full, .s_full, .n_item, .s_item,
                .n_may_leave(n_ml), .s_may_leave(s_ml), .increment, .meet);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
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

  function automatic item_t mk(input bit m, input int a, input int c);
    item_t it;
    it.marker = m; it.addr = 2'(a); it.count = 5'(c);
    return it;
  endfunction

  // apply controls for one clock (set after negedge, cleared after the edge)
  task automatic tick();
    @(posedge clk); #1;
    {n_in, n_out, s_in, s_out, wr_n, wr_s} = '0;
  endtask

  // reference model
  bit    r_nf, r_sf, r_done;
  item_t r_ni, r_si;

  initial begin
    int nmoves;
    repeat (2) @(posedge clk);
    rst_n = 1; #1;
    check(!n_full && !s_full, "empty after reset");
    // load the north half
    wr_n = 1; wr_full = 1; wr_item = mk(1, 2, 5); tick();
    check(n_full && !s_full && n_item == mk(1, 2, 5), "north half loaded");
    check(n_ml && s_ml && !increment && !meet, "one item: may leave");
    // south item with the same address moves in
    s_in = 1; s_in_item = mk(0, 2, 9); tick();
    check(s_full && s_item == mk(0, 2, 9), "south item captured");
    check(meet && increment && !n_ml && !s_ml, "matching meeting blocks both and increments");
    tick();
    check(n_item == mk(1, 2, int'(lfsr_ref(5'd5))) && s_item == mk(0, 2, int'(lfsr_ref(5'd9))),
          $sformatf("counts stepped once: n=%0h s=%0h", n_item, s_item));
    check(!increment && n_ml && s_ml, "interaction complete, both may leave");
    tick();
    check(n_item.count == lfsr_ref(5'd5) && s_item.count == lfsr_ref(5'd9), "no second increment");
    // north leaves, a new north item with another address arrives
    n_out = 1; tick();
    check(!n_full && s_full, "north left");
    n_in = 1; n_in_item = mk(0, 1, 7); tick();
    check(n_full && n_item == mk(0, 1, 7) && meet && !increment && n_ml && s_ml,
          "non-matching meeting: nothing blocked");
    tick();
    check(n_item.count == 7 && s_item.count == lfsr_ref(5'd9), "non-matching meeting: counts kept");
    // both leave in one clock
    n_out = 1; s_out = 1; tick();
    check(!n_full && !s_full, "both left");
    // both arrive in one clock with equal addresses
    n_in = 1; n_in_item = mk(0, 3, 1); s_in = 1; s_in_item = mk(0, 3, 30); tick();
    check(increment && !n_ml, "simultaneous arrival: increment");
    tick();
    check(n_item.count == lfsr_ref(5'd1) && s_item.count == lfsr_ref(5'd30), "simultaneous arrival: counts");
    // unload: write empty
    wr_n = 1; wr_full = 0; tick(); wr_s = 1; wr_full = 0; tick();
    check(!n_full && !s_full, "halves written empty");

    // random legal traffic against the reference model
    r_nf = 0; r_sf = 0; r_done = 0; r_ni = n_item; r_si = s_item;
    nmoves = 0;
    for (int t = 0; t < 3000; t++) begin
      bit inc;
      @(negedge clk);
      inc = r_nf && r_sf && !r_done && (r_ni.addr == r_si.addr);
      check(increment == inc && n_ml == !inc && s_ml == !inc, $sformatf("random t=%0d: F/E outputs", t));
      n_in  = !r_nf && ($urandom_range(0, 1) == 1);
      s_in  = !r_sf && ($urandom_range(0, 1) == 1);
      n_out =  r_nf && !inc && ($urandom_range(0, 2) == 0);
      s_out =  r_sf && !inc && ($urandom_range(0, 2) == 0);
      n_in_item = item_t'($urandom_range(0, 255));
      s_in_item = item_t'($urandom_range(0, 255));
      // reference update
      if (inc) begin
        r_ni.count = lfsr_ref(r_ni.count);
        r_si.count = lfsr_ref(r_si.count);
      end
      if (n_in) r_ni = n_in_item;
      if (s_in) r_si = s_in_item;
      r_nf = (r_nf && !n_out) || n_in;
      r_sf = (r_sf && !s_out) || s_in;
      r_done = r_nf && r_sf && (r_done || inc);
      nmoves += int'(n_in) + int'(s_in);
      @(posedge clk); #1;
      {n_in, n_out, s_in, s_out} = '0;
      check(n_full == r_nf && s_full == r_sf, $sformatf("random t=%0d: full flags", t));
      if (r_nf) check(n_item == r_ni, $sformatf("random t=%0d: north item", t));
      if (r_sf) check(s_item == r_si, $sformatf("random t=%0d: south item", t));
    end
    check(nmoves > 1000, "random traffic moved items");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

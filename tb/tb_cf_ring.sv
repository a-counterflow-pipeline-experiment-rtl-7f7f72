// tb_cf_ring: checks a counterflow ring of 8 stages.
//
// The testbench follows every item itself: it watches the per-boundary move
// pulses, checks that each is legal (source half full, destination half empty,
// never a north and a south move on one boundary, no move out of a stage whose
// two items have not yet interacted, no move while stopped), and from its own
// record of which items share a stage it works out how many matching meetings
// each item has had. After the run, the counts read back through the read
// port must equal the loaded counts stepped that many times by the reference
// LFSR. The ring's marker-crossing outputs are checked against the laps the
// testbench saw.
//
// Timing checks: a lone northbound item takes exactly 8 clocks per lap; a lone
// north and a lone south item with different addresses also 8; with equal
// addresses each meeting holds them one clock, so 10 clocks per lap.
module tb_cf_ring;
  import cf_pkg::*;
  import cf_tb_pkg::*;

  localparam int R = 8;
  logic clk = 0, rst_n = 0, run = 0;
  logic wr_n = 0, wr_s = 0, wr_full = 0;
  logic [2:0] wr_idx = 0, rd_idx = 0;
  item_t wr_item = '0, rd_n_item, rd_s_item;
  logic rd_n_full, rd_s_full, n_mark_cross, s_mark_cross, busy;
  logic [R-1:0] n_move, s_move, contest, increment, meet;
  logic [3:0] no_dly [R];
  int checks = 0, failures = 0;

  cf_ring #(.NSTAGES(R)) dut (
    .clk, .rst_n, .run, .wr_n, .wr_s, .wr_idx, .wr_full, .wr_item,
    .rd_idx, .rd_n_full, .rd_n_item, .rd_s_full, .rd_s_item,
    .n_dly(no_dly), .s_dly(no_dly),
    .n_mark_cross, .s_mark_cross, .n_move, .s_move, .contest, .increment, .meet, .busy);

  always #5 clk = ~clk;
  initial for (int i = 0; i < R; i++) no_dly[i] = '0;

  initial begin
    repeat (200000) @(posedge clk);
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

  // ---- testbench record of the ring ----
  int    tn [R];          // id of north item in each stage, -1 empty
  int    ts [R];
  item_t it_data [2*R];   // loaded item per id (count as loaded)
  int    it_inc  [2*R];   // matching meetings so far
  bit    pending [R];     // pair present that still has to interact
  int    n_laps, s_laps, n_cross_seen, s_cross_seen;
  int    n_contests, n_incs, n_blocked;

  task automatic load(input bit north, input int k, input bit full, input item_t it);
    @(negedge clk);
    wr_n = north; wr_s = !north; wr_idx = 3'(k); wr_full = full; wr_item = it;
    @(posedge clk); #1;
    wr_n = 0; wr_s = 0;
    if (north) begin
      tn[k] = full ? k : -1;
      if (full) begin it_data[k] = it; it_inc[k] = 0; end
    end else begin
      ts[k] = full ? R + k : -1;
      if (full) begin it_data[R+k] = it; it_inc[R+k] = 0; end
    end
    pending[k] = (tn[k] >= 0 && ts[k] >= 0 && it_data[tn[k]].addr == it_data[ts[k]].addr);
  endtask

  task automatic clear_all();
    for (int k = 0; k < R; k++) begin
      load(1, k, 0, '0);
      load(0, k, 0, '0);
    end
  endtask

  // per-clock monitor
  always @(negedge clk) if (rst_n) begin
    int ntn [R];
    int nts [R];
    bit entered [R];
    for (int k = 0; k < R; k++) begin
      check(increment[k] == pending[k], $sformatf("stage %0d: increment %0b expected %0b", k, increment[k], pending[k]));
      entered[k] = 0;
    end
    if (!run) check(n_move == '0 && s_move == '0, "move while stopped");
    for (int k = 0; k < R; k++) begin ntn[k] = tn[k]; nts[k] = ts[k]; end
    for (int b = 0; b < R; b++) begin
      int nx;
      nx = (b + 1) % R;
      if (contest[b]) n_contests++;
      check(!(n_move[b] && s_move[b]), $sformatf("boundary %0d: north and south moved together", b));
      if (run && tn[b] >= 0 && tn[nx] < 0 && pending[b]) n_blocked++;
      if (n_move[b]) begin
        check(tn[b] >= 0 && tn[nx] < 0 && !pending[b], $sformatf("boundary %0d: illegal north move", b));
        ntn[nx] = tn[b];
        if (ntn[b] == tn[b]) ntn[b] = -1;
        entered[nx] = 1;
        if (b == R - 1) begin
          if (it_data[tn[b]].marker) n_laps++;
        end
      end
      if (s_move[b]) begin
        check(ts[nx] >= 0 && ts[b] < 0 && !pending[nx], $sformatf("boundary %0d: illegal south move", b));
        nts[b] = ts[nx];
        if (nts[nx] == ts[nx]) nts[nx] = -1;
        entered[b] = 1;
        if (b == R - 1) begin
          if (it_data[ts[nx]].marker) s_laps++;
        end
      end
    end
    if (n_mark_cross) n_cross_seen++;
    if (s_mark_cross) s_cross_seen++;
    for (int k = 0; k < R; k++) begin
      if (pending[k]) begin
        n_incs++;
        it_inc[tn[k]]++;
        it_inc[ts[k]]++;
        pending[k] = 0;
      end
      tn[k] = ntn[k];
      ts[k] = nts[k];
    end
    for (int k = 0; k < R; k++)
      if (entered[k] && tn[k] >= 0 && ts[k] >= 0 && it_data[tn[k]].addr == it_data[ts[k]].addr)
        pending[k] = 1;
  end

  task automatic check_contents(input string tag);
    for (int k = 0; k < R; k++) begin
      rd_idx = 3'(k); #1;
      check(rd_n_full == (tn[k] >= 0) && rd_s_full == (ts[k] >= 0), $sformatf("%s: stage %0d fullness", tag, k));
      if (tn[k] >= 0) begin
        item_t e;
        e = it_data[tn[k]];
        e.count = lfsr_pow(e.count, it_inc[tn[k]]);
        check(rd_n_item == e, $sformatf("%s: stage %0d north %0h expected %0h", tag, k, rd_n_item, e));
      end
      if (ts[k] >= 0) begin
        item_t e;
        e = it_data[ts[k]];
        e.count = lfsr_pow(e.count, it_inc[ts[k]]);
        check(rd_s_item == e, $sformatf("%s: stage %0d south %0h expected %0h", tag, k, rd_s_item, e));
      end
    end
    check(n_cross_seen == n_laps && s_cross_seen == s_laps, $sformatf("%s: marker crossings", tag));
  endtask

  function automatic item_t mk(input bit m, input int a, input int c);
    item_t it;
    it.marker = m; it.addr = 2'(a); it.count = 5'(c);
    return it;
  endfunction

  // clocks between successive north marker crossings
  task automatic lap_time(input int expected, input string tag);
    int t0, t1;
    run = 1;
    while (!n_mark_cross) @(negedge clk);
    @(negedge clk);
    t0 = 0;
    while (!n_mark_cross) begin @(negedge clk); t0++; end
    @(negedge clk);
    t1 = 0;
    while (!n_mark_cross) begin @(negedge clk); t1++; end
    check(t0 + 1 == expected && t1 + 1 == expected, $sformatf("%s: lap %0d/%0d clocks, expected %0d", tag, t0 + 1, t1 + 1, expected));
    @(negedge clk); run = 0;
    repeat (3) @(negedge clk);
    check_contents(tag);
  endtask

  initial begin
    for (int k = 0; k < R; k++) begin tn[k] = -1; ts[k] = -1; pending[k] = 0; end
    n_laps = 0; s_laps = 0; n_cross_seen = 0; s_cross_seen = 0;
    n_contests = 0; n_incs = 0; n_blocked = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // lone northbound item
    load(1, 0, 1, mk(1, 0, 1));
    lap_time(R, "lone north item");
    // north and south, different addresses
    clear_all();
    load(1, 0, 1, mk(1, 1, 3)); load(0, 0, 1, mk(1, 2, 4));
    lap_time(R, "pair, no match");
    // north and south, equal addresses
    clear_all();
    load(1, 0, 1, mk(1, 3, 3)); load(0, 0, 1, mk(1, 3, 4));
    lap_time(R + 2, "pair, match");
    // random fillings, with stops and restarts
    for (int trial = 0; trial < 40; trial++) begin
      bit nm, sm;
      clear_all();
      nm = 0; sm = 0;
      for (int k = 0; k < R; k++) begin
        if ($urandom_range(0, 1) == 1) begin
          load(1, k, 1, mk(!nm, $urandom_range(0, 3), $urandom_range(1, 31)));
          nm = 1;
        end
        if ($urandom_range(0, 1) == 1) begin
          load(0, k, 1, mk(!sm, $urandom_range(0, 3), $urandom_range(1, 31)));
          sm = 1;
        end
      end
      for (int seg = 0; seg < 4; seg++) begin
        @(negedge clk); run = 1;
        repeat ($urandom_range(5, 200)) @(negedge clk);
        run = 0;
        repeat (2) @(negedge clk);
        check(!busy, "no increment pending two clocks after stop");
        check_contents($sformatf("trial %0d.%0d", trial, seg));
      end
    end
    check(n_contests > 100, $sformatf("contests at a MUTEX: %0d", n_contests));
    check(n_incs > 100, $sformatf("increments: %0d", n_incs));
    check(n_blocked > 10, $sformatf("moves held by May Leave: %0d", n_blocked));
    $display("contests=%0d increments=%0d held=%0d laps=%0d/%0d", n_contests, n_incs, n_blocked, n_laps, s_laps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_zeke_sweep: the occupancy workloads of the counterflow ring.
//
// Runs the full-size chip through the access bus, like tb_zeke_top, over a
// grid of ring occupancies: #N and #S each from {0, 1, 7, 13, 14, 15, 21, 27,
// 28}, once with no matching addresses and once with all addresses matching.
// Every run is stopped, read back and checked item by item against the count
// values implied by the start and end positions and the cycle counters. The
// total throughput (item moves per clock, measured over the last 1000 of 1500
// clocks) is printed as a table, and these shapes are checked: with one ring
// empty, the other ring's throughput peaks at half occupancy and falls off on
// either side; with no matches the total peaks at #N = #S = 14, where all 28
// items move in lockstep every clock; matching addresses never raise it.
// Last, the two configurations of the emission tests run: 14 + 14 items with
// no matches (lockstep) and 13 north + 15 south items with two north items
// matching three south items.
module tb_zeke_sweep;
  import cf_pkg::*;
  import cf_tb_pkg::*;

  localparam int R = 28;
  localparam int RS = 3;

  logic clk = 0, rst_n = 0, run = 0;
  logic acc_we = 0, acc_ring = 0, cnt_src = 0;
  logic [1:0] acc_sel = 0;
  logic [4:0] acc_idx = 0;
  logic [47:0] acc_wdata = 0, acc_rdata;
  logic [3:0] sn_dly [RS];
  logic [3:0] ss_dly [RS];
  logic mon_n, mon_s, busy;
  int checks = 0, failures = 0;

  zeke_top dut (.clk, .rst_n, .run, .acc_we, .acc_ring, .acc_sel, .acc_idx, .acc_wdata,
                .acc_rdata, .cnt_src, .stress_n_dly(sn_dly), .stress_s_dly(ss_dly),
                .mon_n, .mon_s, .busy);

  always #5 clk = ~clk;

  initial begin
    repeat (1500000) @(posedge clk);
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

  // ---- mechanism counters, from inside the design ----
  int m_moves, t_moves;
  int m_contests, t_contests, incs, held, stops, src_switches;
  always @(negedge clk) if (rst_n) begin
    m_moves    += $countones(dut.u_main.n_move) + $countones(dut.u_main.s_move);
    t_moves    += $countones(dut.u_stress.n_move) + $countones(dut.u_stress.s_move);
    m_contests += $countones(dut.u_main.contest);
    t_contests += $countones(dut.u_stress.contest);
    incs       += $countones(dut.u_main.increment) + $countones(dut.u_stress.increment);
    held       += $countones(dut.u_main.increment & dut.u_main.meet);
  end

  // ---- bus ----
  task automatic bus_write(input bit ring, input acc_sel_e sel, input int idx, input logic [47:0] d);
    @(negedge clk);
    acc_we = 1; acc_ring = ring; acc_sel = sel; acc_idx = 5'(idx); acc_wdata = d;
    @(negedge clk);
    acc_we = 0;
  endtask

  task automatic bus_read(input bit ring, input acc_sel_e sel, input int idx, output logic [47:0] d);
    acc_ring = ring; acc_sel = sel; acc_idx = 5'(idx);
    #1 d = acc_rdata;
  endtask

  function automatic logic [47:0] word(input bit full, input bit m, input int a, input int c);
    return 48'({full, m, 2'(a), 5'(c)});
  endfunction

  // ---- loaded contents ----
  int    nN, nS;
  int    n_start [R];   // stage of the i-th north item as loaded
  int    s_start [R];
  item_t n_it [R];
  item_t s_it [R];

  task automatic clear_ring(input bit ring, input int size);
    for (int k = 0; k < size; k++) begin
      bus_write(ring, ACC_NORTH, k, '0);
      bus_write(ring, ACC_SOUTH, k, '0);
    end
    bus_write(0, ACC_NCYC, 0, '0);
    bus_write(0, ACC_SCYC, 0, '0);
  endtask

  function automatic int mod(input int a, input int r);
    return ((a % r) + r) % r;
  endfunction

  // spread n items evenly, first one marked; addresses from mode:
  // 0 all equal per ring (north 0, south 1: never match), 1 all 2, 2 random
  task automatic fill(input bit ring, input int size, input bit north, input int n, input int mode, input int offset);
    for (int i = 0; i < n; i++) begin
      int k, a;
      item_t it;
      // north items are listed forward from the marked one, south items
      // backward, so that list order is travel order in both rings
      k = north ? (offset + (i * size) / n) % size : mod(offset - (i * size) / n, size);
      a = (mode == 0) ? (north ? 0 : 1) : (mode == 1) ? 2 : $urandom_range(0, 3);
      it.marker = (i == 0);
      it.addr = 2'(a);
      it.count = 5'($urandom_range(1, 31));
      bus_write(ring, north ? ACC_NORTH : ACC_SOUTH, k, 48'({1'b1, it}));
      if (north) begin n_start[i] = k; n_it[i] = it; end
      else       begin s_start[i] = k; s_it[i] = it; end
    end
    if (north) nN = n; else nS = n;
  endtask


  // read everything back and check every count against the positions
  task automatic verify(input bit ring, input int size, input string tag, output int meet_stage_mask);
    logic [47:0] d, ncyc, scyc;
    int n_end [R];
    int s_end [R];
    item_t n_got [R];
    item_t s_got [R];
    int nf, sf, nm_end, sm_end;
    int dn [R];
    int ds [R];
    nf = 0; sf = 0; nm_end = -1; sm_end = -1;
    bus_read(0, ACC_NCYC, 0, ncyc);
    bus_read(0, ACC_SCYC, 0, scyc);
    // items, in ring order starting from the marked one
    for (int j = 0; j < size; j++) begin
      bus_read(ring, ACC_NORTH, j, d);
      if (d[8] && d[7]) nm_end = j;
      bus_read(ring, ACC_SOUTH, j, d);
      if (d[8] && d[7]) sm_end = j;
    end
    if (nN > 0) begin
      check(nm_end >= 0, {tag, ": north marker found"});
      for (int j = 0; j < size; j++) begin
        int k;
        k = (nm_end + j) % size;
        bus_read(ring, ACC_NORTH, k, d);
        if (d[8]) begin n_end[nf] = k; n_got[nf] = item_t'(d[7:0]); nf++; end
      end
    end
    if (nS > 0) begin
      check(sm_end >= 0, {tag, ": south marker found"});
      for (int j = 0; j < size; j++) begin
        int k;
        k = mod(sm_end - j, size);
        bus_read(ring, ACC_SOUTH, k, d);
        if (d[8]) begin s_end[sf] = k; s_got[sf] = item_t'(d[7:0]); sf++; end
      end
    end
    check(nf == nN && sf == nS, $sformatf("%s: %0d/%0d items back, loaded %0d/%0d", tag, nf, sf, nN, nS));
    // travel of every item (north forward, south backward), loaded in ring order
    for (int i = 0; i < nN; i++)
      dn[i] = int'(n_end[0]) + int'(size) * int'(ncyc) - n_start[0]
              + mod(n_end[i] - n_end[0], size) - mod(n_start[i] - n_start[0], size);
    for (int i = 0; i < nS; i++)
      ds[i] = int'(s_start[0]) - s_end[0] + int'(size) * int'(scyc)
              + mod(s_end[0] - s_end[i], size) - mod(s_start[0] - s_start[i], size);
    meet_stage_mask = 0;
    for (int i = 0; i < nN; i++) begin
      int k;
      item_t e;
      k = 0;
      for (int j = 0; j < nS; j++) begin
        int g0, g1, m;
        g0 = n_start[i] - s_start[j];
        g1 = g0 + dn[i] + ds[j];
        m = meetings(g0, g1, size);
        if (n_it[i].addr == s_it[j].addr) k += int'(m);
      end
      e = n_it[i];
      e.count = lfsr_pow(e.count, k);
      check(n_got[i] == e, $sformatf("%s: north item %0d is %0h, expected %0h", tag, i, n_got[i], e));
    end
    for (int j = 0; j < nS; j++) begin
      int k;
      item_t e;
      k = 0;
      for (int i = 0; i < nN; i++) begin
        int g0, g1, m;
        g0 = n_start[i] - s_start[j];
        g1 = g0 + dn[i] + ds[j];
        m = meetings(g0, g1, size);
        if (n_it[i].addr == s_it[j].addr) k += int'(m);
      end
      e = s_it[j];
      e.count = lfsr_pow(e.count, k);
      check(s_got[j] == e, $sformatf("%s: south item %0d is %0h, expected %0h", tag, j, s_got[j], e));
    end
  endtask

  task automatic run_for(input int clocks);
    @(negedge clk); run = 1;
    repeat (clocks) @(negedge clk);
    run = 0;
    stops++;
    repeat (2) @(negedge clk);
    check(!busy, "no increment pending after a stop");
  endtask

  // stress ring: which stages hold a meeting
  int meet_seen [RS];
  int cont_seen [RS];
  always @(negedge clk) if (rst_n && run)
    for (int k = 0; k < RS; k++) begin
      if (dut.u_stress.increment[k]) meet_seen[k]++;
      if (dut.u_stress.contest[k]) cont_seen[k]++;
    end

  localparam int NG = 9;
  int grid [NG] = '{0, 1, 7, 13, 14, 15, 21, 27, 28};
  real thr [2][NG][NG];

  // fill with a given address list: mode 0 no match, 1 all match
  task automatic point(input int n_n, input int n_s, input int mode, output real t);
    int mv0;
    int dummy;
    clear_ring(0, R);
    nN = 0; nS = 0;
    if (n_n > 0) fill(0, R, 1, n_n, mode, 0);
    if (n_s > 0) fill(0, R, 0, n_s, mode, 1);
    @(negedge clk); run = 1;
    repeat (500) @(negedge clk);
    mv0 = m_moves;
    repeat (1000) @(negedge clk);
    t = real'(m_moves - mv0) / 1000.0;
    run = 0;
    stops++;
    repeat (2) @(negedge clk);
    check(!busy, "no increment pending after a stop");
    verify(0, R, $sformatf("#N=%0d #S=%0d mode %0d", n_n, n_s, mode), dummy);
  endtask

  initial begin
    real t, best;
    int bi, bj, dummy;
    m_moves = 0; t_moves = 0; m_contests = 0; t_contests = 0; incs = 0; held = 0;
    stops = 0; src_switches = 0;
    for (int k = 0; k < RS; k++) begin sn_dly[k] = '0; ss_dly[k] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int mode = 0; mode < 2; mode++)
      for (int i = 0; i < NG; i++)
        for (int j = 0; j < NG; j++) begin
          point(grid[i], grid[j], mode, t);
          thr[mode][i][j] = t;
        end
    for (int mode = 0; mode < 2; mode++) begin
      $display("total throughput (moves per clock), %s; rows #N, columns #S", mode == 0 ? "no match" : "all match");
      $display("  #N\\#S %5d %5d %5d %5d %5d %5d %5d %5d %5d", grid[0], grid[1], grid[2], grid[3], grid[4], grid[5], grid[6], grid[7], grid[8]);
      for (int i = 0; i < NG; i++)
        $display("  %5d %5.1f %5.1f %5.1f %5.1f %5.1f %5.1f %5.1f %5.1f %5.1f", grid[i],
                 thr[mode][i][0], thr[mode][i][1], thr[mode][i][2], thr[mode][i][3], thr[mode][i][4],
                 thr[mode][i][5], thr[mode][i][6], thr[mode][i][7], thr[mode][i][8]);
    end
    // one ring empty: trapezoid with its top at half occupancy
    check(thr[0][4][0] >= thr[0][2][0] && thr[0][4][0] >= thr[0][6][0], "north alone peaks at 14 items");
    check(thr[0][0][4] >= thr[0][0][2] && thr[0][0][4] >= thr[0][0][6], "south alone peaks at 14 items");
    check(thr[0][8][0] == 0.0 && thr[0][0][0] == 0.0, "a full or empty ring does not move");
    // no matches: peak at 14 + 14, lockstep
    best = 0; bi = 0; bj = 0;
    for (int i = 0; i < NG; i++)
      for (int j = 0; j < NG; j++)
        if (thr[0][i][j] > best) begin best = thr[0][i][j]; bi = i; bj = j; end
    check(thr[0][4][4] >= best, $sformatf("no-match peak at 14/14 (grid maximum %0.2f at %0d/%0d)", best, grid[bi], grid[bj]));
    check(thr[0][4][4] > 27.5, $sformatf("14 + 14 without matches moves in lockstep: %0.2f", thr[0][4][4]));
    for (int i = 0; i < NG; i++)
      for (int j = 0; j < NG; j++)
        check(thr[1][i][j] <= thr[0][i][j] + 0.01,
              $sformatf("matches never raise throughput (%0d/%0d)", grid[i], grid[j]));
    // emission-test configurations
    point(14, 14, 0, t);
    $display("EMI 'synchronous' configuration, 14 + 14 no match: %0.2f moves per clock", t);
    clear_ring(0, R);
    nN = 0; nS = 0;
    fill(0, R, 1, 13, 0, 0);
    fill(0, R, 0, 15, 0, 1);
    // two north items get the address 2, three south items too
    for (int i = 0; i < 2; i++) begin
      n_it[i * 6].addr = 2'd2;
      bus_write(0, ACC_NORTH, n_start[i * 6], 48'({1'b1, n_it[i * 6]}));
    end
    for (int j = 0; j < 3; j++) begin
      s_it[j * 5].addr = 2'd2;
      bus_write(0, ACC_SOUTH, s_start[j * 5], 48'({1'b1, s_it[j * 5]}));
    end
    begin
      int mv0;
      int i0;
      i0 = incs;
      @(negedge clk); run = 1;
      repeat (500) @(negedge clk);
      mv0 = m_moves;
      repeat (1000) @(negedge clk);
      t = real'(m_moves - mv0) / 1000.0;
      run = 0;
      repeat (2) @(negedge clk);
      verify(0, R, "EMI 13/15 configuration", dummy);
      $display("EMI 'asynchronous' configuration, 13 + 15 with 2 x 3 matches: %0.2f moves per clock, %0d increments", t, incs - i0);
      check(incs > i0, "13/15 configuration: matching meetings happened");
    end
    $display("mechanisms: contests=%0d increments=%0d held=%0d stops=%0d", m_contests, incs, held, stops);
    check(m_contests > 0 && incs > 0 && held > 0 && stops > 0, "all mechanisms exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

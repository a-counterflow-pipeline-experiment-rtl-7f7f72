// tb_zeke_top: end-to-end test of the whole chip at its full size.
//
// Everything goes through the access bus, as on the real chip: stop, load
// items and cycle counters, run, stop, read back. The expected count value of
// every item is worked out from the start and end positions alone plus the
// two cycle counters: items in one ring never overtake each other, so the
// marked item's laps (the cycle counter) fix how far every item travelled;
// from two items' travels follows how often they shared a stage, and each
// such meeting with equal addresses steps both counts once.
//
// Phases:
//  1. rate: one northbound item alone moves one stage per clock (exact
//     position and counter value after 100 clocks);
//  2. the 28-stage ring with 14 northbound items and 0, 1, 5, 14 and 28
//     southbound items, with no, all and random address matches; each run is
//     checked and its total throughput (item moves per clock) reported;
//  3. the 3-stage stress ring with one item per direction, equal addresses,
//     counters switched over to it, sweeping the delay on the north request
//     at COP C: meetings must alternate between stage 1 and stage 3 for a
//     small delay and between stage 1 and stage 2 for a larger one, and the
//     MUTEX of COP C must see the two requests tie on the way.
// Mechanisms counted (each must occur): MUTEX contests in both rings,
// increments, moves held back by May Leave, clean stops, the counter source
// switch, and both meeting patterns of the stress ring.
module tb_zeke_top;
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
    repeat (400000) @(posedge clk);
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

  real thr [3][5];
  int ns_list [5] = '{0, 1, 5, 14, 28};

  initial begin
    logic [47:0] d;
    int dummy;
    m_moves = 0; t_moves = 0; m_contests = 0; t_contests = 0; incs = 0; held = 0;
    stops = 0; src_switches = 0;
    for (int k = 0; k < RS; k++) begin sn_dly[k] = '0; ss_dly[k] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;

    // 1. rate of a lone item
    clear_ring(0, R);
    nN = 0; nS = 0;
    bus_write(0, ACC_NORTH, 5, word(1, 1, 1, 7));
    run_for(100);
    bus_read(0, ACC_NORTH, (5 + 100) % R, d);
    check(d == word(1, 1, 1, 7), "lone item: one stage per clock");
    bus_read(0, ACC_NCYC, 0, d);
    check(d == 48'((5 + 100) / R), $sformatf("lone item: cycle counter %0d", d));
    check(mon_n == d[0], "monitor output shows counter bit 0");

    // 2. occupancy sweep with 14 northbound items
    for (int mode = 0; mode < 3; mode++)
      for (int si = 0; si < 5; si++) begin
        int mv0;
        clear_ring(0, R);
        nN = 0; nS = 0;
        fill(0, R, 1, 14, mode, 0);
        if (ns_list[si] > 0) fill(0, R, 0, ns_list[si], mode, 1);
        mv0 = m_moves;
        run_for(1500);
        thr[mode][si] = real'(m_moves - mv0) / 1500.0;
        verify(0, R, $sformatf("#N=14 #S=%0d mode %0d", ns_list[si], mode), dummy);
        // and once more from where it stopped, counters continuing
      end
    $display("total throughput, item moves per clock, #N = 14:");
    $display("  #S      : %6d %6d %6d %6d %6d", 0, 1, 5, 14, 28);
    $display("  no match: %6.2f %6.2f %6.2f %6.2f %6.2f", thr[0][0], thr[0][1], thr[0][2], thr[0][3], thr[0][4]);
    $display("  all     : %6.2f %6.2f %6.2f %6.2f %6.2f", thr[1][0], thr[1][1], thr[1][2], thr[1][3], thr[1][4]);
    $display("  random  : %6.2f %6.2f %6.2f %6.2f %6.2f", thr[2][0], thr[2][1], thr[2][2], thr[2][3], thr[2][4]);
    check(thr[0][3] > thr[1][3], "matching addresses lower the throughput at #S = 14");
    check(thr[0][3] >= thr[2][3] && thr[2][3] >= thr[1][3], "random matches lie between none and all");

    // 3. arbiter stress ring
    cnt_src = 1; src_switches++;
    begin
      bit pat13, pat12, tie_c;
      pat13 = 0; pat12 = 0; tie_c = 0;
      for (int dd = 0; dd <= 5; dd++) begin
        clear_ring(1, RS);
        nN = 0; nS = 0;
        bus_write(1, ACC_NORTH, 0, word(1, 1, 2, 1));
        bus_write(1, ACC_SOUTH, 0, word(1, 1, 2, 17));
        n_start[0] = 0; s_start[0] = 0; nN = 1; nS = 1;
        n_it[0] = item_t'(8'b1_10_00001); s_it[0] = item_t'(8'b1_10_10001);
        // COP A = boundary 0 (stages 1|2), C = boundary 1 (2|3), B = boundary 2 (3|1)
        sn_dly[0] = 4'd3; ss_dly[2] = 4'd3;
        ss_dly[1] = 4'd3; sn_dly[1] = 4'(dd);
        for (int k = 0; k < RS; k++) begin meet_seen[k] = 0; cont_seen[k] = 0; end
        run_for(600);
        verify(1, RS, $sformatf("stress d=%0d", dd), dummy);
        $display("stress ring, north delay at C = %0d: meetings in stage 1/2/3 = %0d/%0d/%0d, contests at A/C/B = %0d/%0d/%0d",
                 dd, meet_seen[0], meet_seen[1], meet_seen[2], cont_seen[0], cont_seen[1], cont_seen[2]);
        check(meet_seen[0] > 0, "stress ring: meetings in stage 1");
        if (meet_seen[2] > 0 && meet_seen[1] == 0) pat13 = 1;
        if (meet_seen[1] > 0 && meet_seen[2] == 0) pat12 = 1;
        if (cont_seen[1] > 0) tie_c = 1;
        if (dd < 3) check(meet_seen[1] == 0 && meet_seen[2] > 0, "small delay: pattern stages 1 and 3");
        if (dd > 3) check(meet_seen[2] == 0 && meet_seen[1] > 0, "large delay: pattern stages 1 and 2");
      end
      check(pat13 && pat12 && tie_c, "stress ring: both patterns, and a tie at COP C between them");
      bus_read(0, ACC_NCYC, 0, d);
      check(d > 0, "cycle counters follow the stress ring");
    end
    cnt_src = 0; src_switches++;

    $display("mechanisms: main contests=%0d stress contests=%0d increments=%0d held=%0d stops=%0d switches=%0d",
             m_contests, t_contests, incs, held, stops, src_switches);
    check(m_contests > 0, "MUTEX contest in the main ring");
    check(t_contests > 0, "MUTEX contest in the stress ring");
    check(incs > 0, "increments");
    check(held > 0, "moves held back by May Leave");
    check(stops > 0, "clean stops");
    check(src_switches > 0, "counter source switched");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

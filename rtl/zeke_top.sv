// zeke_top: the counterflow pipeline test chip.
//
// The chip holds a 28-stage counterflow ring (northbound and southbound items
// circulating in opposite directions through shared stages, one COP per stage
// boundary) and, beside it, a 3-stage ring of the same stages whose COP
// request inputs pass through adjustable delays, used to force contention at
// the arbiters. Two 48-bit cycle counters, one per direction, count passages
// of the marked item at one boundary; they can be connected to either ring.
// The test procedure is: stop, load every stage and the counters through the
// access bus, run for a while, stop, read everything back, and check each
// item's count value against the number of matching items it must have met.
//
// Access bus (this design's encoding): acc_sel selects the north half of a
// stage, the south half of a stage, the north cycle counter or the south cycle
// counter (cf_pkg::acc_sel_e); acc_ring picks the main ring (0) or the stress
// ring (1) for stage accesses; acc_idx is the stage. A stage word is
// {full, marker, addr[1:0], count[4:0]} in acc_wdata[8:0] / acc_rdata[8:0].
// Writes (acc_we) take effect at the clock edge and only while run is low;
// acc_rdata is combinational. cnt_src = 0 connects the counters to the main
// ring, 1 to the stress ring. mon_n / mon_s bring out the low bit of each
// counter, for measuring throughput from outside. busy is high while an
// increment is still pending after a stop. The rings' per-boundary
// observation outputs are left open here; they serve simulation.
//
// The rings, counters, item format, sizes and the stress ring follow the
// document. The clocked timing, the bus encoding, the single run input for
// both rings and the one-bit monitor outputs are this design's choices.
module zeke_top
  import cf_pkg::*;
#(
  parameter int unsigned NSTAGES  = 28,
  parameter int unsigned NSTRESS  = 3,
  parameter int unsigned DLY_W    = 4,
  parameter int unsigned CYCW     = CYC_W,
  localparam int unsigned IDX_W   = (NSTAGES > 1) ? $clog2(NSTAGES) : 1,
  localparam int unsigned SIDX_W  = (NSTRESS > 1) ? $clog2(NSTRESS) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             run,
  // access bus
  input  logic             acc_we,
  input  logic             acc_ring,
  input  logic [1:0]       acc_sel,
  input  logic [IDX_W-1:0] acc_idx,
  input  logic [CYCW-1:0]  acc_wdata,
  output logic [CYCW-1:0]  acc_rdata,
  // cycle counter source and stress-ring delays
  input  logic             cnt_src,
  input  logic [DLY_W-1:0] stress_n_dly [NSTRESS],
  input  logic [DLY_W-1:0] stress_s_dly [NSTRESS],
  // monitor outputs
  output logic             mon_n,
  output logic             mon_s,
  output logic             busy
);

  acc_sel_e sel;
  logic     wr_full;
  item_t    wr_item;
  logic     m_rd_n_full, m_rd_s_full, t_rd_n_full, t_rd_s_full;
  item_t    m_rd_n_item, m_rd_s_item, t_rd_n_item, t_rd_s_item;
  logic     m_ncross, m_scross, t_ncross, t_scross;
  logic     m_busy, t_busy;
  logic [CYCW-1:0] ncyc, scyc;
  logic [DLY_W-1:0] no_dly [NSTAGES];

  always_comb begin
    sel     = acc_sel_e'(acc_sel);
    wr_full = acc_wdata[ITEM_W];
    wr_item = item_t'(acc_wdata[ITEM_W-1:0]);
    for (int i = 0; i < int'(NSTAGES); i++) no_dly[i] = '0;
  end

  cf_ring #(.NSTAGES(NSTAGES), .ADJ_DELAY(1'b0), .DLY_W(DLY_W)) u_main (
    .clk, .rst_n, .run,
    .wr_n    (acc_we && !acc_ring && sel == ACC_NORTH),
    .wr_s    (acc_we && !acc_ring && sel == ACC_SOUTH),
    .wr_idx  (acc_idx),
    .wr_full, .wr_item,
    .rd_idx  (acc_idx),
    .rd_n_full (m_rd_n_full), .rd_n_item (m_rd_n_item),
    .rd_s_full (m_rd_s_full), .rd_s_item (m_rd_s_item),
    .n_dly   (no_dly), .s_dly (no_dly),
    .n_mark_cross (m_ncross), .s_mark_cross (m_scross),
    .n_move (), .s_move (), .contest (), .increment (), .meet (),
    .busy (m_busy)
  );

  cf_ring #(.NSTAGES(NSTRESS), .ADJ_DELAY(1'b1), .DLY_W(DLY_W)) u_stress (
    .clk, .rst_n, .run,
    .wr_n    (acc_we && acc_ring && sel == ACC_NORTH),
    .wr_s    (acc_we && acc_ring && sel == ACC_SOUTH),
    .wr_idx  (SIDX_W'(acc_idx)),
    .wr_full, .wr_item,
    .rd_idx  (SIDX_W'(acc_idx)),
    .rd_n_full (t_rd_n_full), .rd_n_item (t_rd_n_item),
    .rd_s_full (t_rd_s_full), .rd_s_item (t_rd_s_item),
    .n_dly   (stress_n_dly), .s_dly (stress_s_dly),
    .n_mark_cross (t_ncross), .s_mark_cross (t_scross),
    .n_move (), .s_move (), .contest (), .increment (), .meet (),
    .busy (t_busy)
  );

  cycle_counter #(.WIDTH(CYCW)) u_ncyc (
    .clk, .rst_n,
    .inc   (cnt_src ? t_ncross : m_ncross),
    .wr    (acc_we && !run && sel == ACC_NCYC),
    .wdata (acc_wdata),
    .q     (ncyc)
  );

  cycle_counter #(.WIDTH(CYCW)) u_scyc (
    .clk, .rst_n,
    .inc   (cnt_src ? t_scross : m_scross),
    .wr    (acc_we && !run && sel == ACC_SCYC),
    .wdata (acc_wdata),
    .q     (scyc)
  );

  always_comb begin
    unique case (sel)
      ACC_NORTH: acc_rdata = acc_ring ? CYCW'({t_rd_n_full, t_rd_n_item})
                                      : CYCW'({m_rd_n_full, m_rd_n_item});
      ACC_SOUTH: acc_rdata = acc_ring ? CYCW'({t_rd_s_full, t_rd_s_item})
                                      : CYCW'({m_rd_s_full, m_rd_s_item});
      ACC_NCYC:  acc_rdata = ncyc;
      default:   acc_rdata = scyc;
    endcase
    mon_n = ncyc[0];
    mon_s = scyc[0];
    busy  = m_busy || t_busy;
  end

endmodule

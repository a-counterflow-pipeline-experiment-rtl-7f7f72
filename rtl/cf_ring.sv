// cf_ring: a counterflow ring of NSTAGES identical stages.
//
// Two rings share the stages: northbound items move from stage k to stage
// k+1, southbound items from stage k+1 to stage k (indices modulo NSTAGES).
// Boundary b lies between stage b and stage b+1 and has one COP. Its north
// request is "stage b north half full and stage b+1 north half empty", its
// south request "stage b+1 south half full and stage b south half empty";
// both are masked by run, so lowering run stops the rings cleanly after the
// current clock with every item in a stage. Because a boundary admits one move
// per clock and a stage holding two items keeps them until they have
// interacted, every northbound item shares a stage with every southbound item
// it passes, and every such meeting with equal addresses steps both counts.
//
// With ADJ_DELAY set, every COP request input goes through a req_delay whose
// length comes from n_dly[b] / s_dly[b] (the arbiter stress ring); otherwise
// those inputs are unused.
//
// Load/unload port: while run is low, wr_n / wr_s write {wr_full, wr_item}
// into half wr_idx (ignored while run is high). The read port shows half
// rd_idx combinationally. n_mark_cross / s_mark_cross pulse when an item with
// its marker set crosses boundary CNT_BOUNDARY; they drive the cycle counters.
// busy is high while a stage still has an increment to do.
//
// The ring structure, the COP per boundary and the stage contents follow the
// document; the clocked timing (one move per boundary per clock, one clock per
// increment), the boundary numbering and the load/read port are this design's.
module cf_ring
  import cf_pkg::*;
#(
  parameter int unsigned NSTAGES      = 28,
  parameter bit          ADJ_DELAY    = 1'b0,
  parameter int unsigned DLY_W        = 4,
  parameter int unsigned CNT_BOUNDARY = NSTAGES - 1,
  localparam int unsigned IDX_W       = (NSTAGES > 1) ? $clog2(NSTAGES) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             run,
  // load port
  input  logic             wr_n,
  input  logic             wr_s,
  input  logic [IDX_W-1:0] wr_idx,
  input  logic             wr_full,
  input  item_t            wr_item,
  // read port
  input  logic [IDX_W-1:0] rd_idx,
  output logic             rd_n_full,
  output item_t            rd_n_item,
  output logic             rd_s_full,
  output item_t            rd_s_item,
  // adjustable request delays (ADJ_DELAY only)
  input  logic [DLY_W-1:0] n_dly [NSTAGES],
  input  logic [DLY_W-1:0] s_dly [NSTAGES],
  // observation
  output logic             n_mark_cross,
  output logic             s_mark_cross,
  output logic [NSTAGES-1:0] n_move,      // per boundary
  output logic [NSTAGES-1:0] s_move,      // per boundary
  output logic [NSTAGES-1:0] contest,     // per boundary: MUTEX saw both requests
  output logic [NSTAGES-1:0] increment,   // per stage
  output logic [NSTAGES-1:0] meet,        // per stage: holds two items
  output logic             busy
);

  logic  [NSTAGES-1:0] n_full, s_full, n_ml, s_ml;
  logic  [NSTAGES-1:0] n_req, s_req, n_req_d, s_req_d;
  item_t               n_item [NSTAGES];
  item_t               s_item [NSTAGES];

  for (genvar k = 0; k < NSTAGES; k++) begin : g_stage
    localparam int unsigned PREV = (k + NSTAGES - 1) % NSTAGES;
    localparam int unsigned NEXT = (k + 1) % NSTAGES;

    cf_stage u_stage (
      .clk, .rst_n,
      .n_in      (n_move[PREV]),
      .n_in_item (n_item[PREV]),
      .n_out     (n_move[k]),
      .s_in      (s_move[k]),
      .s_in_item (s_item[NEXT]),
      .s_out     (s_move[PREV]),
      .wr_n      (wr_n && !run && (wr_idx == IDX_W'(k))),
      .wr_s      (wr_s && !run && (wr_idx == IDX_W'(k))),
      .wr_full, .wr_item,
      .n_full    (n_full[k]),
      .s_full    (s_full[k]),
      .n_item    (n_item[k]),
      .s_item    (s_item[k]),
      .n_may_leave (n_ml[k]),
      .s_may_leave (s_ml[k]),
      .increment (increment[k]),
      .meet      (meet[k])
    );
  end

  for (genvar b = 0; b < NSTAGES; b++) begin : g_boundary
    localparam int unsigned NEXT = (b + 1) % NSTAGES;

    always_comb begin
      n_req[b] = run && n_full[b]    && !n_full[NEXT];
      s_req[b] = run && s_full[NEXT] && !s_full[b];
    end

    if (ADJ_DELAY) begin : g_dly
      req_delay #(.DLY_W(DLY_W)) u_dn (.clk, .rst_n, .dly(n_dly[b]), .req_i(n_req[b]), .req_o(n_req_d[b]));
      req_delay #(.DLY_W(DLY_W)) u_ds (.clk, .rst_n, .dly(s_dly[b]), .req_i(s_req[b]), .req_o(s_req_d[b]));
    end else begin : g_nodly
      always_comb begin
        n_req_d[b] = n_req[b];
        s_req_d[b] = s_req[b];
      end
    end

    cop u_cop (
      .clk, .rst_n,
      .n_req       (n_req_d[b]),
      .s_req       (s_req_d[b]),
      .n_may_leave (n_ml[b]),
      .s_may_leave (s_ml[NEXT]),
      .n_move      (n_move[b]),
      .s_move      (s_move[b]),
      .contest     (contest[b])
    );
  end

  always_comb begin
    rd_n_full    = n_full[rd_idx];
    rd_n_item    = n_item[rd_idx];
    rd_s_full    = s_full[rd_idx];
    rd_s_item    = s_item[rd_idx];
    n_mark_cross = n_move[CNT_BOUNDARY] && n_item[CNT_BOUNDARY].marker;
    s_mark_cross = s_move[CNT_BOUNDARY] && s_item[(CNT_BOUNDARY + 1) % NSTAGES].marker;
    busy         = |increment;
  end

endmodule

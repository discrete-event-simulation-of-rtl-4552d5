// dmd_top: discrete molecular dynamics (DMD) engine.
//
// Beads are hard spheres moving ballistically in a periodic box divided into
// 32 x 32 x 32 cells.  The simulation advances from event to event: the
// earliest scheduled event (a collision of two beads or a bead crossing a
// cell wall) is taken from a time-ordered priority queue, the collider
// computes the new bead states, the commit writes them back and broadcasts
// the bead tags to cancel every other scheduled event that names them, and
// the predictor schedules, for each updated bead, its next collision within
// its 27-cell neighbourhood and its next cell crossing.
//
// Blocks:  event_priority_queue (4 insertions / 1 dequeue / broadcast
// invalidation per cycle), event_processor (6-stage collider),
// event_predictor (8 x 23-stage pair predictors + wall predictor),
// bead_state_memory (tag-indexed states + bead slot memory),
// bead_pointer_memory (cell-indexed tags + cell slot memory),
// memory_controller (sequencing, with the commit buffer).
//
// Host interface: after reset wait for ld_ready (the pointer memory clears
// itself for 32768 clocks), load beads 0..n_beads-1 with ld_v/ld_id/ld_b (one
// every two clocks while ld_ready), then pulse start.  The engine predicts
// every bead, then commits max_events events and raises done.  Each commit
// is visible on c_v/c_ev/c_a/c_b.  Counters report committed events by kind,
// events cancelled in the queue, queue overflows, cycles in which the queue
// closed a hole, cycles with three or four insertions, and crossings into a
// full cell.
//
// What follows the original design and what does not is described in each
// block; the main departure is that events are processed one at a time
// instead of being overlapped in the collider/predictor pipeline.
module dmd_top
  import dmd_pkg::*;
#(
  parameter int unsigned PQ_DEPTH = 38
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ld_v,
  input  bead_id_t    ld_id,
  input  bead_t       ld_b,
  output logic        ld_ready,
  input  logic [BEAD_W:0] n_beads,
  input  logic        start,
  input  logic [31:0] max_events,
  output logic        running,
  output logic        done,
  output logic        c_v,
  output event_t      c_ev,
  output bead_t       c_a,
  output bead_t       c_b,
  output logic [31:0] n_events,
  output logic [31:0] n_coll,
  output logic [31:0] n_cross,
  output logic [31:0] n_cell_full,
  output logic [31:0] n_cancelled,
  output logic [31:0] n_overflow,
  output logic [31:0] n_scrunch,
  output logic [31:0] n_multi_ins,
  output logic [$clog2(4*PQ_DEPTH+1)-1:0] q_count
);

  // queue
  logic [3:0] q_ins_v;
  event_t     q_ins_e [4];
  inval_t     inv;
  logic       q_ready, q_out_v, q_overflow, q_scrunch;
  event_t     q_out_e;
  logic [7:0] q_killed;
  logic [1:0] q_sel;
  logic [4:0] q_perm;

  // collider
  logic   pr_in_v, pr_out_v, pr_killed;
  event_t pr_ev, pr_out_ev;
  bead_t  pr_a, pr_b, pr_out_a, pr_out_b;

  // predictor
  logic             pd_in_v, pd_first, pd_last, pd_done, pd_coll_v, pd_cross_v;
  time_t            pd_t_now;
  bead_id_t         pd_self_id;
  bead_t            pd_self_b;
  logic [SLOTS-1:0] pd_p_v;
  bead_id_t         pd_p_id [SLOTS];
  bead_t            pd_p_b  [SLOTS];
  event_t           pd_coll_ev, pd_cross_ev;

  // bead memories
  bead_id_t   bm_rd_addr [SLOTS];
  bead_t      bm_rd_data [SLOTS];
  logic       bm_we [2];
  bead_id_t   bm_wa [2];
  bead_t      bm_wd [2];
  bead_id_t   bs_raddr, bs_waddr;
  slot_vec_t  bs_rdata, bs_wdata;
  logic       bs_we;
  logic       pm_busy;
  cell_addr_t pm_rd_cell;
  bead_id_t   pm_rd_ids [SLOTS];
  slot_vec_t  pm_rd_occ;
  cell_addr_t pm_sl_cell [2];
  slot_vec_t  pm_sl_free [2];
  logic       pm_pw_v [2];
  cell_addr_t pm_pw_cell [2];
  logic [$clog2(SLOTS)-1:0] pm_pw_slot [2];
  bead_id_t   pm_pw_id [2];
  logic       pm_fw_v [2];
  cell_addr_t pm_fw_cell [2];
  slot_vec_t  pm_fw_vec [2];

  event_priority_queue #(.DEPTH(PQ_DEPTH)) u_queue (
    .clk, .rst_n,
    .ins_v    (q_ins_v),
    .ins_e    (q_ins_e),
    .inv      (inv),
    .ready    (q_ready),
    .out_e    (q_out_e),
    .out_v    (q_out_v),
    .overflow (q_overflow),
    .killed   (q_killed),
    .scrunch  (q_scrunch),
    .sel      (q_sel),
    .perm_idx (q_perm),
    .count    (q_count)
  );

  event_processor u_collider (
    .clk, .rst_n,
    .hold   (1'b0),
    .inv    (inv),
    .in_v   (pr_in_v),
    .in_ev  (pr_ev),
    .in_a   (pr_a),
    .in_b   (pr_b),
    .out_v  (pr_out_v),
    .out_ev (pr_out_ev),
    .out_a  (pr_out_a),
    .out_b  (pr_out_b),
    .killed (pr_killed)
  );

  event_predictor u_predictor (
    .clk, .rst_n,
    .in_v     (pd_in_v),
    .in_first (pd_first),
    .in_last  (pd_last),
    .t_now    (pd_t_now),
    .self_id  (pd_self_id),
    .self_b   (pd_self_b),
    .p_v      (pd_p_v),
    .p_id     (pd_p_id),
    .p_b      (pd_p_b),
    .done     (pd_done),
    .coll_v   (pd_coll_v),
    .coll_ev  (pd_coll_ev),
    .cross_v  (pd_cross_v),
    .cross_ev (pd_cross_ev)
  );

  bead_state_memory u_beads (
    .clk,
    .rd_addr    (bm_rd_addr),
    .rd_data    (bm_rd_data),
    .we         (bm_we),
    .wa         (bm_wa),
    .wd         (bm_wd),
    .slot_raddr (bs_raddr),
    .slot_rdata (bs_rdata),
    .slot_we    (bs_we),
    .slot_waddr (bs_waddr),
    .slot_wdata (bs_wdata)
  );

  bead_pointer_memory u_cells (
    .clk, .rst_n,
    .busy    (pm_busy),
    .rd_cell (pm_rd_cell),
    .rd_ids  (pm_rd_ids),
    .rd_occ  (pm_rd_occ),
    .sl_cell (pm_sl_cell),
    .sl_free (pm_sl_free),
    .pw_v    (pm_pw_v),
    .pw_cell (pm_pw_cell),
    .pw_slot (pm_pw_slot),
    .pw_id   (pm_pw_id),
    .fw_v    (pm_fw_v),
    .fw_cell (pm_fw_cell),
    .fw_vec  (pm_fw_vec)
  );

  memory_controller u_ctrl (
    .clk, .rst_n,
    .ld_v, .ld_id, .ld_b, .ld_ready, .n_beads, .start, .max_events,
    .running, .done,
    .q_out_v, .q_out_e, .q_ready, .q_ins_v, .q_ins_e, .inv,
    .pr_in_v, .pr_ev, .pr_a, .pr_b, .pr_out_v, .pr_out_ev, .pr_out_a, .pr_out_b,
    .pd_in_v, .pd_first, .pd_last, .pd_t_now, .pd_self_id, .pd_self_b,
    .pd_p_v, .pd_p_id, .pd_p_b, .pd_done, .pd_coll_v, .pd_coll_ev,
    .pd_cross_v, .pd_cross_ev,
    .bm_rd_addr, .bm_rd_data, .bm_we, .bm_wa, .bm_wd,
    .bs_raddr, .bs_rdata, .bs_we, .bs_waddr, .bs_wdata,
    .pm_busy, .pm_rd_cell, .pm_rd_ids, .pm_rd_occ, .pm_sl_cell, .pm_sl_free,
    .pm_pw_v, .pm_pw_cell, .pm_pw_slot, .pm_pw_id,
    .pm_fw_v, .pm_fw_cell, .pm_fw_vec,
    .c_v, .c_ev, .c_a, .c_b,
    .n_events, .n_coll, .n_cross, .n_cell_full
  );

  // queue statistics
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_cancelled <= '0;
      n_overflow  <= '0;
      n_scrunch   <= '0;
      n_multi_ins <= '0;
    end else begin
      n_cancelled <= n_cancelled + 32'(q_killed) + 32'(pr_killed);
      if (q_overflow) n_overflow <= n_overflow + 1;
      if (q_scrunch)  n_scrunch  <= n_scrunch + 1;
      if ($countones(q_ins_v) >= 3) n_multi_ins <= n_multi_ins + 1;
    end
  end

endmodule

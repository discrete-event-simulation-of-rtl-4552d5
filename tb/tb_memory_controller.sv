// tb_memory_controller: checks the controller's bookkeeping while it runs a
// small simulation with the real queue, collider, predictor and memories.
//
// Twelve beads are loaded (a 3 x 2 x 2 lattice, 1.5 diameters apart, random
// velocities) and 200 events are run.  The bench checks:
//   * loading: each bead's state is in the bead memory, its tag is in a slot
//     of the cell its position names, that slot is marked taken, and the
//     bead slot memory holds the one-hot slot;
//   * the initial sweep inserts one crossing per moving bead (and at most
//     one collision per bead) before the first event is taken;
//   * after every commit the same membership rules hold for the beads of the
//     event, and no other cell still lists the bead;
//   * every crossing moves its bead to an adjacent cell on the event's axis;
//   * the run stops after exactly max_events events and raises done.
module tb_memory_controller;
  import dmd_pkg::*;

  localparam int unsigned PQ_DEPTH = 38;
  localparam int NB = 12;
  localparam logic [31:0] CELLW = 32'h0800_0000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        ld_v, ld_ready, start, running, done, c_v;
  bead_id_t    ld_id;
  bead_t       ld_b, c_a, c_b;
  event_t      c_ev;
  logic [BEAD_W:0] n_beads;
  logic [31:0] max_events, n_events, n_coll, n_cross, n_cell_full;
  logic [$clog2(4*PQ_DEPTH+1)-1:0] q_count;

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


  int checks = 0, failures = 0;
  longint cyc = 0;
  bit first_pop = 0;
  int n_sweep_ins = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (cycle %0d)", msg, cyc);
    end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // bead i is listed exactly in the cell its position names, in the slot the
  // bead slot memory gives, and that slot is marked taken
  task automatic check_member(input int i);
    bead_t      b;
    cell_addr_t c;
    slot_vec_t  oh;
    int         s, nfound;
    b  = u_beads.mem[i];
    c  = cell_of(b.pos);
    oh = u_beads.slot[i];
    check($onehot(oh), "bead slot is one-hot");
    s = 0;
    for (int k = 0; k < SLOTS; k++) if (oh[k]) s = k;
    check(u_cells.ptr[c][s] == bead_id_t'(i), "cell lists the bead in its slot");
    check(!u_cells.free[c][s], "bead's slot is marked taken");
    // no neighbouring cell still lists it as taken
    nfound = 0;
    for (int d = 0; d < 27; d++) begin
      cell_addr_t cn;
      logic [CELL_BITS-1:0] x, y, z;
      x = c[CELL_BITS-1:0] + CELL_BITS'(d % 3) - 1'b1;
      y = c[2*CELL_BITS-1:CELL_BITS] + CELL_BITS'((d / 3) % 3) - 1'b1;
      z = c[3*CELL_BITS-1:2*CELL_BITS] + CELL_BITS'(d / 9) - 1'b1;
      cn = {z, y, x};
      for (int k = 0; k < SLOTS; k++)
        if (!u_cells.free[cn][k] && u_cells.ptr[cn][k] == bead_id_t'(i)) nfound++;
    end
    check(nfound == 1, "bead listed in exactly one cell");
  endtask

  task automatic load(input int id, input bead_t b);
    @(negedge clk);
    while (!ld_ready) @(negedge clk);
    ld_v = 1'b1; ld_id = bead_id_t'(id); ld_b = b;
    @(negedge clk);
    ld_v = 1'b0;
  endtask

  initial begin
    bead_t b;
    ld_v = 0; ld_id = '0; ld_b = '0; start = 0;
    n_beads    = (BEAD_W+1)'(NB);
    max_events = 200;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < NB; i++) begin
      b = '0;
      b.pos[0] = 32'(8) * CELLW + 32'(i % 3) * (CELLW + CELLW / 2) + CELLW / 3;
      b.pos[1] = 32'(8) * CELLW + 32'((i / 3) % 2) * (CELLW + CELLW / 2) + CELLW / 3;
      b.pos[2] = 32'(8) * CELLW + 32'(i / 6) * (CELLW + CELLW / 2) + CELLW / 3;
      for (int k = 0; k < 3; k++) b.vel[k] = 32'($signed($urandom_range(0, 1 << 17)) - (1 << 16));
      if (i == 5) b.vel = '{default: '0};   // one bead at rest
      load(i, b);
      repeat (2) @(negedge clk);
      check(u_beads.mem[i] == b, "loaded state in bead memory");
      check_member(i);
    end
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    wait (done);
    @(negedge clk);
    check(n_events == 200, "stops after max_events");
    check(!running, "not running when done");
    check(n_coll > 0 && n_cross > 0, "collisions and crossings committed");
    for (int i = 0; i < NB; i++) check_member(i);
    $display("events=%0d coll=%0d cross=%0d", n_events, n_coll, n_cross);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // initial sweep: insertions before the first event is taken
  always @(posedge clk) begin
    if (running && !first_pop) begin
      n_sweep_ins += $countones(q_ins_v);
      if (q_ready && q_out_v) begin
        first_pop = 1;
        check(n_sweep_ins >= NB - 1 && n_sweep_ins <= 2 * NB,
              "initial sweep inserts a crossing per moving bead and at most one collision");
      end
    end
  end

  // after each commit, check the beads of the event
  always @(posedge clk) begin
    if (rst_n && c_v) begin
      event_t e;
      bead_t  olda;
      e    = c_ev;
      olda = u_beads.mem[e.a];
      fork
        begin
          repeat (2) @(negedge clk);
          check_member(int'(e.a));
          if (e.kind == EV_COLLIDE) check_member(int'(e.b));
          else begin
            logic [CELL_BITS-1:0] c0, c1;
            c0 = olda.pos[e.axis][POS_W-1 -: CELL_BITS];
            c1 = u_beads.mem[e.a].pos[e.axis][POS_W-1 -: CELL_BITS];
            check(c1 == (e.dir ? c0 + 1'b1 : c0 - 1'b1), "crossing moves to the adjacent cell");
          end
        end
      join_none
    end
  end
endmodule

// memory_controller: sequences the simulation around the bead memories.
//
// It feeds the collider and the predictor from the bead memories, commits
// results through the commit buffer (write-back, invalidation broadcast,
// cell membership change) and hands new events to the priority queue.
//
// Phases:
//   CLEAR   wait for the pointer memory to clear itself after reset.
//   IDLE    accept beads from the host (ld_v): the state is written to the
//           bead memory, and in the next cycle the tag goes into the lowest
//           free slot of its cell.  start begins the run.
//   initial prediction: beads 0 .. n_beads-1 are predicted one by one and
//           their next collision and next crossing are inserted.
//   event loop, per event:
//     POP     take the earliest event from the queue (stops after
//             max_events events, or waits while the queue is empty);
//     READ    read both beads;   PROC  six collider stages;
//     FETCH   commit buffer prefetches slot vectors and the bead's slot;
//     COMMIT  write-back, broadcast, cell change, all in one cycle;
//     predict bead a, then (collision) bead b; INSERT up to four events in
//             one cycle.
//   Prediction of one bead: read it (t_now = its time), then walk the 27
//   cells of its neighbourhood, one pointer-memory row per clock, with the
//   row's beads read one clock later and handed to the predictor one clock
//   after that; wait for the predictor's result.
//
// Timing: about 2 + 6 + 3 + 35 clocks per predicted bead, so ~75 clocks per
// crossing and ~110 per collision.  Everything is registered on the rising
// edge.  The bead memory's read data goes straight through to the collider
// and predictor inputs (pr_a, pr_b, pd_self_b, pd_p_b): the controller
// steers only the read addresses and the valid and batch flags.
//
// The order of operations (process, commit with invalidation, predict,
// insert) and the neighbourhood read follow the original design.  The
// original overlaps many events in a deep pipeline, resolving conflicts with
// stalls; this controller handles one event at a time, so those conflicts
// cannot arise.  That, the load protocol and the walk order are this
// design's own.
module memory_controller
  import dmd_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // host
  input  logic       ld_v,
  input  bead_id_t   ld_id,
  input  bead_t      ld_b,
  output logic       ld_ready,
  input  logic [BEAD_W:0] n_beads,
  input  logic       start,
  input  logic [31:0] max_events,
  output logic       running,
  output logic       done,
  // event priority queue
  input  logic       q_out_v,
  input  event_t     q_out_e,
  output logic       q_ready,
  output logic [3:0] q_ins_v,
  output event_t     q_ins_e [4],
  output inval_t     inv,
  // event processor
  output logic       pr_in_v,
  output event_t     pr_ev,
  output bead_t      pr_a,
  output bead_t      pr_b,
  input  logic       pr_out_v,
  input  event_t     pr_out_ev,
  input  bead_t      pr_out_a,
  input  bead_t      pr_out_b,
  // event predictor
  output logic       pd_in_v,
  output logic       pd_first,
  output logic       pd_last,
  output time_t      pd_t_now,
  output bead_id_t   pd_self_id,
  output bead_t      pd_self_b,
  output logic [SLOTS-1:0] pd_p_v,
  output bead_id_t   pd_p_id [SLOTS],
  output bead_t      pd_p_b  [SLOTS],
  input  logic       pd_done,
  input  logic       pd_coll_v,
  input  event_t     pd_coll_ev,
  input  logic       pd_cross_v,
  input  event_t     pd_cross_ev,
  // bead state memory
  output bead_id_t   bm_rd_addr [SLOTS],
  input  bead_t      bm_rd_data [SLOTS],
  output logic       bm_we [2],
  output bead_id_t   bm_wa [2],
  output bead_t      bm_wd [2],
  output bead_id_t   bs_raddr,
  input  slot_vec_t  bs_rdata,
  output logic       bs_we,
  output bead_id_t   bs_waddr,
  output slot_vec_t  bs_wdata,
  // bead pointer memory
  input  logic       pm_busy,
  output cell_addr_t pm_rd_cell,
  input  bead_id_t   pm_rd_ids [SLOTS],
  input  slot_vec_t  pm_rd_occ,
  output cell_addr_t pm_sl_cell [2],
  input  slot_vec_t  pm_sl_free [2],
  output logic       pm_pw_v    [2],
  output cell_addr_t pm_pw_cell [2],
  output logic [$clog2(SLOTS)-1:0] pm_pw_slot [2],
  output bead_id_t   pm_pw_id   [2],
  output logic       pm_fw_v    [2],
  output cell_addr_t pm_fw_cell [2],
  output slot_vec_t  pm_fw_vec  [2],
  // committed events (observation)
  output logic       c_v,
  output event_t     c_ev,
  output bead_t      c_a,
  output bead_t      c_b,
  // statistics
  output logic [31:0] n_events,
  output logic [31:0] n_coll,
  output logic [31:0] n_cross,
  output logic [31:0] n_cell_full
);

  localparam int unsigned SIW = $clog2(SLOTS);

  typedef enum logic [3:0] {
    S_CLEAR, S_IDLE, S_LD2, S_POP, S_READ, S_READ2, S_PROC, S_FETCH, S_COMMIT,
    S_PSELF, S_PSELF2, S_PCELL, S_PWAIT, S_INSERT, S_DONE
  } state_e;

  state_e     st;
  logic       init_mode;       // predicting the initial sweep
  bead_id_t   sweep_id;
  event_t     ev_r;
  cell_addr_t old_cell_r;
  bead_id_t   tgt;             // bead being predicted
  logic       second;          // bead b still to predict
  bead_t      self_r;
  logic [4:0] k;               // neighbourhood walk counter 0..28
  bead_id_t   ids_r [SLOTS];
  slot_vec_t  occ_r;
  logic [3:0] buf_v;
  event_t     buf_e [4];
  bead_id_t   ld_id_r;
  cell_addr_t ld_cell_r;

  // commit buffer
  logic       cb_full, cb_commit, cb_cell_full;
  cell_addr_t cb_fetch_old, cb_fetch_new;
  bead_id_t   cb_fetch_bead;
  event_t     cb_ev;
  logic       cb_bw_we [2];
  bead_id_t   cb_bw_a  [2];
  bead_t      cb_bw_d  [2];
  inval_t     cb_inv;
  logic       cb_pw_v  [2];
  cell_addr_t cb_pw_cell [2];
  logic [SIW-1:0] cb_pw_slot [2];
  bead_id_t   cb_pw_id [2];
  logic       cb_fw_v  [2];
  cell_addr_t cb_fw_cell [2];
  slot_vec_t  cb_fw_vec [2];
  logic       cb_sw_v;
  bead_id_t   cb_sw_bead;
  slot_vec_t  cb_sw_vec;

  commit_buffer u_cb (
    .clk, .rst_n,
    .load        (st == S_PROC && pr_out_v),
    .in_ev       (pr_out_ev),
    .in_a        (pr_out_a),
    .in_b        (pr_out_b),
    .in_old_cell (old_cell_r),
    .full        (cb_full),
    .fetch_old_cell (cb_fetch_old),
    .fetch_new_cell (cb_fetch_new),
    .fetch_bead     (cb_fetch_bead),
    .commit      (cb_commit),
    .slot_old    (pm_sl_free[0]),
    .slot_new    (pm_sl_free[1]),
    .bead_slot   (bs_rdata),
    .ev          (cb_ev),
    .bw_we (cb_bw_we), .bw_a (cb_bw_a), .bw_d (cb_bw_d),
    .inv   (cb_inv),
    .pw_v (cb_pw_v), .pw_cell (cb_pw_cell), .pw_slot (cb_pw_slot), .pw_id (cb_pw_id),
    .fw_v (cb_fw_v), .fw_cell (cb_fw_cell), .fw_vec (cb_fw_vec),
    .sw_v (cb_sw_v), .sw_bead (cb_sw_bead), .sw_vec (cb_sw_vec),
    .cell_full (cb_cell_full)
  );

  assign cb_commit = (st == S_COMMIT) && cb_full;
  assign c_v  = cb_commit;
  assign c_ev = cb_ev;
  assign c_a  = cb_bw_d[0];
  assign c_b  = cb_bw_d[1];

  // neighbour k of a cell: offsets (k%3-1, k/3%3-1, k/9-1), wrapping
  function automatic cell_addr_t neighbour(input cell_addr_t c, input logic [4:0] kk);
    cidx_t x, y, z;
    int unsigned ki;
    ki = 32'(kk);
    x  = c[CELL_BITS-1:0]           + cidx_t'(ki % 3) - cidx_t'(1);
    y  = c[2*CELL_BITS-1:CELL_BITS] + cidx_t'((ki / 3) % 3) - cidx_t'(1);
    z  = c[3*CELL_BITS-1:2*CELL_BITS] + cidx_t'(ki / 9) - cidx_t'(1);
    return {z, y, x};
  endfunction

  function automatic logic [SIW:0] lowest_free(input slot_vec_t f);
    logic [SIW:0] r;
    r = '0;
    for (int s = SLOTS - 1; s >= 0; s--)
      if (f[s]) r = {1'b1, SIW'(s)};
    return r;
  endfunction

  // ------------------------------------------------------------------ FSM
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st         <= S_CLEAR;
      init_mode  <= 1'b0;
      sweep_id   <= '0;
      ev_r       <= '0;
      old_cell_r <= '0;
      tgt        <= '0;
      second     <= 1'b0;
      self_r     <= '0;
      k          <= '0;
      occ_r      <= '0;
      buf_v      <= '0;
      for (int s = 0; s < SLOTS; s++) ids_r[s] <= '0;
      for (int j = 0; j < 4; j++) buf_e[j] <= '0;
      ld_id_r    <= '0;
      ld_cell_r  <= '0;
      n_events   <= '0;
      n_coll     <= '0;
      n_cross    <= '0;
      n_cell_full <= '0;
    end else begin
      unique case (st)
        S_CLEAR: if (!pm_busy) st <= S_IDLE;
        S_IDLE: begin
          if (ld_v) begin
            ld_id_r   <= ld_id;
            ld_cell_r <= cell_of(ld_b.pos);
            st        <= S_LD2;
          end else if (start) begin
            init_mode <= 1'b1;
            sweep_id  <= '0;
            tgt       <= '0;
            second    <= 1'b0;
            buf_v     <= '0;
            st        <= (n_beads == 0) ? S_POP : S_PSELF;
          end
        end
        S_LD2: st <= S_IDLE;
        // ------------------------------------------------ event loop
        S_POP: begin
          if (n_events == max_events) st <= S_DONE;
          else if (q_out_v) begin
            ev_r <= q_out_e;
            st   <= S_READ;
          end
        end
        S_READ:  st <= S_READ2;
        S_READ2: begin
          old_cell_r <= cell_of(bm_rd_data[0].pos);
          st         <= S_PROC;
        end
        S_PROC:  if (pr_out_v) st <= S_FETCH;
        S_FETCH: st <= S_COMMIT;
        S_COMMIT: begin
          n_events <= n_events + 1;
          if (cb_ev.kind == EV_COLLIDE) n_coll  <= n_coll + 1;
          else                          n_cross <= n_cross + 1;
          if (cb_cell_full) n_cell_full <= n_cell_full + 1;
          init_mode <= 1'b0;
          buf_v     <= '0;
          tgt       <= ev_r.a;
          second    <= (ev_r.kind == EV_COLLIDE);
          st        <= S_PSELF;
        end
        // ------------------------------------------------ prediction
        S_PSELF:  st <= S_PSELF2;
        S_PSELF2: begin
          self_r <= bm_rd_data[0];
          k      <= '0;
          st     <= S_PCELL;
        end
        S_PCELL: begin
          for (int s = 0; s < SLOTS; s++) ids_r[s] <= pm_rd_ids[s];
          occ_r <= pm_rd_occ;
          if (k == 5'd28) st <= S_PWAIT;
          k <= k + 1'b1;
        end
        S_PWAIT: begin
          if (pd_done) begin
            // place this bead's two events in the insertion buffer
            if (!buf_v[0] && !buf_v[1]) begin
              buf_v[0] <= pd_coll_v;  buf_e[0] <= pd_coll_ev;
              buf_v[1] <= pd_cross_v; buf_e[1] <= pd_cross_ev;
            end else begin
              buf_v[2] <= pd_coll_v;  buf_e[2] <= pd_coll_ev;
              buf_v[3] <= pd_cross_v; buf_e[3] <= pd_cross_ev;
            end
            if (second) begin
              second <= 1'b0;
              tgt    <= ev_r.b;
              st     <= S_PSELF;
            end else begin
              st <= S_INSERT;
            end
          end
        end
        S_INSERT: begin
          buf_v <= '0;
          if (init_mode && 32'(sweep_id) + 1 < 32'(n_beads)) begin
            sweep_id <= sweep_id + 1'b1;
            tgt      <= sweep_id + 1'b1;
            st       <= S_PSELF;
          end else begin
            init_mode <= 1'b0;
            st        <= S_POP;
          end
        end
        S_DONE: ;
        default: st <= S_CLEAR;
      endcase
    end
  end

  // ------------------------------------------------------------ outputs
  assign ld_ready = (st == S_IDLE);
  assign running  = (st != S_CLEAR) && (st != S_IDLE) && (st != S_LD2) && (st != S_DONE);
  assign done     = (st == S_DONE);
  assign q_ready  = (st == S_POP) && (n_events != max_events);
  assign inv      = cb_inv;

  always_comb begin
    q_ins_v = (st == S_INSERT) ? buf_v : 4'b0000;
    for (int j = 0; j < 4; j++) q_ins_e[j] = buf_e[j];
  end

  // collider
  assign pr_in_v = (st == S_READ2);
  assign pr_ev   = ev_r;
  assign pr_a    = bm_rd_data[0];
  assign pr_b    = bm_rd_data[1];

  // predictor: batch for row k-2 is presented while k = 2..28
  assign pd_in_v    = (st == S_PCELL) && (k >= 5'd2);
  assign pd_first   = (k == 5'd2);
  assign pd_last    = (k == 5'd28);
  assign pd_t_now   = self_r.t;
  assign pd_self_id = tgt;
  assign pd_self_b  = self_r;
  always_comb begin
    for (int s = 0; s < SLOTS; s++) begin
      pd_p_v[s]  = occ_r[s];
      pd_p_id[s] = ids_r[s];
      pd_p_b[s]  = bm_rd_data[s];
    end
  end

  // bead state memory
  always_comb begin
    for (int s = 0; s < SLOTS; s++) bm_rd_addr[s] = pm_rd_ids[s];
    if (st == S_READ) begin
      bm_rd_addr[0] = ev_r.a;
      bm_rd_addr[1] = ev_r.b;
    end else if (st == S_PSELF) begin
      bm_rd_addr[0] = tgt;
    end
    if (st == S_IDLE) begin
      bm_we[0] = ld_v;
      bm_wa[0] = ld_id;
      bm_wd[0] = ld_b;
      bm_we[1] = 1'b0;
      bm_wa[1] = '0;
      bm_wd[1] = '0;
    end else begin
      for (int w = 0; w < 2; w++) begin
        bm_we[w] = cb_bw_we[w] && cb_commit;
        bm_wa[w] = cb_bw_a[w];
        bm_wd[w] = cb_bw_d[w];
      end
    end
    bs_raddr = cb_fetch_bead;
  end

  // pointer memory
  logic [SIW:0] ld_free;
  assign ld_free = lowest_free(pm_sl_free[0]);

  always_comb begin
    pm_rd_cell    = neighbour(cell_of(self_r.pos), k);
    pm_sl_cell[0] = (st == S_IDLE) ? cell_of(ld_b.pos) : cb_fetch_old;
    pm_sl_cell[1] = cb_fetch_new;
    if (st == S_LD2) begin
      pm_pw_v[0]    = ld_free[SIW];
      pm_pw_cell[0] = ld_cell_r;
      pm_pw_slot[0] = ld_free[SIW-1:0];
      pm_pw_id[0]   = ld_id_r;
      pm_fw_v[0]    = ld_free[SIW];
      pm_fw_cell[0] = ld_cell_r;
      pm_fw_vec[0]  = pm_sl_free[0] & ~(slot_vec_t'(1) << ld_free[SIW-1:0]);
      pm_pw_v[1]    = 1'b0;
      pm_pw_cell[1] = '0;
      pm_pw_slot[1] = '0;
      pm_pw_id[1]   = '0;
      pm_fw_v[1]    = 1'b0;
      pm_fw_cell[1] = '0;
      pm_fw_vec[1]  = '0;
      bs_we         = ld_free[SIW];
      bs_waddr      = ld_id_r;
      bs_wdata      = slot_vec_t'(1) << ld_free[SIW-1:0];
    end else begin
      for (int w = 0; w < 2; w++) begin
        pm_pw_v[w]    = cb_pw_v[w];
        pm_pw_cell[w] = cb_pw_cell[w];
        pm_pw_slot[w] = cb_pw_slot[w];
        pm_pw_id[w]   = cb_pw_id[w];
        pm_fw_v[w]    = cb_fw_v[w];
        pm_fw_cell[w] = cb_fw_cell[w];
        pm_fw_vec[w]  = cb_fw_vec[w];
      end
      bs_we    = cb_sw_v;
      bs_waddr = cb_sw_bead;
      bs_wdata = cb_sw_vec;
    end
  end

endmodule

// tb_commit_buffer: checks what the commit buffer writes and broadcasts.
//
// Random collisions and cell crossings are loaded with random bead states,
// then committed with random free-slot vectors for the old and new cells and
// a random one-hot slot for the bead.  The bench checks the prefetch
// addresses (old cell, new cell from the bead's position, bead tag) and, in
// the commit cycle, the bead writes (b only for a collision), the
// invalidation tags, and for a crossing: the tag written into the lowest
// free slot of the new cell, a null pointer into the bead's old slot, the two
// updated free-slot vectors, the new one-hot bead slot, and cell_full with no
// pointer writes when the new cell has no free slot.  Outside the commit
// cycle nothing may be written.
module tb_commit_buffer;
  import dmd_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       load, full, commit, sw_v, cell_full;
  event_t     in_ev, ev;
  bead_t      in_a, in_b;
  cell_addr_t in_old_cell, fetch_old_cell, fetch_new_cell;
  bead_id_t   fetch_bead, sw_bead;
  slot_vec_t  slot_old, slot_new, bead_slot, sw_vec;
  logic       bw_we [2];
  bead_id_t   bw_a [2];
  bead_t      bw_d [2];
  inval_t     inv;
  logic       pw_v [2];
  cell_addr_t pw_cell [2];
  logic [$clog2(SLOTS)-1:0] pw_slot [2];
  bead_id_t   pw_id [2];
  logic       fw_v [2];
  cell_addr_t fw_cell [2];
  slot_vec_t  fw_vec [2];

  commit_buffer dut (.*);

  int checks = 0, failures = 0, n_full = 0, n_cross = 0, n_coll = 0;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load = 0; commit = 0; in_ev = '0; in_a = '0; in_b = '0; in_old_cell = '0;
    slot_old = '0; slot_new = '0; bead_slot = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      cell_addr_t newc;
      int lo, oi;
      @(negedge clk);
      in_ev      = '0;
      in_ev.t    = $urandom;
      in_ev.a    = bead_id_t'($urandom);
      in_ev.b    = bead_id_t'($urandom);
      in_ev.kind = ev_kind_e'($urandom_range(0, 1));
      for (int k = 0; k < 3; k++) begin
        in_a.pos[k] = $urandom; in_a.vel[k] = $urandom;
        in_b.pos[k] = $urandom; in_b.vel[k] = $urandom;
      end
      in_a.t = in_ev.t; in_b.t = in_ev.t;
      in_old_cell = cell_addr_t'($urandom);
      load = 1'b1;
      @(negedge clk);
      load = 1'b0;
      newc = {in_a.pos[2][31:27], in_a.pos[1][31:27], in_a.pos[0][31:27]};
      check(full, "buffer full after load");
      check(fetch_old_cell == in_old_cell && fetch_new_cell == newc && fetch_bead == in_ev.a,
            "prefetch addresses");
      check(!bw_we[0] && !bw_we[1] && !inv.v0 && !inv.v1 && !pw_v[0] && !pw_v[1] &&
            !fw_v[0] && !fw_v[1] && !sw_v, "no writes before commit");
      repeat ($urandom_range(0, 2)) @(negedge clk);
      slot_new  = ($urandom_range(0, 9) == 0) ? '0 : slot_vec_t'($urandom);
      oi        = $urandom_range(0, SLOTS - 1);
      bead_slot = slot_vec_t'(1 << oi);
      slot_old  = slot_vec_t'($urandom) & ~bead_slot;
      commit    = 1'b1;
      #1;
      lo = -1;
      for (int s = SLOTS - 1; s >= 0; s--) if (slot_new[s]) lo = s;
      check(bw_we[0] && bw_a[0] == in_ev.a && bw_d[0] == in_a, "bead a written");
      check(inv.v0 && inv.tag0 == in_ev.a, "bead a broadcast");
      if (in_ev.kind == EV_COLLIDE) begin
        n_coll++;
        check(bw_we[1] && bw_a[1] == in_ev.b && bw_d[1] == in_b, "bead b written");
        check(inv.v1 && inv.tag1 == in_ev.b, "bead b broadcast");
        check(!pw_v[0] && !pw_v[1] && !fw_v[0] && !fw_v[1] && !sw_v && !cell_full,
              "collision leaves the cells alone");
      end else if (lo < 0) begin
        n_full++;
        check(!bw_we[1] && !inv.v1, "crossing writes one bead");
        check(cell_full && !pw_v[0] && !pw_v[1] && !fw_v[0] && !fw_v[1] && !sw_v,
              "crossing into a full cell is flagged, cells untouched");
      end else begin
        n_cross++;
        check(!bw_we[1] && !inv.v1, "crossing writes one bead");
        check(!cell_full, "no full flag");
        check(pw_v[0] && pw_cell[0] == newc && int'(pw_slot[0]) == lo && pw_id[0] == in_ev.a,
              "tag into the lowest free slot of the new cell");
        check(pw_v[1] && pw_cell[1] == in_old_cell && int'(pw_slot[1]) == oi && pw_id[1] == '0,
              "null pointer into the old slot");
        check(fw_v[0] && fw_cell[0] == newc && fw_vec[0] == (slot_new & ~slot_vec_t'(1 << lo)),
              "new cell's free vector");
        check(fw_v[1] && fw_cell[1] == in_old_cell && fw_vec[1] == (slot_old | bead_slot),
              "old cell's free vector");
        check(sw_v && sw_bead == in_ev.a && sw_vec == slot_vec_t'(1 << lo), "bead slot updated");
      end
      @(negedge clk);
      commit = 1'b0;
      check(!full, "buffer empty after commit");
    end
    check(n_full > 0 && n_cross > 0 && n_coll > 0, "collisions, crossings and full cells exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

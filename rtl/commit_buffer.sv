// commit_buffer: holds a processed event and commits it.
//
// An event leaving the collider is loaded together with the cell its first
// bead occupied before the event.  While it waits, the buffer presents the
// addresses of what a cell crossing needs: the old and new cells' free-slot
// vectors and the bead's one-hot slot.  When commit is raised (with that
// fetched data on slot_old/slot_new/bead_slot) the buffer drives, in that one
// cycle:
//   * the bead memory writes: new position, velocity and time of bead a, and
//     of bead b for a collision;
//   * the invalidation broadcast of the event's bead tags, which cancels
//     every scheduled event naming them;
//   * for a cell crossing: the tag into the lowest free slot of the new cell,
//     a null pointer into the old slot, both cells' free-slot vectors and the
//     bead's new one-hot slot.
// cell_full flags a crossing into a cell with no free slot (then the bead is
// not moved in the pointer memory).
//
// Interface: load on a rising edge; then commit at any later cycle; outputs
// other than fetch_* are meaningful only while commit is high.
//
// Committing by write-back plus broadcast, and the single-cycle cell change
// from prefetched slot data, follow the original design.  The buffer holds
// one event because this implementation processes one event at a time; the
// lowest-free-slot rule is this design's own.
module commit_buffer
  import dmd_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       load,
  input  event_t     in_ev,
  input  bead_t      in_a,
  input  bead_t      in_b,
  input  cell_addr_t in_old_cell,
  output logic       full,
  // prefetch addresses
  output cell_addr_t fetch_old_cell,
  output cell_addr_t fetch_new_cell,
  output bead_id_t   fetch_bead,
  // commit
  input  logic       commit,
  input  slot_vec_t  slot_old,
  input  slot_vec_t  slot_new,
  input  slot_vec_t  bead_slot,
  output event_t     ev,
  output logic       bw_we [2],
  output bead_id_t   bw_a  [2],
  output bead_t      bw_d  [2],
  output inval_t     inv,
  output logic       pw_v    [2],
  output cell_addr_t pw_cell [2],
  output logic [$clog2(SLOTS)-1:0] pw_slot [2],
  output bead_id_t   pw_id   [2],
  output logic       fw_v    [2],
  output cell_addr_t fw_cell [2],
  output slot_vec_t  fw_vec  [2],
  output logic       sw_v,
  output bead_id_t   sw_bead,
  output slot_vec_t  sw_vec,
  output logic       cell_full
);

  localparam int unsigned SIW = $clog2(SLOTS);

  bead_t      a_r, b_r;
  cell_addr_t old_r;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full  <= 1'b0;
      ev    <= '0;
      a_r   <= '0;
      b_r   <= '0;
      old_r <= '0;
    end else if (load) begin
      full  <= 1'b1;
      ev    <= in_ev;
      a_r   <= in_a;
      b_r   <= in_b;
      old_r <= in_old_cell;
    end else if (commit) begin
      full  <= 1'b0;
    end
  end

  assign fetch_old_cell = old_r;
  assign fetch_new_cell = cell_of(a_r.pos);
  assign fetch_bead     = ev.a;

  logic              crossing;
  logic [SIW-1:0]    new_idx, old_idx;
  logic              found;
  slot_vec_t         new_oh;

  always_comb begin
    crossing = commit && (ev.kind == EV_CROSS);
    // lowest free slot of the new cell
    found   = 1'b0;
    new_idx = '0;
    for (int s = SLOTS - 1; s >= 0; s--)
      if (slot_new[s]) begin
        found   = 1'b1;
        new_idx = SIW'(s);
      end
    new_oh = found ? slot_vec_t'(1) << new_idx : '0;
    // index of the bead's current one-hot slot
    old_idx = '0;
    for (int s = 0; s < SLOTS; s++)
      if (bead_slot[s]) old_idx = SIW'(s);
  end

  always_comb begin
    bw_we[0] = commit;
    bw_a[0]  = ev.a;
    bw_d[0]  = a_r;
    bw_we[1] = commit && (ev.kind == EV_COLLIDE);
    bw_a[1]  = ev.b;
    bw_d[1]  = b_r;

    inv.v0   = commit;
    inv.tag0 = ev.a;
    inv.v1   = commit && (ev.kind == EV_COLLIDE);
    inv.tag1 = ev.b;

    cell_full = crossing && !found;

    pw_v[0]    = crossing && found;
    pw_cell[0] = fetch_new_cell;
    pw_slot[0] = new_idx;
    pw_id[0]   = ev.a;
    pw_v[1]    = crossing && found;
    pw_cell[1] = old_r;
    pw_slot[1] = old_idx;
    pw_id[1]   = '0;

    fw_v[0]    = crossing && found;
    fw_cell[0] = fetch_new_cell;
    fw_vec[0]  = slot_new & ~new_oh;
    fw_v[1]    = crossing && found;
    fw_cell[1] = old_r;
    fw_vec[1]  = slot_old | bead_slot;

    sw_v    = crossing && found;
    sw_bead = ev.a;
    sw_vec  = new_oh;
  end

endmodule

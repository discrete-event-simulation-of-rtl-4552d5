// bead_pointer_memory: cell-indexed bead pointer memory plus the cell slot
// memory.
//
// For each cell of the 32 x 32 x 32 grid the pointer memory holds SLOTS (8)
// bead tags: a cell about one bead diameter wide holds at most eight bead
// centres.  The cell slot memory holds a bit vector per cell, 1 = slot free.
// A row read returns the eight tags and the occupancy (not free) of a cell;
// the controller walks the 27 cells of a neighbourhood one row per clock.
// Two slot-vector read ports fetch the vectors of a crossing bead's old and
// new cells.  Two pointer write ports and two slot-vector write ports let a
// cell crossing be committed in one cycle: the bead's tag is written into a
// free slot of the new cell, a null pointer into its old slot, and both
// cells' vectors are updated.
//
// All reads are synchronous (data one edge after the address) and
// write-before-read.  After reset the module clears itself, one cell per
// clock, marking every slot free; busy is high until that is done (NCELLS
// clocks).  No access may be made while busy.
//
// Cell indexing by the high position bits, eight tags per row, the free-slot
// vector and the one-cycle crossing follow the original design; the
// self-clearing after reset is this design's own.
module bead_pointer_memory
  import dmd_pkg::*;
#(
  parameter int unsigned NCELLS = 1 << CELL_W
) (
  input  logic       clk,
  input  logic       rst_n,
  output logic       busy,
  // neighbourhood row read
  input  cell_addr_t rd_cell,
  output bead_id_t   rd_ids [SLOTS],
  output slot_vec_t  rd_occ,
  // slot vector reads (old and new cell of a crossing)
  input  cell_addr_t sl_cell [2],
  output slot_vec_t  sl_free [2],
  // pointer writes
  input  logic       pw_v    [2],
  input  cell_addr_t pw_cell [2],
  input  logic [$clog2(SLOTS)-1:0] pw_slot [2],
  input  bead_id_t   pw_id   [2],
  // slot vector writes
  input  logic       fw_v    [2],
  input  cell_addr_t fw_cell [2],
  input  slot_vec_t  fw_vec  [2]
);

  localparam int unsigned AW = $clog2(NCELLS);

  bead_id_t  ptr  [NCELLS][SLOTS];
  slot_vec_t free [NCELLS];

  logic [AW:0] clr;   // clear pointer; clr[AW] = done
  assign busy = !clr[AW];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    clr <= '0;
    else if (busy) clr <= clr + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (busy) begin
      free[clr[AW-1:0]] <= '1;
    end else begin
      for (int w = 0; w < 2; w++) begin
        if (pw_v[w]) ptr[AW'(pw_cell[w])][pw_slot[w]] <= pw_id[w];
        if (fw_v[w]) free[AW'(fw_cell[w])] <= fw_vec[w];
      end
    end
  end

  // write-before-read view of one cell
  function automatic slot_vec_t free_now(input cell_addr_t c);
    slot_vec_t f;
    f = free[AW'(c)];
    for (int w = 0; w < 2; w++)
      if (fw_v[w] && fw_cell[w] == c) f = fw_vec[w];
    return f;
  endfunction

  always_ff @(posedge clk) begin
    for (int s = 0; s < SLOTS; s++) begin
      rd_ids[s] <= ptr[AW'(rd_cell)][s];
      for (int w = 0; w < 2; w++)
        if (pw_v[w] && pw_cell[w] == rd_cell && int'(pw_slot[w]) == s)
          rd_ids[s] <= pw_id[w];
    end
    rd_occ <= ~free_now(rd_cell);
    for (int p = 0; p < 2; p++) sl_free[p] <= free_now(sl_cell[p]);
  end

endmodule

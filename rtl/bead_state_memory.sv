// bead_state_memory: tag-indexed bead memory plus the bead slot memory.
//
// The bead memory holds, per bead tag, position, velocity and time of last
// update (bead_t).  NRD synchronous read ports (data one edge after the
// address) let a whole pointer-memory row of beads be read in one cycle; on
// an FPGA this is one RAM copy per port.  Two write ports commit both beads
// of a collision in the same cycle.  Reads are write-before-read: a read of
// an address written in the same cycle returns the new data.
//
// The bead slot memory holds, per bead, a one-hot vector naming the slot it
// occupies in its cell's pointer-memory row, needed to remove it from the
// old cell at a cell crossing.  One synchronous read port, one write port,
// also write-before-read.
//
// Neither memory is reset; every location is written before it is read.
//
// Tag indexing, the one-hot slot vector and write-before-read follow the
// original design; the port counts are this design's own.
module bead_state_memory
  import dmd_pkg::*;
#(
  parameter int unsigned NBEADS = 1 << BEAD_W,
  parameter int unsigned NRD    = SLOTS
) (
  input  logic      clk,
  input  bead_id_t  rd_addr [NRD],
  output bead_t     rd_data [NRD],
  input  logic      we   [2],
  input  bead_id_t  wa   [2],
  input  bead_t     wd   [2],
  input  bead_id_t  slot_raddr,
  output slot_vec_t slot_rdata,
  input  logic      slot_we,
  input  bead_id_t  slot_waddr,
  input  slot_vec_t slot_wdata
);

  localparam int unsigned AW = $clog2(NBEADS);

  bead_t     mem  [NBEADS];
  slot_vec_t slot [NBEADS];

  always_ff @(posedge clk) begin
    for (int w = 0; w < 2; w++)
      if (we[w]) mem[AW'(wa[w])] <= wd[w];
    if (slot_we) slot[AW'(slot_waddr)] <= slot_wdata;
  end

  always_ff @(posedge clk) begin
    for (int p = 0; p < NRD; p++) begin
      if (we[1] && wa[1] == rd_addr[p])      rd_data[p] <= wd[1];
      else if (we[0] && wa[0] == rd_addr[p]) rd_data[p] <= wd[0];
      else                                   rd_data[p] <= mem[AW'(rd_addr[p])];
    end
    if (slot_we && slot_waddr == slot_raddr) slot_rdata <= slot_wdata;
    else                                     slot_rdata <= slot[AW'(slot_raddr)];
  end

endmodule

// pq_cell: one cell of a single-insertion "scrunching" shift-register
// priority queue.
//
// The cell stores one event (time tag plus payload of bead references) and a
// valid bit.  Each cycle it takes one of four actions, chosen only from its
// own comparator and its neighbours' signals:
//   STAY  keep its content        FWD  take the right neighbour's content
//   BACK  take the left neighbour  INS  take the new element
// Cell 0 (the left end) is the head, holding the earliest event; "forward"
// means towards the head.
//
// Comparator: cmp_out = 1 when this cell's event is not later than the new
// element, so it stays ahead of it.  A hole (invalid cell) passes on the
// result of the cell behind it (cmp_right), so the comparison results along
// the chain always read 1..1 0..0 and the insertion point is unique.
//
// Holes ("scrunching"): pf_out tells the cells behind that a hole exists at
// or ahead of this cell.  A hole lets the cells behind it be "upgraded":
// STAY becomes FWD when nothing is being inserted; BACK becomes STAY when a
// new element is inserted ahead of the hole.  At most one hole is consumed
// per cycle, and nothing is upgraded while the unit dequeues.
//
// Invalidation: the bead tags on the broadcast bus are compared with the
// payload every cycle; a hit clears the valid bit before the cell's content
// is used, so a cancelled event is never moved or delivered.
//
// Timing: all action logic is combinational; the new content is registered
// on the rising clock edge.  Reset empties the cell.
//
// The four actions, the neighbour comparison results, the valid-bit upgrade
// and the broadcast invalidation follow the original queue cell; the chained
// hole signal and the exact upgrade rules are this design's own.
module pq_cell
  import dmd_pkg::*;
#(
  parameter bit FIRST = 1'b0   // this is the head cell
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   deq,          // unit's head is removed this cycle
  input  logic   enq,          // a new element enters the unit this cycle
  input  event_t new_e,
  input  inval_t inv,
  input  event_t left_e,       // content of the cell ahead (after invalidation)
  input  logic   left_v,
  input  event_t right_e,      // content of the cell behind
  input  logic   right_v,
  input  logic   cmp_left,     // comparison result of the cell ahead (1 for head)
  input  logic   cmp_right,    // comparison result of the cell behind (0 at tail)
  input  logic   pf_left,      // a hole exists ahead of this cell
  output event_t q_e,          // content, after invalidation
  output logic   q_v,
  output logic   cmp_out,
  output logic   pf_out,
  output logic   killed        // a valid event was invalidated this cycle
);

  typedef enum logic [1:0] {ACT_STAY, ACT_FWD, ACT_BACK, ACT_INS} act_e;

  event_t e_r;
  logic   v_r;
  act_e   act;

  assign killed = v_r && hit(e_r, inv);
  assign q_e    = e_r;
  assign q_v    = v_r && !killed;

  assign cmp_out = q_v ? (e_r.t <= new_e.t) : cmp_right;
  assign pf_out  = pf_left || !q_v;

  always_comb begin
    act = ACT_STAY;
    if (deq && enq) begin
      if (cmp_right)                act = ACT_FWD;
      else if (cmp_out || FIRST)    act = ACT_INS;
      else                          act = ACT_STAY;
    end else if (deq) begin
      act = ACT_FWD;
    end else if (enq) begin
      if (cmp_out) begin
        // ahead of the insertion point: stay, or move up behind a hole
        if (pf_out) act = cmp_right ? ACT_FWD : ACT_INS;
        else        act = ACT_STAY;
      end else begin
        // behind the insertion point: shift back unless a hole absorbs it
        if (pf_left)       act = ACT_STAY;
        else if (cmp_left) act = ACT_INS;
        else               act = ACT_BACK;
      end
    end else begin
      act = pf_out ? ACT_FWD : ACT_STAY;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_r <= 1'b0;
      e_r <= '0;
    end else begin
      unique case (act)
        ACT_STAY: begin e_r <= e_r;     v_r <= q_v;     end
        ACT_FWD:  begin e_r <= right_e; v_r <= right_v; end
        ACT_BACK: begin e_r <= left_e;  v_r <= left_v;  end
        ACT_INS:  begin e_r <= new_e;   v_r <= 1'b1;    end
      endcase
    end
  end

endmodule

// pq_unit: single-insertion shift register priority queue unit.
//
// DEPTH pq_cells in a chain, kept in time order with the earliest event in
// cell 0.  Per cycle the unit accepts one new element (enq), removes its head
// (deq) and applies the invalidation broadcast to every cell.  Holes left by
// invalidated events are squeezed out one per cycle whenever the unit is not
// dequeued ("scrunching").
//
// head_ok is 1 when cell 0 holds a valid event, which is then the unit's
// minimum.  head_hole flags a hole in cell 0 with valid events behind it: the
// unit must not be dequeued in that cycle (the hole is squeezed out first),
// so that an event is never delivered ahead of an earlier one.
//
// overflow pulses when an element is pushed off the tail: an enqueue without
// dequeue into a full unit with no hole.  A lost event is reported, not
// recovered.  killed counts invalidated events this cycle, scrunch flags a
// cycle in which a hole with valid events behind it was being closed.
//
// Timing: deq/enq/new_e/inv are sampled on the rising edge; head outputs are
// combinational from the cell registers and the invalidation broadcast.
module pq_unit
  import dmd_pkg::*;
#(
  parameter int unsigned DEPTH = 38
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   enq,
  input  event_t new_e,
  input  logic   deq,
  input  inval_t inv,
  output event_t head_e,
  output logic   head_ok,
  output logic   head_hole,
  output logic   overflow,
  output logic [$clog2(DEPTH+1)-1:0] killed,
  output logic   scrunch,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  event_t          e   [DEPTH];
  logic [DEPTH-1:0] v, cmp, pf, kill;
  logic [DEPTH-1:0] hole_seen;  // a hole exists at an index below i
  logic [DEPTH-1:0] mid;        // valid entry with a hole ahead of it

  for (genvar i = 0; i < DEPTH; i++) begin : g_cell
    pq_cell #(.FIRST(i == 0)) u_cell (
      .clk       (clk),
      .rst_n     (rst_n),
      .deq       (deq),
      .enq       (enq),
      .new_e     (new_e),
      .inv       (inv),
      .left_e    ((i == 0) ? '0 : e[(i == 0) ? 0 : i-1]),
      .left_v    ((i == 0) ? 1'b0 : v[(i == 0) ? 0 : i-1]),
      .right_e   ((i == DEPTH-1) ? '0 : e[(i == DEPTH-1) ? i : i+1]),
      .right_v   ((i == DEPTH-1) ? 1'b0 : v[(i == DEPTH-1) ? i : i+1]),
      .cmp_left  ((i == 0) ? 1'b1 : cmp[(i == 0) ? 0 : i-1]),
      .cmp_right ((i == DEPTH-1) ? 1'b0 : cmp[(i == DEPTH-1) ? i : i+1]),
      .pf_left   ((i == 0) ? 1'b0 : pf[(i == 0) ? 0 : i-1]),
      .q_e       (e[i]),
      .q_v       (v[i]),
      .cmp_out   (cmp[i]),
      .pf_out    (pf[i]),
      .killed    (kill[i])
    );
  end

  assign head_e  = e[0];
  assign head_ok = v[0];

  assign hole_seen[0] = 1'b0;
  for (genvar i = 0; i < DEPTH; i++) begin : g_hole
    if (i > 0) begin : g_seen
      assign hole_seen[i] = hole_seen[i-1] || !v[i-1];
    end
    assign mid[i] = v[i] && hole_seen[i];
  end

  assign head_hole = !v[0] && (|v);
  assign scrunch   = !deq && (|mid);
  // the element that would land beyond the tail in an enqueue-only cycle
  assign overflow  = enq && !deq && !pf[DEPTH-1] && (cmp[DEPTH-1] || v[DEPTH-1]);

  always_comb begin
    killed = '0;
    count  = '0;
    for (int i = 0; i < DEPTH; i++) begin
      killed = killed + kill[i];
      count  = count + v[i];
    end
  end

endmodule

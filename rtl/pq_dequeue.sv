// pq_dequeue: comparator network and dequeue logic of the four-unit queue.
//
// Each unit's head is its earliest event.  A tree of three comparators picks
// the earliest valid head (ties go to the lower unit number), the output mux
// presents it to the event processor, and when the consumer accepts it
// (ready) the winning unit alone is dequeued.
//
// If any unit has a hole at its head while holding valid events behind it,
// that unit's minimum is unknown for this cycle, so nothing is delivered
// (out_v = 0): the cycle carries no payload while the hole is squeezed out.
//
// Timing: combinational; out_e/out_v follow the unit heads in the same cycle.
//
// Comparing the four heads and steering the output follow the original
// design; the tie rule and the no-payload rule for head holes are this
// design's own.
module pq_dequeue
  import dmd_pkg::*;
(
  input  event_t     head_e    [4],
  input  logic [3:0] head_ok,
  input  logic [3:0] head_hole,
  input  logic       ready,
  output event_t     out_e,
  output logic       out_v,
  output logic [3:0] deq,
  output logic [1:0] sel
);

  // earlier of two candidates; a is kept on ties
  function automatic logic take_b(input logic va, input time_t ta,
                                  input logic vb, input time_t tb);
    return vb && (!va || tb < ta);
  endfunction

  logic       v01, v23;
  logic [1:0] s01, s23;
  time_t      t01, t23;

  always_comb begin
    s01 = take_b(head_ok[0], head_e[0].t, head_ok[1], head_e[1].t) ? 2'd1 : 2'd0;
    s23 = take_b(head_ok[2], head_e[2].t, head_ok[3], head_e[3].t) ? 2'd3 : 2'd2;
    v01 = head_ok[0] || head_ok[1];
    v23 = head_ok[2] || head_ok[3];
    t01 = head_e[s01].t;
    t23 = head_e[s23].t;
    sel = take_b(v01, t01, v23, t23) ? s23 : s01;
    out_e = head_e[sel];
    out_v = (v01 || v23) && !(|head_hole);
    deq   = '0;
    if (out_v && ready) deq[sel] = 1'b1;
  end

endmodule

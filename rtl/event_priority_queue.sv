// event_priority_queue: on-chip, time-keyed event priority queue with four
// insertions, one dequeue and unbounded invalidation per cycle.
//
// Structure: a routing randomizer (pq_router) spreads up to four new events
// over four single-insertion shift register units (pq_unit, DEPTH cells
// each); the comparator network (pq_dequeue) takes the earliest head of the
// four units.  The invalidation broadcast (two bead tags per cycle) reaches
// every cell of every unit in the same cycle; holes it opens are squeezed
// out by the units.
//
// Interface: ins_v/ins_e are the new events (any subset of the four ports),
// sampled on the rising edge.  out_v/out_e is the earliest pending event; it
// is removed on the edge at which ready is high.  An event inserted in a cycle
// can be delivered from the next cycle on.  overflow pulses when a unit loses
// an event off its tail.  count is the number of valid events held.
//
// Four units, the random routing, the comparator network and broadcast
// invalidation follow the original design; DEPTH = 38 per unit (152 cells)
// is chosen to match its 150-stage sample queue.
module event_priority_queue
  import dmd_pkg::*;
#(
  parameter int unsigned DEPTH = 38
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [3:0] ins_v,
  input  event_t     ins_e [4],
  input  inval_t     inv,
  input  logic       ready,
  output event_t     out_e,
  output logic       out_v,
  output logic       overflow,
  output logic [7:0] killed,     // events cancelled this cycle
  output logic       scrunch,    // a hole is being closed this cycle
  output logic [1:0] sel,        // unit delivering out_e
  output logic [4:0] perm_idx,   // routing scenario in use
  output logic [$clog2(4*DEPTH+1)-1:0] count
);

  localparam int unsigned CW = $clog2(DEPTH+1);

  logic [3:0] u_v, deq, head_ok, head_hole, ovf, scr;
  event_t     u_e [4];
  event_t     head_e [4];
  logic [CW-1:0] u_killed [4];
  logic [CW-1:0] u_count  [4];

  pq_router u_router (
    .clk, .rst_n,
    .in_v  (ins_v),
    .in_e  (ins_e),
    .out_v (u_v),
    .out_e (u_e),
    .perm_idx
  );

  for (genvar u = 0; u < 4; u++) begin : g_unit
    pq_unit #(.DEPTH(DEPTH)) u_unit (
      .clk, .rst_n,
      .enq       (u_v[u]),
      .new_e     (u_e[u]),
      .deq       (deq[u]),
      .inv       (inv),
      .head_e    (head_e[u]),
      .head_ok   (head_ok[u]),
      .head_hole (head_hole[u]),
      .overflow  (ovf[u]),
      .killed    (u_killed[u]),
      .scrunch   (scr[u]),
      .count     (u_count[u])
    );
  end

  pq_dequeue u_deq (
    .head_e, .head_ok, .head_hole,
    .ready,
    .out_e, .out_v,
    .deq, .sel
  );

  assign overflow = |ovf;
  assign scrunch  = |scr;

  always_comb begin
    killed = '0;
    count  = '0;
    for (int u = 0; u < 4; u++) begin
      killed = killed + 8'(u_killed[u]);
      count  = count + ($bits(count))'(u_count[u]);
    end
  end

endmodule

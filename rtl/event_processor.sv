// event_processor: the "collider", a six-stage pipeline that turns an event
// into new bead states.
//
// Collision of beads a and b (equal masses, hard spheres):
//   S1  dt = t_event - t_bead for both beads
//   S2  move both beads to the event time: p += v * dt (wraps with the box)
//   S3  r = p_b - p_a (32-bit signed, minimum image), v = v_b - v_a
//   S4  b = r . v
//   S5  q_k = b * r_k
//   S6  dv_k = q_k / sigma^2, done as a multiplication by the constant
//       INV_SIGMA2 * 2^-INV_SHIFT because every collision happens at the
//       fixed contact distance sigma; v_a += dv, v_b -= dv.
// Cell crossing of bead a: a is moved to the event time; if that position is
// not yet inside the new cell, its coordinate on the crossing axis is set
// onto the wall of the new cell, so the cell index taken from the position
// always agrees with the crossing.
// Both beads' time tags become the event time.
//
// Invalidation: each stage carries the event's bead tags with its valid bit;
// a broadcast that names one of them kills the stage (killed pulses).
// hold freezes every stage (a pipeline stall).
//
// Interface: in_v/in_ev/in_a/in_b enter on a rising edge when hold is low;
// the result appears on out_v/out_ev/out_a/out_b six edges later.
//
// Full 32-bit precision, the pipelined momentum update, the constant
// multiplication in place of the division and the per-stage tag comparison
// against the invalidation broadcast follow the original design.  The
// number of stages (six) and their split, the wall clamp and the constant's
// fixed-point format are this design's own.  The original also parks the
// pipeline in shadow registers so that an inserted event can overtake it;
// here a stall only freezes the pipeline.
module event_processor
  import dmd_pkg::*;
#(
  parameter int unsigned INV_SIGMA2 = 256,  // 1/sigma^2 = INV_SIGMA2 * 2^-INV_SHIFT
  parameter int unsigned INV_SHIFT  = 62
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   hold,
  input  inval_t inv,
  input  logic   in_v,
  input  event_t in_ev,
  input  bead_t  in_a,
  input  bead_t  in_b,
  output logic   out_v,
  output event_t out_ev,
  output bead_t  out_a,
  output bead_t  out_b,
  output logic   killed
);

  localparam int unsigned NS = 6;

  logic   v  [NS+1];
  event_t ev [NS+1];
  bead_t  ba [NS+1];
  bead_t  bb [NS+1];
  logic [NS:1] kill;

  // per-stage data beyond the bead states
  time_t                    dta, dtb;                 // S1
  logic [CELL_BITS-1:0]     cold;                     // S2: cell before the move
  logic signed [POS_W-1:0]  r   [3];                  // S3
  logic signed [VEL_W:0]    dv3 [3];                  // S3
  logic signed [2*POS_W+4:0] bdot;                    // S4
  logic signed [POS_W-1:0]  r4  [3];                  // S4: r carried along
  logic signed [3*POS_W+8:0] q  [3];                  // S5

  assign v[0]  = in_v;
  assign ev[0] = in_ev;
  assign ba[0] = in_a;
  assign bb[0] = in_b;

  for (genvar s = 1; s <= NS; s++) begin : g_kill
    assign kill[s] = v[s] && hit(ev[s], inv);
  end
  assign killed = |kill;

  function automatic logic [POS_W-1:0] advance(input logic [POS_W-1:0] p,
                                               input logic [VEL_W-1:0] vel,
                                               input time_t dt);
    logic signed [VEL_W+TIME_W:0] d;
    d = $signed(vel) * $signed({1'b0, dt});
    return p + d[POS_W-1:0];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 1; s <= NS; s++) v[s] <= 1'b0;
      for (int s = 1; s <= NS; s++) begin
        ev[s] <= '0;
        ba[s] <= '0;
        bb[s] <= '0;
      end
      dta  <= '0;
      dtb  <= '0;
      bdot <= '0;
      for (int k = 0; k < 3; k++) begin
        r[k]   <= '0;
        r4[k]  <= '0;
        dv3[k] <= '0;
        q[k]   <= '0;
      end
    end else if (!hold) begin
      for (int s = 1; s <= NS; s++) begin
        v[s]  <= v[s-1] && !((s > 1) ? kill[s-1] : hit(ev[0], inv));
        ev[s] <= ev[s-1];
        ba[s] <= ba[s-1];
        bb[s] <= bb[s-1];
      end
      // S1: time since each bead's last update
      dta <= in_ev.t - in_a.t;
      dtb <= in_ev.t - in_b.t;
      // S2: ballistic move to the event time
      for (int k = 0; k < 3; k++) begin
        ba[2].pos[k] <= advance(ba[1].pos[k], ba[1].vel[k], dta);
        bb[2].pos[k] <= advance(bb[1].pos[k], bb[1].vel[k], dtb);
      end
      cold    <= ba[1].pos[ev[1].axis][POS_W-1 -: CELL_BITS];
      ba[2].t <= ev[1].t;
      bb[2].t <= ev[1].t;
      // S3: relative position and velocity; wall clamp for a crossing
      for (int k = 0; k < 3; k++) begin
        r[k]   <= $signed(bb[2].pos[k] - ba[2].pos[k]);
        dv3[k] <= $signed({bb[2].vel[k][VEL_W-1], bb[2].vel[k]})
                - $signed({ba[2].vel[k][VEL_W-1], ba[2].vel[k]});
      end
      // (only when the bead has not already entered the new cell, so an
      // exact ballistic position is kept whenever it agrees with the event)
      if (ev[2].kind == EV_CROSS &&
          ba[2].pos[ev[2].axis][POS_W-1 -: CELL_BITS] != (ev[2].dir ? cold + 1'b1 : cold - 1'b1)) begin
        ba[3].pos[ev[2].axis] <= ev[2].dir ? {cold + 1'b1, {(POS_W-CELL_BITS){1'b0}}}
                                           : {cold, {(POS_W-CELL_BITS){1'b0}}} - 1'b1;
      end
      // S4: b = r . v
      begin
        logic signed [2*POS_W+4:0] acc, rk, vk;
        acc = '0;
        for (int k = 0; k < 3; k++) begin
          rk  = (2*POS_W+5)'(r[k]);
          vk  = (2*POS_W+5)'(dv3[k]);
          acc = acc + rk * vk;
        end
        bdot <= acc;
        for (int k = 0; k < 3; k++) r4[k] <= r[k];
      end
      // S5: b * r
      for (int k = 0; k < 3; k++) begin
        logic signed [3*POS_W+8:0] bw, rw;
        bw   = (3*POS_W+9)'(bdot);
        rw   = (3*POS_W+9)'(r4[k]);
        q[k] <= bw * rw;
      end
      // S6: velocity update (collisions only)
      if (ev[5].kind == EV_COLLIDE) begin
        for (int k = 0; k < 3; k++) begin
          logic signed [3*POS_W+20:0] dvk, qw, cw;
          qw  = (3*POS_W+21)'(q[k]);
          cw  = (3*POS_W+21)'(INV_SIGMA2);
          dvk = (qw * cw) >>> INV_SHIFT;
          ba[6].vel[k] <= ba[5].vel[k] + dvk[VEL_W-1:0];
          bb[6].vel[k] <= bb[5].vel[k] - dvk[VEL_W-1:0];
        end
      end
    end
  end

  assign out_v  = v[NS];
  assign out_ev = ev[NS];
  assign out_a  = ba[NS];
  assign out_b  = bb[NS];

endmodule

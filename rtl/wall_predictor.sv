// wall_predictor: predicts a bead's next cell crossing.
//
// A bead's cell is bounded by three candidate walls, one per axis, chosen by
// the sign of the velocity on that axis.  For axis k with v_k > 0 the
// distance is the cell width minus the offset in the cell; with v_k < 0 it
// is the offset plus one (the bead must leave the cell).  The crossing time
// is ceil(distance / |v_k|); the earliest of the (up to) three is the event.
// An axis with zero velocity never crosses; a bead at rest has no event.
//
// Pipeline: S1 distances, S2 the three divisions, S3 minimum and event time;
// the result is then delayed so the latency equals the pair predictors'
// (LAT = 23), letting both kinds of result leave the predictor together.
//
// Interface: in_v/t_now/bead_id/bead_b (bead already at t_now) in, out_v and
// a cell-crossing event (a = b = bead, axis, dir = 1 for +) LAT edges later.
//
// Three candidate walls per bead follow the original design; the arithmetic
// and the pipeline split are this design's own.
module wall_predictor
  import dmd_pkg::*;
#(
  parameter int unsigned LAT = 23
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     in_v,
  input  time_t    t_now,
  input  bead_id_t bead_id,
  input  bead_t    bead_b,
  output logic     out_v,
  output event_t   out_ev
);

  localparam int unsigned OFS_W = POS_W - CELL_BITS;   // offset inside a cell

  logic [OFS_W:0]   dist1 [3];
  logic [VEL_W-1:0] mag1  [3];
  logic [2:0]       dir1, mov1;
  logic [TIME_W:0]  tau2  [3];
  logic [2:0]       dir2, mov2;
  time_t            tn [3];
  bead_id_t         id [3];
  logic             v  [LAT+1];
  event_t           ev [3:LAT];
  logic             ok [3:LAT];

  assign v[0] = in_v;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 1; s <= LAT; s++) v[s] <= 1'b0;
      for (int s = 3; s <= LAT; s++) begin
        ev[s] <= '0;
        ok[s] <= 1'b0;
      end
      for (int k = 0; k < 3; k++) begin
        dist1[k] <= '0;
        mag1[k]  <= '0;
        tau2[k]  <= '0;
        tn[k]    <= '0;
        id[k]    <= '0;
      end
      dir1 <= '0; mov1 <= '0; dir2 <= '0; mov2 <= '0;
    end else begin
      for (int s = 1; s <= LAT; s++) v[s] <= v[s-1];
      tn[1] <= t_now;   tn[2] <= tn[1];
      id[1] <= bead_id; id[2] <= id[1];
      // S1: distance to the wall ahead on each axis
      for (int k = 0; k < 3; k++) begin
        logic [OFS_W-1:0] ofs;
        logic [VEL_W-1:0] vk;
        ofs     = bead_b.pos[k][OFS_W-1:0];
        vk      = bead_b.vel[k];
        dir1[k] <= !vk[VEL_W-1];
        mov1[k] <= (vk != '0);
        mag1[k] <= vk[VEL_W-1] ? -vk : vk;
        dist1[k] <= vk[VEL_W-1] ? {1'b0, ofs} + 1'b1
                                : (OFS_W+1)'(1 << OFS_W) - {1'b0, ofs};
      end
      // S2: ceil(distance / speed)
      for (int k = 0; k < 3; k++) begin
        logic [TIME_W:0] q;
        if (mov1[k]) begin
          logic [VEL_W+1:0] num, den;
          den = (VEL_W+2)'(mag1[k]);
          num = (VEL_W+2)'(dist1[k]) + den - 1'b1;
          q   = (TIME_W+1)'(num / den);
        end else begin
          q = '1;
        end
        tau2[k] <= q;
      end
      dir2 <= dir1;
      mov2 <= mov1;
      // S3: earliest wall
      begin
        logic [1:0]      ax;
        logic [TIME_W:0] best, tsum;
        ax   = 2'd0;
        best = tau2[0];
        for (int k = 1; k < 3; k++)
          if (tau2[k] < best) begin
            best = tau2[k];
            ax   = 2'(k);
          end
        tsum  = {1'b0, tn[2]} + best;
        ok[3] <= v[2] && (|mov2) && !tsum[TIME_W];
        ev[3] <= '{t: tsum[TIME_W-1:0], a: id[2], b: id[2], kind: EV_CROSS,
                   axis: ax, dir: dir2[ax]};
      end
      for (int s = 4; s <= LAT; s++) begin
        ev[s] <= ev[s-1];
        ok[s] <= ok[s-1];
      end
    end
  end

  assign out_v  = ok[LAT] && v[LAT];
  assign out_ev = ev[LAT];

endmodule

// event_predictor: the event predictor units.  Finds, for one bead just
// updated, its next collision and its next cell crossing.
//
// The bead's neighbourhood is presented one cell per clock as a batch of up
// to NLANES (8) partners, the contents of one bead pointer memory row.  Each
// lane is a 23-stage pair_predictor; a wall_predictor works on the bead
// itself, fed with the first batch.  As results leave the pipelines, a
// comparator tree picks the earliest collision of the batch and a running
// minimum keeps the earliest over all batches.  Only these two events are
// scheduled per bead, as in the original method (next collision, next cell
// crossing).
//
// Interface: in_v marks a batch; in_first/in_last mark the first and last
// batch of a bead; t_now/self_id/self_b describe the bead (at t_now) and must
// accompany every batch; p_v/p_id/p_b are the partners.  done pulses LAT+1
// edges after the last batch, with coll_v/coll_ev (earliest collision, if
// any) and cross_v/cross_ev (next crossing, if any) valid in that cycle.
// A new bead may start right after the last batch of the previous one.
//
// The 23-stage units and the two-events-per-bead rule follow the original
// design.  The original sample system has 19 predictor units; here the
// number of lanes equals the cell capacity (8) so one cell is handled per
// clock, which is this design's own choice.
module event_predictor
  import dmd_pkg::*;
#(
  parameter int unsigned NLANES = SLOTS,
  parameter int unsigned LAT    = 23
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_v,
  input  logic              in_first,
  input  logic              in_last,
  input  time_t             t_now,
  input  bead_id_t          self_id,
  input  bead_t             self_b,
  input  logic [NLANES-1:0] p_v,
  input  bead_id_t          p_id [NLANES],
  input  bead_t             p_b  [NLANES],
  output logic              done,
  output logic              coll_v,
  output event_t            coll_ev,
  output logic              cross_v,
  output event_t            cross_ev
);

  logic [NLANES-1:0] lv;
  event_t            lev [NLANES];
  logic              wv;
  event_t            wev;
  logic [LAT:1]      first_d, last_d;

  for (genvar l = 0; l < NLANES; l++) begin : g_lane
    pair_predictor #(.LAT(LAT)) u_pair (
      .clk, .rst_n,
      .in_v    (in_v && p_v[l]),
      .t_now   (t_now),
      .self_id (self_id),
      .self_b  (self_b),
      .part_id (p_id[l]),
      .part_b  (p_b[l]),
      .out_v   (lv[l]),
      .out_ev  (lev[l])
    );
  end

  wall_predictor #(.LAT(LAT)) u_wall (
    .clk, .rst_n,
    .in_v    (in_v && in_first),
    .t_now   (t_now),
    .bead_id (self_id),
    .bead_b  (self_b),
    .out_v   (wv),
    .out_ev  (wev)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      first_d <= '0;
      last_d  <= '0;
    end else begin
      first_d <= {first_d[LAT-1:1], in_v && in_first};
      last_d  <= {last_d[LAT-1:1],  in_v && in_last};
    end
  end

  // earliest collision among the lanes of the batch leaving the pipelines
  logic   bv;
  event_t bev;
  always_comb begin
    bv  = 1'b0;
    bev = lev[0];
    for (int l = 0; l < NLANES; l++)
      if (lv[l] && (!bv || lev[l].t < bev.t)) begin
        bv  = 1'b1;
        bev = lev[l];
      end
  end

  // running minimum over the batches of one bead
  logic   acc_v, xv;
  event_t acc_ev, xev;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_v  <= 1'b0;
      acc_ev <= '0;
      xv     <= 1'b0;
      xev    <= '0;
      done   <= 1'b0;
    end else begin
      done <= last_d[LAT];
      if (first_d[LAT]) begin
        acc_v  <= bv;
        acc_ev <= bev;
        xv     <= wv;
        xev    <= wev;
      end else if (bv && (!acc_v || bev.t < acc_ev.t)) begin
        acc_v  <= 1'b1;
        acc_ev <= bev;
      end
    end
  end

  assign coll_v   = acc_v;
  assign coll_ev  = acc_ev;
  assign cross_v  = xv;
  assign cross_ev = xev;

endmodule

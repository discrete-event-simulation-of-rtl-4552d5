// pair_predictor: 23-stage pipeline that predicts when two beads collide.
//
// Inputs are the bead just updated ("self", already at time t_now) and one
// partner from its neighbourhood (at its own, earlier time).  The ballistic
// solution for hard spheres of diameter sigma is
//   tau = (-b - sqrt(b^2 - v^2 (r^2 - sigma^2))) / v^2 ,  b = r . v
// with r and v the partner's position and velocity relative to self.
//   S1  dt = t_now - t_partner
//   S2  move the partner to t_now
//   S3  r = p_partner - p_self reduced to RED_W = 17 bits (12 fraction bits
//       plus the 5 bits of the cell index), v = v_partner - v_self
//   S4  b = r.v, v2 = v.v, r2 = r.r
//   S5  b^2 and v2 * (r2 - sigma^2)
//   S6  discriminant D
//   S7  sqrt(D) and 1/v2 side by side (the two long operations overlap)
//   S8  -b - sqrt(D)
//   S9  multiply by the reciprocal: the answer is brought together at the end
//   S10 scale back to 32-bit time, add t_now, decide validity
//   S11..S23  delay stages, so the unit has the full 23-stage latency.
// A pair is a collision only if the beads approach (b < 0) and D >= 0.
// Beads already in contact and approaching collide at once (tau = 0).
// No event is produced for a missing partner, the bead itself, or a time
// that overflows 32 bits.
//
// Interface: one pair per clock (fully pipelined); out_v/out_ev appear 23
// edges after in_v.  out_ev is a collision event (a = self, b = partner).
//
// The ballistic formula, the reduced input precision (17 bits) with 32-bit
// output, overlapping square root and division and the 23-stage latency
// follow the original design.  The fixed-point scaling (reciprocal as
// 2^RK / v^2), the placement of the long operations in single stages (a
// timing-driven implementation would spread them over the delay stages) and
// the tau = 0 rule are this design's own.
module pair_predictor
  import dmd_pkg::*;
#(
  parameter int unsigned LAT = 23,     // total latency in stages (>= 10)
  parameter int unsigned RK  = 80      // reciprocal scale: 2^RK / v^2
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     in_v,
  input  time_t    t_now,
  input  bead_id_t self_id,
  input  bead_t    self_b,
  input  bead_id_t part_id,
  input  bead_t    part_b,
  output logic     out_v,
  output event_t   out_ev
);

  localparam int unsigned VW  = VEL_W + 1;            // relative velocity
  localparam int unsigned BW  = RED_W + VW + 2;       // b
  localparam int unsigned V2W = 2*VW + 2;             // v^2
  localparam int unsigned R2W = 2*RED_W + 2;          // r^2
  localparam int unsigned DW  = V2W + R2W + 2;        // discriminant
  localparam int unsigned SW  = DW / 2 + 1;           // sqrt(D)
  localparam int unsigned QW  = RK + 1;               // reciprocal
  localparam int unsigned NW  = SW + 1;               // -b - sqrt(D)
  localparam int unsigned PW  = NW + QW;              // product

  // integer square root, floor(sqrt(x)), restoring (digit by digit)
  function automatic logic [SW-1:0] isqrt(input logic [DW-1:0] x);
    logic [DW+1:0] rem, root, trial;
    logic [2*SW-1:0] xz;                     // x padded to whole digit pairs
    xz   = (2*SW)'(x);
    rem  = '0;
    root = '0;
    for (int i = SW - 1; i >= 0; i--) begin
      rem   = (rem << 2) | (DW+2)'(xz[2*i +: 2]);
      trial = (root << 2) | 1;
      root  = root << 1;
      if (rem >= trial) begin
        rem  = rem - trial;
        root = root | 1;
      end
    end
    return root[SW-1:0];
  endfunction

  // floor(2^RK / d), restoring division
  function automatic logic [QW-1:0] recip(input logic [V2W-1:0] d);
    logic [V2W:0]  rem;
    logic [QW-1:0] q;
    rem = '0;
    q   = '0;
    for (int i = RK; i >= 0; i--) begin
      rem = {rem[V2W-1:0], (i == RK)};
      if (rem >= {1'b0, d}) begin
        rem  = rem - {1'b0, d};
        q[i] = 1'b1;
      end
    end
    return q;
  endfunction

  // stage registers
  logic        v [LAT+1];
  time_t       tn [11];
  bead_id_t    sid [11], pid [11];
  logic        pok [11];
  bead_t       sb1, sb2, pb1, pb2;
  time_t       dt1;
  logic signed [RED_W-1:0] r3 [3];
  logic signed [VW-1:0]    v3 [3];
  logic signed [BW-1:0]    b4, b5, b6, b7;
  logic        [V2W-1:0]   v24, v25, v26;
  logic        [R2W-1:0]   r24;
  logic signed [DW-1:0]    bb5, vd5, d6;
  logic                    touch5, touch6, touch7, touch8, touch9;
  logic        [SW-1:0]    s7;
  logic        [QW-1:0]    q7, q8;
  logic        [NW-1:0]    n8;
  logic        [PW-1:0]    p9;
  logic                    ok6, ok7, ok8, ok9;
  event_t                  ev10;
  logic                    ok10;
  event_t                  evd [11:LAT];

  assign v[0]   = in_v;
  assign tn[0]  = t_now;
  assign sid[0] = self_id;
  assign pid[0] = part_id;
  assign pok[0] = in_v && (part_id != self_id);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 1; s <= LAT; s++) v[s] <= 1'b0;
      for (int s = 11; s <= LAT; s++) evd[s] <= '0;
      for (int s = 1; s < 11; s++) begin
        tn[s]  <= '0;
        sid[s] <= '0;
        pid[s] <= '0;
        pok[s] <= 1'b0;
      end
      sb1 <= '0; sb2 <= '0; pb1 <= '0; pb2 <= '0; dt1 <= '0;
      for (int k = 0; k < 3; k++) begin
        r3[k] <= '0;
        v3[k] <= '0;
      end
      b4 <= '0; b5 <= '0; b6 <= '0; b7 <= '0;
      v24 <= '0; v25 <= '0; v26 <= '0; r24 <= '0;
      bb5 <= '0; vd5 <= '0; d6 <= '0;
      touch5 <= 1'b0; touch6 <= 1'b0; touch7 <= 1'b0; touch8 <= 1'b0; touch9 <= 1'b0;
      s7 <= '0; q7 <= '0; q8 <= '0; n8 <= '0; p9 <= '0;
      ok6 <= 1'b0; ok7 <= 1'b0; ok8 <= 1'b0; ok9 <= 1'b0;
      ev10 <= '0; ok10 <= 1'b0;
    end else begin
      for (int s = 1; s <= LAT; s++) v[s] <= v[s-1];
      for (int s = 1; s < 11; s++) begin
        tn[s]  <= tn[s-1];
        sid[s] <= sid[s-1];
        pid[s] <= pid[s-1];
        pok[s] <= pok[s-1];
      end
      // S1
      sb1 <= self_b;
      pb1 <= part_b;
      dt1 <= t_now - part_b.t;
      // S2: partner to t_now; self moves with it unchanged
      pb2 <= pb1;
      sb2 <= sb1;
      for (int k = 0; k < 3; k++) begin
        logic signed [VEL_W+TIME_W:0] d;
        d = $signed(pb1.vel[k]) * $signed({1'b0, dt1});
        pb2.pos[k] <= pb1.pos[k] + d[POS_W-1:0];
      end
      // S3: reduced-precision relative position, full relative velocity
      for (int k = 0; k < 3; k++) begin
        logic [POS_W-1:0] dp;
        dp    = pb2.pos[k] - sb2.pos[k];
        r3[k] <= $signed(dp[POS_W-1 -: RED_W]);
        v3[k] <= $signed({pb2.vel[k][VEL_W-1], pb2.vel[k]})
               - $signed({sb2.vel[k][VEL_W-1], sb2.vel[k]});
      end
      // S4: dot products
      begin
        logic signed [BW-1:0]  bacc, rw, vw;
        logic [V2W-1:0] vacc;
        logic [R2W-1:0] racc;
        logic signed [V2W-1:0] vv;
        logic signed [R2W-1:0] rr;
        bacc = '0; vacc = '0; racc = '0;
        for (int k = 0; k < 3; k++) begin
          rw   = BW'(r3[k]);
          vw   = BW'(v3[k]);
          bacc = bacc + rw * vw;
          vv   = V2W'(v3[k]);
          vacc = vacc + V2W'(vv * vv);
          rr   = R2W'(r3[k]);
          racc = racc + R2W'(rr * rr);
        end
        b4  <= bacc;
        v24 <= vacc;
        r24 <= racc;
      end
      // S5: b^2 and v^2 (r^2 - sigma^2)
      begin
        logic signed [DW-1:0] bw, vw, dr;
        bw  = DW'(b4);
        vw  = DW'({1'b0, v24});
        dr  = DW'({1'b0, r24}) - DW'(SIGMA_R * SIGMA_R);
        bb5 <= bw * bw;
        vd5 <= vw * dr;
        touch5 <= (r24 <= R2W'(SIGMA_R * SIGMA_R));
      end
      b5  <= b4;
      v25 <= v24;
      // S6: discriminant
      d6     <= bb5 - vd5;
      b6     <= b5;
      v26    <= v25;
      touch6 <= touch5;
      ok6    <= pok[5] && (b5 < 0) && (v25 != 0);
      // S7: square root and reciprocal in parallel
      s7     <= (d6 < 0) ? '0 : isqrt(DW'(d6));
      q7     <= recip(v26);
      b7     <= b6;
      touch7 <= touch6;
      ok7    <= ok6 && (d6 >= 0);
      // S8: numerator -b - sqrt(D)  (positive for approaching beads)
      n8     <= NW'(-b7) - NW'(s7);
      q8     <= q7;
      touch8 <= touch7;
      ok8    <= ok7;
      // S9: multiply
      p9     <= PW'(n8) * PW'(q8);
      touch9 <= touch8;
      ok9    <= ok8 && (touch8 || !n8[NW-1]);   // in contact: tau = 0
      // S10: scale to time ticks, add t_now
      begin
        logic [PW-1:0]     tau;
        logic [TIME_W:0]   tsum;
        tau  = touch9 ? '0 : (p9 >> (RK - RED_SHIFT));
        tsum = {1'b0, tn[9]} + {1'b0, tau[TIME_W-1:0]};
        ok10 <= ok9 && ((tau >> TIME_W) == 0) && !tsum[TIME_W];
        ev10 <= '{t: tsum[TIME_W-1:0], a: sid[9], b: pid[9], kind: EV_COLLIDE,
                  axis: 2'd0, dir: 1'b0};
      end
      // S11..LAT: delay line
      for (int s = 11; s <= LAT; s++) evd[s] <= (s == 11) ? ev10 : evd[s-1];
    end
  end

  // validity travels in a separate delay line
  logic okd [11:LAT];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) for (int s = 11; s <= LAT; s++) okd[s] <= 1'b0;
    else for (int s = 11; s <= LAT; s++) okd[s] <= (s == 11) ? (ok10 && v[10]) : okd[s-1];
  end

  assign out_v  = okd[LAT] && v[LAT];
  assign out_ev = evd[LAT];

endmodule

// tb_dmd_top: end-to-end run of the DMD engine at its default parameters.
//
// Two groups of beads are loaded:
//   * an isolated head-on pair (beads 0 and 1) on the x axis, 1.5 diameters
//     apart, closing at 2V.  Worked out by hand: they touch after
//     0.5 diameter / 2V = 512 ticks, and an equal-mass head-on elastic
//     collision exchanges the velocities exactly (+V <-> -V).
//   * a small gas of NGAS beads on a lattice with 1.5-diameter spacing and
//     pseudorandom velocities, which produces collisions, crossings,
//     cancellations and hole closing in the queue.
// The bench keeps its own copy of every bead from the committed results and
// checks for each commit: event times never decrease; the commit names the
// time tag it was scheduled for; a collision conserves kinetic energy (to
// 1 %: the collider divides by the fixed contact distance, and contact times
// come from the predictor's reduced-precision positions, rounded up to whole
// ticks) and happens at contact distance (to 2 %); a crossing moves the bead
// by exactly one cell on the event's axis and leaves the others alone, with
// unchanged velocity.  It also checks the head-on pair's collision exactly,
// and that collisions, crossings, cancellations, hole closing and 3-4 way
// insertions all occurred.
module tb_dmd_top;
  import dmd_pkg::*;

  localparam int NGAS    = 24;
  localparam int NB      = NGAS + 2;
  localparam int NEVENTS = 400;
  localparam logic [31:0] CELLW = 32'h0800_0000;   // one cell = one diameter
  localparam int V       = 1 << 16;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        ld_v, ld_ready, start, running, done, c_v;
  bead_id_t    ld_id;
  bead_t       ld_b, c_a, c_b;
  event_t      c_ev;
  logic [BEAD_W:0] n_beads;
  logic [31:0] max_events;
  logic [31:0] n_events, n_coll, n_cross, n_cell_full, n_cancelled, n_overflow,
               n_scrunch, n_multi_ins;
  logic [$clog2(4*38+1)-1:0] q_count;

  dmd_top dut (.*);

  int checks = 0, failures = 0;
  bead_t shadow [NB];
  longint cyc = 0;
  bit pair_seen = 0;

  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (cycle %0d)", msg, cyc);
    end
  endtask

  function automatic real sv(input logic [31:0] x);
    return real'($signed(x));
  endfunction

  function automatic real ke(input bead_t b);
    return sv(b.vel[0]) * sv(b.vel[0]) + sv(b.vel[1]) * sv(b.vel[1]) +
           sv(b.vel[2]) * sv(b.vel[2]);
  endfunction

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog: events=%0d", n_events);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- load
  task automatic load(input int id, input bead_t b);
    @(negedge clk);
    while (!ld_ready) @(negedge clk);
    ld_v  = 1'b1;
    ld_id = bead_id_t'(id);
    ld_b  = b;
    shadow[id] = b;
    @(negedge clk);
    ld_v  = 1'b0;
  endtask

  initial begin
    bead_t b;
    ld_v = 0; ld_id = '0; ld_b = '0; start = 0;
    n_beads    = (BEAD_W+1)'(NB);
    max_events = NEVENTS;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // head-on pair around cell (20..22, 20, 20)
    b = '0;
    b.pos[0] = 32'(20) * CELLW + CELLW / 2;       // 20.5 cells
    b.pos[1] = 32'(20) * CELLW + CELLW / 2;
    b.pos[2] = 32'(20) * CELLW + CELLW / 2;
    b.vel[0] = 32'(V);
    load(0, b);
    b.pos[0] = 32'(22) * CELLW;                    // 22.0 cells
    b.vel[0] = -32'(V);
    load(1, b);

    // gas: 4 x 3 x 2 lattice, spacing 1.5 cells, from cell 4
    for (int i = 0; i < NGAS; i++) begin
      int ix, iy, iz;
      ix = i % 4; iy = (i / 4) % 3; iz = i / 12;
      b = '0;
      b.pos[0] = 32'(4) * CELLW + 32'(ix) * (CELLW + CELLW / 2) + CELLW / 4;
      b.pos[1] = 32'(4) * CELLW + 32'(iy) * (CELLW + CELLW / 2) + CELLW / 4;
      b.pos[2] = 32'(4) * CELLW + 32'(iz) * (CELLW + CELLW / 2) + CELLW / 4;
      for (int k = 0; k < 3; k++)
        b.vel[k] = 32'($signed($urandom_range(0, 2*V)) - V);
      load(i + 2, b);
    end

    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    check(running, "running after start");
    wait (done);
    @(negedge clk);

    check(n_events == NEVENTS, "event count reached");
    check(n_coll + n_cross == n_events, "every event is a collision or crossing");
    check(n_coll > 0, "collisions occurred");
    check(n_cross > 0, "cell crossings occurred");
    check(n_cancelled > 0, "scheduled events were cancelled");
    check(n_scrunch > 0, "queue closed holes");
    check(n_multi_ins > 0, "three or four events inserted in one cycle");
    check(n_cell_full == 0, "no crossing into a full cell");
    check(n_overflow == 0, "queue never overflowed");
    check(pair_seen, "head-on pair collided");
    $display("events=%0d coll=%0d cross=%0d cancelled=%0d scrunch=%0d multi=%0d overflow=%0d cycles=%0d q=%0d",
             n_events, n_coll, n_cross, n_cancelled, n_scrunch, n_multi_ins,
             n_overflow, cyc, q_count);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // -------------------------------------------------------- commit checks
  time_t last_t = '0;
  always @(posedge clk) begin
    if (rst_n && c_v) begin
      int a, bb;
      a  = int'(c_ev.a);
      bb = int'(c_ev.b);
      check(c_ev.t >= last_t, "event times never decrease");
      last_t <= c_ev.t;
      check(c_a.t == c_ev.t, "bead time tag is the event time");
      if (c_ev.kind == EV_COLLIDE) begin
        real e0, e1, d2, dk;
        e0 = ke(shadow[a]) + ke(shadow[bb]);
        e1 = ke(c_a) + ke(c_b);
        check(e1 <= e0 * 1.01 + 4.0 && e1 >= e0 * 0.99 - 4.0, "collision conserves energy");
        d2 = 0.0;
        for (int k = 0; k < 3; k++) begin
          dk = sv(c_b.pos[k] - c_a.pos[k]);
          d2 += dk * dk;
        end
        d2 = d2 / (real'(CELLW) * real'(CELLW));
        check(d2 > 0.98 && d2 < 1.02, "collision at contact distance");
        if ((a == 0 && bb == 1) || (a == 1 && bb == 0)) begin
          pair_seen = 1;
          check(c_ev.t >= 510 && c_ev.t <= 514, "head-on pair collides at t=512");
          check($signed(c_a.vel[0]) == -$signed(shadow[a].vel[0]) &&
                $signed(c_b.vel[0]) == -$signed(shadow[bb].vel[0]),
                "head-on pair exchanges velocities");
          check(c_a.vel[1] == 0 && c_a.vel[2] == 0, "head-on pair stays on axis");
        end
        shadow[a]  = c_a;
        shadow[bb] = c_b;
      end else begin
        logic [CELL_BITS-1:0] c0, c1;
        c0 = shadow[a].pos[c_ev.axis][POS_W-1 -: CELL_BITS];
        c1 = c_a.pos[c_ev.axis][POS_W-1 -: CELL_BITS];
        check(c1 == (c_ev.dir ? c0 + 1'b1 : c0 - 1'b1), "crossing moves one cell");
        check(c_a.vel == shadow[a].vel, "crossing keeps velocity");
        for (int k = 0; k < 3; k++)
          if (k != int'(c_ev.axis))
            check(c_a.pos[k][POS_W-1 -: CELL_BITS] == shadow[a].pos[k][POS_W-1 -: CELL_BITS],
                  "crossing keeps other axes' cells");
        shadow[a] = c_a;
      end
    end
  end

endmodule

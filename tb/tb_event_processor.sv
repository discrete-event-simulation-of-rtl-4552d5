// tb_event_processor: checks the six-stage collider.
//
// * Head-on collision worked out by hand: beads one diameter apart on x,
//   closing at 2V, must exchange x velocities exactly.
// * Random oblique collisions: two beads are placed in contact (distance =
//   one diameter) at the event time; the expected velocities are computed
//   here in floating point from v_a' = v_a + (r.v / sigma^2) r and compared
//   to within 2 LSB.  Positions at the event time are computed independently
//   from p + v * dt.
// * Cell crossing: the crossing coordinate lands on the wall of the new
//   cell; velocities are unchanged.
// * Latency: the result appears exactly six edges after the input.
// * Invalidation: a broadcast naming a bead kills the event in flight.
// * hold freezes the pipeline.
// While in_v is low the inputs carry random junk, so every stage must use
// only the data that travels with its own event.
module tb_event_processor;
  import dmd_pkg::*;

  localparam logic [31:0] CELLW = 32'h0800_0000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic   hold, in_v, out_v, killed;
  inval_t inv;
  event_t in_ev, out_ev;
  bead_t  in_a, in_b, out_a, out_b;

  event_processor dut (.*);

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // drive one event, return the number of edges until out_v
  task automatic run(input event_t e, input bead_t a, input bead_t b, output int lat);
    @(negedge clk);
    in_v = 1'b1; in_ev = e; in_a = a; in_b = b;
    @(negedge clk);
    in_v = 1'b0;
    // idle inputs carry junk: the pipeline must not depend on them
    for (int k = 0; k < 3; k++) begin
      in_a.pos[k] = $urandom; in_a.vel[k] = $urandom;
      in_b.pos[k] = $urandom; in_b.vel[k] = $urandom;
    end
    in_ev.t = $urandom;
    lat = 1;
    while (!out_v && lat < 20) begin
      @(negedge clk);
      lat++;
    end
  endtask

  function automatic real sr(input logic [31:0] x);
    return real'($signed(x));
  endfunction

  initial begin
    event_t e;
    bead_t  a, b;
    int     lat;
    hold = 0; in_v = 0; inv = '0; in_ev = '0; in_a = '0; in_b = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;

    // head-on, evaluated at t = 100 (both beads last updated at t = 0)
    a = '0; b = '0;
    a.pos[0] = 32'(10) * CELLW - 32'(100 * 65536);
    b.pos[0] = 32'(11) * CELLW + 32'(100 * 65536);
    a.vel[0] = 32'(65536);
    b.vel[0] = -32'(65536);
    e = '{t: 100, a: 3, b: 7, kind: EV_COLLIDE, axis: 0, dir: 0};
    run(e, a, b, lat);
    check(lat == 6, "latency is six cycles");
    check(out_ev == e, "event passes through");
    check(out_a.pos[0] == 32'(10) * CELLW && out_b.pos[0] == 32'(11) * CELLW,
          "beads moved to event time");
    check($signed(out_a.vel[0]) == -65536 && $signed(out_b.vel[0]) == 65536,
          "head-on velocities exchanged");
    check(out_a.t == 100 && out_b.t == 100, "time tags updated");

    // random oblique collisions in contact
    for (int n = 0; n < 40; n++) begin
      real th, ph, rx, ry, rz, bv, ea[3], eb[3], vr[3];
      th = real'($urandom_range(0, 3141)) / 1000.0;
      ph = real'($urandom_range(0, 6283)) / 1000.0;
      rx = $sin(th) * $cos(ph); ry = $sin(th) * $sin(ph); rz = $cos(th);
      a = '0; b = '0;
      for (int k = 0; k < 3; k++) begin
        a.pos[k] = 32'(12) * CELLW;
        a.vel[k] = 32'($signed($urandom_range(0, 200000)) - 100000);
        b.vel[k] = 32'($signed($urandom_range(0, 200000)) - 100000);
      end
      b.pos[0] = a.pos[0] + 32'($rtoi(rx * real'(CELLW)));
      b.pos[1] = a.pos[1] + 32'($rtoi(ry * real'(CELLW)));
      b.pos[2] = a.pos[2] + 32'($rtoi(rz * real'(CELLW)));
      a.t = 50; b.t = 50;
      e = '{t: 50, a: 1, b: 2, kind: EV_COLLIDE, axis: 0, dir: 0};
      bv = 0.0;
      for (int k = 0; k < 3; k++) begin
        vr[k] = sr(b.vel[k]) - sr(a.vel[k]);
        bv += sr(b.pos[k] - a.pos[k]) * vr[k];
      end
      for (int k = 0; k < 3; k++) begin
        real dvk;
        dvk   = bv * sr(b.pos[k] - a.pos[k]) / (real'(CELLW) * real'(CELLW));
        ea[k] = sr(a.vel[k]) + dvk;
        eb[k] = sr(b.vel[k]) - dvk;
      end
      run(e, a, b, lat);
      for (int k = 0; k < 3; k++) begin
        check(sr(out_a.vel[k]) - ea[k] < 2.0 && ea[k] - sr(out_a.vel[k]) < 2.0, "oblique v_a");
        check(sr(out_b.vel[k]) - eb[k] < 2.0 && eb[k] - sr(out_b.vel[k]) < 2.0, "oblique v_b");
      end
    end

    // cell crossing in -y at t = 30
    a = '0;
    a.pos[0] = 32'(5) * CELLW + 32'h100;
    a.pos[1] = 32'(9) * CELLW + 32'(30 * 1000) - 32'd1;
    a.pos[2] = 32'(2) * CELLW;
    a.vel[1] = -32'(1000);
    a.vel[0] = 32'(7);
    e = '{t: 30, a: 4, b: 4, kind: EV_CROSS, axis: 1, dir: 0};
    run(e, a, a, lat);
    check(out_a.pos[1] == 32'(9) * CELLW - 1, "crossing lands on the wall of the new cell");
    check(out_a.pos[0] == 32'(5) * CELLW + 32'h100 + 32'd210, "other axis advanced");
    check(out_a.vel == a.vel, "crossing keeps velocity");

    // +z crossing
    a = '0;
    a.pos[2] = 32'(31) * CELLW + 32'h07FF_FF00;
    a.vel[2] = 32'(256);
    e = '{t: 1, a: 4, b: 4, kind: EV_CROSS, axis: 2, dir: 1};
    run(e, a, a, lat);
    check(out_a.pos[2] == 32'h0, "crossing wraps around the box");

    // invalidation kills an event in flight
    @(negedge clk);
    in_v = 1; in_ev = '{t: 5, a: 9, b: 8, kind: EV_COLLIDE, axis: 0, dir: 0};
    in_a = '0; in_b = '0;
    @(negedge clk);
    in_v = 0;
    @(negedge clk);
    inv = '{v0: 1'b1, tag0: 10'd8, v1: 1'b0, tag1: 10'd0};
    #1 check(killed, "kill reported");
    @(negedge clk);
    inv = '0;
    repeat (8) begin
      @(negedge clk);
      check(!out_v, "killed event does not emerge");
    end

    // hold freezes the pipeline
    @(negedge clk);
    in_v = 1; in_ev = '{t: 5, a: 1, b: 2, kind: EV_COLLIDE, axis: 0, dir: 0};
    @(negedge clk);
    in_v = 0;
    hold = 1;
    repeat (10) begin
      @(negedge clk);
      check(!out_v, "held pipeline does not advance");
    end
    hold = 0;
    lat = 0;
    while (!out_v && lat < 10) begin
      @(negedge clk);
      lat++;
    end
    check(lat == 5, "pipeline resumes after hold");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

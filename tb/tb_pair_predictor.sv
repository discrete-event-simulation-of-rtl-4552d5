// tb_pair_predictor: checks the collision-time pipeline against a
// floating-point solution of the hard-sphere equation.
//
// Random pairs are made with the partner at a random distance between 0.9 and
// 2.5 diameters and random velocities; the partner is given an older time
// tag and a position that puts it at the chosen place at t_now.  The bench
// solves |r + v tau| = sigma in double precision with the exact 32-bit
// inputs.  Clear cases are checked:
//   * approaching pairs with a real root must produce an event at
//     t_now + tau within 4 ticks + 0.2 % (the inputs are reduced to 17 bits);
//   * receding pairs and pairs that miss must produce none;
//   * a pair already in contact and approaching collides at t_now;
//   * the partner equal to the bead itself produces none.
// One pair enters per clock; results are matched by order and every result
// must appear exactly 23 edges after its input.
module tb_pair_predictor;
  import dmd_pkg::*;

  localparam real SIG = 134217728.0;   // 2^27

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic     in_v, out_v;
  time_t    t_now;
  bead_id_t self_id, part_id;
  bead_t    self_b, part_b;
  event_t   out_ev;

  pair_predictor dut (.*);

  int checks = 0, failures = 0;
  int n_hit = 0, n_miss = 0, n_touch = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  typedef struct {
    longint in_cyc;
    int     want;     // 1 event, 0 none, -1 unclear
    real    t_ref;
    real    t0;
    bit     touching;
    int     self_id, part_id;
  } job_t;
  job_t jobs [$];

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (cycle %0d)", msg, cyc);
    end
  endtask

  function automatic real sr(input logic [31:0] x);
    return real'($signed(x));
  endfunction

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output side: match results to inputs in order
  always @(posedge clk) begin
    if (rst_n && jobs.size() > 0 && cyc - jobs[0].in_cyc == 23) begin
      job_t j;
      j = jobs.pop_front();
      if (j.want == 1) begin
        check(out_v, "approaching pair produces an event");
        if (out_v) begin
          real d;
          d = real'(out_ev.t) - j.t_ref;
          if (d < 0) d = -d;
          check(d <= 4.0 + 0.002 * (j.t_ref - j.t0), "collision time");
          check(out_ev.kind == EV_COLLIDE && int'(out_ev.a) == j.self_id &&
                int'(out_ev.b) == j.part_id, "event names the pair");
        end
      end else if (j.want == 0) begin
        check(!out_v, "no event for receding, missing or self pair");
      end
    end else if (rst_n && jobs.size() == 0) begin
      check(!out_v, "no result without an input");
    end
  end

  initial begin
    in_v = 0; t_now = 0; self_id = 0; part_id = 0; self_b = '0; part_b = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      job_t   j;
      real    rr[3], vv[3], dsep, th, ph, b, v2, r2, disc, tau, tnow;
      int     dtp;
      @(negedge clk);
      tnow   = real'($urandom_range(1000, 5000));
      t_now  = time_t'($rtoi(tnow));
      self_id = bead_id_t'($urandom_range(0, 1023));
      part_id = bead_id_t'($urandom_range(0, 1023));
      if (n % 50 == 7) part_id = self_id;
      dsep = 0.9 + real'($urandom_range(0, 1600)) / 1000.0;
      th = real'($urandom_range(0, 3141)) / 1000.0;
      ph = real'($urandom_range(0, 6283)) / 1000.0;
      rr[0] = dsep * SIG * $sin(th) * $cos(ph);
      rr[1] = dsep * SIG * $sin(th) * $sin(ph);
      rr[2] = dsep * SIG * $cos(th);
      dtp = $urandom_range(0, 200);
      self_b = '0;
      part_b = '0;
      self_b.t = t_now;
      part_b.t = t_now - time_t'(dtp);
      for (int k = 0; k < 3; k++) begin
        logic [31:0] rk;
        self_b.pos[k] = $urandom;
        self_b.vel[k] = 32'($signed($urandom_range(0, 400000)) - 200000);
        part_b.vel[k] = 32'($signed($urandom_range(0, 400000)) - 200000);
        rk = 32'($rtoi(rr[k]));
        // partner reaches self + r at t_now
        part_b.pos[k] = self_b.pos[k] + rk - 32'($signed(part_b.vel[k]) * dtp);
        rr[k] = sr(rk);
        vv[k] = sr(part_b.vel[k]) - sr(self_b.vel[k]);
      end
      in_v = 1'b1;
      b = 0; v2 = 0; r2 = 0;
      for (int k = 0; k < 3; k++) begin
        b  += rr[k] * vv[k];
        v2 += vv[k] * vv[k];
        r2 += rr[k] * rr[k];
      end
      disc = b * b - v2 * (r2 - SIG * SIG);
      j.in_cyc  = cyc;
      j.self_id = int'(self_id);
      j.part_id = int'(part_id);
      j.want  = -1;
      j.t_ref   = 0.0;
      j.t0      = tnow;
      j.touching = 0;
      if (part_id == self_id) j.want = 0;
      else if (r2 <= SIG * SIG * 0.998 && b < -1.0e-3 * $sqrt(r2 * v2)) begin
        j.want = 1; j.t_ref = tnow; j.touching = 1; n_touch++;
      end else if (r2 > SIG * SIG * 1.002) begin
        if (b > 0.05 * $sqrt(r2 * v2) || disc < -0.05 * b * b) begin
          j.want = 0; n_miss++;
        end else if (b < 0 && disc > 0.05 * b * b && -b / $sqrt(r2) > 16384.0) begin
          tau = (-b - $sqrt(disc)) / v2;
          if (tau < 1.0e6) begin
            j.want = 1; j.t_ref = tnow + tau; n_hit++;
          end
        end
      end
      jobs.push_back(j);
    end
    @(negedge clk);
    in_v = 1'b0;
    repeat (30) @(negedge clk);
    check(jobs.size() == 0, "all results seen");
    check(n_hit > 100 && n_miss > 100 && n_touch > 5, "hits, misses and contacts exercised");
    $display("hit=%0d miss=%0d touch=%0d", n_hit, n_miss, n_touch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

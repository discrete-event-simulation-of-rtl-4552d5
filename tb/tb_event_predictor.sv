// tb_event_predictor: checks the batch predictor (8 pair lanes + wall unit).
//
// Beads are predicted back to back, each with 1..4 batches of up to 8
// partners (random lane masks).  Every partner is placed on a random line
// through the bead at d = 1.1..3 diameters and moves along it towards the
// bead (colliding after exactly (d - 1) sigma / s ticks) or away from it (no
// collision).  The bench checks, for each bead, that done pulses exactly
// LAT + 1 edges after its last batch, that the reported collision is the
// earliest one over all batches (time within 4 ticks; partner checked when
// the runner-up is more than 16 ticks later), that no collision is reported
// when all partners recede, and that the crossing event matches an integer
// computation of the first wall crossing.
module tb_event_predictor;
  import dmd_pkg::*;

  localparam int  NL  = SLOTS;
  localparam real SIG = 134217728.0;
  localparam longint CW = 64'd1 << 27;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          in_v, in_first, in_last, done, coll_v, cross_v;
  time_t         t_now;
  bead_id_t      self_id;
  bead_t         self_b;
  logic [NL-1:0] p_v;
  bead_id_t      p_id [NL];
  bead_t         p_b  [NL];
  event_t        coll_ev, cross_ev;

  event_predictor dut (.*);

  int checks = 0, failures = 0, n_coll = 0, n_none = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  typedef struct {
    longint last_cyc;
    bit     has;
    real    t_best;
    real    t_second;
    int     best_id, self_id;
    longint t_cross;
    bit     cross_has;
  } job_t;
  job_t jobs [$];

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (cycle %0d)", msg, cyc);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && jobs.size() > 0 && cyc - jobs[0].last_cyc == 24) begin
      job_t j;
      j = jobs.pop_front();
      check(done, "done LAT+1 edges after the last batch");
      check(coll_v == j.has, "collision found exactly when a partner approaches");
      if (coll_v && j.has) begin
        real d;
        d = real'(coll_ev.t) - j.t_best;
        if (d < 0) d = -d;
        check(d <= 4.0, "earliest collision time");
        check(int'(coll_ev.a) == j.self_id, "collision names the bead");
        if (j.t_second - j.t_best > 16.0)
          check(int'(coll_ev.b) == j.best_id, "collision names the earliest partner");
      end
      check(cross_v == j.cross_has, "crossing present");
      if (cross_v && j.cross_has)
        check(longint'(cross_ev.t) == j.t_cross && int'(cross_ev.a) == j.self_id,
              "crossing time");
    end else if (rst_n && (jobs.size() == 0 || cyc - jobs[0].last_cyc < 24)) begin
      check(!done, "no stray done");
    end
  end

  initial begin
    in_v = 0; in_first = 0; in_last = 0; t_now = 0; self_id = 0; self_b = '0; p_v = '0;
    for (int l = 0; l < NL; l++) begin p_id[l] = '0; p_b[l] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int n = 0; n < 300; n++) begin
      job_t j;
      int nb;
      longint best;
      j.has = 0; j.t_best = 1.0e30; j.t_second = 1.0e30; j.best_id = -1;
      t_now   = time_t'($urandom_range(1000, 50000));
      self_id = bead_id_t'(n % 100);     // partners use ids 100 and up
      self_b  = '0;
      self_b.t = t_now;
      for (int k = 0; k < 3; k++) begin
        self_b.pos[k] = $urandom;
        self_b.vel[k] = 32'($signed($urandom_range(0, 200000)) - 100000);
      end
      // expected crossing
      best = -1;
      for (int k = 0; k < 3; k++) begin
        longint ofs, v, tk;
        ofs = longint'(self_b.pos[k]) % CW;
        v   = longint'($signed(self_b.vel[k]));
        if (v == 0) continue;
        tk = (v > 0) ? (CW - ofs + v - 1) / v : (ofs + (-v)) / (-v);
        if (best < 0 || tk < best) best = tk;
      end
      j.cross_has = best >= 0;
      j.t_cross   = longint'(t_now) + best;
      j.self_id   = int'(self_id);
      nb = $urandom_range(1, 4);
      for (int bt = 0; bt < nb; bt++) begin
        in_v = 1'b1; in_first = (bt == 0); in_last = (bt == nb - 1);
        p_v = NL'($urandom);
        for (int l = 0; l < NL; l++) begin
          real th, ph, u[3], dd, s, tau;
          bit  app;
          int  pid;
          pid = 100 + bt * NL + l;
          p_id[l] = bead_id_t'(pid);
          th = real'($urandom_range(0, 3141)) / 1000.0;
          ph = real'($urandom_range(0, 6283)) / 1000.0;
          u[0] = $sin(th) * $cos(ph); u[1] = $sin(th) * $sin(ph); u[2] = $cos(th);
          dd  = 1.1 + real'($urandom_range(0, 1900)) / 1000.0;
          s   = real'($urandom_range(32768, 262144));
          app = ($urandom_range(0, 99) < ((n % 5 == 0) ? 0 : 30));
          p_b[l] = '0;
          p_b[l].t = t_now;
          for (int k = 0; k < 3; k++) begin
            p_b[l].pos[k] = self_b.pos[k] + 32'($rtoi(dd * SIG * u[k]));
            p_b[l].vel[k] = self_b.vel[k] + 32'($rtoi((app ? -s : s) * u[k]));
          end
          tau = real'(t_now) + (dd - 1.0) * SIG / s;
          if (p_v[l] && app) begin
            j.has = 1;
            if (tau < j.t_best) begin
              j.t_second = j.t_best; j.t_best = tau; j.best_id = pid;
            end else if (tau < j.t_second) j.t_second = tau;
          end
        end
        j.last_cyc = cyc;
        @(negedge clk);
      end
      if (j.has) n_coll++; else n_none++;
      jobs.push_back(j);
      in_v = 1'b0; in_first = 1'b0; in_last = 1'b0;
      if ($urandom_range(0, 1) == 1) @(negedge clk);
    end
    repeat (40) @(negedge clk);
    check(jobs.size() == 0, "all beads reported");
    check(n_coll > 50 && n_none > 20, "beads with and without collisions");
    $display("coll=%0d none=%0d", n_coll, n_none);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

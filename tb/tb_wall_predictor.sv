// tb_wall_predictor: checks the cell-crossing prediction.
//
// Random beads (positions anywhere in the box, velocities of random sign and
// size per axis, some axes at rest) enter one per clock.  For each axis the
// bench computes, with 64-bit integers, the first whole tick at which the
// bead's cell index on that axis changes, and takes the earliest axis.  It
// checks the event time, axis and direction (when the earliest axis is
// unique), that a bead at rest gives no event, and that every result appears
// exactly 23 edges after its input.
module tb_wall_predictor;
  import dmd_pkg::*;

  localparam longint CW = 64'd1 << 27;   // cell width in position units

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic     in_v, out_v;
  time_t    t_now;
  bead_id_t bead_id;
  bead_t    bead_b;
  event_t   out_ev;

  wall_predictor dut (.*);

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  typedef struct {
    longint in_cyc;
    bit     want;
    bit     unique_axis;
    longint t_ref;
    int     axis, dir, id;
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
    if (rst_n && jobs.size() > 0 && cyc - jobs[0].in_cyc == 23) begin
      job_t j;
      j = jobs.pop_front();
      check(out_v == j.want, "event present exactly when the bead moves");
      if (j.want && out_v) begin
        check(longint'(out_ev.t) == j.t_ref, "crossing time");
        check(out_ev.kind == EV_CROSS && int'(out_ev.a) == j.id && int'(out_ev.b) == j.id,
              "crossing event names the bead");
        if (j.unique_axis)
          check(int'(out_ev.axis) == j.axis && int'(out_ev.dir) == j.dir, "axis and direction");
      end
    end else if (rst_n && jobs.size() == 0) begin
      check(!out_v, "no result without an input");
    end
  end

  initial begin
    in_v = 0; t_now = 0; bead_id = 0; bead_b = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      job_t j;
      longint best;
      int nbest;
      @(negedge clk);
      t_now   = time_t'($urandom_range(0, 100000));
      bead_id = bead_id_t'($urandom_range(0, 1023));
      bead_b  = '0;
      bead_b.t = t_now;
      for (int k = 0; k < 3; k++) begin
        int sel;
        bead_b.pos[k] = $urandom;
        sel = $urandom_range(0, 9);
        if (n % 40 == 5 || sel == 0) bead_b.vel[k] = '0;
        else if (sel == 1) bead_b.vel[k] = $urandom_range(0, 1) ? 32'(1) : -32'(1);
        else if (sel < 4) bead_b.vel[k] = 32'($signed($urandom_range(0, 400)) - 200);
        else bead_b.vel[k] = 32'($signed($urandom_range(0, 2000000)) - 1000000);
      end
      in_v = 1'b1;
      j.in_cyc = cyc;
      j.id     = int'(bead_id);
      best  = -1;
      nbest = 0;
      j.axis = 0; j.dir = 0;
      for (int k = 0; k < 3; k++) begin
        longint p, ofs, v, tk;
        p   = longint'(bead_b.pos[k]);
        ofs = p % CW;
        v   = longint'($signed(bead_b.vel[k]));
        if (v == 0) continue;
        // first whole tick with the position outside [cell start, cell end)
        if (v > 0) tk = (CW - ofs + v - 1) / v;
        else       tk = (ofs + 1 + (-v) - 1) / (-v);
        if (best < 0 || tk < best) begin
          best = tk; nbest = 1; j.axis = k; j.dir = (v > 0);
        end else if (tk == best) nbest++;
      end
      j.want        = (best >= 0) && (longint'(t_now) + best < 64'd1 << 32);
      j.unique_axis = (nbest == 1);
      j.t_ref       = longint'(t_now) + best;
      jobs.push_back(j);
    end
    @(negedge clk);
    in_v = 1'b0;
    repeat (30) @(negedge clk);
    check(jobs.size() == 0, "all results seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_pq_unit: random test of one single-insertion shift-register queue unit
// against a reference multiset of event times.
//
// Each cycle the bench may insert one event, remove the head (only when the
// head cell holds a live event) and broadcast a bead tag for invalidation.
// It checks that the head is always the earliest pending time, that the
// count equals the reference (after the broadcast), that a full unit raises
// overflow and drops exactly its latest event, and that invalidation holes
// are closed (scrunch) while the head advances.
module tb_pq_unit;
  import dmd_pkg::*;

  localparam int unsigned DEPTH = 6;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic   enq, deq, head_ok, head_hole, overflow, scrunch;
  event_t new_e, head_e;
  inval_t inv;
  logic [$clog2(DEPTH+1)-1:0] killed, count;

  pq_unit #(.DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0, cycle = 0;
  event_t model [$];
  int n_ovf = 0, n_scr = 0, n_kill = 0, n_deq = 0;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (cycle %0d)", msg, cycle);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    enq = 0; deq = 0; new_e = '0; inv = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (cycle = 0; cycle < 5000; cycle++) begin
      @(negedge clk);
      new_e      = '0;
      new_e.t    = time_t'($urandom_range(0, 300));
      new_e.a    = bead_id_t'($urandom_range(0, 11));
      new_e.b    = bead_id_t'($urandom_range(0, 11));
      enq        = ($urandom_range(0, 99) < ((cycle / 500) % 2 ? 70 : 40));
      inv        = '0;
      if ($urandom_range(0, 99) < 12) begin
        inv.v0   = 1'b1;
        inv.tag0 = bead_id_t'($urandom_range(0, 11));
      end
      #1;
      for (int i = model.size() - 1; i >= 0; i--)
        if (hit(model[i], inv)) model.delete(i);
      if (killed != 0) n_kill++;
      check(int'(count) == model.size(), "count matches reference");
      deq = head_ok && ($urandom_range(0, 99) < 35);
      #1;
      if (head_ok) begin
        time_t tmin;
        tmin = '1;
        foreach (model[i]) if (model[i].t < tmin) tmin = model[i].t;
        check(head_e.t == tmin, "head is the earliest event");
      end
      if (scrunch) n_scr++;
      // expected overflow: enqueue-only into a unit with every cell live
      check(overflow == (enq && !deq && model.size() == DEPTH), "overflow flag");
      @(posedge clk);
      if (deq) begin
        int idx;
        idx = -1;
        foreach (model[i]) if (model[i].t == head_e.t && idx < 0) idx = i;
        model.delete(idx);
        n_deq++;
      end
      if (enq) model.push_back(new_e);
      if (overflow) begin
        // the latest time is lost
        int idx;
        time_t tmax;
        n_ovf++;
        tmax = '0;
        idx  = 0;
        foreach (model[i]) if (model[i].t >= tmax) begin tmax = model[i].t; idx = i; end
        model.delete(idx);
      end
    end
    check(n_ovf > 0, "overflow exercised");
    check(n_scr > 0, "hole closing exercised");
    check(n_kill > 0, "invalidation exercised");
    check(n_deq > 100, "dequeues exercised");
    $display("overflow=%0d scrunch=%0d kill=%0d deq=%0d", n_ovf, n_scr, n_kill, n_deq);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

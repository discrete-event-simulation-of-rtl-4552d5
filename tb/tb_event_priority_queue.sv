// tb_event_priority_queue: random test of the four-insertion event queue
// against a reference multiset.
//
// Every cycle the bench inserts 0..4 random events, sometimes broadcasts one
// or two bead tags for invalidation and randomly accepts the output.  Each
// delivered event must be the earliest event still pending in the reference
// (equal times may come in any order) and must be one of them.  The total
// held is kept at or below DEPTH so that no unit can overflow.  The bench
// also checks the one-cycle insert-to-output latency on an empty queue, that
// the queue drains to exactly the reference contents, and that four-way
// insertion, invalidation and hole closing all happened.
module tb_event_priority_queue;
  import dmd_pkg::*;

  localparam int unsigned DEPTH = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [3:0] ins_v;
  event_t     ins_e [4];
  inval_t     inv;
  logic       ready;
  event_t     out_e;
  logic       out_v, overflow, scrunch;
  logic [7:0] killed;
  logic [1:0] sel;
  logic [4:0] perm_idx;
  logic [$clog2(4*DEPTH+1)-1:0] count;

  event_priority_queue #(.DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0;
  event_t model [$];
  int n_quad = 0, n_kill = 0, n_scr = 0, n_deq = 0;
  int cycle = 0;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (cycle %0d)", msg, cycle);
    end
  endtask

  function automatic event_t rand_ev();
    event_t e;
    e      = '0;
    e.t    = time_t'($urandom_range(0, 200));
    e.a    = bead_id_t'($urandom_range(0, 15));
    e.b    = bead_id_t'($urandom_range(0, 15));
    e.kind = ev_kind_e'($urandom_range(0, 1));
    e.axis = 2'($urandom_range(0, 2));
    e.dir  = 1'($urandom_range(0, 1));
    return e;
  endfunction

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ins_v = '0;
    inv   = '0;
    ready = 1'b0;
    for (int j = 0; j < 4; j++) ins_e[j] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(!out_v && count == 0, "empty after reset");

    // latency: one insert is visible after exactly one edge
    ins_v    = 4'b0100;
    ins_e[2] = rand_ev();
    @(posedge clk);
    #1;
    model.push_back(ins_e[2]);
    ins_v = '0;
    check(out_v && out_e == ins_e[2], "insert visible one cycle later");

    for (cycle = 0; cycle < 4000; cycle++) begin
      @(negedge clk);
      // stimulus
      ins_v = '0;
      for (int j = 0; j < 4; j++) begin
        ins_e[j] = rand_ev();
        if (model.size() + $countones(ins_v) < DEPTH - 0 && $urandom_range(0, 99) < 45)
          ins_v[j] = 1'b1;
      end
      // keep the total at or below DEPTH (cannot overflow any unit)
      for (int j = 0; j < 4; j++)
        if (model.size() + $countones(ins_v) > DEPTH - 4) ins_v[j] = 1'b0;
      if (cycle % 97 == 3 && model.size() <= DEPTH - 4) ins_v = 4'b1111;
      inv = '0;
      if ($urandom_range(0, 99) < 15) begin
        inv.v0   = 1'b1;
        inv.tag0 = bead_id_t'($urandom_range(0, 15));
        if ($urandom_range(0, 1) == 1) begin
          inv.v1   = 1'b1;
          inv.tag1 = bead_id_t'($urandom_range(0, 15));
        end
      end
      ready = ($urandom_range(0, 99) < 60);
      #1;
      // apply invalidation to the model (combinational inside the queue)
      for (int i = model.size() - 1; i >= 0; i--)
        if (hit(model[i], inv)) model.delete(i);
      if (killed != 0) n_kill++;
      if (scrunch) n_scr++;
      if (ins_v == 4'b1111) n_quad++;
      // output check
      if (out_v) begin
        time_t tmin;
        int idx;
        tmin = '1;
        idx  = -1;
        foreach (model[i]) if (model[i].t < tmin) tmin = model[i].t;
        foreach (model[i]) if (model[i] == out_e && idx < 0) idx = i;
        check(idx >= 0, "delivered event is pending");
        check(out_e.t == tmin, "delivered event is the earliest");
        if (ready && idx >= 0) begin
          model.delete(idx);
          n_deq++;
        end
      end else begin
        check(1'b1, "no output");
      end
      @(posedge clk);
      #1;
      for (int j = 0; j < 4; j++) if (ins_v[j]) model.push_back(ins_e[j]);
      begin
        // the broadcast is still on the bus and masks matching new entries
        int n;
        n = 0;
        foreach (model[i]) if (!hit(model[i], inv)) n++;
        check(int'(count) == n, "count matches reference");
      end
    end

    // drain
    @(negedge clk);
    ins_v = '0;
    inv   = '0;
    ready = 1'b1;
    for (int k = 0; k < 200 && model.size() > 0; k++) begin
      #1;
      if (out_v) begin
        int idx;
        time_t tmin;
        tmin = '1;
        idx = -1;
        foreach (model[i]) if (model[i].t < tmin) tmin = model[i].t;
        foreach (model[i]) if (model[i] == out_e && idx < 0) idx = i;
        check(idx >= 0 && out_e.t == tmin, "drain order");
        if (idx >= 0) model.delete(idx);
      end
      @(negedge clk);
    end
    check(model.size() == 0, "drained all reference events");
    check(!out_v, "empty after drain");

    check(n_quad > 0, "four-way insertion exercised");
    check(n_kill > 0, "invalidation exercised");
    check(n_scr > 0, "hole closing exercised");
    check(n_deq > 100, "dequeues exercised");
    $display("quad=%0d kill=%0d scrunch=%0d deq=%0d", n_quad, n_kill, n_scr, n_deq);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

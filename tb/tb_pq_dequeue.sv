// tb_pq_dequeue: checks the comparator network that picks the queue output.
//
// Random unit heads (with random valid and head-hole flags and frequent
// equal times) are applied.  The expected winner is found by a linear scan
// for the smallest time among valid heads, lowest unit first on ties.  The
// bench checks the selected unit, the output event, out_v (some head valid
// and no unit with a hole at its head) and that exactly the winner is
// dequeued when ready is high, and nothing when it is low.
module tb_pq_dequeue;
  import dmd_pkg::*;

  event_t     head_e [4], out_e;
  logic [3:0] head_ok, head_hole, deq;
  logic       ready, out_v;
  logic [1:0] sel;

  pq_dequeue dut (.*);

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 5000; n++) begin
      int w;
      logic ev;
      for (int u = 0; u < 4; u++) begin
        head_e[u]   = '0;
        head_e[u].t = time_t'($urandom_range(0, 6));
        head_e[u].a = bead_id_t'(u);
        head_ok[u]  = $urandom_range(0, 3) != 0;
        head_hole[u] = !head_ok[u] && ($urandom_range(0, 7) == 0);
      end
      ready = $urandom_range(0, 1);
      #1;
      w = -1;
      for (int u = 0; u < 4; u++)
        if (head_ok[u] && (w < 0 || head_e[u].t < head_e[w].t)) w = u;
      ev = (w >= 0) && (head_hole == 0);
      check(out_v == ev, "out_v");
      if (w >= 0) begin
        check(int'(sel) == w, "earliest head selected, lowest unit on ties");
        check(out_e == head_e[w], "output event");
      end
      check(deq == ((ev && ready) ? 4'(1 << w) : 4'b0), "dequeue strobe");
      #9;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_pq_router: checks the routing randomizer of the event queue.
//
// Every cycle random events are offered on the four predictor outputs.  The
// bench checks that the outputs are exactly the inputs under a permutation
// (each input reaches one distinct unit, nothing is lost or duplicated), that
// the permutation is the one named by perm_idx in the factorial number system
// (digits perm_idx/6, (perm_idx%6)/2, perm_idx%2 select from the units not
// yet taken), and that all 24 routing scenarios occur.
module tb_pq_router;
  import dmd_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [3:0] in_v, out_v;
  event_t     in_e [4], out_e [4];
  logic [4:0] perm_idx;

  pq_router dut (.*);

  int checks = 0, failures = 0;
  bit seen [24];

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_v = '0;
    for (int j = 0; j < 4; j++) in_e[j] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      int p [4];
      int avail [$];
      @(negedge clk);
      for (int j = 0; j < 4; j++) begin
        in_e[j]   = '0;
        in_e[j].t = $urandom;
        in_e[j].a = bead_id_t'(j);
        in_v[j]   = $urandom_range(0, 1);
      end
      #1;
      check(perm_idx < 24, "scenario index in range");
      if (perm_idx < 24) seen[perm_idx] = 1'b1;
      avail = '{0, 1, 2, 3};
      p[0] = avail[perm_idx / 6];         avail.delete(perm_idx / 6);
      p[1] = avail[(perm_idx % 6) / 2];   avail.delete((perm_idx % 6) / 2);
      p[2] = avail[perm_idx % 2];         avail.delete(perm_idx % 2);
      p[3] = avail[0];
      for (int j = 0; j < 4; j++) begin
        check(out_v[p[j]] == in_v[j], "valid routed to its unit");
        if (in_v[j]) check(out_e[p[j]] == in_e[j], "event routed to its unit");
      end
      check($countones(out_v) == $countones(in_v), "no event lost or duplicated");
    end
    foreach (seen[i]) check(seen[i], "every routing scenario used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

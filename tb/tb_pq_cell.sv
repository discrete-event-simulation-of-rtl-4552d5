// tb_pq_cell: exhaustive-by-random test of one queue cell's next-state rule.
//
// Two cells (an ordinary one and a head cell) receive random neighbour
// contents, comparison and hole flags, commands and broadcasts.  After each
// clock edge the bench compares the cell's content with the reference rule
// below, which states where the cell's next content comes from:
//   * its own entry is "earlier" than the new event when it is live and its
//     time is <= the new time; an empty cell passes on the flag of the cell
//     behind it;
//   * dequeue (alone): every cell takes the content of the cell behind;
//   * dequeue with insert: cells behind the insertion point move forward, the
//     insertion point takes the new event, the rest stay;
//   * insert (alone): cells ahead of the insertion point stay, the insertion
//     point takes the new event, cells behind shift back, except that a hole
//     ahead absorbs the shift;
//   * idle: a cell at or behind a hole moves forward (hole closing).
// It also checks the comparison, hole and kill outputs.
module tb_pq_cell;
  import dmd_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic   deq, enq, left_v, right_v, cmp_left, cmp_right, pf_left;
  event_t new_e, left_e, right_e;
  inval_t inv;
  event_t q_e [2];
  logic   q_v [2], cmp_out [2], pf_out [2], killed [2];

  pq_cell #(.FIRST(1'b0)) u_mid (
    .clk, .rst_n, .deq, .enq, .new_e, .inv, .left_e, .left_v, .right_e, .right_v,
    .cmp_left, .cmp_right, .pf_left,
    .q_e (q_e[0]), .q_v (q_v[0]), .cmp_out (cmp_out[0]), .pf_out (pf_out[0]),
    .killed (killed[0]));
  pq_cell #(.FIRST(1'b1)) u_head (
    .clk, .rst_n, .deq, .enq, .new_e, .inv, .left_e ('0), .left_v (1'b0),
    .right_e, .right_v, .cmp_left (1'b1), .cmp_right, .pf_left (1'b0),
    .q_e (q_e[1]), .q_v (q_v[1]), .cmp_out (cmp_out[1]), .pf_out (pf_out[1]),
    .killed (killed[1]));

  int checks = 0, failures = 0, cycle = 0;
  int n_ins = 0, n_fwd = 0, n_back = 0, n_kill = 0;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (cycle %0d)", msg, cycle);
    end
  endtask

  function automatic event_t rand_ev();
    event_t e;
    e   = '0;
    e.t = time_t'($urandom_range(0, 20));
    e.a = bead_id_t'($urandom_range(0, 7));
    e.b = bead_id_t'($urandom_range(0, 7));
    return e;
  endfunction

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    deq = 0; enq = 0; left_v = 0; right_v = 0; cmp_left = 0; cmp_right = 0;
    pf_left = 0; new_e = '0; left_e = '0; right_e = '0; inv = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (cycle = 0; cycle < 20000; cycle++) begin
      event_t cur_e [2], exp_e [2];
      logic   cur_v [2], exp_v [2];
      @(negedge clk);
      deq = $urandom_range(0, 3) == 0;
      enq = $urandom_range(0, 1);
      new_e = rand_ev();
      left_e = rand_ev();   left_v = $urandom_range(0, 3) != 0;
      right_e = rand_ev();  right_v = $urandom_range(0, 3) != 0;
      cmp_left = $urandom_range(0, 1);
      cmp_right = $urandom_range(0, 1);
      pf_left = $urandom_range(0, 3) == 0;
      inv = '0;
      if ($urandom_range(0, 9) == 0) begin
        inv.v0 = 1'b1;
        inv.tag0 = bead_id_t'($urandom_range(0, 7));
      end
      #1;
      for (int c = 0; c < 2; c++) begin
        logic live, earlier, hole_here, pfl, cl;
        pfl = (c == 1) ? 1'b0 : pf_left;
        cl  = (c == 1) ? 1'b1 : cmp_left;
        cur_e[c] = q_e[c];
        cur_v[c] = u_mid.v_r;
        if (c == 1) cur_v[c] = u_head.v_r;
        live      = cur_v[c] && !hit(cur_e[c], inv);
        earlier   = live ? (cur_e[c].t <= new_e.t) : cmp_right;
        hole_here = pfl || !live;
        check(killed[c] == (cur_v[c] && hit(cur_e[c], inv)), "kill flag");
        check(q_v[c] == live, "valid after broadcast");
        check(cmp_out[c] == earlier, "comparison output");
        check(pf_out[c] == hole_here, "hole flag");
        // where the next content comes from
        exp_e[c] = cur_e[c]; exp_v[c] = live;                       // stay
        if (deq && enq) begin
          if (cmp_right) begin exp_e[c] = right_e; exp_v[c] = right_v; end
          else if (earlier || c == 1) begin exp_e[c] = new_e; exp_v[c] = 1'b1; end
        end else if (deq) begin
          exp_e[c] = right_e; exp_v[c] = right_v;
        end else if (enq) begin
          if (earlier && hole_here) begin
            if (cmp_right) begin exp_e[c] = right_e; exp_v[c] = right_v; end
            else begin exp_e[c] = new_e; exp_v[c] = 1'b1; end
          end else if (!earlier && !pfl) begin
            if (cl) begin exp_e[c] = new_e; exp_v[c] = 1'b1; end
            else begin exp_e[c] = (c == 1) ? '0 : left_e; exp_v[c] = (c == 1) ? 1'b0 : left_v; end
          end
        end else if (hole_here) begin
          exp_e[c] = right_e; exp_v[c] = right_v;
        end
        if (exp_e[c] == new_e && exp_v[c]) n_ins++;
        if (killed[c]) n_kill++;
      end
      if (enq && !deq && !cmp_out[0] && !pf_left && !cmp_left) n_back++;
      if (!enq && !deq && pf_out[0]) n_fwd++;
      @(posedge clk);
      #1;
      for (int c = 0; c < 2; c++) begin
        logic vv;
        vv = (c == 0) ? u_mid.v_r : u_head.v_r;
        check(vv == exp_v[c], "next valid");
        if (exp_v[c]) check(q_e[c] == exp_e[c], "next content");
      end
    end
    check(n_ins > 0 && n_fwd > 0 && n_back > 0 && n_kill > 0, "all actions exercised");
    $display("ins=%0d fwd=%0d back=%0d kill=%0d", n_ins, n_fwd, n_back, n_kill);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

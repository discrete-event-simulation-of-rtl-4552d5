// tb_bead_pointer_memory: random test of the cell-indexed bead pointer
// memory and the cell slot memory against reference arrays.
//
// After reset the bench waits for busy to fall, which must take exactly
// NCELLS clocks, and checks that every cell then reads as all slots free.
// It then issues random pointer writes, slot-vector writes, row reads and
// two slot-vector reads every cycle, often to the same cell in the same
// cycle.  Data must appear one edge after the address and already show
// writes of that cycle.  Pointers are compared only where written before.
module tb_bead_pointer_memory;
  import dmd_pkg::*;

  localparam int N = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       busy;
  cell_addr_t rd_cell;
  bead_id_t   rd_ids [SLOTS];
  slot_vec_t  rd_occ;
  cell_addr_t sl_cell [2];
  slot_vec_t  sl_free [2];
  logic       pw_v [2];
  cell_addr_t pw_cell [2];
  logic [$clog2(SLOTS)-1:0] pw_slot [2];
  bead_id_t   pw_id [2];
  logic       fw_v [2];
  cell_addr_t fw_cell [2];
  slot_vec_t  fw_vec [2];

  bead_pointer_memory #(.NCELLS(N)) dut (.*);

  int checks = 0, failures = 0, n_bypass = 0;
  bead_id_t  ref_ptr  [N][SLOTS];
  bit        known    [N][SLOTS];
  slot_vec_t ref_free [N];

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_busy;
    rd_cell = '0;
    for (int w = 0; w < 2; w++) begin
      sl_cell[w] = '0; pw_v[w] = 0; pw_cell[w] = '0; pw_slot[w] = '0; pw_id[w] = '0;
      fw_v[w] = 0; fw_cell[w] = '0; fw_vec[w] = '0;
    end
    for (int c = 0; c < N; c++) begin
      ref_free[c] = '1;
      for (int s = 0; s < SLOTS; s++) known[c][s] = 0;
    end
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    n_busy = 0;
    while (busy && n_busy < 100) begin
      @(negedge clk);
      n_busy++;
    end
    check(n_busy == N, "clearing takes one clock per cell");
    for (int c = 0; c < N; c++) begin
      rd_cell = cell_addr_t'(c);
      @(negedge clk);
      check(rd_occ == '0, "cell empty after clearing");
    end

    for (int n = 0; n < 5000; n++) begin
      bead_id_t  exp_ids [SLOTS];
      bit        exp_k   [SLOTS];
      slot_vec_t exp_occ, exp_sl [2];
      for (int w = 0; w < 2; w++) begin
        pw_v[w]    = $urandom_range(0, 1);
        pw_cell[w] = cell_addr_t'($urandom_range(0, N - 1));
        pw_slot[w] = 3'($urandom_range(0, SLOTS - 1));
        pw_id[w]   = bead_id_t'($urandom);
        fw_v[w]    = $urandom_range(0, 1);
        fw_cell[w] = cell_addr_t'($urandom_range(0, N - 1));
        fw_vec[w]  = slot_vec_t'($urandom);
      end
      // two writes of one kind never target the same cell in one cycle
      if (pw_cell[1] == pw_cell[0] && pw_slot[1] == pw_slot[0]) pw_v[1] = 0;
      if (fw_cell[1] == fw_cell[0]) fw_v[1] = 0;
      rd_cell    = $urandom_range(0, 1) ? pw_cell[0] : cell_addr_t'($urandom_range(0, N - 1));
      sl_cell[0] = $urandom_range(0, 1) ? fw_cell[0] : cell_addr_t'($urandom_range(0, N - 1));
      sl_cell[1] = $urandom_range(0, 1) ? fw_cell[1] : cell_addr_t'($urandom_range(0, N - 1));
      if ((fw_v[0] && fw_cell[0] == sl_cell[0]) || (pw_v[0] && pw_cell[0] == rd_cell)) n_bypass++;
      for (int w = 0; w < 2; w++) begin
        if (pw_v[w]) begin ref_ptr[pw_cell[w]][pw_slot[w]] = pw_id[w]; known[pw_cell[w]][pw_slot[w]] = 1; end
        if (fw_v[w]) ref_free[fw_cell[w]] = fw_vec[w];
      end
      for (int s = 0; s < SLOTS; s++) begin
        exp_ids[s] = ref_ptr[rd_cell][s];
        exp_k[s]   = known[rd_cell][s];
      end
      exp_occ   = ~ref_free[rd_cell];
      exp_sl[0] = ref_free[sl_cell[0]];
      exp_sl[1] = ref_free[sl_cell[1]];
      @(posedge clk);
      #1;
      for (int s = 0; s < SLOTS; s++)
        if (exp_k[s]) check(rd_ids[s] == exp_ids[s], "row read (write-before-read)");
      check(rd_occ == exp_occ, "occupancy read");
      check(sl_free[0] == exp_sl[0] && sl_free[1] == exp_sl[1], "slot vector reads");
      @(negedge clk);
    end
    check(n_bypass > 100, "same-cycle write and read exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

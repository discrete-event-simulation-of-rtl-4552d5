// tb_bead_state_memory: random test of the tag-indexed bead state memory and
// the bead slot memory against reference arrays.
//
// Every cycle the bench issues random writes on both write ports, eight
// random reads and a slot read/write, often to the same address in the same
// cycle.  Read data must appear one edge after the address and must already
// show a write made in that same cycle (port 1 wins over port 0 when both
// write the same address).  Only addresses written before are compared.
module tb_bead_state_memory;
  import dmd_pkg::*;

  localparam int N = 32;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  bead_id_t  rd_addr [SLOTS];
  bead_t     rd_data [SLOTS];
  logic      we [2];
  bead_id_t  wa [2];
  bead_t     wd [2];
  bead_id_t  slot_raddr, slot_waddr;
  slot_vec_t slot_rdata, slot_wdata;
  logic      slot_we;

  bead_state_memory #(.NBEADS(N)) dut (.*);

  int checks = 0, failures = 0, n_bypass = 0;
  bead_t     ref_mem  [N];
  slot_vec_t ref_slot [N];
  bit        known [N], sknown [N];

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  function automatic bead_t rand_bead();
    bead_t b;
    for (int k = 0; k < 3; k++) begin
      b.pos[k] = $urandom;
      b.vel[k] = $urandom;
    end
    b.t = $urandom;
    return b;
  endfunction

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) begin known[i] = 0; sknown[i] = 0; end
    for (int n = 0; n < 5000; n++) begin
      bead_t     exp_d [SLOTS];
      bit        exp_k [SLOTS];
      slot_vec_t exp_s;
      bit        exp_sk;
      @(negedge clk);
      for (int w = 0; w < 2; w++) begin
        we[w] = $urandom_range(0, 2) == 0;
        wa[w] = bead_id_t'($urandom_range(0, N - 1));
        wd[w] = rand_bead();
      end
      for (int p = 0; p < SLOTS; p++) begin
        rd_addr[p] = ($urandom_range(0, 3) == 0 && we[p % 2]) ? wa[p % 2]
                                                              : bead_id_t'($urandom_range(0, N - 1));
        if (we[p % 2] && rd_addr[p] == wa[p % 2]) n_bypass++;
      end
      slot_we    = $urandom_range(0, 1);
      slot_waddr = bead_id_t'($urandom_range(0, N - 1));
      slot_wdata = slot_vec_t'(1 << $urandom_range(0, SLOTS - 1));
      slot_raddr = $urandom_range(0, 1) ? slot_waddr : bead_id_t'($urandom_range(0, N - 1));
      // reference: writes first, then reads
      for (int w = 0; w < 2; w++)
        if (we[w]) begin ref_mem[wa[w]] = wd[w]; known[wa[w]] = 1; end
      if (slot_we) begin ref_slot[slot_waddr] = slot_wdata; sknown[slot_waddr] = 1; end
      for (int p = 0; p < SLOTS; p++) begin
        exp_d[p] = ref_mem[rd_addr[p]];
        exp_k[p] = known[rd_addr[p]];
      end
      exp_s  = ref_slot[slot_raddr];
      exp_sk = sknown[slot_raddr];
      @(posedge clk);
      #1;
      for (int p = 0; p < SLOTS; p++)
        if (exp_k[p]) check(rd_data[p] == exp_d[p], "bead read (write-before-read)");
      if (exp_sk) check(slot_rdata == exp_s, "slot read (write-before-read)");
    end
    check(n_bypass > 100, "same-cycle write and read exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

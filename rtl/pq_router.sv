// pq_router: routing randomizer in front of the four queue units.
//
// Up to four new events arrive from the event predictor in one cycle.  Input
// j is sent to unit perm[j], where perm is one of the 4! = 24 permutations of
// {0,1,2,3}.  The permutation index is taken from a 16-bit maximal-length
// LFSR (taps 16,14,13,11) reduced modulo 24, and decoded with the factorial
// number system: digit d0 = idx / 6 picks perm[0] among the four units,
// d1 = (idx % 6) / 2 among the remaining three, d2 = idx % 2 among the last
// two.  Spreading insertions randomly keeps the four units about equally
// full.
//
// Timing: purely combinational routing; the LFSR steps on every clock edge
// and is reset to a fixed non-zero seed.
//
// Four inputs, four outputs and a pseudorandom choice among 24 routings
// follow the original design; the LFSR and the decode are this design's own.
module pq_router
  import dmd_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic  [3:0] in_v,
  input  event_t      in_e [4],
  output logic  [3:0] out_v,
  output event_t      out_e [4],
  output logic  [4:0] perm_idx       // routing scenario in use (0..23)
);

  logic [15:0] lfsr;
  logic [1:0]  perm [4];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) lfsr <= 16'hACE1;
    else        lfsr <= {lfsr[14:0], lfsr[15] ^ lfsr[13] ^ lfsr[12] ^ lfsr[10]};
  end

  assign perm_idx = 5'(lfsr % 16'd24);

  always_comb begin
    logic [1:0] avail [4];
    logic [4:0] rest;
    int unsigned d [3];
    for (int k = 0; k < 4; k++) avail[k] = 2'(k);
    d[0] = 32'(perm_idx) / 6;
    rest = 5'(32'(perm_idx) % 6);
    d[1] = 32'(rest) / 2;
    d[2] = 32'(rest) % 2;
    for (int j = 0; j < 4; j++) perm[j] = '0;
    // pick digit d[j] from the ordered list of units not yet taken
    for (int j = 0; j < 3; j++) begin
      perm[j] = avail[d[j]];
      for (int k = 0; k < 3; k++)
        if (k >= int'(d[j])) avail[k] = avail[k+1];
    end
    perm[3] = avail[0];
  end

  always_comb begin
    for (int u = 0; u < 4; u++) begin
      out_v[u] = 1'b0;
      out_e[u] = '0;
    end
    for (int j = 0; j < 4; j++) begin
      out_v[perm[j]] = in_v[j];
      out_e[perm[j]] = in_e[j];
    end
  end

endmodule

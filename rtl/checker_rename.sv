// checker_rename: dedicated register renaming of the checker cluster.
//
// Committed instructions are renamed a second time, independently of the
// regular clusters, so that the checker re-executes them as a separate,
// data-independent thread. A speculative map (RAT) gives the current mapping
// of every logical register; a retirement map (RRAT) follows the checkROB
// retirement. A physical register is put back in the free pool only when the
// instruction that overwrote its logical register retires from the checkROB.
//
// Rename: up to W lanes per cycle (combinational results, state updated at the
// clock edge). Sources of a lane see destinations of earlier lanes of the same
// cycle. Each lane with a destination takes the lowest-numbered free register;
// `free_cnt` must cover the lanes with destinations (the commit stage checks
// it). Retire: up to RET_W records update the RRAT and free `chk_old_pdst`.
// `flush` (rollback) copies the RRAT into the RAT and rebuilds the free pool
// from it. The map/free-vector organisation and the register counts are this
// design's own choices.
module checker_rename
  import chk_pkg::*;
#(
  parameter int unsigned W     = 6,
  parameter int unsigned RET_W = 6
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          flush,
  // rename lanes
  input  logic [W-1:0]                  v,
  input  logic [W-1:0]                  has_dst,
  input  lreg_t                         ldst     [W],
  input  lreg_t                         lsrc1    [W],
  input  lreg_t                         lsrc2    [W],
  output preg_t                         psrc1    [W],
  output preg_t                         psrc2    [W],
  output preg_t                         pdst     [W],
  output preg_t                         old_pdst [W],
  output logic [$clog2(NUM_PREG+1)-1:0] free_cnt,
  // retirement
  input  retire_t                       ret      [RET_W]
);
  localparam int unsigned CW = $clog2(NUM_PREG+1);

  preg_t               rat  [NUM_LREG];
  preg_t               rrat [NUM_LREG];
  logic [NUM_PREG-1:0] free_q, free_after_alloc, used_by_rrat;
  preg_t               rat_n [NUM_LREG];

  always_comb begin
    free_cnt = '0;
    for (int p = 0; p < NUM_PREG; p++) free_cnt = free_cnt + CW'(free_q[p]);
  end

  // rename of the W lanes with intra-group forwarding
  always_comb begin
    logic found;
    found            = 1'b0;
    rat_n            = rat;
    free_after_alloc = free_q;
    for (int i = 0; i < W; i++) begin
      psrc1[i]    = rat_n[lsrc1[i]];
      psrc2[i]    = rat_n[lsrc2[i]];
      old_pdst[i] = rat_n[ldst[i]];
      pdst[i]     = '0;
      if (v[i] && has_dst[i]) begin
        found = 1'b0;
        for (int p = 0; p < NUM_PREG; p++) begin
          if (!found && free_after_alloc[p]) begin
            found               = 1'b1;
            pdst[i]             = preg_t'(p);
            free_after_alloc[p] = 1'b0;
          end
        end
        rat_n[ldst[i]] = pdst[i];
      end
    end
  end

  always_comb begin
    used_by_rrat = '0;
    for (int l = 0; l < NUM_LREG; l++) used_by_rrat[rrat[l]] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int l = 0; l < NUM_LREG; l++) begin
        rat[l]  <= preg_t'(l);
        rrat[l] <= preg_t'(l);
      end
      for (int p = 0; p < NUM_PREG; p++) free_q[p] <= (p >= NUM_LREG);
    end else if (flush) begin
      rat    <= rrat;
      free_q <= ~used_by_rrat;
    end else begin
      logic [NUM_PREG-1:0] f;
      rat <= rat_n;
      f = free_after_alloc;
      for (int r = 0; r < RET_W; r++) begin
        if (ret[r].valid && ret[r].has_dst) begin
          rrat[ret[r].ldst]     <= ret[r].pdst;
          f[ret[r].chk_old_pdst] = 1'b1;
        end
      end
      free_q <= f;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n || flush)
                   $countones(v & has_dst) <= int'(free_cnt))
    else $error("checker_rename: out of free registers");
endmodule

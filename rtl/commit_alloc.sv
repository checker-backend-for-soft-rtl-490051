// commit_alloc: commit gating and allocation to the checker cluster.
//
// Each cycle up to W instructions at the head of the ROB may commit. With
// checking on, a committing instruction is at the same time allocated to the
// checker cluster: it takes a checkROB entry and a checker register (if it
// writes one), a load also an LVQ entry, a store an SVQ entry and a branch a
// BVQ entry. If any of these structures lacks room the instruction, and all
// younger ones, wait: commit stalls. The check is a running count over the
// lanes in program order, so the committed lanes always form a prefix.
// With checking off only the SVQ is needed (stores still reach memory
// through it) and nothing is allocated to the checker.
// `hold` (rollback in progress, or checking being switched off) blocks all
// commits. Purely combinational; the valid lanes of `slot` must form a prefix.
module commit_alloc
  import chk_pkg::*;
#(
  parameter int unsigned W      = 6,
  parameter int unsigned CNT_W  = 8    // width of the free-space inputs
) (
  input  commit_t          slot [W],
  input  logic             ft_on,
  input  logic             hold,
  input  logic [CNT_W-1:0] crob_free,
  input  logic [CNT_W-1:0] lvq_free,
  input  logic [CNT_W-1:0] svq_free,
  input  logic [CNT_W-1:0] bvq_free,
  input  logic [CNT_W-1:0] preg_free,
  output logic [W-1:0]     commit_v,
  output logic [$clog2(W+1)-1:0] n_commit,
  output logic [W-1:0]     alloc_v,
  output logic [W-1:0]     ld_push,
  output logic [W-1:0]     st_push,
  output logic [W-1:0]     br_push,
  output logic             stall      // a valid instruction was held back for lack of room
);
  always_comb begin
    logic             go, fits;
    logic [CNT_W-1:0] n_all, n_ld, n_st, n_br, n_dst;
    go       = !hold;
    fits     = 1'b0;
    alloc_v  = '0; ld_push = '0; br_push = '0; st_push = '0;
    n_all    = '0; n_ld = '0; n_st = '0; n_br = '0; n_dst = '0;
    commit_v = '0;
    n_commit = '0;
    stall    = 1'b0;
    for (int i = 0; i < W; i++) begin
      if (go && slot[i].valid) begin
        if (ft_on)
          fits = (n_all < crob_free) &&
                 (slot[i].op != OP_LOAD   || n_ld < lvq_free) &&
                 (slot[i].op != OP_STORE  || n_st < svq_free) &&
                 (slot[i].op != OP_BRANCH || n_br < bvq_free) &&
                 (!slot[i].has_dst        || n_dst < preg_free);
        else
          fits = slot[i].op != OP_STORE || n_st < svq_free;
        if (fits) begin
          commit_v[i] = 1'b1;
          n_commit    = n_commit + 1'b1;
          n_all       = n_all + 1'b1;
          if (slot[i].op == OP_LOAD)   n_ld = n_ld + 1'b1;
          if (slot[i].op == OP_STORE)  n_st = n_st + 1'b1;
          if (slot[i].op == OP_BRANCH) n_br = n_br + 1'b1;
          if (slot[i].has_dst)         n_dst = n_dst + 1'b1;
        end else begin
          stall = 1'b1;
          go    = 1'b0;
        end
      end else begin
        go = 1'b0;
      end
    end
    for (int i = 0; i < W; i++) begin
      alloc_v[i] = commit_v[i] && ft_on;
      ld_push[i] = alloc_v[i] && slot[i].op == OP_LOAD;
      br_push[i] = alloc_v[i] && slot[i].op == OP_BRANCH;
      st_push[i] = commit_v[i] && slot[i].op == OP_STORE;
    end
  end
endmodule

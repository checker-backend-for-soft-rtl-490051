// check_rob: reorder buffer of the checker cluster (checkROB).
//
// Instructions that commit from the main ROB are allocated here, as if they
// came from decode, and re-executed on the checker cluster. Commit and retire
// are separated: an instruction's registers (its previous mappings in the
// regular clusters and in the checker) are only released when it leaves the
// checkROB, so that a rollback is still possible until then.
//
// Allocation: up to ALLOC_W per cycle, compacted in lane order; `alloc_idx`
// gives each valid lane its slot (combinational), which the checker cluster
// returns on completion. Completion: CMP_W ports mark slots done and carry
// the checker's exception bit. Retirement: up to RET_W done instructions per
// cycle, in order, while `ret_en` is high. A store may retire only once the
// SVQ has validated it: `st_validated` pulses add a credit, a retired store
// spends one. An exception is serviced only when both the regular and the
// checker cluster raised it (`exc_v`, after which the group stops); if only
// one of them did, `err` is raised and the instruction stays. 128 entries as
// in the evaluated configuration. `flush` empties the buffer on rollback.
module check_rob
  import chk_pkg::*;
#(
  parameter int unsigned DEPTH   = 128,
  parameter int unsigned ALLOC_W = 6,
  parameter int unsigned CMP_W   = 4,
  parameter int unsigned RET_W   = 6
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         flush,
  // allocation at commit
  input  logic [ALLOC_W-1:0]           alloc_v,
  input  op_e                          alloc_op      [ALLOC_W],
  input  word_t                        alloc_pc      [ALLOC_W],
  input  logic [ALLOC_W-1:0]           alloc_has_dst,
  input  lreg_t                        alloc_ldst    [ALLOC_W],
  input  preg_t                        alloc_pdst    [ALLOC_W],
  input  preg_t                        alloc_chk_old [ALLOC_W],
  input  preg_t                        alloc_reg_old [ALLOC_W],
  input  logic [ALLOC_W-1:0]           alloc_exc,
  output logic [$clog2(DEPTH)-1:0]     alloc_idx     [ALLOC_W],
  output logic [$clog2(DEPTH+1)-1:0]   free_cnt,
  output logic [$clog2(DEPTH+1)-1:0]   count,
  // completion from the checker cluster
  input  logic [CMP_W-1:0]             cmp_v,
  input  logic [$clog2(DEPTH)-1:0]     cmp_idx       [CMP_W],
  input  logic [CMP_W-1:0]             cmp_exc,
  // store validation credit from the SVQ
  input  logic                         st_validated,
  // retirement
  input  logic                         ret_en,
  output retire_t                      ret           [RET_W],
  output logic                         exc_v,
  output word_t                        exc_pc,
  output logic                         err,
  output word_t                        oldest_pc
);
  localparam int unsigned IW = $clog2(DEPTH);
  localparam int unsigned CW = $clog2(DEPTH+1);

  typedef struct packed {
    word_t pc;
    logic  is_store;
    logic  has_dst;
    lreg_t ldst;
    preg_t pdst;
    preg_t chk_old;
    preg_t reg_old;
    logic  exc_reg;
  } ent_t;

  ent_t             ent [DEPTH];
  logic [DEPTH-1:0] done, exc_chk;
  logic [IW-1:0]    head, tail;
  logic [CW-1:0]    n_alloc, n_ret, st_credit, n_st_ret;

  function automatic logic [IW-1:0] wrap_add(logic [IW-1:0] p, int unsigned k);
    int unsigned s;
    s = int'(p) + k;
    if (s >= DEPTH) s = s - DEPTH;
    return IW'(s);
  endfunction

  // slot of each allocating lane
  always_comb begin
    int unsigned off;
    off = 0;
    for (int i = 0; i < ALLOC_W; i++) begin
      alloc_idx[i] = wrap_add(tail, off);
      if (alloc_v[i]) off++;
    end
    n_alloc = CW'(off);
  end

  assign free_cnt  = CW'(DEPTH) - count;
  assign oldest_pc = ent[head].pc;

  // in-order retirement of a group
  always_comb begin
    logic          go;
    logic [IW-1:0] idx;
    logic [CW-1:0] credit;
    go       = ret_en;
    credit   = st_credit;
    n_ret    = '0;
    n_st_ret = '0;
    exc_v    = 1'b0;
    exc_pc   = '0;
    err      = 1'b0;
    for (int i = 0; i < RET_W; i++) begin
      idx    = wrap_add(head, i);
      ret[i] = '0;
      if (go && CW'(i) < count && done[idx]) begin
        if (ent[idx].exc_reg != exc_chk[idx]) begin
          err = 1'b1;          // exception seen by only one of the two executions
          go  = 1'b0;
        end else if (ent[idx].is_store && credit == 0) begin
          go  = 1'b0;          // store not validated yet
        end else begin
          ret[i] = '{valid: 1'b1, pc: ent[idx].pc, is_store: ent[idx].is_store,
                     has_dst: ent[idx].has_dst, ldst: ent[idx].ldst, pdst: ent[idx].pdst,
                     chk_old_pdst: ent[idx].chk_old, reg_old_pdst: ent[idx].reg_old};
          n_ret = n_ret + 1'b1;
          if (ent[idx].is_store) begin
            credit   = credit - 1'b1;
            n_st_ret = n_st_ret + 1'b1;
          end
          if (ent[idx].exc_reg) begin
            exc_v  = 1'b1;     // both executions agree: service the exception
            exc_pc = ent[idx].pc;
            go     = 1'b0;
          end
        end
      end else begin
        go = 1'b0;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n || flush) begin
      head      <= '0;
      tail      <= '0;
      count     <= '0;
      st_credit <= '0;
      done      <= '0;
    end else begin
      for (int i = 0; i < ALLOC_W; i++) begin
        if (alloc_v[i]) begin
          ent[alloc_idx[i]] <= '{pc: alloc_pc[i], is_store: alloc_op[i] == OP_STORE,
                                 has_dst: alloc_has_dst[i], ldst: alloc_ldst[i],
                                 pdst: alloc_pdst[i], chk_old: alloc_chk_old[i],
                                 reg_old: alloc_reg_old[i], exc_reg: alloc_exc[i]};
          done[alloc_idx[i]] <= 1'b0;
        end
      end
      for (int c = 0; c < CMP_W; c++) begin
        if (cmp_v[c]) begin
          done[cmp_idx[c]]    <= 1'b1;
          exc_chk[cmp_idx[c]] <= cmp_exc[c];
        end
      end
      head      <= wrap_add(head, int'(n_ret));
      tail      <= wrap_add(tail, int'(n_alloc));
      count     <= count + n_alloc - n_ret;
      st_credit <= st_credit + CW'(st_validated) - n_st_ret;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n || flush) n_alloc <= free_cnt)
    else $error("check_rob overflow");
endmodule

// ft_checker_top: checker-backend error detection and recovery subsystem.
//
// A clustered processor has several identical execution clusters (backends).
// This subsystem turns one of them into a checker: every instruction that
// commits from the ROB is allocated a second time, to the checker cluster,
// and re-executed there on different hardware, so both particle-induced
// (soft) errors and variation-induced timing errors show up as differences.
// The blocks here are the extra hardware the scheme needs around an unchanged
// cluster:
//   commit_alloc    commit gating: commit stalls when a checking structure is full
//   checker_rename  the checker's own renaming, registers freed at checkROB retire
//   check_rob       in-order buffer of instructions being re-executed
//   lvq / svq / bvq committed load, store and branch values; the checker's
//                   loads read data from the LVQ, its stores and branches are
//                   compared with the SVQ and BVQ
//   ckpt_buf        released register values of the last 64 retired
//                   instructions; the SVQ holds stores until they leave it
//   recovery_ctrl   flush, rollback, lower frequency, re-execute, hard error
//   mode_ctrl       checking on/off at run time
//   domain_fifo     carries stores leaving the SVQ into the memory clock domain
// Outside this module, and reached through ports: the ROB head (`rob_slot`),
// the checker cluster's schedulers (`chk_alloc`) and its results (`cmp_*`,
// `chk_ld_*`, `chk_st_*`, `chk_br_*`), register-file read ports for the
// released registers (`rel_*`), register restore on rollback (`restore_*`),
// the data cache write port (`mem_*`), the load-disambiguation search of the
// regular clusters (`lk_*`), and the clock generator (`freq_level`).
// Everything runs on `clk` except the memory write port, which is in the
// `clk_mem` domain (the second-level cache is a domain of its own) and is fed
// through a dual-clock FIFO. If the SVQ fills with validated stores that are
// all still inside the checkpoint window, the window is shortened one entry
// per cycle until one leaves (see `ckpt_shrink`).
// Parameter defaults are the evaluated configuration: commit width 6,
// checkROB 128, LVQ 8, SVQ 16+32, BVQ 16, checkpoint buffer 64; the checker
// has 4 completion ports (its issue width).
module ft_checker_top
  import chk_pkg::*;
#(
  parameter int unsigned W          = 6,
  parameter int unsigned CROB_DEPTH = 128,
  parameter int unsigned LVQ_DEPTH  = 8,
  parameter int unsigned SVQ_NV     = 16,
  parameter int unsigned SVQ_EXTRA  = 32,
  parameter int unsigned BVQ_DEPTH  = 16,
  parameter int unsigned CKPT_DEPTH = 64,
  parameter int unsigned CMP_W      = 4,
  parameter int unsigned MAX_TRIALS = 3,
  parameter int unsigned MEM_FIFO   = 8
) (
  input  logic                     clk,
  input  logic                     clk_mem,
  input  logic                     rst_n,
  // control
  input  logic                     ft_req,
  input  logic                     hard_ack,
  output logic                     ft_on,
  // ROB head
  input  commit_t                  rob_slot [W],
  output logic [W-1:0]             commit_v,
  output logic [$clog2(W+1)-1:0]   n_commit,
  output logic                     commit_stall,
  // allocation to the checker cluster
  output chk_alloc_t               chk_alloc [W],
  // checker cluster results
  input  logic [CMP_W-1:0]         cmp_v,
  input  logic [6:0]               cmp_idx [CMP_W],
  input  logic [CMP_W-1:0]         cmp_exc,
  input  logic                     chk_ld_v,
  input  word_t                    chk_ld_addr,
  output word_t                    chk_ld_data,
  input  logic                     chk_st_v,
  input  word_t                    chk_st_addr,
  input  word_t                    chk_st_data,
  input  logic                     chk_br_v,
  input  logic                     chk_br_taken,
  input  word_t                    chk_br_target,
  // register release (read ports of both register files)
  output logic [W-1:0]             rel_reg_v,
  output preg_t                    rel_reg_preg [W],
  input  word_t                    rel_reg_val  [W],
  output logic [W-1:0]             rel_chk_v,
  output preg_t                    rel_chk_preg [W],
  input  word_t                    rel_chk_val  [W],
  // serviced exceptions
  output logic                     exc_v,
  output word_t                    exc_pc,
  // memory write port (clk_mem domain)
  output logic                     mem_v,
  output word_t                    mem_addr,
  output word_t                    mem_data,
  input  logic                     mem_rdy,
  // load disambiguation against the SVQ
  input  word_t                    lk_addr,
  output logic                     lk_hit,
  output word_t                    lk_data,
  // recovery
  output logic [3:0]               err_src,    // {exception, branch, store, load}
  output logic                     flush,
  output logic                     restore_v,
  output ckpt_t                    restore_ent,
  output logic                     resume,
  output word_t                    restart_pc,
  output logic [$clog2(MAX_TRIALS+1)-1:0] freq_level,
  output logic                     hard_error,
  output logic                     release_all,
  output logic                     in_reexec,
  output logic [$clog2(W+1)-1:0]   n_retire,
  output logic [$clog2(CKPT_DEPTH+1)-1:0] ckpt_count
);
  localparam int unsigned CW = 9;
  localparam int unsigned CROB_IW = $clog2(CROB_DEPTH);

  // control
  logic rec_busy, undo_start, undo_done, undo_busy, ckpt_restart_v, hold_commit, ckpt_clear;
  word_t ckpt_restart_pc;
  logic ckpt_shrink;
  logic err;

  // occupancy
  logic [$clog2(CROB_DEPTH+1)-1:0]         crob_free, crob_count;
  logic [$clog2(LVQ_DEPTH+1)-1:0]          lvq_free, lvq_count;
  logic [$clog2(BVQ_DEPTH+1)-1:0]          bvq_free, bvq_count;
  logic [$clog2(SVQ_NV+SVQ_EXTRA+1)-1:0]   svq_free, svq_alw, svq_vld, svq_pend;
  logic [$clog2(NUM_PREG+1)-1:0]           preg_free;
  logic [$clog2(W+1)-1:0]                  rel_stores;

  // commit
  logic [W-1:0] alloc_v, ld_push, st_push, br_push;

  commit_alloc #(.W(W), .CNT_W(CW)) u_commit (
    .slot(rob_slot), .ft_on, .hold(rec_busy || hold_commit),
    .crob_free(CW'(crob_free)), .lvq_free(CW'(lvq_free)), .svq_free(CW'(svq_free)),
    .bvq_free(CW'(bvq_free)), .preg_free(CW'(preg_free)),
    .commit_v, .n_commit, .alloc_v, .ld_push, .st_push, .br_push, .stall(commit_stall)
  );

  // checker rename
  lreg_t ldst [W], lsrc1 [W], lsrc2 [W];
  preg_t psrc1 [W], psrc2 [W], pdst [W], old_pdst [W];
  logic [W-1:0] has_dst;
  retire_t ret [W];

  always_comb begin
    for (int i = 0; i < W; i++) begin
      ldst[i]    = rob_slot[i].ldst;
      lsrc1[i]   = rob_slot[i].lsrc1;
      lsrc2[i]   = rob_slot[i].lsrc2;
      has_dst[i] = rob_slot[i].has_dst;
    end
  end

  checker_rename #(.W(W), .RET_W(W)) u_rename (
    .clk, .rst_n, .flush, .v(alloc_v), .has_dst, .ldst, .lsrc1, .lsrc2,
    .psrc1, .psrc2, .pdst, .old_pdst, .free_cnt(preg_free), .ret
  );

  // checkROB
  op_e   a_op [W];
  word_t a_pc [W];
  preg_t a_reg_old [W];
  logic [W-1:0] a_exc;
  logic [CROB_IW-1:0] alloc_idx [W];
  logic [CROB_IW-1:0] c_idx [CMP_W];
  logic crob_err, st_validated;
  word_t crob_oldest_pc;

  always_comb begin
    for (int i = 0; i < W; i++) begin
      a_op[i]      = rob_slot[i].op;
      a_pc[i]      = rob_slot[i].pc;
      a_reg_old[i] = rob_slot[i].reg_old_pdst;
      a_exc[i]     = rob_slot[i].exc;
    end
    for (int c = 0; c < CMP_W; c++) c_idx[c] = CROB_IW'(cmp_idx[c]);
  end

  check_rob #(.DEPTH(CROB_DEPTH), .ALLOC_W(W), .CMP_W(CMP_W), .RET_W(W)) u_crob (
    .clk, .rst_n, .flush,
    .alloc_v, .alloc_op(a_op), .alloc_pc(a_pc), .alloc_has_dst(has_dst), .alloc_ldst(ldst),
    .alloc_pdst(pdst), .alloc_chk_old(old_pdst), .alloc_reg_old(a_reg_old), .alloc_exc(a_exc),
    .alloc_idx, .free_cnt(crob_free), .count(crob_count),
    .cmp_v(cmp_v & {CMP_W{!rec_busy}}), .cmp_idx(c_idx), .cmp_exc,
    .st_validated, .ret_en(ft_on && !rec_busy), .ret, .exc_v, .exc_pc, .err(crob_err),
    .oldest_pc(crob_oldest_pc)
  );

  always_comb begin
    for (int i = 0; i < W; i++) begin
      chk_alloc[i] = '{valid: alloc_v[i], op: rob_slot[i].op, pc: rob_slot[i].pc,
                       crob_idx: 7'(alloc_idx[i]), has_dst: rob_slot[i].has_dst,
                       pdst: pdst[i], psrc1: psrc1[i], psrc2: psrc2[i]};
    end
  end

  // value queues
  mem_rec_t ld_rec [W], st_rec [W];
  br_rec_t  br_rec [W];
  logic lvq_err, svq_err, bvq_err;
  logic svq_mem_v, svq_mem_rdy, mem_fifo_full;
  mem_rec_t svq_mem_rec, mem_rec;

  always_comb begin
    for (int i = 0; i < W; i++) begin
      ld_rec[i] = '{addr: rob_slot[i].addr, data: rob_slot[i].data};
      st_rec[i] = '{addr: rob_slot[i].addr, data: rob_slot[i].data};
      br_rec[i] = '{taken: rob_slot[i].taken, target: rob_slot[i].target};
    end
  end

  lvq #(.DEPTH(LVQ_DEPTH), .PUSH_W(W)) u_lvq (
    .clk, .rst_n, .flush, .push_v(ld_push), .push_rec(ld_rec), .free_cnt(lvq_free),
    .count(lvq_count), .chk_v(chk_ld_v && !rec_busy), .chk_addr(chk_ld_addr),
    .chk_data(chk_ld_data), .err(lvq_err)
  );

  bvq #(.DEPTH(BVQ_DEPTH), .PUSH_W(W)) u_bvq (
    .clk, .rst_n, .flush, .push_v(br_push), .push_rec(br_rec), .free_cnt(bvq_free),
    .count(bvq_count), .chk_v(chk_br_v && !rec_busy), .chk_taken(chk_br_taken),
    .chk_target(chk_br_target), .err(bvq_err)
  );

  svq #(.NV(SVQ_NV), .EXTRA(SVQ_EXTRA), .PUSH_W(W), .REL_W(W)) u_svq (
    .clk, .rst_n, .flush, .ft_on, .push_v(st_push), .push_rec(st_rec), .free_cnt(svq_free),
    .chk_v(chk_st_v && !rec_busy), .chk_addr(chk_st_addr), .chk_data(chk_st_data),
    .err(svq_err), .validated(st_validated),
    .release_n(rel_stores), .release_all,
    .mem_v(svq_mem_v), .mem_addr(svq_mem_rec.addr), .mem_data(svq_mem_rec.data),
    .mem_rdy(svq_mem_rdy), .lk_addr, .lk_hit, .lk_data,
    .cnt_alw(svq_alw), .cnt_vld(svq_vld), .cnt_pend(svq_pend)
  );

  // crossing into the memory domain
  domain_fifo #(.T(mem_rec_t), .DEPTH(MEM_FIFO)) u_mem_cdc (
    .rst_n, .wclk(clk), .w_v(svq_mem_v), .w_data(svq_mem_rec), .w_full(mem_fifo_full),
    .rclk(clk_mem), .r_v(mem_v), .r_data(mem_rec), .r_rdy(mem_rdy)
  );
  assign svq_mem_rdy = !mem_fifo_full;
  assign mem_addr    = mem_rec.addr;
  assign mem_data    = mem_rec.data;

  // register release and checkpoint
  logic [W-1:0] ck_wr_v;
  ckpt_t        ck_ent [W];

  always_comb begin
    for (int i = 0; i < W; i++) begin
      if (ft_on) begin
        rel_reg_v[i]    = ret[i].valid && ret[i].has_dst;
        rel_reg_preg[i] = ret[i].reg_old_pdst;
      end else begin
        // checking off: registers are released at commit, as usual
        rel_reg_v[i]    = commit_v[i] && rob_slot[i].has_dst;
        rel_reg_preg[i] = rob_slot[i].reg_old_pdst;
      end
      rel_chk_v[i]    = ret[i].valid && ret[i].has_dst;
      rel_chk_preg[i] = ret[i].chk_old_pdst;
      ck_wr_v[i]      = ret[i].valid;
      ck_ent[i]       = '{pc: ret[i].pc, is_store: ret[i].is_store, has_dst: ret[i].has_dst,
                          ldst: ret[i].ldst, val_reg: rel_reg_val[i], val_chk: rel_chk_val[i]};
    end
  end

  // Escape from a full SVQ: when every record in it is a validated store
  // still inside the window and nothing is left to retire, commit could never
  // resume. Give up the oldest window entry, one per cycle, until a store
  // leaves.
  assign ckpt_shrink = ft_on && !rec_busy && svq_free == 0 && svq_alw == 0 && crob_count == 0;

  ckpt_buf #(.DEPTH(CKPT_DEPTH), .W(W)) u_ckpt (
    .clk, .rst_n, .clear(ckpt_clear), .shrink(ckpt_shrink), .wr_v(ck_wr_v), .wr_ent(ck_ent), .rel_stores,
    .count(ckpt_count), .undo_start, .undo_busy, .rst_v(restore_v), .rst_ent(restore_ent),
    .undo_done, .restart_pc(ckpt_restart_pc), .restart_v(ckpt_restart_v)
  );

  always_comb begin
    n_retire = '0;
    for (int i = 0; i < W; i++) n_retire = n_retire + ($clog2(W+1))'(ck_wr_v[i]);
  end

  // error detection and recovery
  assign err_src = {crob_err, bvq_err, svq_err, lvq_err};
  assign err     = |err_src;

  recovery_ctrl #(.MAX_TRIALS(MAX_TRIALS), .CNT_W(CW), .RET_W(W)) u_rec (
    .clk, .rst_n, .err(err && ft_on), .inflight(CW'(crob_count) + CW'(ckpt_count)),
    .crob_oldest_pc, .undo_done, .ckpt_restart_v, .ckpt_restart_pc,
    .n_ret(n_retire), .hard_ack,
    .flush, .undo_start, .busy(rec_busy), .resume, .restart_pc, .freq_level,
    .hard_error, .in_reexec
  );

  mode_ctrl u_mode (
    .clk, .rst_n, .ft_req, .crob_empty(crob_count == 0), .svq_unchecked_empty(svq_pend == 0),
    .rec_busy, .ft_on, .hold_commit, .release_all, .ckpt_clear
  );

  initial assert (CROB_DEPTH <= 128) else $error("checkROB index carried in 7 bits");

  // occupancy counts not needed beyond the free counts above
  logic unused_ok;
  assign unused_ok = ^{lvq_count, bvq_count, svq_vld, undo_busy};
endmodule

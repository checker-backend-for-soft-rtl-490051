// tb_ft_checker_top: end-to-end test of the checker-backend subsystem at its
// default (full) size.
//
// The testbench plays the parts of the processor around the subsystem:
//  - the ROB head: a random program of ALU ops, loads, stores and branches
//    (PC = 0x1000 + 4*n) is offered up to 6 instructions per cycle; on a
//    rollback it refetches from the restart PC it is given;
//  - the checker cluster: allocated instructions complete after a random
//    latency, out of order, through 4 completion ports; loads, stores and
//    branches are re-executed in program order within their class;
//  - both register files (a released register reads back a value derived
//    from its number), the memory write port in its own clock domain
//    (random ready) and the load-disambiguation search.
// Faults are injected: transient corruptions of a checker store, load
// address, branch outcome or exception, of a store value in the regular
// cluster, and one persistent store fault that ends in a hard error. The
// test also switches checking off and on once in mid-program.
// Checked against independent models: memory sees exactly the program's
// stores, in order, with correct values and none twice; the LVQ returns the
// committed load data; forwarding returns the youngest queued store; a
// rollback restores exactly the values saved for the retired instructions of
// the checkpoint window, newest first, and restarts at its oldest
// instruction; each mechanism (commit stall, load/store/branch checks, each
// error source, rollback, lower frequency, hard error, mode switch,
// exception service, forwarding, checkpoint release) happened at least once.
module tb_ft_checker_top;
  import chk_pkg::*;
  localparam int W = 6, CMPW = 4, CKPT = 64, NI = 3000;
  localparam word_t PC0 = 32'h1000;

  logic clk = 0, clk_mem = 0, rst_n = 0;
  logic ft_req, hard_ack, ft_on;
  commit_t rob_slot [W];
  logic [W-1:0] commit_v; logic [$clog2(W+1)-1:0] n_commit, n_retire; logic commit_stall;
  chk_alloc_t chk_alloc [W];
  logic [CMPW-1:0] cmp_v, cmp_exc; logic [6:0] cmp_idx [CMPW];
  logic chk_ld_v, chk_st_v, chk_br_v, chk_br_taken;
  word_t chk_ld_addr, chk_ld_data, chk_st_addr, chk_st_data, chk_br_target;
  logic [W-1:0] rel_reg_v, rel_chk_v; preg_t rel_reg_preg [W], rel_chk_preg [W];
  word_t rel_reg_val [W], rel_chk_val [W];
  logic exc_v; word_t exc_pc;
  logic mem_v, mem_rdy; word_t mem_addr, mem_data;
  word_t lk_addr, lk_data; logic lk_hit;
  logic [3:0] err_src; logic flush, restore_v, resume, hard_error, release_all, in_reexec;
  ckpt_t restore_ent; word_t restart_pc; logic [1:0] freq_level;
  logic [$clog2(CKPT+1)-1:0] ckpt_count;

  ft_checker_top dut (.*);

  always #5 clk = ~clk;
  always #7 clk_mem = ~clk_mem;   // memory domain runs on its own, slower clock

  // register files: a released register reads back a value derived from its number
  always_comb
    for (int i = 0; i < W; i++) begin
      rel_reg_val[i] = 32'hA000_0000 | 32'(rel_reg_preg[i]);
      rel_chk_val[i] = 32'hC000_0000 | 32'(rel_chk_preg[i]);
    end

  // ---------------- program ----------------
  op_e g_op [NI]; bit g_dst [NI], g_taken [NI], g_exc [NI];
  lreg_t g_ldst [NI]; word_t g_addr [NI], g_data [NI], g_target [NI]; preg_t g_regold [NI];
  int g_fault [NI];   // 0 none, 1 checker store data, 2 checker load address, 3 checker branch,
                      // 4 checker exception, 5 regular store data, 6 persistent checker store data
  bit fired [NI];
  int store_seqs[$];

  function automatic word_t pc_of(int s); return PC0 + word_t'(4 * s); endfunction
  function automatic int seq_of(word_t pc); return int'((pc - PC0) >> 2); endfunction

  // ---------------- models ----------------
  typedef struct { int idx; int seq; int ready; } pend_t;
  typedef struct { int seq; bit dst; lreg_t l; word_t vr, vc; } win_t;
  pend_t pend[$];
  win_t  win[$], exp_rst[$];
  int    svq_m[$];                 // committed stores not yet written, by sequence number
  word_t svq_d[$];                 // their data as committed (a faulty copy included)
  int    next_commit = 0, next_retire = 0, wr_idx = 0, exp_restart = 0, cyc = 0;
  bit    fe_halt = 0, switched = 0;
  int    checks = 0, failures = 0;
  // mechanism counters
  int n_stall = 0, n_ld = 0, n_st = 0, n_br = 0, n_rollback = 0, n_restore = 0, n_hard = 0,
      n_off = 0, n_exc = 0, n_fwd = 0, n_slow = 0, n_release = 0, n_err_ld = 0, n_err_st = 0,
      n_err_br = 0, n_err_exc = 0, n_hard_cycles = 0, n_shrink = 0;
  bit shrink_now;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s @cycle %0d", what, cyc); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog: commit=%0d retire=%0d written=%0d/%0d", next_commit, next_retire, wr_idx, store_seqs.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // memory side, in the memory clock domain
  initial begin
    mem_rdy = 0;
    forever begin
      bit take;
      @(negedge clk_mem);
      mem_rdy = rst_n && $urandom_range(0, 3) != 0;
      take = mem_v && mem_rdy;
      if (take) begin
        int s;
        s = wr_idx < store_seqs.size() ? store_seqs[wr_idx] : -1;
        check(s >= 0 && mem_addr == g_addr[s] && mem_data == g_data[s], "memory sees the program's stores in order");
      end
      @(posedge clk_mem);
      if (take) wr_idx++;
    end
  end

  initial begin
    // program
    for (int s = 0; s < NI; s++) begin
      int r;
      r = $urandom_range(0, 99);
      g_op[s] = r < 40 ? OP_ALU : r < 65 ? OP_LOAD : r < 80 ? OP_STORE : OP_BRANCH;
      if (s >= NI - 300 && s < NI - 180) g_op[s] = OP_STORE;   // store burst
      g_dst[s] = g_op[s] == OP_ALU || g_op[s] == OP_LOAD;
      g_ldst[s] = lreg_t'($urandom);
      g_addr[s] = {26'h0, 4'($urandom), 2'b00};
      g_data[s] = $urandom; g_taken[s] = 1'($urandom); g_target[s] = $urandom;
      g_regold[s] = preg_t'(s);
      g_exc[s] = g_op[s] == OP_ALU && $urandom_range(0, 299) == 0;
      g_fault[s] = 0; fired[s] = 0;
      if (g_op[s] == OP_STORE) store_seqs.push_back(s);
      if ($urandom_range(0, 599) == 0)
        case (g_op[s])
          OP_STORE:  g_fault[s] = $urandom_range(0, 1) != 0 ? 1 : 5;
          OP_LOAD:   g_fault[s] = 2;
          OP_BRANCH: g_fault[s] = 3;
          default:   g_fault[s] = 4;
        endcase
    end
    // make sure every kind occurs, plus one persistent fault
    for (int s = 100; s < NI; s++) if (g_op[s] == OP_STORE) begin g_fault[s] = 1; break; end
    for (int s = 300; s < NI; s++) if (g_op[s] == OP_LOAD) begin g_fault[s] = 2; break; end
    for (int s = 500; s < NI; s++) if (g_op[s] == OP_BRANCH) begin g_fault[s] = 3; break; end
    for (int s = 700; s < NI; s++) if (g_op[s] == OP_ALU) begin g_fault[s] = 4; break; end
    for (int s = 900; s < NI; s++) if (g_op[s] == OP_STORE) begin g_fault[s] = 5; break; end
    for (int s = 2000; s < NI; s++) if (g_op[s] == OP_STORE) begin g_fault[s] = 6; break; end

    ft_req = 1; hard_ack = 0; lk_addr = '0;
    cmp_v = '0; cmp_exc = '0; chk_ld_v = 0; chk_st_v = 0; chk_br_v = 0;
    chk_ld_addr = '0; chk_st_addr = '0; chk_st_data = '0; chk_br_taken = 0; chk_br_target = '0;
    foreach (cmp_idx[c]) cmp_idx[c] = '0;
    foreach (rob_slot[i]) rob_slot[i] = '0;
    repeat (4) @(posedge clk_mem);
    @(negedge clk);
    rst_n = 1;

    while (!(next_commit == NI && next_retire == NI && svq_m.size() == 0 && wr_idx == store_seqs.size())) begin
      int nv, ld_i, st_i, br_i, used, ncmp; int done_i[$]; bit any_busy;
      @(negedge clk);
      cyc++;
      // ----- drive -----
      hard_ack = 0;
      // checking off for a while in mid-program, and at the end to drain the window
      if (!switched && next_commit > NI / 2) begin switched = 1; ft_req = 0; end
      if (switched && !ft_on && ft_req == 0 && next_commit > NI / 2 + 150) ft_req = 1;
      if (next_commit == NI && next_retire == NI) ft_req = 0;
      // ROB head
      nv = fe_halt ? 0 : $urandom_range(1, W);
      for (int i = 0; i < W; i++) begin
        int s;
        s = next_commit + i;
        rob_slot[i] = '0;
        if (i < nv && s < NI) begin
          rob_slot[i] = '{valid: 1'b1, op: g_op[s], pc: pc_of(s), has_dst: g_dst[s], ldst: g_ldst[s],
                          lsrc1: lreg_t'(s), lsrc2: lreg_t'(s + 3), reg_old_pdst: g_regold[s],
                          addr: g_addr[s], data: g_data[s], taken: g_taken[s], target: g_target[s],
                          exc: g_exc[s]};
          if (g_fault[s] == 5 && !fired[s]) rob_slot[i].data = g_data[s] ^ 32'h8000;
        end
      end
      // checker cluster: oldest ready load, store and branch, then other ready instructions
      cmp_v = '0; chk_ld_v = 0; chk_st_v = 0; chk_br_v = 0; done_i.delete();
      ld_i = -1; st_i = -1; br_i = -1;
      foreach (pend[k]) begin
        if (g_op[pend[k].seq] == OP_LOAD && ld_i < 0) ld_i = k;
        if (g_op[pend[k].seq] == OP_STORE && st_i < 0) st_i = k;
        if (g_op[pend[k].seq] == OP_BRANCH && br_i < 0) br_i = k;
      end
      ncmp = 0;
      if (!fe_halt) begin
        foreach (pend[k]) begin
          int s; bit take;
          s = pend[k].seq;
          take = pend[k].ready <= cyc && ncmp < CMPW &&
                 (g_op[s] == OP_ALU || k == ld_i || k == st_i || k == br_i);
          if (take) begin
            bit bad;
            bad = (g_fault[s] != 0 && g_fault[s] != 5 && !fired[s]) || g_fault[s] == 6;
            cmp_v[ncmp] = 1; cmp_idx[ncmp] = 7'(pend[k].idx);
            cmp_exc[ncmp] = g_exc[s] ^ (bad && g_fault[s] == 4);
            case (g_op[s])
              OP_LOAD:   begin chk_ld_v = 1; chk_ld_addr = g_addr[s] ^ ((bad && g_fault[s] == 2) ? 32'h40 : 0); end
              OP_STORE:  begin chk_st_v = 1; chk_st_addr = g_addr[s];
                               chk_st_data = g_data[s] ^ ((bad && g_fault[s] inside {1, 6}) ? 32'h1 : 0); end
              OP_BRANCH: begin chk_br_v = 1; chk_br_taken = g_taken[s] ^ (bad && g_fault[s] == 3);
                               chk_br_target = g_target[s]; end
              default: ;
            endcase
            done_i.push_back(k);
            ncmp++;
          end
        end
      end
      lk_addr = {26'h0, 4'($urandom), 2'b00};
      #1;
      // ----- check -----
      any_busy = fe_halt || flush || hard_error;
      if (chk_ld_v && !any_busy && err_src[0] == 0) begin
        check(chk_ld_data == g_data[pend[ld_i].seq], "LVQ returns committed load data");
        n_ld++;
      end
      if (chk_st_v && !any_busy) n_st++;
      if (chk_br_v && !any_busy) n_br++;
      if (!any_busy && err_src != 0) begin
        n_err_ld += err_src[0]; n_err_st += err_src[1]; n_err_br += err_src[2]; n_err_exc += err_src[3];
      end
      if (!any_busy) begin
        bit eh; word_t ed;
        eh = 0; ed = '0;
        foreach (svq_m[k]) if (g_addr[svq_m[k]] == lk_addr) begin eh = 1; ed = svq_d[k]; end
        check(lk_hit == eh && (!eh || lk_data == ed), "store forwarding");
        n_fwd += lk_hit;
      end
      n_stall += commit_stall;
      n_exc += exc_v;
      if (freq_level != 0) n_slow++;
      if (dut.svq_mem_v && dut.svq_mem_rdy && ft_on) n_release++;
      shrink_now = dut.ckpt_shrink && win.size() != 0;
      if (dut.ckpt_shrink) begin
        n_shrink++;
        check(svq_m.size() == 48 && pend.size() == 0 && n_retire == 0, "window shortened only when the SVQ is full and nothing can retire");
      end
      if (flush) begin
        n_rollback++;
        exp_rst.delete();
        for (int k = win.size() - 1; k >= 0; k--) if (win[k].dst) exp_rst.push_back(win[k]);
        exp_restart = win.size() != 0 ? win[0].seq : next_retire;
      end
      if (restore_v) begin
        n_restore++;
        check(exp_rst.size() != 0 && restore_ent.ldst == exp_rst[0].l && restore_ent.val_reg == exp_rst[0].vr &&
              restore_ent.val_chk == exp_rst[0].vc, "rollback restores saved values newest first");
        if (exp_rst.size() != 0) void'(exp_rst.pop_front());
      end
      if (resume) check(exp_rst.size() == 0 && restart_pc == pc_of(exp_restart), "restart point");
      if (hard_error) begin
        n_hard_cycles++;
        if (n_hard_cycles == 1) n_hard++;
        if (n_hard_cycles == 5) begin
          hard_ack = 1;
          foreach (g_fault[s]) if (g_fault[s] == 6) g_fault[s] = 0;   // faulty part taken out
        end
      end else begin
        n_hard_cycles = 0;
      end
      // ----- update at the clock edge -----
      @(posedge clk);
      for (int d = done_i.size() - 1; d >= 0; d--) begin
        int s;
        s = pend[done_i[d]].seq;
        if (g_fault[s] inside {1, 2, 3, 4}) fired[s] = 1;
        pend.delete(done_i[d]);
      end
      for (int i = 0; i < W; i++) if (chk_alloc[i].valid)
        pend.push_back('{idx: int'(chk_alloc[i].crob_idx), seq: seq_of(chk_alloc[i].pc),
                         ready: cyc + $urandom_range(1, 6)});
      for (int i = 0; i < int'(n_commit); i++) begin
        int s;
        s = next_commit + i;
        if (g_op[s] == OP_STORE) begin svq_m.push_back(s); svq_d.push_back(rob_slot[i].data); end
        if (g_fault[s] == 5) fired[s] = 1;
      end
      next_commit += int'(n_commit);
      if (!ft_on) next_retire = next_commit;
      for (int i = 0; i < int'(n_retire); i++) begin
        int s;
        s = next_retire + i;
        win.push_back('{seq: s, dst: g_dst[s], l: g_ldst[s], vr: rel_reg_val[i], vc: rel_chk_val[i]});
        if (g_dst[s]) check(rel_reg_v[i] && rel_chk_v[i] && rel_reg_preg[i] == g_regold[s], "registers released at retire");
        if (win.size() > CKPT) void'(win.pop_front());
      end
      if (shrink_now) void'(win.pop_front());
      next_retire += int'(n_retire);
      if (dut.svq_mem_v && dut.svq_mem_rdy) begin void'(svq_m.pop_front()); void'(svq_d.pop_front()); end   // store left the SVQ
      if (release_all) begin win.delete(); n_off++; end
      if (flush) begin pend.delete(); fe_halt = 1; end
      if (resume) begin
        next_commit = exp_restart; next_retire = exp_restart; win.delete(); fe_halt = 0;
        while (svq_m.size() != 0 && svq_m[$] >= exp_restart) begin void'(svq_m.pop_back()); void'(svq_d.pop_back()); end
      end
    end
    check(wr_idx == store_seqs.size(), "every store written exactly once");
    check(n_stall > 0, "commit stall");          check(n_ld > 0, "load checks");
    check(n_st > 0, "store checks");             check(n_br > 0, "branch checks");
    check(n_err_ld > 0, "load address error");   check(n_err_st > 0, "store error");
    check(n_err_br > 0, "branch error");         check(n_err_exc > 0, "exception mismatch");
    check(n_rollback > 0, "rollback");           check(n_restore > 0, "register restore");
    check(n_slow > 0, "lower frequency");        check(n_hard > 0, "hard error");
    check(n_off > 1, "checking switched off");   check(n_exc > 0, "exception serviced");
    check(n_shrink > 0, "window shortened for a store burst");
    check(n_fwd > 0, "store forwarding");        check(n_release > 0, "store released by checkpoint window");
    $display("cycles=%0d stalls=%0d ld=%0d st=%0d br=%0d err(ld/st/br/exc)=%0d/%0d/%0d/%0d rollbacks=%0d restores=%0d",
             cyc, n_stall, n_ld, n_st, n_br, n_err_ld, n_err_st, n_err_br, n_err_exc, n_rollback, n_restore);
    $display("slow_cycles=%0d hard=%0d off=%0d exc=%0d fwd=%0d released=%0d stores=%0d",
             n_slow, n_hard, n_off, n_exc, n_fwd, n_release, store_seqs.size());
    $display("window shortened=%0d cycles", n_shrink);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

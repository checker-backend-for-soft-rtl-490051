// tb_check_rob: self-checking test of the checkROB.
// A reference model tracks every allocated instruction (slot index, store
// flag, exception bits, completion). Each cycle the test allocates random
// groups, completes random in-flight slots out of order through the
// completion ports, validates the oldest unvalidated store, and toggles the
// retire enable. The model derives the expected in-order retire group
// (stop at the first incomplete entry, an unvalidated store, an exception
// seen by one side only -> err, an exception seen by both -> exc_v and stop)
// and the slots handed out, and compares them with the buffer's outputs.
module tb_check_rob;
  import chk_pkg::*;
  localparam int unsigned DEPTH = 16, AW = 6, CMPW = 4, RW = 6;
  localparam int unsigned IW = $clog2(DEPTH), CW = $clog2(DEPTH+1);
  logic clk = 0, rst_n = 0, flush = 0;
  logic [AW-1:0] alloc_v, alloc_has_dst, alloc_exc;
  op_e alloc_op [AW]; word_t alloc_pc [AW]; lreg_t alloc_ldst [AW];
  preg_t alloc_pdst [AW], alloc_chk_old [AW], alloc_reg_old [AW];
  logic [IW-1:0] alloc_idx [AW];
  logic [CW-1:0] free_cnt, count;
  logic [CMPW-1:0] cmp_v, cmp_exc; logic [IW-1:0] cmp_idx [CMPW];
  logic st_validated, ret_en; retire_t ret [RW];
  logic exc_v, err; word_t exc_pc, oldest_pc;
  int checks = 0, failures = 0, n_retired = 0, n_exc = 0, n_err = 0, n_st_wait = 0;

  typedef struct { int idx; word_t pc; bit st, dst, exc_r, exc_c, done, vld; lreg_t l; preg_t p, co, ro; } e_t;
  e_t model[$];
  int tail_m = 0;

  check_rob #(.DEPTH(DEPTH), .ALLOC_W(AW), .CMP_W(CMPW), .RET_W(RW)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s @%0t", what, $time); end
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    alloc_v = '0; cmp_v = '0; st_validated = 0; ret_en = 0; alloc_has_dst = '0; alloc_exc = '0; cmp_exc = '0;
    foreach (alloc_op[i]) begin alloc_op[i] = OP_ALU; alloc_pc[i] = '0; alloc_ldst[i] = '0;
      alloc_pdst[i] = '0; alloc_chk_old[i] = '0; alloc_reg_old[i] = '0; end
    foreach (cmp_idx[i]) cmp_idx[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 5000; cyc++) begin
      int n, nret, cands[$]; bit go, e_err, e_exc; int first_unv;
      @(negedge clk);
      check(count == CW'(model.size()) && free_cnt == CW'(DEPTH - model.size()), $sformatf("count/free dut=%0d model=%0d", count, model.size()));
      if (model.size() != 0) check(oldest_pc == model[0].pc, "oldest_pc");
      // allocation
      n = $urandom_range(0, AW); if (n > DEPTH - model.size()) n = DEPTH - model.size();
      alloc_v = '0;
      for (int i = 0, k = 0; i < AW; i++) begin
        alloc_op[i] = op_e'($urandom_range(0, 3));
        alloc_pc[i] = $urandom; alloc_has_dst[i] = 1'($urandom); alloc_ldst[i] = lreg_t'($urandom);
        alloc_pdst[i] = preg_t'($urandom); alloc_chk_old[i] = preg_t'($urandom); alloc_reg_old[i] = preg_t'($urandom);
        alloc_exc[i] = $urandom_range(0, 29) == 0;
        if (k < n && $urandom_range(0, 2) != 0) begin alloc_v[i] = 1; k++; end
      end
      // completions of distinct not-done entries
      cmp_v = '0;
      cands.delete();
      foreach (model[i]) if (!model[i].done) cands.push_back(i);
      cands.shuffle();
      for (int c = 0; c < CMPW; c++) begin
        cmp_exc[c] = 0;
        if (c < cands.size() && $urandom_range(0, 3) != 0) begin
          cmp_v[c] = 1; cmp_idx[c] = IW'(model[cands[c]].idx);
          cmp_exc[c] = model[cands[c]].exc_r ^ ($urandom_range(0, 49) == 0);
        end
      end
      // validate the oldest store not yet validated
      first_unv = -1;
      foreach (model[i]) if (model[i].st && !model[i].vld && first_unv < 0) first_unv = i;
      st_validated = first_unv >= 0 && $urandom_range(0, 2) == 0;
      ret_en = $urandom_range(0, 4) != 0;
      #1;
      // expected retire group
      go = ret_en; nret = 0; e_err = 0; e_exc = 0;
      for (int i = 0; i < RW; i++) begin
        if (go && i < model.size() && model[i].done) begin
          if (model[i].exc_r != model[i].exc_c) begin e_err = 1; go = 0; end
          else if (model[i].st && !model[i].vld) begin go = 0; n_st_wait++; end
          else begin
            nret++;
            if (model[i].exc_r) begin e_exc = 1; go = 0; end
          end
        end else go = 0;
      end
      for (int i = 0; i < RW; i++) begin
        if (i < nret) check(ret[i].valid && ret[i].pc == model[i].pc && ret[i].is_store == model[i].st &&
                            ret[i].ldst == model[i].l && ret[i].pdst == model[i].p &&
                            ret[i].chk_old_pdst == model[i].co && ret[i].reg_old_pdst == model[i].ro, "retire group");
        else check(!ret[i].valid, "no extra retire");
      end
      check(err == e_err && exc_v == e_exc, "err/exc");
      if (e_exc) check(exc_pc == model[nret-1].pc, "exc_pc");
      for (int i = 0, off = 0; i < AW; i++) begin
        check(int'(alloc_idx[i]) == (tail_m + off) % DEPTH, "alloc_idx");
        if (alloc_v[i]) off++;
      end
      @(posedge clk);
      n_retired += nret; if (e_exc) n_exc++; if (e_err) n_err++;
      for (int c = 0; c < CMPW; c++) if (cmp_v[c]) begin
        model[cands[c]].done = 1; model[cands[c]].exc_c = cmp_exc[c];
      end
      if (st_validated) model[first_unv].vld = 1;
      repeat (nret) void'(model.pop_front());
      for (int i = 0; i < AW; i++) if (alloc_v[i]) begin
        model.push_back('{idx: tail_m, pc: alloc_pc[i], st: alloc_op[i] == OP_STORE, dst: alloc_has_dst[i],
                          exc_r: alloc_exc[i], exc_c: 0, done: 0, vld: 0, l: alloc_ldst[i], p: alloc_pdst[i],
                          co: alloc_chk_old[i], ro: alloc_reg_old[i]});
        tail_m = (tail_m + 1) % DEPTH;
      end
      if (e_err || cyc % 900 == 899) begin
        @(negedge clk); alloc_v = '0; cmp_v = '0; st_validated = 0; ret_en = 0; flush = 1;
        @(posedge clk); model.delete(); tail_m = 0;
        @(negedge clk); flush = 0;
        check(count == 0, "flush empties");
      end
    end
    check(n_retired > 1000 && n_exc > 0 && n_err > 0 && n_st_wait > 0, "all retire cases seen");
    $display("retired=%0d exc=%0d err=%0d store_waits=%0d", n_retired, n_exc, n_err, n_st_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

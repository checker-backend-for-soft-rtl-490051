// tb_checker_rename: self-checking test of the checker rename logic.
// A reference model keeps its own speculative map, retirement map and free
// set. Random groups of lanes (some with destinations, sources naming
// registers written by earlier lanes of the same group) are renamed; the
// model predicts the lowest-numbered free registers and the forwarded
// source mappings. Retirements free the previous mappings in order, and an
// occasional flush must restore the retirement map and free set. A check
// that no physical register is ever handed out twice is included.
module tb_checker_rename;
  import chk_pkg::*;
  localparam int unsigned W = 6, RW = 6;
  logic clk = 0, rst_n = 0, flush = 0;
  logic [W-1:0] v, has_dst;
  lreg_t ldst [W], lsrc1 [W], lsrc2 [W];
  preg_t psrc1 [W], psrc2 [W], pdst [W], old_pdst [W];
  logic [$clog2(NUM_PREG+1)-1:0] free_cnt;
  retire_t ret [RW];
  int checks = 0, failures = 0;

  int rat[NUM_LREG], rrat[NUM_LREG];
  bit free_m[NUM_PREG];
  typedef struct { bit dst; int l, p, old; } inf_t;
  inf_t inflight[$];

  checker_rename #(.W(W), .RET_W(RW)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s @%0t", what, $time); end
  endtask

  function automatic int nfree();
    int c = 0;
    foreach (free_m[p]) c += free_m[p];
    return c;
  endfunction

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    v = '0; has_dst = '0;
    foreach (ldst[i]) begin ldst[i] = '0; lsrc1[i] = '0; lsrc2[i] = '0; end
    foreach (ret[i]) ret[i] = '0;
    foreach (rat[l]) begin rat[l] = l; rrat[l] = l; end
    foreach (free_m[p]) free_m[p] = p >= NUM_LREG;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 5000; cyc++) begin
      int nd, nr, m_rat[NUM_LREG]; bit m_free[NUM_PREG]; inf_t grp[$];
      @(negedge clk);
      check(int'(free_cnt) == nfree(), "free_cnt");
      // retire the oldest in-flight instructions
      nr = $urandom_range(0, RW); if (nr > inflight.size()) nr = inflight.size();
      for (int r = 0; r < RW; r++) begin
        ret[r] = '0;
        if (r < nr) ret[r] = '{valid: 1, pc: '0, is_store: 0, has_dst: inflight[r].dst,
                               ldst: lreg_t'(inflight[r].l), pdst: preg_t'(inflight[r].p),
                               chk_old_pdst: preg_t'(inflight[r].old), reg_old_pdst: '0};
      end
      // rename a group
      m_rat = rat; m_free = free_m; nd = 0; grp.delete();
      v = '0;
      for (int i = 0; i < W; i++) begin
        has_dst[i] = 1'($urandom); ldst[i] = lreg_t'($urandom); lsrc1[i] = lreg_t'($urandom); lsrc2[i] = lreg_t'($urandom);
        if ($urandom_range(0, 3) != 0 && (!has_dst[i] || nd < nfree())) begin
          v[i] = 1; if (has_dst[i]) nd++;
        end else v[i] = 0;
      end
      // lanes must form no gaps only in the commit stage; here any lane may be idle
      #1;
      for (int i = 0; i < W; i++) begin
        if (v[i]) begin
          check(int'(psrc1[i]) == m_rat[lsrc1[i]] && int'(psrc2[i]) == m_rat[lsrc2[i]], "source mapping");
          check(int'(old_pdst[i]) == m_rat[ldst[i]], "old mapping");
          if (has_dst[i]) begin
            int exp_p;
            exp_p = -1;
            foreach (m_free[p]) if (m_free[p] && exp_p < 0) exp_p = p;
            check(int'(pdst[i]) == exp_p, $sformatf("pdst %0d exp %0d", pdst[i], exp_p));
            m_free[exp_p] = 0;
            grp.push_back('{dst: 1, l: ldst[i], p: exp_p, old: m_rat[ldst[i]]});
            m_rat[ldst[i]] = exp_p;
          end else grp.push_back('{dst: 0, l: 0, p: 0, old: 0});
        end
      end
      @(posedge clk);
      rat = m_rat; free_m = m_free;
      for (int r = 0; r < nr; r++) begin
        inf_t e;
        e = inflight.pop_front();
        if (e.dst) begin rrat[e.l] = e.p; check(!free_m[e.old], "double free"); free_m[e.old] = 1; end
      end
      foreach (grp[g]) inflight.push_back(grp[g]);
      if (cyc % 300 == 299) begin
        @(negedge clk); v = '0; foreach (ret[i]) ret[i] = '0; flush = 1;
        @(posedge clk);
        rat = rrat; inflight.delete();
        foreach (free_m[p]) free_m[p] = 1;
        foreach (rrat[l]) free_m[rrat[l]] = 0;
        @(negedge clk); flush = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

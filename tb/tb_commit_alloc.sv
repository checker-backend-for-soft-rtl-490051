// tb_commit_alloc: self-checking test of commit gating.
// Random ROB-head groups (a valid prefix of random instruction classes) and
// random free counts for the checkROB, LVQ, SVQ, BVQ and checker registers
// are applied; an independent model computes how many instructions may
// commit in order before the first one that finds its structure full, and
// which of them go to each queue. Covers checking off (only SVQ room
// matters, nothing is allocated) and hold.
module tb_commit_alloc;
  import chk_pkg::*;
  localparam int unsigned W = 6, CNT_W = 9;
  commit_t slot [W];
  logic ft_on, hold;
  logic [CNT_W-1:0] crob_free, lvq_free, svq_free, bvq_free, preg_free;
  logic [W-1:0] commit_v, alloc_v, ld_push, st_push, br_push;
  logic [$clog2(W+1)-1:0] n_commit;
  logic stall;
  int checks = 0, failures = 0, n_stall = 0;

  commit_alloc #(.W(W), .CNT_W(CNT_W)) dut (.*);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 20000; t++) begin
      int nv, k, nall, nl, ns, nb, nd; bit blocked, e_stall; logic [W-1:0] e_commit;
      nv = $urandom_range(0, W);
      for (int i = 0; i < W; i++) begin
        slot[i] = '0;
        slot[i].valid = i < nv;
        slot[i].op = op_e'($urandom_range(0, 3));
        slot[i].has_dst = 1'($urandom);
      end
      ft_on = $urandom_range(0, 4) != 0;
      hold = $urandom_range(0, 9) == 0;
      crob_free = CNT_W'($urandom_range(0, 8)); lvq_free = CNT_W'($urandom_range(0, 3));
      svq_free = CNT_W'($urandom_range(0, 3)); bvq_free = CNT_W'($urandom_range(0, 3));
      preg_free = CNT_W'($urandom_range(0, 5));
      // model
      e_commit = '0; blocked = hold; e_stall = 0;
      nall = 0; nl = 0; ns = 0; nb = 0; nd = 0;
      for (int i = 0; i < nv; i++) begin
        bit need_ok;
        if (ft_on)
          need_ok = nall + 1 <= crob_free && (slot[i].op != OP_LOAD || nl + 1 <= lvq_free) &&
                    (slot[i].op != OP_STORE || ns + 1 <= svq_free) &&
                    (slot[i].op != OP_BRANCH || nb + 1 <= bvq_free) && (!slot[i].has_dst || nd + 1 <= preg_free);
        else
          need_ok = slot[i].op != OP_STORE || ns + 1 <= svq_free;
        if (!blocked && need_ok) begin
          e_commit[i] = 1; nall++;
          nl += slot[i].op == OP_LOAD; ns += slot[i].op == OP_STORE;
          nb += slot[i].op == OP_BRANCH; nd += slot[i].has_dst;
        end else begin
          if (!blocked) e_stall = 1;
          blocked = 1;
        end
      end
      #1;
      check(commit_v == e_commit && int'(n_commit) == $countones(e_commit), "committed prefix");
      check(stall == e_stall, "stall flag");
      for (int i = 0; i < W; i++) begin
        check(alloc_v[i] == (e_commit[i] && ft_on), "alloc");
        check(ld_push[i] == (e_commit[i] && ft_on && slot[i].op == OP_LOAD), "lvq push");
        check(st_push[i] == (e_commit[i] && slot[i].op == OP_STORE), "svq push");
        check(br_push[i] == (e_commit[i] && ft_on && slot[i].op == OP_BRANCH), "bvq push");
      end
      n_stall += e_stall;
      #1;
    end
    check(n_stall > 1000, "stalls exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_ckpt_buf: self-checking test of the checkpoint buffer.
// Random groups of retired instructions are written; a reference queue
// keeps the last DEPTH of them. Checked each cycle: the fill count and the
// number of stores pushed out of the window (these are the stores that may
// now be written to memory). Periodically a rollback walk is started: the
// entries must come out newest first, one per cycle, with `rst_v` only for
// entries that have a destination, then `undo_done`, an empty buffer and the
// restart PC of the oldest entry. The walk length (one cycle per entry) is
// checked, as are `clear` and `shrink` (one oldest entry given up in a
// cycle without writes).
module tb_ckpt_buf;
  import chk_pkg::*;
  localparam int unsigned DEPTH = 16, W = 6;
  logic clk = 0, rst_n = 0, clear = 0, shrink = 0;
  logic [W-1:0] wr_v; ckpt_t wr_ent [W];
  logic [$clog2(W+1)-1:0] rel_stores;
  logic [$clog2(DEPTH+1)-1:0] count;
  logic undo_start, undo_busy, rst_v, undo_done, restart_v;
  ckpt_t rst_ent; word_t restart_pc;
  int checks = 0, failures = 0, n_rel = 0, n_undo = 0, n_shrink = 0;
  ckpt_t model[$];

  ckpt_buf #(.DEPTH(DEPTH), .W(W)) dut (.*);

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
    wr_v = '0; undo_start = 0;
    foreach (wr_ent[i]) wr_ent[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      int n_in, n_ev, exp_rel;
      @(negedge clk);
      check(int'(count) == model.size(), "count");
      wr_v = '0;
      for (int i = 0; i < W; i++) begin
        wr_ent[i] = '{pc: $urandom, is_store: $urandom_range(0, 3) == 0, has_dst: 1'($urandom),
                      ldst: lreg_t'($urandom), val_reg: $urandom, val_chk: $urandom};
        wr_v[i] = $urandom_range(0, 2) != 0;
      end
      if ($urandom_range(0, 7) == 0) wr_v = '0;
      shrink = $urandom_range(0, 3) == 0;
      n_in = $countones(wr_v);
      n_ev = model.size() + n_in - DEPTH; if (n_ev < 0) n_ev = 0;
      if (shrink && n_in == 0 && model.size() != 0) begin n_ev = 1; n_shrink++; end
      exp_rel = 0;
      for (int k = 0; k < n_ev; k++) exp_rel += model[k].is_store;
      #1; check(int'(rel_stores) == exp_rel, "released stores");
      n_rel += exp_rel;
      @(posedge clk);
      repeat (n_ev) void'(model.pop_front());
      for (int i = 0; i < W; i++) if (wr_v[i]) model.push_back(wr_ent[i]);
      if (cyc % 97 == 96) begin
        word_t first_pc;
        int steps, n0;
        @(negedge clk); wr_v = '0; shrink = 0; undo_start = 1;
        first_pc = model.size() != 0 ? model[0].pc : '0;
        n0 = model.size();
        @(negedge clk); undo_start = 0;
        check(restart_v == (model.size() != 0) && (model.size() == 0 || restart_pc == first_pc), "restart pc");
        steps = 0;
        while (!undo_done && steps < 2 * DEPTH) begin
          if (model.size() != 0) begin
            check(undo_busy && rst_v == model[$].has_dst && rst_ent == model[$], "undo order newest first");
            void'(model.pop_back());
          end
          steps++;
          @(negedge clk);
        end
        check(undo_done && steps == n0 + 1, $sformatf("undo takes one cycle per entry (%0d for %0d)", steps, n0));
        check(count == 0 && model.size() == 0, "empty after undo");
        n_undo++;
      end
      if (cyc % 501 == 500) begin
        @(negedge clk); wr_v = '0; shrink = 0; clear = 1;
        @(negedge clk); clear = 0; model.delete();
        check(count == 0, "clear");
      end
    end
    check(n_rel > 100 && n_undo > 10 && n_shrink > 20, "stores released, rollbacks walked, window shortened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

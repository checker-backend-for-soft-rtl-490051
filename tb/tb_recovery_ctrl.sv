// tb_recovery_ctrl: directed test of the recovery sequencer.
// 1) An error during normal operation: one flush/undo_start cycle with the
//    frequency lowered one step, the undo phase (busy), resume with the
//    checkpoint restart PC in the cycle undo_done arrives, then re-execution
//    until as many instructions retired as were in flight (cycle-exact),
//    after which the frequency returns to nominal.
// 2) An empty checkpoint window: the restart PC is the checkROB's oldest PC
//    captured when the error was seen.
// 3) Errors that persist: each new trial lowers the frequency further; the
//    error after MAX_TRIALS trials raises hard_error until hard_ack, which
//    starts one more rollback at nominal frequency.
module tb_recovery_ctrl;
  import chk_pkg::*;
  localparam int unsigned MT = 3, CNT_W = 9, RW = 6;
  logic clk = 0, rst_n = 0;
  logic err, undo_done, ckpt_restart_v, hard_ack;
  logic [CNT_W-1:0] inflight; word_t crob_oldest_pc, ckpt_restart_pc, restart_pc;
  logic [$clog2(RW+1)-1:0] n_ret;
  logic flush, undo_start, busy, resume, hard_error, in_reexec;
  logic [$clog2(MT+1)-1:0] freq_level;
  int checks = 0, failures = 0;

  recovery_ctrl #(.MAX_TRIALS(MT), .CNT_W(CNT_W), .RET_W(RW)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s @%0t", what, $time); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic rollback(int trial, bit ck_v, word_t exp_pc);
    // called at a negedge with err just raised
    @(negedge clk); err = 0;
    check(flush && undo_start && busy && int'(freq_level) == trial, "flush cycle");
    @(negedge clk);
    check(!flush && !undo_start && busy, "undo phase");
    repeat (3) begin @(negedge clk); check(busy && !resume, "still undoing"); end
    undo_done = 1; ckpt_restart_v = ck_v; ckpt_restart_pc = 32'h100;
    #1; check(resume && restart_pc == exp_pc, "resume with restart pc");
    @(negedge clk); undo_done = 0;
    check(in_reexec && !busy && int'(freq_level) == trial, "re-execution at lower frequency");
  endtask

  initial begin
    err = 0; undo_done = 0; ckpt_restart_v = 0; hard_ack = 0; inflight = '0;
    crob_oldest_pc = 32'h200; ckpt_restart_pc = '0; n_ret = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!busy && freq_level == 0 && !hard_error, "idle after reset");
    // 1) single error, fixed by re-execution
    inflight = 10; err = 1;
    rollback(1, 1, 32'h100);
    n_ret = 3;
    repeat (3) begin @(negedge clk); check(in_reexec, "re-executing"); end
    @(negedge clk); n_ret = 0;   // 4 * 3 >= 10 retired: back to normal
    check(!in_reexec && freq_level == 0, "fixed after the rolled-back window");
    // 2) empty checkpoint window: restart from the checkROB head
    crob_oldest_pc = 32'h2c0; inflight = 2; err = 1;
    @(negedge clk); crob_oldest_pc = 32'h999;   // later changes must not matter
    err = 1;
    // the first err above was taken; this extra one is ignored during flush
    check(flush, "flush");
    @(negedge clk); err = 0;
    repeat (2) @(negedge clk);
    undo_done = 1; ckpt_restart_v = 0; #1;
    check(resume && restart_pc == 32'h2c0, "restart at checkROB head");
    @(negedge clk); undo_done = 0; n_ret = 2;
    @(negedge clk); n_ret = 0;
    check(!in_reexec && freq_level == 0, "fixed");
    // 3) persistent error
    inflight = 50; err = 1;
    rollback(1, 1, 32'h100);
    err = 1; rollback(2, 1, 32'h100);
    err = 1; rollback(3, 1, 32'h100);
    err = 1;
    @(negedge clk); err = 0;
    check(hard_error && busy && !flush, "hard error after repeated failures");
    repeat (5) begin @(negedge clk); check(hard_error, "hard error holds"); end
    hard_ack = 1; @(negedge clk); hard_ack = 0;
    check(!hard_error && flush && freq_level == 0, "hard_ack rolls back at nominal frequency");
    @(negedge clk); undo_done = 1; ckpt_restart_v = 1; #1;
    check(resume && restart_pc == 32'h100, "resume after hard error");
    @(negedge clk); undo_done = 0; n_ret = 6;
    repeat (9) @(negedge clk);
    n_ret = 0;
    check(!busy && !in_reexec && freq_level == 0, "normal after re-execution");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

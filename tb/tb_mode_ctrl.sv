// tb_mode_ctrl: directed test of the checking on/off control.
// Checks: checking is on after reset; a disable request holds commit and
// waits while the checkROB is not empty, stores are unchecked or a recovery
// is running; the switch then takes one release cycle (release_all and
// ckpt_clear) and turns checking off; re-enabling takes effect in the next
// cycle; a renewed enable request during the drain aborts it.
module tb_mode_ctrl;
  logic clk = 0, rst_n = 0;
  logic ft_req, crob_empty, svq_unchecked_empty, rec_busy;
  logic ft_on, hold_commit, release_all, ckpt_clear;
  int checks = 0, failures = 0;

  mode_ctrl dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s @%0t", what, $time); end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ft_req = 1; crob_empty = 0; svq_unchecked_empty = 0; rec_busy = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(ft_on && !hold_commit && !release_all, "on after reset");
    ft_req = 0;
    @(negedge clk);
    check(ft_on && hold_commit && !release_all, "draining");
    repeat (3) begin @(negedge clk); check(hold_commit && !release_all, "wait for checkROB"); end
    crob_empty = 1;
    repeat (2) begin @(negedge clk); check(hold_commit && !release_all, "wait for stores"); end
    svq_unchecked_empty = 1; rec_busy = 1;
    @(negedge clk); check(hold_commit && !release_all, "wait for recovery");
    rec_busy = 0; #1;
    check(release_all && ckpt_clear && ft_on, "release cycle");
    @(negedge clk);
    check(!ft_on && !hold_commit && !release_all, "off");
    repeat (3) begin @(negedge clk); check(!ft_on, "stays off"); end
    ft_req = 1;
    @(negedge clk); check(ft_on && !hold_commit, "on again");
    // abort a drain
    crob_empty = 0; ft_req = 0;
    @(negedge clk); check(hold_commit, "draining again");
    ft_req = 1;
    @(negedge clk); check(ft_on && !hold_commit, "drain aborted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

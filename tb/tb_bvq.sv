// tb_bvq: self-checking test of the Branch Value Queue.
// Random committed branch outcomes are mirrored in a reference queue; the
// checker's re-executed branches pop them. An error is expected exactly when
// the taken bit differs, or the branch is taken and the target differs
// (a not-taken branch with another target is not an error).
module tb_bvq;
  import chk_pkg::*;
  localparam int unsigned DEPTH = 16, PW = 6;
  logic clk = 0, rst_n = 0, flush = 0;
  logic [PW-1:0] push_v;
  br_rec_t push_rec [PW];
  logic [$clog2(DEPTH+1)-1:0] free_cnt, count;
  logic chk_v, chk_taken; word_t chk_target; logic err;
  int checks = 0, failures = 0;
  br_rec_t model[$];

  bvq #(.DEPTH(DEPTH), .PUSH_W(PW)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push_v = '0; chk_v = 0; chk_taken = 0; chk_target = '0;
    foreach (push_rec[i]) push_rec[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      int n, kind; bit exp_err;
      @(negedge clk);
      check(count == model.size(), "count");
      check(free_cnt == DEPTH - model.size(), "free_cnt");
      n = $urandom_range(0, PW);
      if (n > DEPTH - model.size()) n = DEPTH - model.size();
      push_v = '0;
      for (int i = 0, k = 0; i < PW; i++) begin
        push_rec[i] = '{taken: 1'($urandom), target: $urandom};
        if (k < n && $urandom_range(0, 1)) begin push_v[i] = 1; k++; end
      end
      chk_v = $urandom_range(0, 2) != 0 && model.size() != 0;
      if (chk_v) begin
        kind = $urandom_range(0, 9);   // 0: flip taken, 1: other target, else correct
        chk_taken  = (kind == 0) ? !model[0].taken : model[0].taken;
        chk_target = (kind == 1) ? model[0].target + 4 : model[0].target;
        exp_err = kind == 0 || (kind == 1 && model[0].taken);
        #1; check(err == exp_err, $sformatf("err kind=%0d taken=%0d", kind, model[0].taken));
      end else begin
        #1; check(!err, "no err when idle");
      end
      @(posedge clk);
      if (chk_v) void'(model.pop_front());
      for (int i = 0; i < PW; i++) if (push_v[i]) model.push_back(push_rec[i]);
      if (cyc % 700 == 699) begin
        @(negedge clk); push_v = '0; chk_v = 0; flush = 1;
        @(posedge clk); model.delete();
        @(negedge clk); flush = 0;
        check(count == 0, "flush empties");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

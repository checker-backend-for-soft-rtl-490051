// tb_lvq: self-checking test of the Load Value Queue.
// Random bursts of committed loads (0..PUSH_W per cycle, never beyond the
// reported free space) are mirrored in a reference queue; checker loads pop
// them and must get the oldest data, with an error only when the address
// differs. Also checks the free count, underflow detection and flush.
module tb_lvq;
  import chk_pkg::*;
  localparam int unsigned DEPTH = 8, PW = 6;
  logic clk = 0, rst_n = 0, flush = 0;
  logic [PW-1:0] push_v;
  mem_rec_t push_rec [PW];
  logic [$clog2(DEPTH+1)-1:0] free_cnt, count;
  logic chk_v; word_t chk_addr, chk_data; logic err;
  int checks = 0, failures = 0;
  mem_rec_t model[$];

  lvq #(.DEPTH(DEPTH), .PUSH_W(PW)) dut (.*);

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
    push_v = '0; chk_v = 0; chk_addr = '0;
    foreach (push_rec[i]) push_rec[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      int n, room; bit bad;
      @(negedge clk);
      check(count == model.size(), "count");
      check(free_cnt == DEPTH - model.size(), "free_cnt");
      room = DEPTH - model.size();
      n = $urandom_range(0, PW);
      if (n > room) n = room;
      push_v = '0;
      for (int i = 0, k = 0; i < PW; i++) begin
        push_rec[i] = '{addr: $urandom, data: $urandom};
        if (k < n && $urandom_range(0, 1)) begin push_v[i] = 1; k++; end
      end
      chk_v = $urandom_range(0, 2) != 0 && model.size() != 0;
      bad = $urandom_range(0, 9) == 0;
      if (chk_v) begin
        chk_addr = bad ? model[0].addr ^ 32'h4 : model[0].addr;
        #1;
        check(chk_data == model[0].data, "chk_data");
        check(err == bad, "err on address mismatch");
      end else begin
        #1; check(!err, "no err when idle");
      end
      @(posedge clk);
      if (chk_v) void'(model.pop_front());
      for (int i = 0; i < PW; i++) if (push_v[i]) model.push_back(push_rec[i]);
      if (cyc % 500 == 499) begin
        @(negedge clk); push_v = '0; chk_v = 0; flush = 1;
        @(posedge clk); model.delete();
        @(negedge clk); flush = 0;
        check(count == 0, "flush empties");
      end
    end
    // underflow: a checker load with nothing committed is an error
    @(negedge clk); push_v = '0; flush = 1; @(negedge clk); flush = 0;
    chk_v = 1; chk_addr = 0; #1; check(err, "underflow flagged");
    @(negedge clk); chk_v = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

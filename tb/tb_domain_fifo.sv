// tb_domain_fifo: self-checking test of the dual-clock FIFO.
// Three phases with different clock ratios (write faster, read faster,
// nearly equal). Random words are offered with a random valid and read
// with a random ready; every word must arrive once, in order. Also checks
// that the FIFO does fill up (full seen) and that a word written into an
// empty FIFO appears on the read side within 4 read clocks.
module tb_domain_fifo;
  localparam int unsigned DEPTH = 8;
  logic rst_n = 0, wclk = 0, rclk = 0;
  logic w_v, w_full, r_v, r_rdy;
  logic [31:0] w_data, r_data;
  int checks = 0, failures = 0, n_full = 0;
  logic [31:0] sent[$];
  int wper = 5, rper = 7;
  bit running = 1;

  domain_fifo #(.T(logic [31:0]), .DEPTH(DEPTH)) dut (.*);

  always #(wper) wclk = ~wclk;
  always #(rper) rclk = ~rclk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s @%0t", what, $time); end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // writer
  initial begin
    w_v = 0; w_data = '0;
    repeat (6) @(posedge wclk);
    while (running) begin
      bit acc;
      @(negedge wclk);
      w_v = $urandom_range(0, 3) != 0;
      if (w_v) w_data = $urandom;
      acc = w_v && !w_full;          // flags change only at the clock edge
      if (w_full) n_full++;
      @(posedge wclk);
      if (acc) sent.push_back(w_data);
    end
    @(negedge wclk) w_v = 0;
  end

  // reader
  initial begin
    r_rdy = 0;
    repeat (6) @(posedge rclk);
    forever begin
      bit take;
      @(negedge rclk);
      r_rdy = $urandom_range(0, 3) != 0;
      take = r_v && r_rdy;
      if (take) begin
        check(sent.size() != 0 && r_data == sent[0], $sformatf("order and value got %h exp %h n=%0d", r_data, sent.size() ? sent[0] : 0, sent.size()));
        if (sent.size() != 0) void'(sent.pop_front());
      end
      @(posedge rclk);
    end
  end

  initial begin
    repeat (4) @(posedge rclk);
    rst_n = 1;
    #60000; wper = 9; rper = 4;
    #60000; wper = 6; rper = 5;
    #60000; running = 0;
    #2000;
    check(sent.size() == 0, "everything delivered");
    check(n_full > 0, "full reached");
    // latency from an empty FIFO
    @(negedge wclk); w_v = 1; w_data = 32'hCAFE_F00D;
    sent.push_back(w_data);
    @(posedge wclk); #1 w_v = 0;
    begin
      int k;
      k = 0;
      while (!r_v && k < 10) begin @(posedge rclk); k++; end
      check(r_v && k <= 4, $sformatf("visible after %0d read clocks", k));
    end
    #1000;
    check(sent.size() == 0, "last word delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

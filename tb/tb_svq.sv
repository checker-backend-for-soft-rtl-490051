// tb_svq: self-checking test of the Store Value Queue.
// A reference model keeps every queued store with its state (allowed to
// write / validated / pending). Each cycle the test commits random stores
// within the expected free space (limited both by the total size and by the
// number of non-validated entries), validates the oldest pending store with a
// correct or corrupted value, releases stores from the checkpoint window,
// drains memory with a random ready, and searches a random address. Checked:
// free count, error/validated flags, the order and values written to memory
// (only released stores), youngest-match forwarding, flush (drops all stores
// not yet allowed), and the unchecked mode entered through release_all.
module tb_svq;
  import chk_pkg::*;
  localparam int unsigned NV = 16, EXTRA = 32, PW = 6, RW = 6, DEPTH = NV + EXTRA;
  localparam int unsigned CW = $clog2(DEPTH+1);
  logic clk = 0, rst_n = 0, flush = 0, ft_on = 1;
  logic [PW-1:0] push_v; mem_rec_t push_rec [PW];
  logic [CW-1:0] free_cnt, cnt_alw, cnt_vld, cnt_pend;
  logic chk_v; word_t chk_addr, chk_data; logic err, validated;
  logic [$clog2(RW+1)-1:0] release_n; logic release_all;
  logic mem_v, mem_rdy; word_t mem_addr, mem_data;
  word_t lk_addr, lk_data; logic lk_hit;
  int checks = 0, failures = 0, writes = 0, hits = 0;

  typedef struct { mem_rec_t r; int st; } m_t;   // st: 0 allowed, 1 validated, 2 pending
  m_t model[$];

  svq #(.NV(NV), .EXTRA(EXTRA), .PUSH_W(PW), .REL_W(RW)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s @%0t", what, $time); end
  endtask

  function automatic int cnt(int st);
    int c = 0;
    foreach (model[i]) if (model[i].st == st) c++;
    return c;
  endfunction

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(int cyc, bit ft);
    int n, exp_free, first_pend, nrel, rel_left; bit bad, exp_hit; word_t exp_data;
    @(negedge clk);
    exp_free = DEPTH - model.size();
    if (ft && NV - cnt(2) < exp_free) exp_free = NV - cnt(2);
    check(free_cnt == CW'(exp_free), $sformatf("free_cnt %0d exp %0d", free_cnt, exp_free));
    check(cnt_alw == CW'(cnt(0)) && cnt_vld == CW'(cnt(1)) && cnt_pend == CW'(cnt(2)), "counts");
    n = $urandom_range(0, PW); if (n > exp_free) n = exp_free;
    push_v = '0;
    for (int i = 0, k = 0; i < PW; i++) begin
      push_rec[i] = '{addr: {28'h0, 4'($urandom)}, data: $urandom};
      if (k < n && $urandom_range(0, 1)) begin push_v[i] = 1; k++; end
    end
    first_pend = -1;
    foreach (model[i]) if (model[i].st == 2 && first_pend < 0) first_pend = i;
    chk_v = ft && first_pend >= 0 && $urandom_range(0, 1);
    bad = $urandom_range(0, 7) == 0;
    if (chk_v) begin
      chk_addr = model[first_pend].r.addr;
      chk_data = model[first_pend].r.data ^ (bad ? 32'h100 : 32'h0);
    end
    release_n = ft ? ($clog2(RW+1))'($urandom_range(0, 3)) : '0;
    release_all = 0;
    mem_rdy = $urandom_range(0, 3) != 0;
    lk_addr = {28'h0, 4'($urandom)};
    #1;
    check(err == (chk_v && bad), "err");
    check(validated == (chk_v && !bad), "validated");
    check(mem_v == (cnt(0) != 0), "mem_v");
    if (mem_v && cnt(0) != 0) check(mem_addr == model[0].r.addr && mem_data == model[0].r.data, "mem order");
    exp_hit = 0; exp_data = '0;
    foreach (model[i]) if (model[i].r.addr == lk_addr) begin exp_hit = 1; exp_data = model[i].r.data; end
    check(lk_hit == exp_hit && (!exp_hit || lk_data == exp_data), "lookup youngest match");
    if (lk_hit) hits++;
    @(posedge clk);
    // model update: release (from the stores validated before this cycle), validate, write, push
    rel_left = release_n;
    foreach (model[i]) if (model[i].st == 1 && rel_left > 0) begin model[i].st = 0; rel_left--; end
    if (chk_v && !bad) model[first_pend].st = 1;
    if (mem_v && mem_rdy) begin void'(model.pop_front()); writes++; end
    for (int i = 0; i < PW; i++) if (push_v[i]) model.push_back('{r: push_rec[i], st: ft ? 2 : 0});
  endtask

  initial begin
    push_v = '0; chk_v = 0; chk_addr = '0; chk_data = '0; release_n = '0; release_all = 0;
    mem_rdy = 0; lk_addr = '0;
    foreach (push_rec[i]) push_rec[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      step(cyc, 1);
      if (cyc % 400 == 399) begin
        int keep;
        @(negedge clk); push_v = '0; chk_v = 0; release_n = '0; mem_rdy = 0; flush = 1;
        @(posedge clk);
        keep = cnt(0);
        while (model.size() > keep) void'(model.pop_back());
        @(negedge clk); flush = 0;
        check(cnt_vld == 0 && cnt_pend == 0 && cnt_alw == CW'(keep), "flush keeps only allowed stores");
      end
    end
    // switch to unchecked mode: validate the rest, then release_all
    @(negedge clk); push_v = '0; release_n = '0; mem_rdy = 0;
    while (cnt(2) != 0) begin
      int fp;
      fp = -1;
      foreach (model[i]) if (model[i].st == 2 && fp < 0) fp = i;
      chk_v = 1; chk_addr = model[fp].r.addr; chk_data = model[fp].r.data;
      @(posedge clk); model[fp].st = 1; @(negedge clk);
    end
    chk_v = 0; release_all = 1;
    @(posedge clk); foreach (model[i]) model[i].st = 0;
    @(negedge clk); release_all = 0; ft_on = 0;
    check(cnt_vld == 0 && cnt_alw == CW'(model.size()), "release_all");
    for (int cyc = 0; cyc < 500; cyc++) step(cyc, 0);
    check(writes > 500, "stores reached memory");
    check(hits > 100, "forwarding exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// mpush_fifo: circular FIFO that accepts several writes and one read per cycle.
//
// Used as the storage of the load and branch value queues, which are filled at
// commit (up to PUSH_W instructions per cycle) and drained one record at a time,
// in program order, by the checker cluster. Push lanes are compacted: the
// valid lanes of a cycle are written to consecutive slots in lane order. The
// caller must not push more than `free_cnt` records; `head` is the oldest
// record and is valid while `count` is non-zero. A pop and pushes may occur in
// the same cycle. `flush` empties the queue (used on rollback).
module mpush_fifo #(
  parameter type         T      = logic [31:0],
  parameter int unsigned DEPTH  = 8,
  parameter int unsigned PUSH_W = 6
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     flush,
  input  logic [PUSH_W-1:0]        push_v,
  input  T                         push_d [PUSH_W],
  input  logic                     pop,
  output T                         head,
  output logic [$clog2(DEPTH+1)-1:0] count,
  output logic [$clog2(DEPTH+1)-1:0] free_cnt
);
  localparam int unsigned IW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH+1);

  T                mem [DEPTH];
  logic [IW-1:0]   rd_ptr, wr_ptr;
  logic [CW-1:0]   n_push;

  function automatic logic [IW-1:0] wrap_add(logic [IW-1:0] p, int unsigned k);
    int unsigned s;
    s = int'(p) + k;
    if (s >= DEPTH) s = s - DEPTH;
    return IW'(s);
  endfunction

  always_comb begin
    n_push = '0;
    for (int i = 0; i < PUSH_W; i++) n_push = n_push + CW'(push_v[i]);
  end

  assign head     = mem[rd_ptr];
  assign free_cnt = CW'(DEPTH) - count;

  always_ff @(posedge clk) begin
    int unsigned off;
    if (!rst_n || flush) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      off = 0;
      for (int i = 0; i < PUSH_W; i++) begin
        if (push_v[i]) begin
          mem[wrap_add(wr_ptr, off)] <= push_d[i];
          off++;
        end
      end
      wr_ptr <= wrap_add(wr_ptr, off);
      if (pop) rd_ptr <= wrap_add(rd_ptr, 1);
      count <= count + n_push - CW'(pop);
    end
  end

  // Handshake rules: no overflow, no read from an empty queue.
  assert property (@(posedge clk) disable iff (!rst_n || flush) n_push <= free_cnt)
    else $error("mpush_fifo overflow");
  assert property (@(posedge clk) disable iff (!rst_n || flush) pop |-> count != 0)
    else $error("mpush_fifo pop while empty");
endmodule

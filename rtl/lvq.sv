// lvq: Load Value Queue of the checker backend.
//
// When a load commits, its address and loaded data enter the LVQ instead of
// being fetched again: the checker cluster never accesses the cache. Loads are
// re-executed by the checker in program order with respect to other loads; each
// re-executed load presents its recomputed address, takes the data of the
// oldest LVQ record (`chk_data`, same cycle) and removes it. An address
// mismatch raises `err` in that cycle. The queue is a plain FIFO (8 entries as
// in the evaluated configuration), filled by up to PUSH_W loads per commit
// cycle; commit must stall when `free_cnt` is too small. Timing: `chk_data` and
// `err` are combinational from `chk_v`/`chk_addr`; the record is removed at
// the next clock edge. `flush` empties the queue on rollback.
module lvq
  import chk_pkg::*;
#(
  parameter int unsigned DEPTH  = 8,
  parameter int unsigned PUSH_W = 6
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       flush,
  // commit side
  input  logic [PUSH_W-1:0]          push_v,
  input  mem_rec_t                   push_rec [PUSH_W],
  output logic [$clog2(DEPTH+1)-1:0] free_cnt,
  output logic [$clog2(DEPTH+1)-1:0] count,
  // checker side
  input  logic                       chk_v,
  input  word_t                      chk_addr,
  output word_t                      chk_data,
  output logic                       err
);
  mem_rec_t head;

  mpush_fifo #(.T(mem_rec_t), .DEPTH(DEPTH), .PUSH_W(PUSH_W)) u_q (
    .clk, .rst_n, .flush, .push_v, .push_d(push_rec),
    .pop(chk_v && count != 0), .head, .count, .free_cnt
  );

  assign chk_data = head.data;
  // A checker load with no committed load behind it is also a control-flow error.
  assign err      = chk_v && (count == 0 || head.addr != chk_addr);
endmodule

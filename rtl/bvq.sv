// bvq: Branch Value Queue of the checker backend.
//
// Instructions are fetched only once, so the checker cluster cannot follow its
// own control flow; its branches do not change the PC. Instead the outcome of
// every committed branch (taken bit and target) is queued here, and when the
// checker re-executes the branch (in program order) its outcome is compared
// with the oldest record, which is then removed. Any difference in the taken
// bit, or in the target of a taken branch, raises `err` in that cycle. The
// target of a not-taken branch is not compared (a design choice: it is not
// used). 16 entries as in the evaluated configuration; up to PUSH_W branches
// enter per commit cycle. `flush` empties the queue on rollback.
module bvq
  import chk_pkg::*;
#(
  parameter int unsigned DEPTH  = 16,
  parameter int unsigned PUSH_W = 6
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       flush,
  // commit side
  input  logic [PUSH_W-1:0]          push_v,
  input  br_rec_t                    push_rec [PUSH_W],
  output logic [$clog2(DEPTH+1)-1:0] free_cnt,
  output logic [$clog2(DEPTH+1)-1:0] count,
  // checker side
  input  logic                       chk_v,
  input  logic                       chk_taken,
  input  word_t                      chk_target,
  output logic                       err
);
  br_rec_t head;

  mpush_fifo #(.T(br_rec_t), .DEPTH(DEPTH), .PUSH_W(PUSH_W)) u_q (
    .clk, .rst_n, .flush, .push_v, .push_d(push_rec),
    .pop(chk_v && count != 0), .head, .count, .free_cnt
  );

  assign err = chk_v && (count == 0 || head.taken != chk_taken ||
                         (head.taken && head.target != chk_target));
endmodule

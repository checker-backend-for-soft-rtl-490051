// mode_ctrl: run-time switch between checking and full-throughput operation.
//
// Fault tolerance can be turned off at any time, giving the checker cluster
// back for performance, power or temperature, and turned on again.
//   OFF   `ft_on` low: instructions commit without being checked and stores
//         go to memory in order. A request to enable takes effect at once,
//         since the checking structures are empty.
//   ON    `ft_on` high. A request to disable moves to DRAIN.
//   DRAIN commit is held (`hold_commit`) until every committed instruction has
//         been re-executed and retired and no store is waiting for
//         validation, and no recovery is in progress. Then, for one cycle,
//         `release_all` lets the SVQ write every validated store and
//         `ckpt_clear` drops the checkpoint window, and the state is OFF.
//         A renewed enable request during DRAIN returns to ON.
// The drain-before-disable rule is this design's choice; the document only
// states that checking can be disabled at any time.
module mode_ctrl (
  input  logic clk,
  input  logic rst_n,
  input  logic ft_req,       // 1: checking wanted
  input  logic crob_empty,
  input  logic svq_unchecked_empty,
  input  logic rec_busy,
  output logic ft_on,
  output logic hold_commit,
  output logic release_all,
  output logic ckpt_clear
);
  typedef enum logic [1:0] {M_OFF, M_ON, M_DRAIN} mode_e;
  mode_e mode;
  logic  drained;

  assign drained     = mode == M_DRAIN && crob_empty && svq_unchecked_empty && !rec_busy && !ft_req;
  assign ft_on       = mode != M_OFF;
  assign hold_commit = mode == M_DRAIN;
  assign release_all = drained;
  assign ckpt_clear  = drained;

  always_ff @(posedge clk) begin
    if (!rst_n) mode <= M_ON;
    else begin
      case (mode)
        M_OFF:   if (ft_req) mode <= M_ON;
        M_ON:    if (!ft_req) mode <= M_DRAIN;
        M_DRAIN: if (ft_req) mode <= M_ON;
                 else if (drained) mode <= M_OFF;
        default: mode <= M_ON;
      endcase
    end
  end
endmodule

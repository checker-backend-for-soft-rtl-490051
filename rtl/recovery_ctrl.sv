// recovery_ctrl: error recovery sequencer.
//
// When any comparison fails (load address, store address/data, branch
// outcome, or an exception seen by only one execution) the processor rolls
// back and tries again:
//   FLUSH  one cycle: `flush` empties the checkROB, the value queues, the
//          non-released part of the SVQ and the checker rename map, and
//          `undo_start` starts the checkpoint-buffer walk. The frequency is
//          lowered one step (`freq_level`), in case the error was a timing
//          error.
//   UNDO   the checkpoint buffer restores the saved register values.
//   resume `resume` pulses with `restart_pc`: the oldest instruction of the
//          checkpoint window, or, if the window was empty, the oldest
//          instruction that was in the checkROB.
//   REEXEC instructions re-execute at the lower frequency. Once as many have
//          retired as were rolled back, the error is taken as fixed: the
//          frequency and the trial count return to normal.
// An error during REEXEC starts another trial. After MAX_TRIALS failed
// trials the error is taken as permanent: `hard_error` is raised and the
// sequencer waits in HARD, with everything held, until `hard_ack` (e.g. after
// a hardware test has disabled the faulty part); it then rolls back once more
// and resumes at the nominal frequency. `busy` is high outside NORMAL and REEXEC;
// commit and retirement are held while it is. The number of trials, the
// frequency steps and the "fixed" criterion are this design's own choices.
module recovery_ctrl
  import chk_pkg::*;
#(
  parameter int unsigned MAX_TRIALS = 3,
  parameter int unsigned CNT_W      = 9,   // wide enough for checkROB + checkpoint window
  parameter int unsigned RET_W      = 6
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        err,
  input  logic [CNT_W-1:0]            inflight,     // checkROB + checkpoint entries
  input  word_t                       crob_oldest_pc,
  input  logic                        undo_done,
  input  logic                        ckpt_restart_v,
  input  word_t                       ckpt_restart_pc,
  input  logic [$clog2(RET_W+1)-1:0]  n_ret,
  input  logic                        hard_ack,
  output logic                        flush,
  output logic                        undo_start,
  output logic                        busy,
  output logic                        resume,
  output word_t                       restart_pc,
  output logic [$clog2(MAX_TRIALS+1)-1:0] freq_level,
  output logic                        hard_error,
  output logic                        in_reexec
);
  typedef enum logic [2:0] {S_NORMAL, S_FLUSH, S_UNDO, S_REEXEC, S_HARD} state_e;

  localparam int unsigned TW = $clog2(MAX_TRIALS+1);

  state_e         state;
  logic [TW-1:0]  trials;
  logic [CNT_W-1:0] window, retired;
  word_t          crob_pc_q;

  assign flush      = state == S_FLUSH;
  assign undo_start = state == S_FLUSH;
  assign busy       = state inside {S_FLUSH, S_UNDO, S_HARD};
  assign resume     = state == S_UNDO && undo_done;
  assign restart_pc = ckpt_restart_v ? ckpt_restart_pc : crob_pc_q;
  assign hard_error = state == S_HARD;
  assign in_reexec  = state == S_REEXEC;
  assign freq_level = trials;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_NORMAL;
      trials    <= '0;
      window    <= '0;
      retired   <= '0;
      crob_pc_q <= '0;
    end else begin
      case (state)
        S_NORMAL, S_REEXEC: begin
          if (err) begin
            window    <= inflight;
            crob_pc_q <= crob_oldest_pc;
            if (int'(trials) >= MAX_TRIALS) begin
              state <= S_HARD;
            end else begin
              state  <= S_FLUSH;
              trials <= trials + 1'b1;
            end
          end else if (state == S_REEXEC) begin
            if (retired + CNT_W'(n_ret) >= window) begin
              state  <= S_NORMAL;   // re-executed past the failing point: fixed
              trials <= '0;
            end else begin
              retired <= retired + CNT_W'(n_ret);
            end
          end
        end
        S_FLUSH: state <= S_UNDO;
        S_UNDO: if (undo_done) begin
          state   <= S_REEXEC;
          retired <= '0;
        end
        S_HARD: if (hard_ack) begin
          state  <= S_FLUSH;   // roll back once more and resume at nominal frequency
          trials <= '0;
        end
        default: state <= S_NORMAL;
      endcase
    end
  end

endmodule

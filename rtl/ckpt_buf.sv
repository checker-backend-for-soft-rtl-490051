// ckpt_buf: checkpoint buffer for rollback recovery.
//
// A circular buffer holding, for each of the last DEPTH retired instructions
// (64 in the evaluated configuration), the logical register it released and
// the values that register held in the regular clusters and in the checker.
// Errors are detected late (by a store), so the state must be recoverable
// across that distance: walking the buffer from the newest entry to the
// oldest and writing the saved values back undoes all retired instructions.
//
// Write: up to W retired instructions per cycle, compacted in lane order.
// When the buffer is full the oldest entries are overwritten; every store
// among them is beyond any rollback and its SVQ record may now reach memory:
// `rel_stores` counts them in the same cycle.
// Undo: `undo_start` begins a walk that emits one entry per cycle on
// `rst_v/rst_ent` (newest first; `rst_v` only for entries with a destination)
// and pulses `undo_done` in the cycle after the last one; the buffer is then
// empty. `restart_pc`/`restart_v`, captured at `undo_start`, give the PC of
// the oldest entry, where execution resumes. `clear` drops all entries
// without undoing them (checking switched off). Writes are ignored during an
// undo walk. `shrink` gives up the oldest entry in a cycle with no writes:
// the window is then shorter than DEPTH, and the store in that entry, if
// any, is released. It keeps commit moving when the SVQ is filled by stores
// still inside the window; this escape is this design's own addition.
module ckpt_buf
  import chk_pkg::*;
#(
  parameter int unsigned DEPTH = 64,
  parameter int unsigned W     = 6
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        clear,
  input  logic                        shrink,
  // retired instructions
  input  logic [W-1:0]                wr_v,
  input  ckpt_t                       wr_ent [W],
  output logic [$clog2(W+1)-1:0]      rel_stores,
  output logic [$clog2(DEPTH+1)-1:0]  count,
  // rollback
  input  logic                        undo_start,
  output logic                        undo_busy,
  output logic                        rst_v,
  output ckpt_t                       rst_ent,
  output logic                        undo_done,
  output word_t                       restart_pc,
  output logic                        restart_v
);
  localparam int unsigned IW = $clog2(DEPTH);
  localparam int unsigned CW = $clog2(DEPTH+1);

  ckpt_t         mem [DEPTH];
  logic [IW-1:0] head, tail, newest;
  logic [CW-1:0] n_in, n_evict;

  function automatic logic [IW-1:0] wrap_add(logic [IW-1:0] p, int unsigned k);
    int unsigned s;
    s = int'(p) + k;
    if (s >= DEPTH) s = s - DEPTH;
    return IW'(s);
  endfunction

  always_comb begin
    n_in = '0;
    for (int i = 0; i < W; i++) n_in = n_in + CW'(wr_v[i]);
    if (undo_busy || undo_start) n_in = '0;
  end

  // entries pushed out of the window this cycle, and the stores among them
  always_comb begin
    int unsigned need;
    need       = int'(count) + int'(n_in);
    n_evict    = (need > DEPTH) ? CW'(need - DEPTH) : '0;
    if (shrink && n_in == 0 && count != 0 && !undo_busy && !undo_start) n_evict = CW'(1);
    rel_stores = '0;
    for (int k = 0; k < W; k++)
      if (CW'(k) < n_evict && mem[wrap_add(head, k)].is_store) rel_stores = rel_stores + 1'b1;
  end

  assign newest  = wrap_add(tail, DEPTH - 1);
  assign rst_ent = mem[newest];
  assign rst_v   = undo_busy && count != 0 && mem[newest].has_dst;

  always_ff @(posedge clk) begin
    int unsigned off;
    if (!rst_n || clear) begin
      head       <= '0;
      tail       <= '0;
      count      <= '0;
      undo_busy  <= 1'b0;
      undo_done  <= 1'b0;
      restart_v  <= 1'b0;
      restart_pc <= '0;
    end else if (undo_busy) begin
      undo_done <= 1'b0;
      if (count != 0) begin
        tail  <= newest;
        count <= count - 1'b1;
      end else begin
        undo_busy <= 1'b0;
        undo_done <= 1'b1;
      end
    end else begin
      undo_done <= 1'b0;
      if (undo_start) begin
        undo_busy  <= 1'b1;
        restart_v  <= count != 0;
        restart_pc <= mem[head].pc;
      end else begin
        off = 0;
        for (int i = 0; i < W; i++) begin
          if (wr_v[i]) begin
            mem[wrap_add(tail, off)] <= wr_ent[i];
            off++;
          end
        end
        tail  <= wrap_add(tail, off);
        head  <= wrap_add(head, int'(n_evict));
        count <= count + n_in - n_evict;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) undo_start |-> wr_v == '0)
    else $error("ckpt_buf: retirement during rollback start");
endmodule

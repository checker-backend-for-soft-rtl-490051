// svq: Store Value Queue with delayed memory update.
//
// Only stores are validated, so no corrupted value reaches memory. A committed
// store leaves the LSQ and enters the SVQ with its address and data. When the
// checker cluster re-executes the store (stores are re-executed in program
// order) it presents its own address and data, which are compared with the
// oldest non-validated record; a match validates the record (`validated`
// pulse, the checkROB may then retire the store), a mismatch raises `err`.
//
// For recovery a validated store must not reach memory while the instruction
// can still be rolled back, i.e. while it is inside the checkpoint window.
// The queue is a circular buffer of NV + EXTRA entries (16 + 32 in the
// evaluated configuration) with four pointers:
//   head     oldest record; allowed records drain to memory from here
//   wr_ptr   first store not yet allowed to write
//   vld_ptr  first store not yet validated
//   tail     next free slot
// `release_n` (stores leaving the checkpoint buffer) advances wr_ptr;
// `release_all` allows every validated store (used when fault tolerance is
// switched off). On `flush` (rollback) every store that is not yet allowed to
// write is discarded. With `ft_on` low stores are entered already validated
// and allowed, so the queue only orders them towards memory.
//
// Loads executing in the regular clusters search the queue for an older store
// to the same address (`lk_*`, combinational): the youngest match supplies the
// data. Memory port: `mem_v/addr/data` with `mem_rdy`, one store per cycle.
// Limiting the non-validated part to NV entries is this design's reading of
// the 16+32 split; the lookup port and the memory handshake are also its own.
module svq
  import chk_pkg::*;
#(
  parameter int unsigned NV     = 16,
  parameter int unsigned EXTRA  = 32,
  parameter int unsigned PUSH_W = 6,
  parameter int unsigned REL_W  = 6
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      flush,
  input  logic                      ft_on,
  // commit side
  input  logic [PUSH_W-1:0]         push_v,
  input  mem_rec_t                  push_rec [PUSH_W],
  output logic [$clog2(NV+EXTRA+1)-1:0] free_cnt,
  // checker side
  input  logic                      chk_v,
  input  word_t                     chk_addr,
  input  word_t                     chk_data,
  output logic                      err,
  output logic                      validated,
  // release from the checkpoint window
  input  logic [$clog2(REL_W+1)-1:0] release_n,
  input  logic                      release_all,
  // memory write port
  output logic                      mem_v,
  output word_t                     mem_addr,
  output word_t                     mem_data,
  input  logic                      mem_rdy,
  // load disambiguation
  input  word_t                     lk_addr,
  output logic                      lk_hit,
  output word_t                     lk_data,
  // status
  output logic [$clog2(NV+EXTRA+1)-1:0] cnt_alw,   // allowed, not yet written
  output logic [$clog2(NV+EXTRA+1)-1:0] cnt_vld,   // validated, not yet allowed
  output logic [$clog2(NV+EXTRA+1)-1:0] cnt_pend   // not yet validated
);
  localparam int unsigned DEPTH = NV + EXTRA;
  localparam int unsigned IW    = $clog2(DEPTH);
  localparam int unsigned CW    = $clog2(DEPTH+1);

  mem_rec_t      mem [DEPTH];
  logic [IW-1:0] head, wr_ptr, vld_ptr, tail;
  logic [CW-1:0] total, n_push, n_rel, room_total, room_pend;
  logic          do_wr, do_vld;

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

  assign total      = cnt_alw + cnt_vld + cnt_pend;
  assign room_total = CW'(DEPTH) - total;
  assign room_pend  = CW'(NV) - cnt_pend;
  assign free_cnt   = ft_on ? ((room_total < room_pend) ? room_total : room_pend) : room_total;

  // validation of the oldest non-validated store
  assign do_vld    = chk_v && cnt_pend != 0 && 
                     mem[vld_ptr].addr == chk_addr && mem[vld_ptr].data == chk_data;
  assign err       = chk_v && !do_vld;
  assign validated = do_vld;

  // release: never beyond the validated stores
  always_comb begin
    if (release_all) n_rel = cnt_vld + CW'(do_vld);
    else if (CW'(release_n) > cnt_vld) n_rel = cnt_vld;
    else n_rel = CW'(release_n);
  end

  // memory drain
  assign mem_v    = cnt_alw != 0;
  assign mem_addr = mem[head].addr;
  assign mem_data = mem[head].data;
  assign do_wr    = mem_v && mem_rdy;

  // youngest older store to the same address
  always_comb begin
    lk_hit  = 1'b0;
    lk_data = '0;
    for (int k = 0; k < DEPTH; k++) begin
      if (CW'(k) < total && mem[wrap_add(head, k)].addr == lk_addr) begin
        lk_hit  = 1'b1;
        lk_data = mem[wrap_add(head, k)].data;
      end
    end
  end

  always_ff @(posedge clk) begin
    int unsigned off;
    if (!rst_n) begin
      head <= '0; wr_ptr <= '0; vld_ptr <= '0; tail <= '0;
      cnt_alw <= '0; cnt_vld <= '0; cnt_pend <= '0;
    end else if (flush) begin
      // discard everything not yet allowed to reach memory
      if (do_wr) head <= wrap_add(head, 1);
      cnt_alw  <= cnt_alw - CW'(do_wr);
      vld_ptr  <= wr_ptr;
      tail     <= wr_ptr;
      cnt_vld  <= '0;
      cnt_pend <= '0;
    end else begin
      off = 0;
      for (int i = 0; i < PUSH_W; i++) begin
        if (push_v[i]) begin
          mem[wrap_add(tail, off)] <= push_rec[i];
          off++;
        end
      end
      tail <= wrap_add(tail, off);
      if (do_wr) head <= wrap_add(head, 1);
      if (ft_on) begin
        if (do_vld) vld_ptr <= wrap_add(vld_ptr, 1);
        wr_ptr   <= wrap_add(wr_ptr, int'(n_rel));
        cnt_pend <= cnt_pend + n_push - CW'(do_vld);
        cnt_vld  <= cnt_vld + CW'(do_vld) - n_rel;
        cnt_alw  <= cnt_alw + n_rel - CW'(do_wr);
      end else begin
        // checking disabled: stores are allowed to write as they enter
        vld_ptr  <= wrap_add(tail, off);
        wr_ptr   <= wrap_add(tail, off);
        cnt_pend <= '0;
        cnt_vld  <= '0;
        cnt_alw  <= cnt_alw + n_push - CW'(do_wr);
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n || flush) n_push <= free_cnt)
    else $error("svq overflow");
  assert property (@(posedge clk) disable iff (!rst_n) !ft_on |-> (cnt_vld == 0 && cnt_pend == 0))
    else $error("svq: checking switched off with stores still unchecked");
endmodule

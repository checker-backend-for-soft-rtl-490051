// domain_fifo: dual-clock FIFO joining two clock domains.
//
// The processor is split into clock domains (frontend, memory, each
// execution cluster) that may run from different clocks; traffic between
// them passes through small FIFOs. This is such a FIFO: a DEPTH-entry
// memory written in the `wclk` domain and read in the `rclk` domain, with
// Gray-coded read and write pointers passed to the other side through
// two-flop synchronisers. Write side: `w_v` offers `w_data`; it is taken at
// the clock edge unless `w_full` (valid/ready with ready = !w_full). Read side: `r_v` (not empty) with `r_data`, consumed
// by `r_rdy`. Because of the synchronisers, data written becomes visible on
// the read side 2-3 read clocks later, and freed space 2-3 write clocks after
// the read; the flags are conservative, never wrong. `rst_n` must be held
// for several cycles of both clocks. The Gray-pointer structure and the
// depth (8) are this design's own choices; the source only asks for simple
// synchronising FIFOs.
module domain_fifo #(
  parameter type         T     = logic [31:0],
  parameter int unsigned DEPTH = 8            // power of two
) (
  input  logic rst_n,
  // write domain
  input  logic wclk,
  input  logic w_v,
  input  T     w_data,
  output logic w_full,
  // read domain
  input  logic rclk,
  output logic r_v,
  output T     r_data,
  input  logic r_rdy
);
  localparam int unsigned AW = $clog2(DEPTH);

  T              mem [DEPTH];
  logic [AW:0]   wbin, rbin, wgray, rgray;
  logic [AW:0]   rgray_w1, rgray_w2;   // read pointer seen in the write domain
  logic [AW:0]   wgray_r1, wgray_r2;   // write pointer seen in the read domain
  logic [AW:0]   wbin_n, rbin_n;

  function automatic logic [AW:0] bin2gray(logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // write domain
  assign w_full = wgray == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]};
  assign wbin_n = wbin + (AW+1)'(w_v && !w_full);

  always_ff @(posedge wclk) begin
    if (!rst_n) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
    end else begin
      if (w_v && !w_full) mem[wbin[AW-1:0]] <= w_data;
      wbin     <= wbin_n;
      wgray    <= bin2gray(wbin_n);
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
    end
  end

  // read domain
  assign r_v    = rgray != wgray_r2;
  assign r_data = mem[rbin[AW-1:0]];
  assign rbin_n = rbin + (AW+1)'(r_v && r_rdy);

  always_ff @(posedge rclk) begin
    if (!rst_n) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      rbin     <= rbin_n;
      rgray    <= bin2gray(rbin_n);
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
    end
  end

  initial assert (DEPTH >= 4 && (DEPTH & (DEPTH - 1)) == 0) else $error("domain_fifo: DEPTH must be a power of two, at least 4");
endmodule

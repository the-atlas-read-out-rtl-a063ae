// history_fifo: the history buffer of one busy input's duration counts.
//
// A synchronous FIFO of DEPTH words of W bits with empty and full flags and a
// synchronous reset that empties it. The oldest word is always presented on
// rdata (first-word fall-through) and a read removes it, so a VME read of the
// FIFO address returns it in the same access. A write to a full FIFO is
// ignored, so a FIFO that is not run as a circular buffer keeps the first
// DEPTH words written; a read and a write on the same clock are both done
// even when the FIFO is full, which is how the sequencer keeps the last DEPTH
// words in circular-buffer mode. rdata reads zero when the FIFO is empty.
// Depth 512 and width 16 follow the description; the memory organisation and
// fall-through read are this design's choices (the original uses FIFO chips).
module history_fifo #(
  parameter int unsigned W     = 16,
  parameter int unsigned DEPTH = 512
) (
  input  logic         clk,
  input  logic         rst,      // power-on reset
  input  logic         clear,    // global FIFO reset
  input  logic         wr,
  input  logic [W-1:0] wdata,
  input  logic         rd,
  output logic [W-1:0] rdata,
  output logic         empty,
  output logic         full
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic [AW:0]   used;
  logic          do_rd, do_wr;

  assign empty = (used == 0);
  assign full  = (used == (AW+1)'(DEPTH));
  assign do_rd = rd && !empty;
  assign do_wr = wr && (!full || do_rd);
  assign rdata = empty ? '0 : mem[rp];

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] p);
    return (p == AW'(DEPTH-1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      wp   <= '0;
      rp   <= '0;
      used <= '0;
    end else begin
      if (do_wr) wp <= inc(wp);
      if (do_rd) rp <= inc(rp);
      used <= used + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
  end

  // The occupancy can never pass the depth.
  a_no_overflow: assert property (@(posedge clk) disable iff (rst) used <= (AW+1)'(DEPTH));
endmodule

// fifo_sequencer: duration counter / history buffer sequencer.
//
// Two modes, selected by the seq_en control bit:
//   * software mode (seq_en = 0): counter enable, counter reset, FIFO write
//     and FIFO reset come from VME control and command bits, and FIFO reads
//     come from VME reads of the FIFO addresses.
//   * sequencer mode (seq_en = 1): a 16-bit down counter, reloaded from the
//     VME-programmed shadow register, times the transfers. The counters run
//     continuously; every `shadow` clocks (0 means 65536; at 10 MHz the
//     longest programmable period, 65535 ticks, is 6.55 ms) one transfer
//     clock writes all counters into their FIFOs and starts a new counting
//     interval. On the same clock every FIFO whose circular bit is set and
//     which is full is read once, so it keeps the newest 512 words.
//     Entering sequencer mode clears the counters and loads the down counter.
// VME software commands (counter reset, FIFO write and reset, FIFO reads)
// stay effective in both modes. The down counter with shadow register, the
// 10 MHz rate and the circular read-on-write follow the description; the
// single-clock transfer and the start-up behaviour are this design's choices.
module fifo_sequencer #(
  parameter int unsigned N_IN = 16,
  parameter int unsigned W    = 16
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            seq_en,      // control bit: sequencer mode
  input  logic [W-1:0]    shadow,      // transfer period in clocks
  input  logic [N_IN-1:0] circ,        // circular-buffer bits
  input  logic [N_IN-1:0] fifo_full,
  input  logic            sw_cnt_en,   // control bit: counters enabled
  input  logic            sw_cnt_rst,  // command pulses
  input  logic            sw_fifo_wr,
  input  logic            sw_fifo_rst,
  input  logic [N_IN-1:0] vme_fifo_rd, // VME read of FIFO i
  output logic            cnt_en,
  output logic            cnt_clear,
  output logic            fifo_wr,
  output logic            fifo_clear,
  output logic [N_IN-1:0] fifo_rd,
  output logic            transfer,    // one-clock pulse per timed transfer
  output logic            running,
  output logic [W-1:0]    down_cnt
);
  logic seq_en_q;
  logic start;

  assign start    = seq_en && !seq_en_q;
  assign running  = seq_en_q;
  assign transfer = seq_en_q && (down_cnt == W'(1));

  always_ff @(posedge clk) begin
    if (rst) begin
      seq_en_q <= 1'b0;
      down_cnt <= '0;
    end else begin
      seq_en_q <= seq_en;
      if (start || transfer)
        down_cnt <= shadow;
      else if (seq_en_q)
        down_cnt <= down_cnt - 1'b1;
    end
  end

  assign cnt_en     = seq_en ? 1'b1 : sw_cnt_en;
  assign cnt_clear  = sw_cnt_rst || start || transfer;
  assign fifo_wr    = sw_fifo_wr || transfer;
  assign fifo_clear = sw_fifo_rst;
  assign fifo_rd    = vme_fifo_rd | ({N_IN{transfer}} & circ & fifo_full);
endmodule

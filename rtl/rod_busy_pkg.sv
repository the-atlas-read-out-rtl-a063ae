// rod_busy_pkg: constants and types shared by the ROD-Busy module.
//
// The ROD-Busy module ORs up to 16 ROD busy signals into one busy output and
// measures how long each input is busy. Its size (16 inputs, 4 outputs,
// 16-bit counters, 512-word history FIFOs, 10 MHz clock) follows the module as
// described for ATLAS. The VME register map, the bit assignment of the
// control, command and status registers and the VME address modifier set are
// this design's own choices: the original map is not published with the
// description.
//
// Register map (16-bit words, byte offset = 2 * word address, A[7:1]):
//   0x00 CTRL        rw  control bits (ctrl_t)
//   0x02 STATUS      r   status bits (status_t)
//   0x04 MASK        rw  1 = input removed from the busy sum
//   0x06 TEST        rw  1 = input line driven busy by its test driver
//   0x08 INPUT       r   monitor latch: state of the 16 input lines
//   0x0A SEQ_SHADOW  rw  sequencer period in 100 ns ticks (0 = 65536)
//   0x0C CIRC        rw  1 = FIFO kept as circular buffer by the sequencer
//   0x0E FIFO_EMPTY  r   empty flag of each FIFO
//   0x10 FIFO_FULL   r   full flag of each FIFO
//   0x12 SREQ_INTVL  rw  time-out interval in 100 ns ticks
//   0x14 SREQ_LIMIT  rw  time-out limit of busy ticks within one interval
//   0x16 IRQ_CTRL    rw  [2:0] VME interrupt level, [3] interrupter enable
//   0x18 STATUS_ID   rw  [7:0] Status/ID returned in the IACK cycle
//   0x1A CMD         w   command pulses (cmd_t), reads as zero
//   0x20-0x3E CNT[i] r   live duration counter i
//   0x40-0x5E FIFO[i] r  oldest word of FIFO i; the read removes it
package rod_busy_pkg;

  localparam int unsigned N_IN_DEF   = 16;   // busy inputs per module
  localparam int unsigned N_OUT_DEF  = 4;    // busy outputs per module
  localparam int unsigned CNT_W      = 16;   // duration / sequencer / time-out counters
  localparam int unsigned FIFO_DEPTH_DEF = 512;

  // Word addresses (VME A[7:1]).
  typedef logic [6:0] waddr_t;
  localparam waddr_t A_CTRL       = 7'h00;
  localparam waddr_t A_STATUS     = 7'h01;
  localparam waddr_t A_MASK       = 7'h02;
  localparam waddr_t A_TEST       = 7'h03;
  localparam waddr_t A_INPUT      = 7'h04;
  localparam waddr_t A_SEQ_SHADOW = 7'h05;
  localparam waddr_t A_CIRC       = 7'h06;
  localparam waddr_t A_FIFO_EMPTY = 7'h07;
  localparam waddr_t A_FIFO_FULL  = 7'h08;
  localparam waddr_t A_SREQ_INTVL = 7'h09;
  localparam waddr_t A_SREQ_LIMIT = 7'h0A;
  localparam waddr_t A_IRQ_CTRL   = 7'h0B;
  localparam waddr_t A_STATUS_ID  = 7'h0C;
  localparam waddr_t A_CMD        = 7'h0D;
  localparam waddr_t A_CNT_BASE   = 7'h10;  // 16 words
  localparam waddr_t A_FIFO_BASE  = 7'h20;  // 16 words

  // Control register.
  typedef struct packed {
    logic [11:0] spare;
    logic        sreq_en;     // [3] time-out service requester enabled
    logic        force_busy;  // [2] global busy on all busy outputs
    logic        cnt_en;      // [1] duration counters enabled (software mode)
    logic        seq_en;      // [0] sequencer (circular buffer) mode
  } ctrl_t;

  // Command register: each bit written as 1 gives a one-clock pulse.
  typedef struct packed {
    logic [8:0] spare;
    logic       module_rst;   // [6] global module reset
    logic       irq_test;     // [5] raise a test interrupt
    logic       sreq_clr;     // [4] clear the service request
    logic       sreq_set;     // [3] set the service request
    logic       fifo_rst;     // [2] empty all FIFOs
    logic       fifo_wr;      // [1] write all counters into their FIFOs
    logic       cnt_rst;      // [0] clear all duration counters
  } cmd_t;

  // Status register.
  typedef struct packed {
    logic [11:0] spare;
    logic        seq_run;     // [3] sequencer running
    logic        irq_pend;    // [2] interrupt request pending on the bus
    logic        sreq;        // [1] time-out service request
    logic        busy_out;    // [0] state of the busy outputs
  } status_t;

  // VME address modifiers accepted (data access, user and supervisor).
  localparam logic [5:0] AM_A24_USER = 6'h39;
  localparam logic [5:0] AM_A24_SUP  = 6'h3D;
  localparam logic [5:0] AM_A16_USER = 6'h29;
  localparam logic [5:0] AM_A16_SUP  = 6'h2D;

endpackage

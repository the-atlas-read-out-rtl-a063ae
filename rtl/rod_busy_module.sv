// rod_busy_module: the ATLAS ROD-Busy module.
//
// Read-out drivers (RODs) raise a busy signal when their buffers are nearly
// full. This module ORs up to N_IN such busy signals (those not masked off)
// into one busy, driven on N_OUT identical outputs, which either feeds the
// next ROD-Busy module of a tree or vetoes level-1 triggers at the central
// trigger processor. Alongside the OR it measures, for every input, how long
// it was busy (16-bit counters at 10 MHz), keeps a history of these
// durations in one 512-word FIFO per input, and raises a VME interrupt when
// the global busy has been true for longer than a programmed limit within a
// programmed interval.
//
// Blocks: ip_reg_structure (test, monitor, mask, sum), N_IN/4 x
// quad_count_struct (duration counters), N_IN x history_fifo, fifo_sequencer
// (software or timed transfers, circular buffers), sreq_timer_struct
// (time-out service requester), vme_if (VME slave and registers) and
// vme_interrupter. The two VME responders share the data bus: d_out is
// taken from whichever drives it, d_oe and DTACK* are combined.
//
// Interface: clk is the 10 MHz system clock and rst a synchronous active-high
// reset; a module reset written over VME also resets everything except the
// bus state machines. busy_in and busy_out are active-high logic levels: the
// analog receivers, open-collector drivers and their 0 V busy level are
// outside this logic. The VME data bus is split into d_in, d_out and d_oe;
// DTACK*, IRQ* and IACKOUT* are active-low open-collector controls.
// Timing: busy_in to busy_out is combinational; everything else is clocked.
// N_IN must be a multiple of 4 (counters come in quads). The sequencer's
// down counter and transfer strobe, the time-out counters and the
// combinational global busy are observation points of the blocks that the
// register map does not read; they stay unconnected here.
module rod_busy_module
  import rod_busy_pkg::*;
#(
  parameter int unsigned N_IN       = N_IN_DEF,
  parameter int unsigned N_OUT      = N_OUT_DEF,
  parameter int unsigned FIFO_DEPTH = FIFO_DEPTH_DEF
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [N_IN-1:0]   busy_in,
  output logic [N_OUT-1:0]  busy_out,
  input  logic [15:0]       base_sw,
  input  logic [23:1]       vme_a,
  input  logic [5:0]        vme_am,
  input  logic              vme_as_n,
  input  logic [1:0]        vme_ds_n,
  input  logic              vme_write_n,
  input  logic              vme_lword_n,
  input  logic              vme_iack_n,
  input  logic              vme_iackin_n,
  output logic              vme_iackout_n,
  input  logic [15:0]       vme_d_in,
  output logic [15:0]       vme_d_out,
  output logic              vme_d_oe,
  output logic              vme_dtack_n,
  output logic [7:1]        vme_irq_n
);
  // Registers and commands.
  ctrl_t                  ctrl;
  cmd_t                   cmd;
  status_t                status;
  logic [N_IN-1:0]        mask, test, circ, vme_fifo_rd;
  logic [15:0]            seq_shadow, sreq_interval, sreq_limit;
  logic [2:0]             irq_level;
  logic                   irq_en;
  logic [7:0]             status_id;
  // Datapath.
  logic                   core_rst;
  logic [N_IN-1:0]        busy_sync, input_status;
  logic                   busy_global, busy_global_sync;
  logic [N_IN-1:0][15:0]  count, fifo_data;
  logic [N_IN-1:0]        fifo_empty, fifo_full, fifo_rd;
  logic                   cnt_en, cnt_clear, fifo_wr, fifo_clear, transfer, seq_run;
  logic [15:0]            down_cnt;
  logic                   sreq, irq_pend;
  logic [15:0]            interval_cnt, limit_cnt;
  // Bus responders.
  logic [15:0]            slv_d, irq_d;
  logic                   slv_oe, irq_oe, slv_dtack_n, irq_dtack_n;

  assign core_rst = rst || cmd.module_rst;

  ip_reg_structure #(.N_IN(N_IN), .N_OUT(N_OUT)) u_ip (
    .clk, .rst(core_rst), .busy_in, .test, .mask, .force_busy(ctrl.force_busy),
    .busy_sync, .input_status, .busy_global, .busy_global_sync, .busy_out);

  for (genvar q = 0; q < N_IN / 4; q++) begin : g_quad
    quad_count_struct #(.N(4), .W(CNT_W)) u_cnt (
      .clk, .rst(core_rst), .en(cnt_en), .clear(cnt_clear),
      .busy(busy_sync[4*q +: 4]), .count(count[4*q +: 4]));
  end

  for (genvar i = 0; i < N_IN; i++) begin : g_fifo
    history_fifo #(.W(CNT_W), .DEPTH(FIFO_DEPTH)) u_fifo (
      .clk, .rst(core_rst), .clear(fifo_clear), .wr(fifo_wr), .wdata(count[i]),
      .rd(fifo_rd[i]), .rdata(fifo_data[i]), .empty(fifo_empty[i]), .full(fifo_full[i]));
  end

  fifo_sequencer #(.N_IN(N_IN), .W(CNT_W)) u_seq (
    .clk, .rst(core_rst), .seq_en(ctrl.seq_en), .shadow(seq_shadow), .circ,
    .fifo_full, .sw_cnt_en(ctrl.cnt_en), .sw_cnt_rst(cmd.cnt_rst),
    .sw_fifo_wr(cmd.fifo_wr), .sw_fifo_rst(cmd.fifo_rst), .vme_fifo_rd,
    .cnt_en, .cnt_clear, .fifo_wr, .fifo_clear, .fifo_rd, .transfer,
    .running(seq_run), .down_cnt);

  sreq_timer_struct #(.W(CNT_W)) u_sreq (
    .clk, .rst(core_rst), .busy(busy_global_sync), .interval(sreq_interval),
    .limit(sreq_limit), .enable(ctrl.sreq_en), .sw_set(cmd.sreq_set),
    .sw_clr(cmd.sreq_clr), .sreq, .interval_cnt, .limit_cnt);

  assign status = '{spare: '0, seq_run: seq_run, irq_pend: irq_pend,
                    sreq: sreq, busy_out: busy_global_sync};

  vme_if #(.N_IN(N_IN)) u_vme (
    .clk, .bus_rst(rst), .rst(core_rst),
    .vme_a, .vme_am, .vme_as_n, .vme_ds_n, .vme_write_n, .vme_lword_n, .vme_iack_n,
    .vme_d_in, .vme_d_out(slv_d), .vme_d_oe(slv_oe), .vme_dtack_n(slv_dtack_n),
    .base_sw, .ctrl, .mask, .test, .seq_shadow, .circ, .sreq_interval, .sreq_limit,
    .irq_level, .irq_en, .status_id, .cmd, .fifo_rd(vme_fifo_rd),
    .status, .input_status, .fifo_empty, .fifo_full, .count, .fifo_data);

  vme_interrupter u_irq (
    .clk, .rst(core_rst), .bus_rst(rst), .irq_level, .irq_en, .status_id, .sreq,
    .irq_test(cmd.irq_test), .vme_iack_n, .vme_iackin_n, .vme_as_n, .vme_ds_n,
    .vme_a(vme_a[3:1]), .vme_iackout_n, .vme_irq_n, .vme_d_out(irq_d),
    .vme_d_oe(irq_oe), .vme_dtack_n(irq_dtack_n), .pending(irq_pend));

  assign vme_d_out   = slv_oe ? slv_d : irq_d;
  assign vme_d_oe    = slv_oe || irq_oe;
  assign vme_dtack_n = slv_dtack_n && irq_dtack_n;

  // Bus ownership: the slave and the interrupter never answer together.
  a_one_responder: assert property (@(posedge clk) !(slv_oe && irq_oe));
  initial assert (N_IN % 4 == 0) else $error("N_IN must be a multiple of 4");
endmodule

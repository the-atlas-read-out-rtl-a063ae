// tb_rod_busy_module: end-to-end test of the ROD-Busy module at its defaults.
//
// A VME master model programs the module through its registers (A24, base
// switches 0x1234) while the testbench drives the 16 busy inputs. Every
// mechanism of the module is exercised and counted, and the test fails if
// one never happened:
//   sum      a busy input reaches all four busy outputs
//   mask     a masked input is removed from the sum but still counted
//   test     a test-register bit makes an input busy and shows in INPUT
//   force    the force-busy control bit drives the outputs and status bit
//   sw_xfer  software mode: count busy clocks, write the FIFOs by command,
//            read them back, clear the counters
//   seq_xfer sequencer mode: transfers every SHADOW clocks, measured
//   circ     a circular FIFO keeps the newest 512 of 600 transfers
//   keep     a non-circular FIFO keeps the first 512 and shows full
//   sreq     the time-out requester fires on too much busy in an interval
//   irq      the interrupt is acknowledged with the Status/ID
//   irqtest  the software interrupter test
//   pass     an acknowledge for another level goes down the IACK chain
//   aonly    an address-only cycle changes nothing
//   reset    the software module reset clears registers, counters, FIFOs
module tb_rod_busy_module;
  import rod_busy_pkg::*;
  localparam logic [15:0] BASE = 16'h1234;
  localparam int SHADOW = 128;
  localparam int NXFER  = 600;
  localparam int DEPTH  = 512;
  logic clk = 0, rst = 1;
  logic [15:0] busy_in;
  logic [3:0] busy_out;
  logic [23:1] vme_a; logic [5:0] vme_am;
  logic vme_as_n, vme_write_n, vme_lword_n, vme_iack_n, vme_iackin_n, vme_iackout_n;
  logic [1:0] vme_ds_n;
  logic [15:0] vme_d_in, vme_d_out;
  logic vme_d_oe, vme_dtack_n;
  logic [7:1] vme_irq_n;
  int checks = 0, failures = 0;
  typedef enum int {M_SUM, M_MASK, M_TEST, M_FORCE, M_SW_XFER, M_SEQ_XFER, M_CIRC, M_KEEP,
                    M_SREQ, M_IRQ, M_IRQTEST, M_PASS, M_AONLY, M_RESET, M_COUNT} mech_t;
  int mech [M_COUNT];
  string mech_name [M_COUNT] = '{"sum", "mask", "test", "force", "sw_xfer", "seq_xfer", "circ",
                                 "keep", "sreq", "irq", "irqtest", "pass", "aonly", "reset"};
  bit saw_iackout;
  // Busy clocks given to inputs 2 and 3 in each sequencer period.
  int pattern [NXFER];

  rod_busy_module dut (.clk, .rst, .busy_in, .busy_out, .base_sw(BASE), .vme_a, .vme_am,
    .vme_as_n, .vme_ds_n, .vme_write_n, .vme_lword_n, .vme_iack_n, .vme_iackin_n,
    .vme_iackout_n, .vme_d_in, .vme_d_out, .vme_d_oe, .vme_dtack_n, .vme_irq_n);
  vme_master_bfm bfm (.clk, .a(vme_a), .am(vme_am), .as_n(vme_as_n), .ds_n(vme_ds_n),
    .write_n(vme_write_n), .lword_n(vme_lword_n), .iack_n(vme_iack_n), .iackin_n(vme_iackin_n),
    .d_out(vme_d_in), .d_in(vme_d_oe ? vme_d_out : 16'hFFFF), .dtack_n(vme_dtack_n));

  always #50 clk = ~clk;   // 10 MHz
  always @(posedge clk) if (!vme_iackout_n) saw_iackout = 1;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask
  task automatic clocks(input int n); repeat (n) @(negedge clk); endtask

  function automatic logic [23:0] adr(input logic [6:0] w);
    return {BASE, w, 1'b0};
  endfunction
  task automatic wr(input logic [6:0] w, input logic [15:0] d);
    bit ok;
    bfm.write16(adr(w), AM_A24_USER, d, ok);
    check(ok, $sformatf("write %h acknowledged", w));
  endtask
  task automatic rd(input logic [6:0] w, output logic [15:0] d);
    bit ok;
    bfm.read16(adr(w), AM_A24_USER, d, ok);
    check(ok, $sformatf("read %h acknowledged", w));
  endtask
  task automatic expect_rd(input logic [6:0] w, input logic [15:0] e, input string what);
    logic [15:0] d;
    rd(w, d);
    check(d == e, $sformatf("%s: read %h, expected %h", what, d, e));
  endtask
  task automatic cmd(input cmd_t c); wr(A_CMD, c); endtask

  function automatic cmd_t mk_cmd(input int bitpos);
    cmd_t c; c = '0; c[bitpos] = 1'b1; return c;
  endfunction

  initial begin
    #400000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] d;
    ctrl_t c;
    bit ok; logic [7:0] id;
    int t_first, f0;
    busy_in = '0;
    for (int m = 0; m < M_COUNT; m++) mech[m] = 0;
    clocks(4); rst = 0; clocks(4);

    // ---- summing, masking, test, force ----
    check(busy_out == 4'b0000, "idle outputs");
    busy_in[7] = 1; #1;
    check(busy_out == 4'b1111, "busy input reaches all outputs");
    if (busy_out == 4'b1111) mech[M_SUM]++;
    busy_in[7] = 0;
    wr(A_MASK, 16'h0008);
    busy_in[3] = 1; #1;
    check(busy_out == 4'b0000, "masked input removed from the sum");
    if (busy_out == 4'b0000) mech[M_MASK]++;
    clocks(5);
    expect_rd(A_INPUT, 16'h0008, "masked input still monitored");
    busy_in[3] = 0;
    wr(A_MASK, 16'h0000);
    wr(A_TEST, 16'h0020);
    check(busy_out == 4'b1111, "test bit drives the input busy");
    expect_rd(A_INPUT, 16'h0020, "test bit seen in the input register");
    if (busy_out == 4'b1111) mech[M_TEST]++;
    wr(A_TEST, 16'h0000);
    check(busy_out == 4'b0000, "test bit released");
    c = '0; c.force_busy = 1;
    wr(A_CTRL, c);
    check(busy_out == 4'b1111, "forced global busy");
    expect_rd(A_STATUS, 16'h0001, "status bit follows busy out");
    if (busy_out == 4'b1111) mech[M_FORCE]++;
    wr(A_CTRL, 16'h0000);
    expect_rd(A_STATUS, 16'h0000, "status bit clear");

    // ---- software mode: counters and FIFOs under program control ----
    cmd(mk_cmd(0)); cmd(mk_cmd(2));          // counter reset, FIFO reset
    expect_rd(A_FIFO_EMPTY, 16'hFFFF, "all FIFOs empty");
    c = '0; c.cnt_en = 1;
    wr(A_CTRL, c);
    @(negedge clk);
    busy_in[0] = 1; busy_in[1] = 1; busy_in[15] = 1;
    clocks(100); busy_in[0] = 0;
    clocks(150); busy_in[1] = 0;
    clocks(33);  busy_in[15] = 0;
    clocks(5);
    wr(A_CTRL, 16'h0000);                     // stop counting
    expect_rd(A_CNT_BASE + 0, 16'd100, "counter 0 = 100 busy clocks");
    expect_rd(A_CNT_BASE + 1, 16'd250, "counter 1 = 250 busy clocks");
    expect_rd(A_CNT_BASE + 15, 16'd283, "counter 15 = 283 busy clocks");
    expect_rd(A_CNT_BASE + 2, 16'd0, "counter 2 idle");
    cmd(mk_cmd(1));                           // FIFO write
    expect_rd(A_FIFO_EMPTY, 16'h0000, "FIFOs written");
    expect_rd(A_FIFO_BASE + 0, 16'd100, "FIFO 0 word");
    expect_rd(A_FIFO_BASE + 1, 16'd250, "FIFO 1 word");
    expect_rd(A_FIFO_BASE + 15, 16'd283, "FIFO 15 word");
    expect_rd(A_FIFO_EMPTY, 16'h8003, "read FIFOs now empty");
    cmd(mk_cmd(0));
    expect_rd(A_CNT_BASE + 1, 16'd0, "counter reset");
    cmd(mk_cmd(2));
    expect_rd(A_FIFO_EMPTY, 16'hFFFF, "FIFO reset");
    mech[M_SW_XFER]++;

    // ---- sequencer mode: timed transfers, circular and first-512 FIFOs ----
    wr(A_SEQ_SHADOW, 16'(SHADOW));
    wr(A_CIRC, 16'h0004);                     // FIFO 2 circular, FIFO 3 not
    c = '0; c.seq_en = 1;
    busy_in[0] = 1;                           // always busy: every word = SHADOW
    wr(A_CTRL, c);
    // Find the first transfer by polling: FIFO 0 stops being empty. The
    // poll ends 3..20 clocks after it; each busy pulse then starts 20
    // clocks later in its period and ends well before the next transfer.
    t_first = 0;
    do begin
      rd(A_FIFO_EMPTY, d);
      t_first++;
    end while (d[0] && t_first < 100);
    check(t_first > 1, "sequencer waits one period before its first transfer");
    clocks(20);
    for (int k = 0; k < NXFER; k++) begin
      pattern[k] = (k * 7) % 53 + 1;
      busy_in[2] = 1; busy_in[3] = 1;
      clocks(pattern[k]);
      busy_in[2] = 0; busy_in[3] = 0;
      clocks(SHADOW - pattern[k]);
    end
    clocks(SHADOW - 40);                      // just past transfer 600
    wr(A_CTRL, 16'h0000);                     // stops before the next transfer
    busy_in[0] = 0;
    f0 = failures;
    expect_rd(A_FIFO_FULL, 16'hFFFF, "all FIFOs full after 601 transfers");
    // FIFO 0: always busy, each word = transfer period in clocks.
    for (int k = 0; k < 4; k++) expect_rd(A_FIFO_BASE + 0, 16'(SHADOW), "transfer period");
    if (failures == f0) mech[M_SEQ_XFER]++;
    // The first transfer came after the start; words of FIFO 2/3 hold the
    // pattern of the period that ended at each transfer, pattern k lying in
    // the period ending at transfer k+1.
    begin
      int bad2 = 0, bad3 = 0, exp2, exp3;
      for (int i = 0; i < DEPTH; i++) begin
        // non-circular FIFO 3: transfers 0..511 (transfer 0 has no pulse)
        exp3 = (i == 0) ? 0 : pattern[i - 1];
        rd(A_FIFO_BASE + 3, d);
        if (d != 16'(exp3)) bad3++;
        // circular FIFO 2: the newest 512 of the transfers made
        rd(A_FIFO_BASE + 2, d);
        exp2 = -1;
        if (i + NXFER + 1 - DEPTH - 1 < NXFER) exp2 = pattern[i + NXFER + 1 - DEPTH - 1];
        if (d != 16'(exp2)) bad2++;
      end
      check(bad3 == 0, $sformatf("non-circular FIFO keeps the first 512 (%0d wrong)", bad3));
      check(bad2 == 0, $sformatf("circular FIFO keeps the newest 512 (%0d wrong)", bad2));
      if (bad3 == 0) mech[M_KEEP]++;
      if (bad2 == 0) mech[M_CIRC]++;
    end
    expect_rd(A_FIFO_EMPTY, 16'h000C, "FIFOs 2 and 3 read out");
    cmd(mk_cmd(2));

    // ---- time-out service request and interrupt ----
    wr(A_SREQ_INTVL, 16'd1000);
    wr(A_SREQ_LIMIT, 16'd300);
    wr(A_IRQ_CTRL, 16'h000A);                 // level 2, enabled
    wr(A_STATUS_ID, 16'h0042);
    c = '0; c.sreq_en = 1;
    wr(A_CTRL, c);
    busy_in[4] = 1; clocks(200); busy_in[4] = 0;
    expect_rd(A_STATUS, 16'h0000, "200 busy clocks below the limit");
    busy_in[4] = 1; clocks(400); busy_in[4] = 0;
    expect_rd(A_STATUS, 16'h0006, "service request and interrupt pending");
    check(vme_irq_n == 7'b1111101, "IRQ2 asserted");
    if (!vme_irq_n[2]) mech[M_SREQ]++;
    saw_iackout = 0;
    bfm.iack_cycle(3'd5, id, ok);
    check(!ok && saw_iackout, "IACK of level 5 passed down the chain");
    if (!ok && saw_iackout) mech[M_PASS]++;
    clocks(4);
    bfm.iack_cycle(3'd2, id, ok);
    check(ok && id == 8'h42, $sformatf("IACK level 2 returns Status/ID %h", id));
    check(vme_irq_n == 7'h7F, "IRQ released");
    if (ok && id == 8'h42) mech[M_IRQ]++;
    cmd(mk_cmd(4));                           // clear service request
    expect_rd(A_STATUS, 16'h0000, "service request cleared");
    cmd(mk_cmd(3));                           // software set, interrupts too
    expect_rd(A_STATUS, 16'h0006, "service request set by software");
    bfm.iack_cycle(3'd2, id, ok);
    check(ok && id == 8'h42, "software request acknowledged");
    cmd(mk_cmd(4));
    expect_rd(A_STATUS, 16'h0000, "request and interrupt cleared");
    cmd(mk_cmd(5));                           // interrupter test
    check(!vme_irq_n[2], "test interrupt");
    bfm.iack_cycle(3'd2, id, ok);
    check(ok && id == 8'h42, "test interrupt acknowledged");
    if (ok && id == 8'h42) mech[M_IRQTEST]++;

    // ---- address-only cycle ----
    wr(A_MASK, 16'h00F0);
    bfm.addr_only(adr(A_MASK), AM_A24_USER);
    expect_rd(A_MASK, 16'h00F0, "address-only cycle changes nothing");
    mech[M_AONLY]++;

    // ---- module reset ----
    f0 = failures;
    c = '0; c.cnt_en = 1; wr(A_CTRL, c);
    busy_in[9] = 1; clocks(20); busy_in[9] = 0;
    cmd(mk_cmd(1));
    cmd(mk_cmd(6));
    expect_rd(A_MASK, 16'h0000, "reset clears mask");
    expect_rd(A_CTRL, 16'h0000, "reset clears control");
    expect_rd(A_CNT_BASE + 9, 16'h0000, "reset clears counters");
    expect_rd(A_FIFO_EMPTY, 16'hFFFF, "reset empties FIFOs");
    if (failures == f0) mech[M_RESET]++;

    for (int m = 0; m < M_COUNT; m++) begin
      $display("mechanism %-8s happened %0d times", mech_name[m], mech[m]);
      check(mech[m] > 0, $sformatf("mechanism %s exercised", mech_name[m]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

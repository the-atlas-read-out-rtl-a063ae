// tb_vme_interrupter: interrupt request, acknowledge and daisy chain.
//
// Two interrupters share the bus, the second one's IACKIN* taken from the
// first one's IACKOUT*. Checked: a rising service request raises IRQ* on
// the programmed level only when enabled and the level is not 0; a held
// request does not raise it again; an acknowledge of another level is
// passed down the chain (IACKOUT* low) and not answered; an acknowledge of
// the right level is answered by the first pending interrupter in the chain
// with its Status/ID and releases its IRQ*, the next acknowledge reaching
// the second; the software test pulse raises a request; disabling withdraws
// one.
module tb_vme_interrupter;
  logic clk = 0, rst = 1;
  logic [2:0] lvl0, lvl1;
  logic en0, en1, sreq0, sreq1, test0, test1;
  logic [7:0] sid0, sid1;
  logic [23:1] a; logic [5:0] am; logic as_n, write_n, lword_n, iack_n, iackin_n;
  logic [1:0] ds_n; logic [15:0] m_d;
  logic iackout0, iackout1, oe0, oe1, dt0, dt1, pend0, pend1;
  logic [7:1] irq0, irq1;
  logic [15:0] d0, d1;
  int checks = 0, failures = 0;
  bit saw_iackout0;

  vme_interrupter u0 (.clk, .rst, .bus_rst(rst), .irq_level(lvl0), .irq_en(en0), .status_id(sid0),
    .sreq(sreq0), .irq_test(test0), .vme_iack_n(iack_n), .vme_iackin_n(iackin_n), .vme_as_n(as_n),
    .vme_ds_n(ds_n), .vme_a(a[3:1]), .vme_iackout_n(iackout0), .vme_irq_n(irq0),
    .vme_d_out(d0), .vme_d_oe(oe0), .vme_dtack_n(dt0), .pending(pend0));
  vme_interrupter u1 (.clk, .rst, .bus_rst(rst), .irq_level(lvl1), .irq_en(en1), .status_id(sid1),
    .sreq(sreq1), .irq_test(test1), .vme_iack_n(iack_n), .vme_iackin_n(iackout0), .vme_as_n(as_n),
    .vme_ds_n(ds_n), .vme_a(a[3:1]), .vme_iackout_n(iackout1), .vme_irq_n(irq1),
    .vme_d_out(d1), .vme_d_oe(oe1), .vme_dtack_n(dt1), .pending(pend1));
  vme_master_bfm bfm (.clk, .a, .am, .as_n, .ds_n, .write_n, .lword_n, .iack_n, .iackin_n,
    .d_out(m_d), .d_in(oe0 ? d0 : oe1 ? d1 : 16'hFFFF), .dtack_n(dt0 && dt1));

  always #50 clk = ~clk;
  always @(posedge clk) if (!iackout0) saw_iackout0 = 1;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic clocks(input int n); repeat (n) @(negedge clk); endtask

  task automatic ack(input logic [2:0] level, input bit exp_ok, input logic [7:0] exp_id);
    bit ok; logic [7:0] id;
    clocks(4);
    saw_iackout0 = 0;
    bfm.iack_cycle(level, id, ok);
    check(ok == exp_ok, $sformatf("IACK level %0d answered=%0d", level, ok));
    if (ok && exp_ok) check(id == exp_id, $sformatf("Status/ID %h expected %h", id, exp_id));
  endtask

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    lvl0 = 3; lvl1 = 3; en0 = 1; en1 = 1; sid0 = 8'h5A; sid1 = 8'hC7;
    sreq0 = 0; sreq1 = 0; test0 = 0; test1 = 0;
    clocks(4); rst = 0; clocks(2);
    check(irq0 == 7'h7F && irq1 == 7'h7F, "no request after reset");
    // Request from the first interrupter.
    sreq0 = 1; clocks(3);
    check(irq0 == 7'b1111011 && pend0, "IRQ3 asserted");
    clocks(20);
    // Other level: passed down, not answered.
    ack(3'd5, 0, 8'h00);
    check(saw_iackout0, "IACK of another level passed down the chain");
    check(pend0 && !irq0[3], "still pending");
    // Right level: answered, released (address lines moving on early).
    bfm.pipeline = 1;
    ack(3'd3, 1, 8'h5A);
    bfm.pipeline = 0;
    check(!saw_iackout0, "answered IACK not passed on");
    check(!pend0 && irq0 == 7'h7F, "released on acknowledge");
    clocks(50);
    check(!pend0, "held request does not re-trigger");
    sreq0 = 0; clocks(2);
    // Both pending: first in the chain answers first.
    sreq0 = 1; sreq1 = 1; clocks(3);
    check(pend0 && pend1, "both pending");
    ack(3'd3, 1, 8'h5A);
    check(!pend0 && pend1, "first in chain served first");
    ack(3'd3, 1, 8'hC7);
    check(!pend1, "second served next");
    // Software test pulse on level 6.
    lvl1 = 6; test1 = 1; clocks(1); test1 = 0; clocks(2);
    check(pend1 && irq1 == 7'b1011111, $sformatf("test interrupt on IRQ6 %b %b", pend1, irq1));
    ack(3'd6, 1, 8'hC7);
    // Disable withdraws; level 0 requests nothing.
    test0 = 1; clocks(1); test0 = 0; clocks(2);
    check(pend0, "test pending");
    en0 = 0; clocks(2);
    check(!pend0 && irq0 == 7'h7F, "disable withdraws");
    en0 = 1; lvl0 = 0; test0 = 1; clocks(1); test0 = 0; clocks(2);
    check(!pend0 && irq0 == 7'h7F, "level 0 requests nothing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

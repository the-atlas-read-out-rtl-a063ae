// tb_busy_tree: three ROD-Busy modules wired as a busy tree.
//
// Two leaf modules each collect 15 ROD busy signals plus one sub-system
// busy; their busy outputs, together with two sub-detector busy signals,
// enter a root module whose busy output is the trigger veto. All three sit
// on one VME bus with different base switches. Checked: the veto equals the
// OR of every unmasked busy in the tree at all times (random stimulus, with
// one ROD masked at its leaf over VME); the root's duration counter for a
// leaf equals the number of clocks that leaf's output was busy.
module tb_busy_tree;
  import rod_busy_pkg::*;
  localparam logic [15:0] BASE [3] = '{16'h0100, 16'h0200, 16'h0300};
  logic clk = 0, rst = 1;
  logic [15:0] rod_a, rod_b, root_in;
  logic sub_x, sub_y, sub_det2, sub_det3;
  logic [3:0] out_a, out_b, out_root;
  logic [23:1] a; logic [5:0] am; logic as_n, write_n, lword_n, iack_n, iackin_n;
  logic [1:0] ds_n; logic [15:0] m_d;
  logic [2:0][15:0] d_out; logic [2:0] d_oe, dtack_n, iackout_n;
  logic [2:0][7:1] irq_n;
  logic [15:0] d_bus;
  int checks = 0, failures = 0;
  int leaf_a_busy = 0;
  bit counting = 0;

  always_comb begin
    d_bus = 16'hFFFF;
    for (int i = 0; i < 3; i++) if (d_oe[i]) d_bus = d_out[i];
  end

  rod_busy_module u_leaf_a (.clk, .rst, .busy_in({sub_x, rod_a[14:0]}), .busy_out(out_a),
    .base_sw(BASE[0]), .vme_a(a), .vme_am(am), .vme_as_n(as_n), .vme_ds_n(ds_n),
    .vme_write_n(write_n), .vme_lword_n(lword_n), .vme_iack_n(iack_n), .vme_iackin_n(iackin_n),
    .vme_iackout_n(iackout_n[0]), .vme_d_in(m_d), .vme_d_out(d_out[0]), .vme_d_oe(d_oe[0]),
    .vme_dtack_n(dtack_n[0]), .vme_irq_n(irq_n[0]));
  rod_busy_module u_leaf_b (.clk, .rst, .busy_in({sub_y, rod_b[14:0]}), .busy_out(out_b),
    .base_sw(BASE[1]), .vme_a(a), .vme_am(am), .vme_as_n(as_n), .vme_ds_n(ds_n),
    .vme_write_n(write_n), .vme_lword_n(lword_n), .vme_iack_n(iack_n), .vme_iackin_n(iackout_n[0]),
    .vme_iackout_n(iackout_n[1]), .vme_d_in(m_d), .vme_d_out(d_out[1]), .vme_d_oe(d_oe[1]),
    .vme_dtack_n(dtack_n[1]), .vme_irq_n(irq_n[1]));
  assign root_in = {12'h000, out_b[0], sub_det3, sub_det2, out_a[0]};
  rod_busy_module u_root (.clk, .rst, .busy_in(root_in), .busy_out(out_root),
    .base_sw(BASE[2]), .vme_a(a), .vme_am(am), .vme_as_n(as_n), .vme_ds_n(ds_n),
    .vme_write_n(write_n), .vme_lword_n(lword_n), .vme_iack_n(iack_n), .vme_iackin_n(iackout_n[1]),
    .vme_iackout_n(iackout_n[2]), .vme_d_in(m_d), .vme_d_out(d_out[2]), .vme_d_oe(d_oe[2]),
    .vme_dtack_n(dtack_n[2]), .vme_irq_n(irq_n[2]));
  vme_master_bfm bfm (.clk, .a, .am, .as_n, .ds_n, .write_n, .lword_n, .iack_n, .iackin_n,
    .d_out(m_d), .d_in(d_bus), .dtack_n(&dtack_n));

  always #50 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic wr(input int m, input logic [6:0] w, input logic [15:0] d);
    bit ok;
    bfm.write16({BASE[m], w, 1'b0}, AM_A24_USER, d, ok);
    check(ok, "write acknowledged");
  endtask
  task automatic rd(input int m, input logic [6:0] w, output logic [15:0] d);
    bit ok;
    bfm.read16({BASE[m], w, 1'b0}, AM_A24_USER, d, ok);
    check(ok, "read acknowledged");
  endtask

  // Count the clocks on which leaf A's output is busy, as the root samples it.
  always @(posedge clk) if (counting && out_a[0]) leaf_a_busy++;

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] d, mask_a;
    ctrl_t c;
    rod_a = '0; rod_b = '0; sub_x = 0; sub_y = 0; sub_det2 = 0; sub_det3 = 0;
    repeat (4) @(negedge clk);
    rst = 0;
    repeat (4) @(negedge clk);
    mask_a = 16'h0010;                        // ROD 4 of leaf A is faulty
    wr(0, A_MASK, mask_a);
    rd(0, A_MASK, d);
    check(d == mask_a, "leaf A mask");
    rd(1, A_MASK, d);
    check(d == 16'h0000, "leaf B untouched");
    c = '0; c.cnt_en = 1;
    wr(2, A_CTRL, c);
    wr(2, A_CMD, 16'h0001);                   // clear root counters
    @(negedge clk);
    counting = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      rod_a    = ($urandom() % 40 == 0) ? 16'(1) << ($urandom() % 15) : '0;
      rod_b    = ($urandom() % 40 == 0) ? 16'(1) << ($urandom() % 15) : '0;
      if (i % 50 == 0) rod_a[4] = 1;          // the masked ROD is busy often
      sub_x    = ($urandom() % 100) == 0;
      sub_y    = ($urandom() % 100) == 0;
      sub_det2 = ($urandom() % 200) == 0;
      sub_det3 = ($urandom() % 200) == 0;
      #1;
      check(out_root[0] == ((|(rod_a[14:0] & ~mask_a[14:0])) | sub_x | (|rod_b[14:0]) | sub_y |
                            sub_det2 | sub_det3), "veto is the OR of the tree");
      check(out_a == {4{out_a[0]}} && out_root == {4{out_root[0]}}, "four equal outputs");
    end
    @(negedge clk);
    rod_a = '0; rod_b = '0; sub_x = 0; sub_y = 0; sub_det2 = 0; sub_det3 = 0;
    counting = 0;
    repeat (5) @(negedge clk);
    wr(2, A_CTRL, 16'h0000);
    rd(2, A_CNT_BASE + 0, d);
    check(d == 16'(leaf_a_busy), $sformatf("root counts leaf A busy: %0d vs %0d", d, leaf_a_busy));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_vme_if: VME slave cycles and register file.
//
// A VME master model runs D16 cycles against the slave with base switches
// 0xA5C3. Checked: every read/write register reads back what was written
// in A24 (AM 0x39/0x3D) and A16 (AM 0x29/0x2D) cycles; cycles to another
// base, with another address modifier, byte cycles and IACK cycles get no
// DTACK* and change nothing; an address-only cycle changes nothing; status,
// input, flag, counter and FIFO words read back from their sources; a FIFO
// read gives exactly one pop pulse on its own FIFO; a command write gives a
// one-clock pulse; reset clears the registers; DTACK* comes within 4 clocks
// of the data strobes; cycles whose address lines change right after AS*
// falls (address pipelining) still reach the right register.
module tb_vme_if;
  import rod_busy_pkg::*;
  localparam int N_IN = 16;
  localparam logic [15:0] BASE = 16'hA5C3;
  logic clk = 0, bus_rst = 1, rst = 1;
  logic [23:1] vme_a;
  logic [5:0] vme_am;
  logic vme_as_n, vme_write_n, vme_lword_n, vme_iack_n, iackin_n;
  logic [1:0] vme_ds_n;
  logic [15:0] vme_d_in, vme_d_out;
  logic vme_d_oe, vme_dtack_n;
  logic [15:0] base_sw;
  ctrl_t ctrl; cmd_t cmd; status_t status;
  logic [N_IN-1:0] mask, test, circ, fifo_rd, input_status, fifo_empty, fifo_full;
  logic [15:0] seq_shadow, sreq_interval, sreq_limit;
  logic [2:0] irq_level; logic irq_en; logic [7:0] status_id;
  logic [N_IN-1:0][15:0] count, fifo_data;
  int checks = 0, failures = 0;
  int pops [N_IN];
  int cmd_pulses = 0;
  cmd_t cmd_seen;

  vme_if #(.N_IN(N_IN)) dut (.*);
  vme_master_bfm bfm (.clk, .a(vme_a), .am(vme_am), .as_n(vme_as_n), .ds_n(vme_ds_n),
    .write_n(vme_write_n), .lword_n(vme_lword_n), .iack_n(vme_iack_n), .iackin_n(iackin_n),
    .d_out(vme_d_in), .d_in(vme_d_oe ? vme_d_out : 16'hFFFF), .dtack_n(vme_dtack_n));

  always #50 clk = ~clk;   // 10 MHz

  always @(posedge clk) begin
    for (int i = 0; i < N_IN; i++) if (fifo_rd[i]) pops[i]++;
    if (cmd != '0) begin cmd_pulses++; cmd_seen = cmd; end
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic logic [23:0] adr24(input logic [6:0] w);
    return {BASE, w, 1'b0};
  endfunction
  function automatic logic [23:0] adr16(input logic [6:0] w);
    return {8'h00, BASE[7:0], w, 1'b0};
  endfunction

  task automatic wr(input logic [23:0] a, input logic [5:0] am, input logic [15:0] d, input bit exp_ok);
    bit ok;
    bfm.write16(a, am, d, ok);
    check(ok == exp_ok, $sformatf("write %h ack %0d", a, ok));
    if (ok) check(bfm.last_cycles <= 4, "DTACK latency");
  endtask
  task automatic rd(input logic [23:0] a, input logic [5:0] am, input logic [15:0] exp, input bit exp_ok);
    bit ok; logic [15:0] d;
    bfm.read16(a, am, d, ok);
    check(ok == exp_ok, $sformatf("read %h ack %0d", a, ok));
    if (ok && exp_ok) check(d == exp, $sformatf("read %h = %h, expected %h", a, d, exp));
  endtask

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [6:0] rw [10];
    logic [15:0] v [10];
    logic [15:0] wmask [10];
    bit ok; logic [15:0] d;
    rw = '{A_CTRL, A_MASK, A_TEST, A_SEQ_SHADOW, A_CIRC, A_SREQ_INTVL, A_SREQ_LIMIT,
           A_IRQ_CTRL, A_STATUS_ID, A_CTRL};
    wmask = '{16'hFFFF, 16'hFFFF, 16'hFFFF, 16'hFFFF, 16'hFFFF, 16'hFFFF, 16'hFFFF,
              16'h000F, 16'h00FF, 16'hFFFF};
    base_sw = BASE;
    for (int i = 0; i < N_IN; i++) begin
      pops[i] = 0; count[i] = 16'(1000 + 7 * i); fifo_data[i] = 16'(16'hF000 + i);
    end
    status = 16'h000B; input_status = 16'h1234; fifo_empty = 16'h00F0; fifo_full = 16'h0F00;
    repeat (4) @(posedge clk);
    @(negedge clk) begin bus_rst = 0; rst = 0; end
    @(negedge clk) cmd_pulses = 0;
    // Read/write registers, A24 then A16.
    for (int pass = 0; pass < 4; pass++) begin
      logic [5:0] am;
      am = (pass == 0) ? AM_A24_USER : (pass == 1) ? AM_A24_SUP : (pass == 2) ? AM_A16_USER : AM_A16_SUP;
      for (int k = 0; k < 9; k++) begin
        v[k] = $urandom();
        wr(pass < 2 ? adr24(rw[k]) : adr16(rw[k]), am, v[k], 1);
      end
      for (int k = 0; k < 9; k++)
        rd(pass < 2 ? adr24(rw[k]) : adr16(rw[k]), am, v[k] & wmask[k], 1);
    end
    check(mask == v[1] && test == v[2] && seq_shadow == v[3], "register outputs");
    // Not for this module: no DTACK, no change.
    wr({16'hA5C4, 7'(A_MASK), 1'b0}, AM_A24_USER, 16'h5555, 0);
    wr({8'h00, 8'hC4, 7'(A_MASK), 1'b0}, AM_A16_USER, 16'h5555, 0);
    wr(adr24(A_MASK), 6'h09, 16'h5555, 0);        // A32 modifier
    bfm.cycle(adr24(A_MASK), AM_A24_USER, 1'b1, 16'h5555, 2'b10, 1'b0, d, ok);   // byte cycle
    check(!ok, "byte cycle not acknowledged");
    bfm.cycle(adr24(A_MASK), AM_A24_USER, 1'b1, 16'h5555, 2'b00, 1'b1, d, ok);   // IACK
    check(!ok, "IACK cycle ignored by the slave");
    bfm.addr_only(adr24(A_MASK), AM_A24_USER);
    check(mask == v[1], "nothing changed by foreign or address-only cycles");
    rd(adr24(A_MASK), AM_A24_USER, v[1], 1);
    // Read-back sources.
    rd(adr24(A_STATUS), AM_A24_USER, 16'h000B, 1);
    rd(adr24(A_INPUT), AM_A24_USER, 16'h1234, 1);
    rd(adr24(A_FIFO_EMPTY), AM_A24_USER, 16'h00F0, 1);
    rd(adr24(A_FIFO_FULL), AM_A24_USER, 16'h0F00, 1);
    for (int i = 0; i < N_IN; i++) rd(adr24(A_CNT_BASE + 7'(i)), AM_A24_USER, 16'(1000 + 7 * i), 1);
    for (int i = 0; i < N_IN; i++) check(pops[i] == 0, "no pop on counter reads");
    for (int i = 0; i < N_IN; i++) begin
      rd(adr24(A_FIFO_BASE + 7'(i)), AM_A24_USER, 16'(16'hF000 + i), 1);
      for (int j = 0; j < N_IN; j++) check(pops[j] == (j <= i ? 1 : 0), "one pop on the FIFO read");
    end
    // Address pipelining: A and AM change 20 ns after AS* falls.
    bfm.pipeline = 1;
    wr(adr24(A_TEST), AM_A24_USER, 16'hBEEF, 1);
    rd(adr24(A_TEST), AM_A24_USER, 16'hBEEF, 1);
    wr(adr16(A_SREQ_LIMIT), AM_A16_USER, 16'h1357, 1);
    rd(adr16(A_SREQ_LIMIT), AM_A16_SUP, 16'h1357, 1);
    check(test == 16'hBEEF && sreq_limit == 16'h1357, "pipelined writes land");
    bfm.pipeline = 0;
    // Command pulses.
    wr(adr24(A_CMD), AM_A24_USER, 16'h0015, 1);
    check(cmd_pulses == 1 && cmd_seen == 16'h0015, "command pulse");
    rd(adr24(A_CMD), AM_A24_USER, 16'h0000, 1);
    // Reset clears registers.
    @(negedge clk) rst = 1;
    @(negedge clk) rst = 0;
    rd(adr24(A_MASK), AM_A24_USER, 16'h0000, 1);
    rd(adr24(A_CTRL), AM_A24_USER, 16'h0000, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

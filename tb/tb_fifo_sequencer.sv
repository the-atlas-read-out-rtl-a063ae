// tb_fifo_sequencer: software mode pass-through and timed transfers.
//
// Software mode: random VME controls must reach the counters and FIFOs
// unchanged and no timed transfer may happen. Sequencer mode: entering it
// clears the counters; transfers must then come exactly every `shadow`
// clocks (checked for 5, 37, 65535 = 6.5535 ms at 10 MHz, and 0 = 65536),
// each with a counter clear, a FIFO write and a read of exactly the FIFOs
// that are full and marked circular.
module tb_fifo_sequencer;
  localparam int N_IN = 16, W = 16;
  logic clk = 0, rst = 1;
  logic seq_en, sw_cnt_en, sw_cnt_rst, sw_fifo_wr, sw_fifo_rst;
  logic [W-1:0] shadow, down_cnt;
  logic [N_IN-1:0] circ, fifo_full, vme_fifo_rd, fifo_rd;
  logic cnt_en, cnt_clear, fifo_wr, fifo_clear, transfer, running;
  int checks = 0, failures = 0;
  longint cyc = 0;

  fifo_sequencer #(.N_IN(N_IN), .W(W)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at cycle %0d", what, cyc);
    end
  endtask

  // Enter sequencer mode with period p and check n transfers.
  task automatic run_seq(input logic [W-1:0] p, input int n);
    longint t0, last;
    int seen;
    int unsigned period;
    period = (p == 0) ? 65536 : p;
    shadow = p;
    @(negedge clk);
    seq_en = 1;
    #1;
    check(cnt_clear && cnt_en, "counters cleared and enabled on start");
    check(!transfer, "no transfer on start");
    t0 = cyc; last = t0; seen = 0;
    while (seen < n) begin
      @(negedge clk);
      check(cnt_en, "counters enabled in sequencer mode");
      if (transfer) begin
        seen++;
        check(cyc - last == longint'(period), $sformatf("transfer period %0d", period));
        check(cnt_clear && fifo_wr, "transfer clears counters and writes FIFOs");
        check(fifo_rd == (circ & fifo_full), "circular reads on transfer");
        last = cyc;
      end else begin
        check(!fifo_wr && fifo_rd == '0, "no FIFO access between transfers");
      end
      circ = $urandom(); fifo_full = $urandom();
      #1;
    end
    @(negedge clk);
    seq_en = 0;
    @(negedge clk);
  endtask

  initial begin
    #30000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seq_en = 0; shadow = '0; circ = '0; fifo_full = '0; vme_fifo_rd = '0;
    sw_cnt_en = 0; sw_cnt_rst = 0; sw_fifo_wr = 0; sw_fifo_rst = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    // Software mode.
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      sw_cnt_en = $urandom(); sw_cnt_rst = $urandom(); sw_fifo_wr = $urandom();
      sw_fifo_rst = $urandom(); vme_fifo_rd = $urandom(); circ = $urandom();
      fifo_full = $urandom(); shadow = 16'd3;
      #1;
      check(cnt_en == sw_cnt_en && cnt_clear == sw_cnt_rst && fifo_wr == sw_fifo_wr &&
            fifo_clear == sw_fifo_rst && fifo_rd == vme_fifo_rd && !transfer && !running,
            "software mode controls");
    end
    @(negedge clk);
    sw_cnt_en = 0; sw_cnt_rst = 0; sw_fifo_wr = 0; sw_fifo_rst = 0; vme_fifo_rd = '0;
    run_seq(16'd5, 20);
    run_seq(16'd37, 10);
    run_seq(16'd65535, 2);
    run_seq(16'd0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

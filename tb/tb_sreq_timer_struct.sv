// tb_sreq_timer_struct: busy time-out service requester.
//
// Directed cases: with interval 100 and limit 30, a continuous busy raises
// the request on the 30th busy clock; a busy of 29 clocks per 100-clock
// window never does; the request stays until cleared; disabling stops the
// timer but software set and clear still work. Then a random busy pattern
// with random registers is compared every clock with a model that counts
// busy clocks within consecutive windows of `interval` clocks.
module tb_sreq_timer_struct;
  localparam int W = 16;
  logic clk = 0, rst = 1;
  logic busy, enable, sw_set, sw_clr, sreq;
  logic [W-1:0] interval, limit, interval_cnt, limit_cnt;
  int checks = 0, failures = 0;
  int m_win, m_lim;
  bit m_sreq;

  sreq_timer_struct #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Model update for one clock with the present inputs.
  task automatic model_step();
    int lim_next;
    lim_next = m_lim + ((busy && m_lim < 65535) ? 1 : 0);
    if (sw_clr) m_sreq = 0;
    else if (sw_set || (enable && busy && lim_next >= int'(limit))) m_sreq = 1;
    m_win++;
    if (m_win >= int'(interval)) begin m_win = 0; m_lim = 0; end
    else m_lim = lim_next;
  endtask

  task automatic tick();
    model_step();
    @(posedge clk);
    #1;
    check(sreq == m_sreq, "sreq vs model");
    @(negedge clk);
  endtask

  task automatic restart();
    rst = 1; @(negedge clk); rst = 0;
    m_win = 0; m_lim = 0; m_sreq = 0;
  endtask

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int first;
    busy = 0; enable = 0; sw_set = 0; sw_clr = 0; interval = 100; limit = 30;
    m_win = 0; m_lim = 0; m_sreq = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    restart();
    // Continuous busy: request after exactly 30 busy clocks.
    enable = 1; busy = 1; first = -1;
    for (int i = 1; i <= 60; i++) begin
      tick();
      if (sreq && first < 0) first = i;
    end
    check(first == 30, $sformatf("request on busy clock 30 (got %0d)", first));
    busy = 0;
    repeat (300) tick();
    check(sreq, "request held until cleared");
    sw_clr = 1; tick(); sw_clr = 0;
    check(!sreq, "software clear");
    // 29 busy clocks per window: never.
    restart();
    for (int w = 0; w < 20; w++)
      for (int i = 0; i < 100; i++) begin busy = (i >= 50 && i < 79); tick(); end
    check(!sreq, "29 of 100 never reaches 30");
    // Busy straddling a window boundary is split: 20 + 20 never reaches 30.
    restart();
    for (int i = 0; i < 300; i++) begin busy = (i >= 80 && i < 120); tick(); end
    check(!sreq, "window restart clears the limit counter");
    // Disabled: no request, software set works.
    restart();
    enable = 0; busy = 1;
    repeat (200) tick();
    check(!sreq, "disabled timer raises nothing");
    sw_set = 1; tick(); sw_set = 0;
    check(sreq, "software set");
    sw_clr = 1; tick(); sw_clr = 0;
    // Random.
    restart();
    for (int i = 0; i < 100000; i++) begin
      if (i % 20000 == 0) begin
        interval = 16'(50 + $urandom() % 400);
        limit    = 16'(10 + $urandom() % 200);
        restart();
      end
      busy   = ($urandom() % 4) != 0;
      enable = ($urandom() % 100) != 0;
      sw_set = ($urandom() % 5000) == 0;
      sw_clr = ($urandom() % 300) == 0;
      tick();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

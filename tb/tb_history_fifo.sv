// tb_history_fifo: 512-word history FIFO against a queue model.
//
// Phase 1 writes 600 words into the default 512-deep FIFO: the full flag
// must rise after 512 and the extra writes must be dropped, so reading back
// gives the first 512 words. Phase 2 fills it again and then writes with a
// simultaneous read when full (the circular-buffer access), which must keep
// the newest 512 words. Phase 3 applies random reads and writes, and a
// clear, checking data, empty and full against the model every clock.
module tb_history_fifo;
  localparam int W = 16, DEPTH = 512;
  logic clk = 0, rst = 1;
  logic clear, wr, rd, empty, full;
  logic [W-1:0] wdata, rdata;
  int checks = 0, failures = 0;
  logic [W-1:0] q [$];

  history_fifo #(.W(W), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // One clock with the given controls, model updated alongside.
  task automatic step(input bit w, input logic [W-1:0] d, input bit r, input bit c);
    bit do_r, do_w;
    wr = w; wdata = d; rd = r; clear = c;
    #1;
    check(empty == (q.size() == 0), "empty flag");
    check(full == (q.size() == DEPTH), "full flag");
    if (q.size() != 0) check(rdata == q[0], "head data");
    do_r = r && q.size() != 0;
    do_w = w && (q.size() < DEPTH || do_r);
    @(posedge clk);
    if (c) q.delete();
    else begin
      if (do_r) void'(q.pop_front());
      if (do_w) q.push_back(d);
    end
    @(negedge clk);
    wr = 0; rd = 0; clear = 0;
  endtask

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr = 0; rd = 0; clear = 0; wdata = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    // Phase 1: keep the first 512.
    for (int i = 0; i < 600; i++) step(1, W'(i), 0, 0);
    check(full && q.size() == DEPTH, "full after 512");
    for (int i = 0; i < DEPTH; i++) begin
      check(rdata == W'(i), "first 512 kept");
      step(0, 0, 1, 0);
    end
    check(empty, "empty after read-out");
    // Phase 2: circular, keep the newest 512.
    for (int i = 0; i < DEPTH; i++) step(1, W'(1000 + i), 0, 0);
    for (int i = 0; i < 300; i++) step(1, W'(2000 + i), full, 0);
    check(full, "still full");
    check(rdata == W'(1000 + 300), "oldest after circular writes");
    step(0, 0, 0, 1);
    check(empty, "clear empties");
    // Phase 3: random.
    for (int i = 0; i < 20000; i++)
      step(($urandom() % 3) != 0, W'($urandom()), ($urandom() % 3) == 0, ($urandom() % 5000) == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

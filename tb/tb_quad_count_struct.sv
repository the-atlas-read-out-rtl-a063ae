// tb_quad_count_struct: duration counters against a reference model.
//
// Random busy inputs, enable and clear pulses are applied for several
// thousand clocks, with a stretch of continuous busy long enough to reach
// saturation on one counter. A reference model in the testbench counts
// enabled busy clocks, restarts at the current tick on a clear and
// saturates at 65535; all four counters are compared every clock.
module tb_quad_count_struct;
  localparam int N = 4, W = 16;
  logic clk = 0, rst = 1;
  logic en, clear;
  logic [N-1:0] busy;
  logic [N-1:0][W-1:0] count;
  int checks = 0, failures = 0;
  int unsigned model [N];
  int sat_seen = 0;

  quad_count_struct #(.N(N), .W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0; clear = 0; busy = '0;
    for (int i = 0; i < N; i++) model[i] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int cyc = 0; cyc < 140000; cyc++) begin
      if (cyc < 70000) begin
        busy  = $urandom();
        en    = ($urandom() % 8) != 0;
        clear = ($urandom() % 500) == 0;
      end else begin
        busy  = 4'b0001;           // long busy on input 0: saturates
        en    = 1;
        clear = (cyc == 70000);
      end
      @(posedge clk);
      for (int i = 0; i < N; i++) begin
        if (clear)                       model[i] = (en && busy[i]) ? 1 : 0;
        else if (en && busy[i] && model[i] < 65535) model[i]++;
      end
      #1;
      for (int i = 0; i < N; i++) begin
        checks++;
        if (count[i] != W'(model[i])) begin
          failures++;
          if (failures < 10) $display("FAIL counter %0d = %0d, expected %0d", i, count[i], model[i]);
        end
      end
      if (count[0] == 16'hFFFF) sat_seen++;
      @(negedge clk);
    end
    checks++;
    if (sat_seen == 0) begin failures++; $display("FAIL saturation never reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

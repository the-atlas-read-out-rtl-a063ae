// tb_ip_reg_structure: random test of input test/mask/sum and synchronisers.
//
// Each clock the testbench applies random busy inputs, test, mask and force
// bits and checks: the busy outputs combinationally equal the OR of the
// unmasked (input OR test) lines and the force bit; busy_sync equals the
// lines two clocks earlier; the monitor latch equals them three clocks
// earlier; the synchronised global busy follows the registered lines.
module tb_ip_reg_structure;
  localparam int N_IN = 16, N_OUT = 4;
  logic clk = 0, rst = 1;
  logic [N_IN-1:0] busy_in, test, mask, busy_sync, input_status;
  logic force_busy, busy_global, busy_global_sync;
  logic [N_OUT-1:0] busy_out;
  int checks = 0, failures = 0;
  logic [N_IN-1:0] hist [4];
  logic [N_IN-1:0] mask_q;
  logic force_q;

  ip_reg_structure #(.N_IN(N_IN), .N_OUT(N_OUT)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    busy_in = '0; test = '0; mask = '0; force_busy = 0;
    for (int k = 0; k < 4; k++) hist[k] = '0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int cyc = 0; cyc < 2000; cyc++) begin
      @(negedge clk);
      // sparse busy so that masking matters
      busy_in    = $urandom() & $urandom() & $urandom();
      test       = (cyc % 7 == 0) ? N_IN'(1) << ($urandom() % N_IN) : '0;
      mask       = (cyc < 1000) ? $urandom() : '0;
      force_busy = ($urandom() % 16) == 0;
      #1;
      check(busy_out == {N_OUT{(|((busy_in | test) & ~mask)) | force_busy}}, "busy_out sum");
      @(posedge clk);
      #1;
      // hist[0] = lines sampled at this edge
      hist[3] = hist[2]; hist[2] = hist[1]; hist[1] = hist[0]; hist[0] = busy_in | test;
      mask_q = mask; force_q = force_busy;
      if (cyc >= 4) begin
        check(busy_sync == hist[1], "busy_sync latency 2");
        check(input_status == hist[2], "monitor latch latency 3");
        check(busy_global_sync == ((|(hist[2] & ~mask_q)) | force_q), "global busy sync");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// quad_count_struct: four 16-bit busy-duration up-counters.
//
// Counter i advances by one on each 10 MHz clock on which its synchronised
// busy input is true and the global enable is set, so its value is the busy
// time of that input in 100 ns units. Sixteen inputs use four of these blocks,
// as in the original module. The global clear starts a new measurement
// interval: the counter is loaded with the current tick (1 if enabled and
// busy, else 0), so that no tick is lost when the sequencer clears the
// counters on the same clock that the FIFOs store them. Counters saturate at
// all-ones instead of wrapping. The load-with-current-tick clear and the
// saturation are this design's choices; width, rate, enable and reset follow
// the description.
module quad_count_struct #(
  parameter int unsigned N = 4,
  parameter int unsigned W = 16
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                en,       // global counter enable
  input  logic                clear,    // global counter reset / new interval
  input  logic [N-1:0]        busy,     // synchronised busy inputs
  output logic [N-1:0][W-1:0] count
);
  always_ff @(posedge clk) begin
    if (rst) begin
      count <= '0;
    end else begin
      for (int i = 0; i < N; i++) begin
        if (clear)
          count[i] <= W'(en && busy[i]);
        else if (en && busy[i] && count[i] != {W{1'b1}})
          count[i] <= count[i] + 1'b1;
      end
    end
  end
endmodule

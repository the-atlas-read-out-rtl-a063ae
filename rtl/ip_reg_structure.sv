// ip_reg_structure: busy input monitoring, test stimulation, masking and summing.
//
// Each input line is first ORed with its test-register bit, which stands for
// the open-collector test driver that pulls the physical line to the busy
// level. The resulting lines feed two paths:
//   * the summing path: lines not masked off are ORed together with the
//     force-busy control bit into the global busy, which drives all N_OUT busy
//     outputs. This path is combinational, so a busy reaches the outputs (and
//     the next module of the tree, or the trigger veto) without waiting for
//     the clock.
//   * the clocked path: a two-flop synchroniser gives busy_sync, which feeds
//     the duration counters (unmasked, as in the original module) and the
//     monitor latch read as the input status register, plus a synchronised
//     copy of the global busy for the time-out timer and the status bit.
// Inputs are active high (1 = busy); the inversion to the 0 V busy level of
// the cables is done by the receivers and drivers outside this logic.
// Mask polarity (1 = removed from the sum) and the synchroniser are this
// design's choices; everything else follows the module's description.
module ip_reg_structure #(
  parameter int unsigned N_IN  = 16,
  parameter int unsigned N_OUT = 4
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [N_IN-1:0]  busy_in,       // from the input receivers
  input  logic [N_IN-1:0]  test,          // test register
  input  logic [N_IN-1:0]  mask,          // mask register, 1 = masked off
  input  logic             force_busy,    // control bit: global busy
  output logic [N_IN-1:0]  busy_sync,     // synchronised lines, to the counters
  output logic [N_IN-1:0]  input_status,  // monitor latch
  output logic             busy_global,   // combinational global busy
  output logic             busy_global_sync,
  output logic [N_OUT-1:0] busy_out       // to the output drivers
);
  logic [N_IN-1:0] line;
  logic [N_IN-1:0] sync1;

  assign line        = busy_in | test;
  assign busy_global = (|(line & ~mask)) | force_busy;
  assign busy_out    = {N_OUT{busy_global}};

  always_ff @(posedge clk) begin
    if (rst) begin
      sync1            <= '0;
      busy_sync        <= '0;
      input_status     <= '0;
      busy_global_sync <= 1'b0;
    end else begin
      sync1            <= line;
      busy_sync        <= sync1;
      input_status     <= busy_sync;
      busy_global_sync <= (|(busy_sync & ~mask)) | force_busy;
    end
  end
endmodule

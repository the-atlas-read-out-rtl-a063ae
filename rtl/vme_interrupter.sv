// vme_interrupter: VMEbus interrupter (release on acknowledge).
//
// A rising edge of the time-out service request, or a software test pulse,
// makes an interrupt pending when the interrupter is enabled and a level
// 1..7 is programmed. While pending, IRQ*[level] is driven low. In an
// interrupt acknowledge cycle (IACK* low, AS* low, both data strobes low and
// IACKIN* low) whose A[3:1] equals the level, the interrupter puts its 8-bit
// Status/ID on D[7:0], drives DTACK* low until the data strobes rise, and
// withdraws the request. Any other acknowledge cycle is passed on down the
// daisy chain by driving IACKOUT* low until AS* rises. A[3:1] is latched by
// the falling edge of AS*. Disabling the
// interrupter withdraws a pending request. Strobes are synchronised to the
// 10 MHz clock like the slave's. The programmable level, enable and 8-bit
// Status/ID follow the description; release on acknowledge and the edge
// trigger are this design's choices.
module vme_interrupter (
  input  logic        clk,
  input  logic        rst,
  input  logic        bus_rst,
  input  logic [2:0]  irq_level,
  input  logic        irq_en,
  input  logic [7:0]  status_id,
  input  logic        sreq,         // time-out service request
  input  logic        irq_test,     // software test pulse
  // VMEbus
  input  logic        vme_iack_n,
  input  logic        vme_iackin_n,
  input  logic        vme_as_n,
  input  logic [1:0]  vme_ds_n,
  input  logic [3:1]  vme_a,
  output logic        vme_iackout_n,
  output logic [7:1]  vme_irq_n,
  output logic [15:0] vme_d_out,
  output logic        vme_d_oe,
  output logic        vme_dtack_n,
  output logic        pending
);
  typedef enum logic [1:0] {S_IDLE, S_RESP, S_PASS, S_WAIT} state_t;
  state_t state;

  logic       sreq_q;
  logic       as_m, as_s, iackin_m, iackin_s;
  logic [1:0] ds_m, ds_s;
  logic       iack_cycle;
  logic [3:1] a_l;

  // Acknowledged level, latched by the falling edge of AS* (see vme_if).
  always_ff @(negedge vme_as_n) a_l <= vme_a;

  assign iack_cycle = !as_s && !iackin_s && !vme_iack_n && (ds_s == 2'b00);

  always_ff @(posedge clk) begin
    if (bus_rst) begin
      as_m <= 1'b1; as_s <= 1'b1;
      ds_m <= 2'b11; ds_s <= 2'b11;
      iackin_m <= 1'b1; iackin_s <= 1'b1;
    end else begin
      as_m <= vme_as_n;         as_s <= as_m;
      ds_m <= vme_ds_n;         ds_s <= ds_m;
      iackin_m <= vme_iackin_n; iackin_s <= iackin_m;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      sreq_q  <= 1'b0;
      pending <= 1'b0;
      state   <= S_IDLE;
    end else begin
      sreq_q <= sreq;
      if (!irq_en || irq_level == 3'd0)
        pending <= 1'b0;
      else if ((sreq && !sreq_q) || irq_test)
        pending <= 1'b1;
      case (state)
        S_IDLE:
          if (iack_cycle) begin
            if (pending && a_l == irq_level) state <= S_RESP;
            else                               state <= S_PASS;
          end
        S_RESP:
          if (ds_s == 2'b11) begin
            pending <= 1'b0;
            state   <= S_WAIT;
          end
        S_PASS:
          if (as_s) state <= S_IDLE;
        S_WAIT:
          if (as_s) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    vme_irq_n = '1;
    if (pending && irq_level != 3'd0) vme_irq_n[irq_level] = 1'b0;
  end
  assign vme_iackout_n = (state != S_PASS);
  assign vme_dtack_n   = (state != S_RESP);
  assign vme_d_oe      = (state == S_RESP);
  assign vme_d_out     = {8'd0, status_id};

  // The chain is passed on or answered, never both.
  a_chain: assert property (@(posedge clk) !(!vme_iackout_n && !vme_dtack_n));
endmodule

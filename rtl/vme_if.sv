// vme_if: VMEbus slave interface and register file of the ROD-Busy module.
//
// A conventional VME slave for 16-bit word data cycles (D16) with standard
// (A24) or short (A16) addressing. Four hex switches (base_sw) hold the base
// address: an A24 cycle selects the module when A[23:8] equals all four
// switches, an A16 cycle when A[15:8] equals the lower two. The module
// occupies 256 bytes; the register map is listed in rod_busy_pkg.
//
// Timing: the bus strobes are asynchronous and pass through two-flop
// synchronisers on the 10 MHz clock. The address, address modifier, IACK* and
// LWORD* lines are latched by the falling edge of AS* itself, so the master
// may move on to the next address as soon as AS* has fallen (address
// pipelining). When both data strobes are then seen low with LWORD* high the
// access is made on one clock, with WRITE* sampled then, and DTACK* is driven low until the data strobes
// are released. A cycle whose address strobe rises without a data strobe is
// an address-only cycle and ends with no action. Byte or long-word cycles are
// not acknowledged. The strobes must stay at each level for more than one
// clock (100 ns); a read or write is acknowledged about 300 ns after DS*.
//
// Register side: writes load the control, mask, test, sequencer shadow,
// circular, time-out, interrupter and Status/ID registers; a write to the
// command register gives one-clock pulses (counter reset, FIFO write, FIFO
// reset, service-request set/clear, interrupter test, module reset). A read
// of FIFO i's address returns its oldest word and pops it (fifo_rd pulse).
// rst clears the registers (power-on or module reset); bus_rst resets only the
// bus state machine, so a module reset written over the bus does not cut its
// own cycle short. The D16/A24/A16, address pipelining, address-only cycles
// and switch base address follow the description; the register map, decode
// window and synchronous implementation are this design's choices.
module vme_if
  import rod_busy_pkg::*;
#(
  parameter int unsigned N_IN = 16
) (
  input  logic                   clk,
  input  logic                   bus_rst,
  input  logic                   rst,
  // VMEbus (data bus split into input, output and output enable)
  input  logic [23:1]            vme_a,
  input  logic [5:0]             vme_am,
  input  logic                   vme_as_n,
  input  logic [1:0]             vme_ds_n,
  input  logic                   vme_write_n,
  input  logic                   vme_lword_n,
  input  logic                   vme_iack_n,
  input  logic [15:0]            vme_d_in,
  output logic [15:0]            vme_d_out,
  output logic                   vme_d_oe,
  output logic                   vme_dtack_n,
  input  logic [15:0]            base_sw,
  // registers
  output ctrl_t                  ctrl,
  output logic [N_IN-1:0]        mask,
  output logic [N_IN-1:0]        test,
  output logic [15:0]            seq_shadow,
  output logic [N_IN-1:0]        circ,
  output logic [15:0]            sreq_interval,
  output logic [15:0]            sreq_limit,
  output logic [2:0]             irq_level,
  output logic                   irq_en,
  output logic [7:0]             status_id,
  output cmd_t                   cmd,
  output logic [N_IN-1:0]        fifo_rd,
  // read-back sources
  input  status_t                status,
  input  logic [N_IN-1:0]        input_status,
  input  logic [N_IN-1:0]        fifo_empty,
  input  logic [N_IN-1:0]        fifo_full,
  input  logic [N_IN-1:0][15:0]  count,
  input  logic [N_IN-1:0][15:0]  fifo_data
);
  typedef enum logic [1:0] {S_IDLE, S_SEL, S_SKIP, S_ACK} state_t;
  state_t state;

  logic       as_m, as_s, as_q;
  logic [1:0] ds_m, ds_s;
  logic [23:1] a_l;
  logic [5:0]  am_l;
  logic        iack_l, lword_l;
  logic [6:0]  waddr;
  logic        write_q;
  logic [15:0] rdata_q;
  logic       as_fall, hit, access;

  // Address phase, latched by the falling edge of AS* itself, so that the
  // master may change the address lines right after it (address pipelining).
  // These flops are read only after the synchronised AS* has fallen.
  always_ff @(negedge vme_as_n) begin
    a_l     <= vme_a;
    am_l    <= vme_am;
    iack_l  <= vme_iack_n;
    lword_l <= vme_lword_n;
  end

  assign waddr   = a_l[7:1];
  assign as_fall = as_q && !as_s;
  assign hit = iack_l &&
               ((((am_l == AM_A24_USER) || (am_l == AM_A24_SUP)) && (a_l[23:8] == base_sw)) ||
                (((am_l == AM_A16_USER) || (am_l == AM_A16_SUP)) && (a_l[15:8] == base_sw[7:0])));
  assign access = (state == S_SEL) && !as_s && (ds_s == 2'b00) && lword_l;

  // Read multiplexer.
  function automatic logic [15:0] read_word(input logic [6:0] a);
    logic [15:0] r;
    r = '0;
    case (a)
      A_CTRL:       r = ctrl;
      A_STATUS:     r = status;
      A_MASK:       r = 16'(mask);
      A_TEST:       r = 16'(test);
      A_INPUT:      r = 16'(input_status);
      A_SEQ_SHADOW: r = seq_shadow;
      A_CIRC:       r = 16'(circ);
      A_FIFO_EMPTY: r = 16'(fifo_empty);
      A_FIFO_FULL:  r = 16'(fifo_full);
      A_SREQ_INTVL: r = sreq_interval;
      A_SREQ_LIMIT: r = sreq_limit;
      A_IRQ_CTRL:   r = {12'd0, irq_en, irq_level};
      A_STATUS_ID:  r = {8'd0, status_id};
      default:      r = '0;
    endcase
    for (int i = 0; i < N_IN; i++) begin
      if (a == A_CNT_BASE + 7'(i))  r = count[i];
      if (a == A_FIFO_BASE + 7'(i)) r = fifo_data[i];
    end
    return r;
  endfunction

  // Bus state machine.
  always_ff @(posedge clk) begin
    if (bus_rst) begin
      as_m <= 1'b1; as_s <= 1'b1; as_q <= 1'b1;
      ds_m <= 2'b11; ds_s <= 2'b11;
      state   <= S_IDLE;
      write_q <= 1'b0;
      rdata_q <= '0;
    end else begin
      as_m <= vme_as_n;  as_s <= as_m;  as_q <= as_s;
      ds_m <= vme_ds_n;  ds_s <= ds_m;
      case (state)
        S_IDLE:
          if (as_fall) state <= hit ? S_SEL : S_SKIP;
        S_SKIP:
          if (as_s) state <= S_IDLE;
        S_SEL:
          if (as_s)
            state <= S_IDLE;              // address-only cycle or end of cycle
          else if (access) begin
            write_q <= !vme_write_n;
            rdata_q <= read_word(waddr);
            state   <= S_ACK;
          end
        S_ACK:
          if (ds_s == 2'b11) state <= as_s ? S_IDLE : S_SEL;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign vme_dtack_n = (state != S_ACK);
  assign vme_d_oe    = (state == S_ACK) && !write_q;
  assign vme_d_out   = rdata_q;

  // FIFO pop on a read of its address.
  always_comb begin
    fifo_rd = '0;
    for (int i = 0; i < N_IN; i++)
      if (access && vme_write_n && waddr == A_FIFO_BASE + 7'(i))
        fifo_rd[i] = 1'b1;
  end

  // Register file.
  logic wr;
  logic [15:0] wdata;
  assign wr    = access && !vme_write_n;
  assign wdata = vme_d_in;

  always_ff @(posedge clk) begin
    if (rst) begin
      ctrl          <= '0;
      mask          <= '0;
      test          <= '0;
      seq_shadow    <= '0;
      circ          <= '0;
      sreq_interval <= '0;
      sreq_limit    <= '0;
      irq_level     <= '0;
      irq_en        <= 1'b0;
      status_id     <= '0;
      cmd           <= '0;
    end else begin
      cmd <= '0;
      if (wr)
        case (waddr)
          A_CTRL:       ctrl          <= wdata;
          A_MASK:       mask          <= wdata[N_IN-1:0];
          A_TEST:       test          <= wdata[N_IN-1:0];
          A_SEQ_SHADOW: seq_shadow    <= wdata;
          A_CIRC:       circ          <= wdata[N_IN-1:0];
          A_SREQ_INTVL: sreq_interval <= wdata;
          A_SREQ_LIMIT: sreq_limit    <= wdata;
          A_IRQ_CTRL:   {irq_en, irq_level} <= wdata[3:0];
          A_STATUS_ID:  status_id     <= wdata[7:0];
          A_CMD:        cmd           <= wdata;
          default: ;
        endcase
    end
  end

  // Data is driven only while the cycle is acknowledged.
  a_oe_dtack: assert property (@(posedge clk) vme_d_oe |-> !vme_dtack_n);
endmodule

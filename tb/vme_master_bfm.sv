// vme_master_bfm: VMEbus master model for the testbenches.
//
// Drives single D16 data cycles, address-only cycles and interrupt
// acknowledge cycles with the strobe order of the VMEbus: address, AM and
// WRITE* first, then AS*, then data and both DS*; it then waits for DTACK*
// (or gives up after `timeout` clocks, as a bus timer giving BERR* would),
// takes the read data, releases DS* and AS* and waits for DTACK* to rise.
// Strobes change on the falling clock edge and are held for `hold` clocks.
// With `pipeline` set, the address and AM lines change 20 ns after AS*
// falls, as a master pipelining its next address would drive them.
module vme_master_bfm #(
  parameter int unsigned HOLD = 2
) (
  input  logic        clk,
  output logic [23:1] a,
  output logic [5:0]  am,
  output logic        as_n,
  output logic [1:0]  ds_n,
  output logic        write_n,
  output logic        lword_n,
  output logic        iack_n,
  output logic        iackin_n,
  output logic [15:0] d_out,
  input  logic [15:0] d_in,
  input  logic        dtack_n
);
  int unsigned timeout = 40;
  int unsigned last_cycles;   // clocks from DS* low to DTACK* low in the last cycle
  bit pipeline = 0;            // change A and AM 20 ns after AS* falls

  initial begin
    a = '0; am = '0; as_n = 1'b1; ds_n = 2'b11; write_n = 1'b1;
    lword_n = 1'b1; iack_n = 1'b1; iackin_n = 1'b1; d_out = '0;
  end

  task automatic idle(input int unsigned n);
    repeat (n) @(negedge clk);
  endtask

  // One cycle; ds selects the data strobes (2'b00 for D16).
  task automatic cycle(input logic [23:0] addr, input logic [5:0] amod, input logic wr,
                       input logic [15:0] wdata, input logic [1:0] ds, input logic iack,
                       output logic [15:0] rdata, output bit ok);
    int unsigned n;
    @(negedge clk);
    a = addr[23:1]; am = amod; write_n = !wr; lword_n = 1'b1; iack_n = !iack;
    idle(1);
    as_n = 1'b0; iackin_n = !iack;
    d_out = wdata;
    if (pipeline) begin
      #20;
      a = ~a; am = ~am;        // next cycle's address already on the bus
    end
    idle(1);
    ds_n = ds;
    n = 0; ok = 0;
    while (n < timeout) begin
      @(negedge clk);
      n++;
      if (!dtack_n) begin ok = 1; break; end
    end
    last_cycles = n;
    rdata = d_in;
    idle(HOLD);
    ds_n = 2'b11;
    idle(1);
    as_n = 1'b1; iackin_n = 1'b1; iack_n = 1'b1;
    n = 0;
    while (!dtack_n && n < timeout) begin @(negedge clk); n++; end
    idle(HOLD);
  endtask

  task automatic write16(input logic [23:0] addr, input logic [5:0] amod,
                         input logic [15:0] wdata, output bit ok);
    logic [15:0] r;
    cycle(addr, amod, 1'b1, wdata, 2'b00, 1'b0, r, ok);
  endtask

  task automatic read16(input logic [23:0] addr, input logic [5:0] amod,
                        output logic [15:0] rdata, output bit ok);
    cycle(addr, amod, 1'b0, 16'h0, 2'b00, 1'b0, rdata, ok);
  endtask

  // Address strobe only, no data strobe.
  task automatic addr_only(input logic [23:0] addr, input logic [5:0] amod);
    @(negedge clk);
    a = addr[23:1]; am = amod; write_n = 1'b1;
    idle(1);
    as_n = 1'b0;
    idle(6);
    as_n = 1'b1;
    idle(HOLD + 2);
  endtask

  // Interrupt acknowledge cycle for a level; returns the Status/ID byte.
  task automatic iack_cycle(input logic [2:0] level, output logic [7:0] id, output bit ok);
    logic [15:0] r;
    cycle({20'h0, level, 1'b0}, 6'h00, 1'b0, 16'h0, 2'b00, 1'b1, r, ok);
    id = r[7:0];
  endtask
endmodule

// atomi_passive_object - a passive object: address recognition plus a
// 4-channel analog switch between bus IO lines and a module's pins.
//
// A passive object cannot start a transaction. It only recognises its address
// and, while selected, connects its module (a GPS receiver with a serial
// port, a key matrix, a display) straight to the bus so that the active object
// that addressed it can drive and read the module's pins. The chip select of
// the address recogniser closes four switches that join IO[CH_BASE+3:CH_BASE]
// to the module pins; with the switches open the module pins sit at their
// pulled-up high level and the module does not touch the bus.
//
// Address recognition is the one-line latch on IO[SEL_LINE] (BYTE_MODE = 0) or
// the 8-bit latch and comparator for MY_ADDR (BYTE_MODE = 1).
//
// Latch-driven chip select and a quad switch (a 4066-type part) are the
// passive object of the document; the choice of switched lines and the
// treatment of a closed switch as joining two open-drain nets are this
// design's own.
//
// Interface: bus levels in, IO pull requests out; module side `mod_pull`
// (module pin pulling low) and `mod_in` (level at the module pin). Timing:
// combinational apart from the address latch, which acts on the ADDR edge.
module atomi_passive_object
  import atomi_pkg::*;
#(
  parameter bit                BYTE_MODE = 1'b0,
  parameter int unsigned       SEL_LINE  = 2,
  parameter logic [ADDR_W-1:0] MY_ADDR   = 8'h42,
  parameter int unsigned       CH_BASE   = 4
) (
  input  bus_t            bus,
  output logic [IO_W-1:0] io_pull,
  input  logic [NCH-1:0]  mod_pull,
  output logic [NCH-1:0]  mod_in,
  output logic            cs
);

  if (BYTE_MODE) begin : g_byte
    logic [ADDR_W-1:0] latched;
    atomi_byte_select #(.ADDR_W(ADDR_W)) u_sel (
      .addr_n (bus.addr_n),
      .io     (bus.io[ADDR_W-1:0]),
      .my_addr(MY_ADDR),
      .sel    (cs),
      .latched(latched)
    );
  end else begin : g_line
    atomi_line_select u_sel (
      .addr_n(bus.addr_n),
      .d     (bus.io[SEL_LINE]),
      .cs    (cs)
    );
  end

  always_comb begin
    io_pull = '0;
    for (int k = 0; k < NCH; k++) begin
      io_pull[CH_BASE + k] = cs & mod_pull[k];
      mod_in[k]            = cs ? bus.io[CH_BASE + k] : 1'b1;
    end
  end

endmodule

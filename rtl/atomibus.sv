// atomibus - the shared AtomiBus II lines of one bus.
//
// Nine IO lines, ADDR and SET run through every object; each is an
// open-drain net with a pull-up, so its level is low when any object pulls
// it low (wired-AND). ACK is different: it is split into segments by the
// arbitration switch of every object. Segment i lies on the upstream side of
// object i (object 0 is the start of the chain); object i's switch joins
// segment i to segment i+1 while the object holds no grant, and while it does,
// the switch separates them and grounds segment i+1. Each segment group that
// is joined by closed switches resolves as one wired-AND net.
//
// The line set (9 + 3) and the switched ACK chain follow the bus definition.
// Treating every line as a digital open-drain net is this design's reading of
// lines the definition calls analog.
//
// Interface: per-object pull requests `drv` and switch states `ack_cut`;
// outputs are the resolved line levels `bus` and, per object, the level of
// its own ACK segment. Purely combinational.
module atomibus
  import atomi_pkg::*;
#(
  parameter int unsigned NOBJ = 5
) (
  input  drive_t [NOBJ-1:0] drv,
  input  logic   [NOBJ-1:0] ack_cut,
  output bus_t              bus,
  output logic   [NOBJ-1:0] ack_seg
);

  // Segment NOBJ is the open end behind the last object.
  logic [NOBJ:0] seg_low;

  // Spread a low level along closed switches in both directions.
  function automatic logic [NOBJ:0] spread(input logic [NOBJ:0] low,
                                           input logic [NOBJ-1:0] cut);
    logic [NOBJ:0] fwd, bwd;
    fwd = low;
    for (int s = 1; s <= NOBJ; s++) fwd[s] = low[s] | (~cut[s-1] & fwd[s-1]);
    bwd = low;
    for (int s = NOBJ - 1; s >= 0; s--) bwd[s] = low[s] | (~cut[s] & bwd[s+1]);
    return fwd | bwd;
  endfunction

  always_comb begin
    bus.io     = '1;
    bus.addr_n = 1'b1;
    bus.set_n  = 1'b1;
    for (int i = 0; i < NOBJ; i++) begin
      bus.io     &= ~drv[i].io_pull;
      bus.addr_n &= ~drv[i].addr_pull;
      bus.set_n  &= ~drv[i].set_pull;
    end
  end

  // A segment is pulled low by its own object or grounded by the switch of
  // the object in front of it.
  always_comb begin
    for (int s = 0; s <= NOBJ; s++) begin
      seg_low[s] = 1'b0;
      if (s < NOBJ) seg_low[s] = seg_low[s] | drv[s].ack_pull;
      if (s > 0)    seg_low[s] = seg_low[s] | ack_cut[s-1];
    end
  end

  logic [NOBJ:0] grp_low;
  assign grp_low = spread(seg_low, ack_cut);
  assign ack_seg = ~grp_low[NOBJ-1:0];

endmodule

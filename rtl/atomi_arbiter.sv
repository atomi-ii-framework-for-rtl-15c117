// atomi_arbiter - bus reservation and daisy-chain arbitration of one active
// object.
//
// The bus is free when ADDR, SET and ACK are all high. An object asks for the
// bus by releasing its BUS_REQ pin (input `req` high); the gate then raises
// the BUS_REQUEST node (`grant`) as soon as the bus is free. The node steers
// three 2:1 switches:
//   * it pulls SET low, so every other object sees the bus reserved at once;
//   * it replaces SET by a constant high at the gate's own input, so the
//     object does not lock itself out with its own SET pull;
//   * it cuts the ACK line towards the next object in the chain and ties the
//     next object's side to ground.
// When two objects ask in the same instant, the one nearer the start of the
// chain cuts the ACK of all objects behind it, so they drop their grant:
// priority is geographical. The grant ends when the MCU drives BUS_REQ low
// again, or when ADDR goes low, which is what the granted object does next to
// start its transaction (ADDR low then keeps the bus reserved).
//
// The switch arrangement and the free-bus rule follow the reservation
// schematic of the bus definition. In the schematic the node and the gate form
// an asynchronous loop; here the node is a register updated every clock, which
// makes the grant one clock late and lets two simultaneous requesters both
// see a grant for one clock before the upstream one wins. Users of `grant`
// (atomi_bus_master) therefore confirm it over two clocks.
//
// Interface: all bus inputs are line levels (1 = high). Outputs: `grant`
// (readable BUS_REQ level), `set_pull` (pull SET low), `ack_cut` (open the
// ACK daisy chain and ground the downstream segment).
module atomi_arbiter (
  input  logic clk,
  input  logic rst_n,
  input  logic req,       // BUS_REQ released by the MCU
  input  logic addr_n,    // ADDR line
  input  logic set_n,     // SET line
  input  logic ack_in_n,  // upstream ACK segment
  output logic grant,     // BUS_REQUEST node
  output logic set_pull,
  output logic ack_cut
);

  logic set_seen;  // SET as seen by the gate, through the left-hand switch
  logic bus_free;

  assign set_seen = grant ? 1'b1 : set_n;
  assign bus_free = addr_n & set_seen & ack_in_n;

  // A BUS_REQ pin driven low overrides the gate output through R1.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) grant <= 1'b0;
    else        grant <= req & bus_free;
  end

  assign set_pull = grant;
  assign ack_cut  = grant;

endmodule

// atomi_byte_select - 8-bit address recognition in logic.
//
// The object number is placed on IO[7:0] and latched on the falling edge of
// ADDR, like the one-line scheme but eight bits wide; an equality comparator
// with the object's own number adds the "one more gate" that an 8-bit address
// needs. The object is selected while ADDR stays low. 256 objects can share a
// bus this way, and objects using this scheme can sit on the same bus as
// one-line objects.
//
// The 8-bit width and the latch-on-falling-edge rule come from the bus
// definition; the latch-plus-comparator circuit is the simplest one that does
// it and is this design's choice. The latch is level-sensitive on purpose,
// transparent while ADDR is high, like the one-line scheme's latch: its
// output holds the current address before ADDR falls, so `sel` never shows
// the previous transaction's address.
//
// Timing: `sel` is valid as soon as ADDR is low; no clock is needed.
module atomi_byte_select #(
  parameter int unsigned ADDR_W = 8
) (
  input  logic              addr_n,
  input  logic [ADDR_W-1:0] io,
  input  logic [ADDR_W-1:0] my_addr,
  output logic              sel,
  output logic [ADDR_W-1:0] latched
);

  always_latch
    if (addr_n) latched = io;

  assign sel = ~addr_n & (latched == my_addr);

endmodule

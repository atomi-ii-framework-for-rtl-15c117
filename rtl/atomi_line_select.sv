// atomi_line_select - one-line address recognition of a passive object.
//
// A single latch does the whole job: its D input is the IO line chosen as the
// object's select line, and ADDR is wired both to its latch enable and to its
// active-low output enable. While ADDR is high the latch follows the line and
// its output is off; when ADDR falls the value on the line is held and the
// output turns on. The object is therefore selected for the whole transaction
// if its line was high when ADDR fell. Several objects can be selected at once
// by raising several lines.
//
// The wiring is the single-gate latch of the bus definition, and it is kept a
// level-sensitive latch here on purpose: the latch follows the line while
// ADDR is high, so at the falling edge its output already has the new value
// and the chip select cannot glitch with the previous transaction's value.
// With the output disabled the chip select reads low.
//
// Timing: `cs` rises together with the falling edge of ADDR and falls with
// its rising edge. No clock is needed.
module atomi_line_select (
  input  logic addr_n,  // ADDR line: latch enable and output enable
  input  logic d,       // the IO line used as this object's select line
  output logic cs       // chip select, active high
);

  logic q;

  always_latch
    if (addr_n) q = d;

  assign cs = q & ~addr_n;

endmodule

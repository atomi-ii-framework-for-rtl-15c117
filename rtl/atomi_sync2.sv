// atomi_sync2 - two-flop synchroniser for a bus line entering a clock domain.
//
// Objects on the bus run from unrelated clocks, so a control line driven by
// another object is passed through two flip-flops before a state machine
// looks at it. The output lags the line by two to three clocks. Reset value
// is 1, the level of an idle (pulled-up) line.
module atomi_sync2 (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q
);

  logic meta;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta <= 1'b1;
      q    <= 1'b1;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end

endmodule

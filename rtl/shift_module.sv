// shift_module: input latch plus right shifter, producing one SPT term of a
// product (multiplicand * 2^-ctl, truncated).
//
// While en is high the magnitude x is captured on each rising clk edge (the
// input latch); y = captured >> ctl, combinational from the latch, with the
// bits shifted out discarded (truncation). The latch stays closed when en is
// low, so the shifter does not switch for a term that is not used.
// Timing: y reflects x one clk edge after en is high. The latch-then-shift
// structure follows the described module; the 4-bit shift control and the
// plain barrel shifter are this design's choices.
module shift_module #(
  parameter int unsigned W  = 15,
  parameter int unsigned SW = 4
) (
  input  logic          clk,
  input  logic          en,
  input  logic [W-1:0]  x,
  input  logic [SW-1:0] ctl,
  output logic [W-1:0]  y
);

  logic [W-1:0] x_q;

  always_ff @(posedge clk) begin
    if (en) x_q <= x;
  end

  assign y = x_q >> ctl;

endmodule

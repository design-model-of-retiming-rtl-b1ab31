// latch_adder: one-bit full adder whose sum output is held while its enable
// is low, the cell from which the add/subtract stages are built.
//
// The sum S = A ^ B ^ Cin is passed to the output while EA is high and kept
// while EA is low; the carry-out is a plain combinational output, because
// only the sum leaves the stage and needs to be held. In this synchronous
// model the hold element is a flip-flop with enable: S takes the new sum on
// each rising clk edge at which EA is high, so S is valid one cycle after
// EA is raised. The full-adder function, held sum and unheld carry follow
// the described cell; using a clocked flip-flop instead of a level-sensitive
// keeper is this design's choice. The held bit has no reset: the delay line
// only raises EA after a request, so S is written before it is read.
module latch_adder (
  input  logic clk,
  input  logic a,
  input  logic b,
  input  logic cin,
  input  logic ea,
  output logic s,
  output logic cout
);

  logic sum_d;

  always_comb begin
    sum_d = a ^ b ^ cin;
    cout  = (a & b) | (a & cin) | (b & cin);
  end

  always_ff @(posedge clk) begin
    if (ea) s <= sum_d;
  end

endmodule

// product_mux: final selection of the SPT multiplier. The magnitude comes
// from the last stage that was used: Shift Module 1 alone for a one-term
// coefficient, ADD/SUB1 for two terms, ADD/SUB2 for three. The product sign
// is the sign-magnitude rule: negative when the multiplicand sign and the
// coefficient sign differ. Purely combinational.
// The three-way selection follows the described output mux; the select
// coding (en2 only counts together with en1) is this design's choice.
module product_mux #(
  parameter int unsigned W = 15
) (
  input  logic         en1,
  input  logic         en2,
  input  logic [W-1:0] sm1,
  input  logic [W-1:0] as1,
  input  logic [W-1:0] as2,
  input  logic         sg,
  input  logic         x_sign,
  output logic [W:0]   product
);

  always_comb begin
    if (!en1)     product[W-1:0] = sm1;
    else if (en2) product[W-1:0] = as2;
    else          product[W-1:0] = as1;
    product[W] = sg ^ x_sign;
  end

endmodule

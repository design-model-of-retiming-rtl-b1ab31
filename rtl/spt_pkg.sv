// spt_pkg: shared types and constants of the SPT (signed power-of-two)
// shift-add multiplier and the FIR filter built from it.
//
// A coefficient is never stored as a binary number. It is kept already
// decoded into the control signals the multiplier consumes: up to three
// power-of-two terms, each a right shift of the multiplicand, combined by
// two add/subtract stages. The coefficient value is
//   (-1)^sg * ( 2^-ctl1 + (en1 ? (sub1?-1:1)*2^-ctl2 : 0)
//                       + (en1&en2 ? (sub2?-1:1)*2^-ctl3 : 0) )
// with every partial product truncated to the 15-bit magnitude grid, plus
// an optional one-LSB correction (see add_sub). The field list follows the
// multiplier's control inputs; the 4-bit shift width is this design's choice.
package spt_pkg;

  localparam int unsigned MAG_W   = 15;  // magnitude bits of multiplicand and product
  localparam int unsigned SHIFT_W = 4;   // width of one shift control (0..15 places)

  typedef struct packed {
    logic               sg;     // coefficient sign
    logic               en1;    // second SPT term present
    logic               en2;    // third SPT term present
    logic [SHIFT_W-1:0] ctl1;   // shift of term 1 (largest weight)
    logic [SHIFT_W-1:0] ctl2;   // shift of term 2
    logic [SHIFT_W-1:0] ctl3;   // shift of term 3
    logic               sub1;   // term 2 is subtracted
    logic               sub2;   // term 3 is subtracted
    logic               corr;   // truncation correction
  } spt_ctrl_t;


  // Zero coefficient: term 1 minus an equal term 2.
  localparam spt_ctrl_t SPT_ZERO = '{sg: 1'b0, en1: 1'b1, en2: 1'b0,
                                     ctl1: '1, ctl2: '1, ctl3: '0,
                                     sub1: 1'b1, sub2: 1'b0, corr: 1'b0};

endpackage

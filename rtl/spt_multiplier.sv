// spt_multiplier: 16-bit sign-magnitude shift-add multiplier whose
// coefficient arrives as predecoded control signals for up to three signed
// power-of-two (SPT) terms, with a four-phase REQ/ACK handshake.
//
// Three shift modules each latch the 15-bit multiplicand magnitude and shift
// it right by their term's amount. ADD/SUB1 combines terms 1 and 2, ADD/SUB2
// adds or subtracts term 3 to that; the output mux takes the last stage that
// was used, and the sign is SG combined with the multiplicand sign. Term 1
// always has the largest weight, so subtraction needs no comparison. The
// speculative delay line enables only the stages the coefficient needs and
// raises ACK after the matching time: with default delays ACK rises 1, 2 or
// 3 clk edges after REQ is first sampled, for 1, 2 or 3 terms, and PRODUCT
// is valid while ACK is high. Shift module 2 and 3 latches and the adder
// stages stay closed when their term is absent.
// Interface: hold multiplicand and ctrl stable while req is high; lower req
// after ack rises; raise the next req only after ack has fallen.
// The block structure and the control signals follow the described
// multiplier; it is built here as a synchronous circuit in which every delay
// element and latch is clocked, which is this design's choice.
module spt_multiplier
  import spt_pkg::*;
#(
  parameter int unsigned W         = 15,
  parameter int unsigned SHIFT_DLY = 1,
  parameter int unsigned ADD1_DLY  = 1,
  parameter int unsigned ADD2_DLY  = 1
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      req,
  input  logic [W:0] multiplicand,
  input  spt_ctrl_t ctrl,
  output logic [W:0] product,
  output logic      ack
);

  logic [W-1:0] sm1, sm2, sm3, as1, as2;
  logic         ea1, ea2;

  shift_module #(.W(W), .SW(SHIFT_W)) u_sm1 (
    .clk (clk), .en (req),
    .x (multiplicand[W-1:0]), .ctl (ctrl.ctl1), .y (sm1)
  );
  shift_module #(.W(W), .SW(SHIFT_W)) u_sm2 (
    .clk (clk), .en (req & ctrl.en1),
    .x (multiplicand[W-1:0]), .ctl (ctrl.ctl2), .y (sm2)
  );
  shift_module #(.W(W), .SW(SHIFT_W)) u_sm3 (
    .clk (clk), .en (req & ctrl.en2),
    .x (multiplicand[W-1:0]), .ctl (ctrl.ctl3), .y (sm3)
  );

  speculative_delay #(
    .SHIFT_DLY (SHIFT_DLY), .ADD1_DLY (ADD1_DLY), .ADD2_DLY (ADD2_DLY)
  ) u_dly (
    .clk (clk), .rst_n (rst_n), .req (req),
    .en1 (ctrl.en1), .en2 (ctrl.en2),
    .ea1 (ea1), .ea2 (ea2), .ack (ack)
  );

  add_sub #(.W(W)) u_as1 (
    .clk (clk), .ea (ea1), .sub (ctrl.sub1), .corr (ctrl.corr),
    .a (sm1), .b (sm2), .y (as1)
  );
  add_sub #(.W(W)) u_as2 (
    .clk (clk), .ea (ea2), .sub (ctrl.sub2), .corr (1'b0),
    .a (as1), .b (sm3), .y (as2)
  );

  product_mux #(.W(W)) u_mux (
    .en1 (ctrl.en1), .en2 (ctrl.en2),
    .sm1 (sm1), .as1 (as1), .as2 (as2),
    .sg (ctrl.sg), .x_sign (multiplicand[W]),
    .product (product)
  );

endmodule

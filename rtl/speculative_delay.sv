// speculative_delay: timing generator of the SPT multiplier. From the
// request and the two "term present" flags it produces the enables of the
// two add/subtract stages and the acknowledge, so that a product with fewer
// terms completes sooner and unused stages are never enabled.
//
//   d    = REQ delayed by SHIFT_DLY            (input latch + shifter time)
//   ea1  = d & en1                             (enable ADD/SUB1)
//   ea2  = (ea1 & en2) delayed by ADD1_DLY     (enable ADD/SUB2)
//   m    = en2 ? ea2 : ea1
//   ack  = en1 ? ((m & REQ) delayed by ADD2_DLY) : d
//          or, once REQ is low, any delay flip-flop still set
//
// Each delay is a chain of D flip-flops of the given number of cycles, reset
// to 0. With the default of one cycle each, ACK rises 1, 2 or 3 clk edges
// after REQ is first sampled high for a product of 1, 2 or 3 terms.
// Handshake is four-phase: REQ stays high until ACK, then falls; ACK falls
// again after the same path delay (the REQ gate before the last delay is the
// return-to-zero path). ACK is additionally held high after REQ falls until
// every delay flip-flop has cleared, so a new REQ always starts from an
// empty line; the fall therefore comes max(S, A2 if en1, S+A1 if en1&en2)
// edges after REQ falls. The gate-and-mux network follows the described
// delay line; the clock-cycle delay values, the reset and the hold of ACK
// during return-to-zero are this design's choices.
module speculative_delay #(
  parameter int unsigned SHIFT_DLY = 1,
  parameter int unsigned ADD1_DLY  = 1,
  parameter int unsigned ADD2_DLY  = 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic req,
  input  logic en1,
  input  logic en2,
  output logic ea1,
  output logic ea2,
  output logic ack
);

  logic [SHIFT_DLY-1:0] shift_q;
  logic [ADD1_DLY-1:0]  add1_q;
  logic [ADD2_DLY-1:0]  add2_q;
  logic d, m, busy;

  assign d   = shift_q[SHIFT_DLY-1];
  assign ea1 = d & en1;
  assign ea2 = add1_q[ADD1_DLY-1];
  assign m   = en2 ? ea2 : ea1;
  assign busy = (|shift_q) | (|add1_q) | (|add2_q);
  assign ack  = (en1 ? add2_q[ADD2_DLY-1] : d) | (!req & busy);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shift_q <= '0;
      add1_q  <= '0;
      add2_q  <= '0;
    end else begin
      shift_q <= SHIFT_DLY'({shift_q, req});
      add1_q  <= ADD1_DLY'({add1_q, ea1 & en2});
      add2_q  <= ADD2_DLY'({add2_q, m & req});
    end
  end

endmodule

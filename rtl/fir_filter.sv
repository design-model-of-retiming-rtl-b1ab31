// fir_filter: direct-form FIR filter of TAPS taps built from SPT shift-add
// multipliers, one per tap.
//
// Samples are 16-bit sign-magnitude Q15 numbers (bit 15 sign, bits 14:0 the
// magnitude in units of 2^-15). Each accepted sample enters a D flip-flop
// delay line x[0..TAPS-1] (x[0] newest). The controller then raises one REQ
// to all TAPS multipliers at once; each multiplies its tap by its predecoded
// coefficient word from coef_ctrl_mem and acknowledges after 1-3 cycles,
// depending on how many power-of-two terms its coefficient has. When every
// ACK is high the sign-magnitude products are converted to two's complement
// and summed:  y[n] = sum_k c_k * x[n-k]  (each product truncated as the
// multiplier does). REQ is then lowered and the next sample is accepted
// once all ACKs have fallen (four-phase handshake).
// Interface: in_valid/in_ready accept a sample on a clk edge where both are
// high; out_valid pulses for one cycle with out_sample, a two's-complement
// number with LSB weight 2^-15 and MAG_W+1+clog2(TAPS) bits (no rounding or
// saturation). Write coefficient words (coef_we/coef_addr/coef_data) only
// while in_ready is high.
// Timing with the default multiplier delays: out_valid rises 2 to 4 clk
// edges after the edge that accepts a sample (1 + the largest term count
// among the coefficients), and in_ready returns once every multiplier has
// completed its return-to-zero phase.
// The tap count of 16 is the largest evaluated configuration of the
// described filter and its multiplier and flip-flop delay line follow it;
// the direct-form arrangement, the controller and the output format are
// this design's choices.
module fir_filter
  import spt_pkg::*;
#(
  parameter int unsigned TAPS = 16,
  localparam int unsigned AW  = (TAPS > 1) ? $clog2(TAPS) : 1,
  localparam int unsigned OW  = MAG_W + 1 + $clog2(TAPS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          coef_we,
  input  logic [AW-1:0] coef_addr,
  input  spt_ctrl_t     coef_data,
  input  logic          in_valid,
  output logic          in_ready,
  input  logic [MAG_W:0] in_sample,
  output logic          out_valid,
  output logic [OW-1:0] out_sample
);

  typedef enum logic [1:0] {S_IDLE, S_MUL, S_RTZ} state_t;

  state_t          state_q;
  logic            req_q;
  logic [MAG_W:0]  x_q  [TAPS];
  logic [MAG_W:0]  prod [TAPS];
  logic [TAPS-1:0] ack;
  spt_ctrl_t       coef [TAPS];
  logic signed [OW-1:0] sum;

  coef_ctrl_mem #(.TAPS(TAPS)) u_coef (
    .clk (clk), .rst_n (rst_n),
    .we (coef_we), .waddr (coef_addr), .wdata (coef_data),
    .words (coef)
  );

  for (genvar k = 0; k < TAPS; k++) begin : g_tap
    spt_multiplier #(.W(MAG_W)) u_mul (
      .clk (clk), .rst_n (rst_n), .req (req_q),
      .multiplicand (x_q[k]), .ctrl (coef[k]),
      .product (prod[k]), .ack (ack[k])
    );
  end

  // Sum of the sign-magnitude products in two's complement.
  always_comb begin
    sum = '0;
    for (int k = 0; k < TAPS; k++) begin
      if (prod[k][MAG_W]) sum = sum - OW'(prod[k][MAG_W-1:0]);
      else                sum = sum + OW'(prod[k][MAG_W-1:0]);
    end
  end

  assign in_ready = (state_q == S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= S_IDLE;
      req_q      <= 1'b0;
      out_valid  <= 1'b0;
      out_sample <= '0;
      for (int k = 0; k < TAPS; k++) x_q[k] <= '0;
    end else begin
      out_valid <= 1'b0;
      unique case (state_q)
        S_IDLE: if (in_valid) begin
          x_q[0] <= in_sample;
          for (int k = 1; k < TAPS; k++) x_q[k] <= x_q[k-1];
          req_q   <= 1'b1;
          state_q <= S_MUL;
        end
        S_MUL: if (&ack) begin
          out_sample <= sum;
          out_valid  <= 1'b1;
          req_q      <= 1'b0;
          state_q    <= S_RTZ;
        end
        S_RTZ: if (!(|ack)) state_q <= S_IDLE;
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // Coefficients must not change while a product is being formed.
  a_coef_stable : assert property (@(posedge clk) disable iff (!rst_n)
    coef_we |-> state_q == S_IDLE)
    else $error("coefficient written while the filter is busy");

endmodule

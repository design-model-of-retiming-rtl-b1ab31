// fir_run: self-contained stimulus and checker for one fir_filter instance
// of TAPS taps, used by fir_taps_tb. It programs random coefficient words
// of 1 to 3 terms (one tap set to zero), streams N_SAMPLES random
// sign-magnitude samples, including full-scale positive and negative
// values, and compares every output and its latency (1 + the largest term
// count) with the spt_ref_pkg reference. Counts are reported on its ports
// when done rises.
module fir_run
  import spt_pkg::*;
  import spt_ref_pkg::*;
#(
  parameter int TAPS      = 4,
  parameter int N_SAMPLES = 60
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures
);

  localparam int AW = (TAPS > 1) ? $clog2(TAPS) : 1;
  localparam int OW = MAG_W + 1 + $clog2(TAPS);

  logic rst_n = 0, coef_we = 0, in_valid = 0, in_ready, out_valid;
  logic [AW-1:0] coef_addr = '0;
  spt_ctrl_t coef_data = '0;
  logic [15:0] in_sample = '0;
  logic [OW-1:0] out_sample;

  fir_filter #(.TAPS(TAPS)) dut (.*);

  spt_ctrl_t   coef [TAPS];
  logic [15:0] hist [TAPS];

  task automatic push(input logic [15:0] x);
    int lat, exp, maxt;
    @(negedge clk);
    in_valid = 1; in_sample = x;
    while (!in_ready) @(negedge clk);
    for (int k = TAPS - 1; k > 0; k--) hist[k] = hist[k-1];
    hist[0] = x;
    exp = 0; maxt = 0;
    for (int k = 0; k < TAPS; k++) begin
      exp += sm_to_int(spt_mul_ref(hist[k], coef[k]));
      if (n_terms(coef[k]) > maxt) maxt = n_terms(coef[k]);
    end
    @(posedge clk);
    #1; in_valid = 0;
    lat = 0;
    do begin
      @(posedge clk); #1; lat++;
    end while (!out_valid && lat < 50);
    checks++;
    if ($signed(out_sample) != OW'(exp)) begin
      failures++;
      $display("FAIL taps=%0d output %0d exp %0d", TAPS, $signed(out_sample), exp);
    end
    checks++;
    if (lat != 1 + maxt) begin
      failures++;
      $display("FAIL taps=%0d latency %0d exp %0d", TAPS, lat, 1 + maxt);
    end
  endtask

  initial begin
    done = 0; checks = 0; failures = 0;
    for (int k = 0; k < TAPS; k++) hist[k] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < TAPS; k++) begin
      coef[k] = rand_ctrl();
      if (k == 1) coef[k] = SPT_ZERO;
      if (k == 2) coef[k].en1 = 1'b0;
      if (k == 0) begin coef[k].en1 = 1'b1; coef[k].en2 = 1'b1; end
      @(negedge clk);
      coef_we = 1; coef_addr = AW'(k); coef_data = coef[k];
    end
    @(negedge clk);
    coef_we = 0;
    push(16'h7fff);
    push(16'hffff);
    for (int n = 2; n < N_SAMPLES; n++) push(16'($urandom));
    done = 1;
  end

endmodule

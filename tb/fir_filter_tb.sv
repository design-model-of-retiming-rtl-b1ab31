// fir_filter_tb: end-to-end test of the FIR filter at its default size
// (16 taps). Phases:
//   1. after reset, with every coefficient at its reset value (zero);
//   2. random coefficient words of 1, 2 and 3 terms with random sign,
//      subtraction and correction, random samples, random idle gaps;
//   3. all coefficients of one term (shortest latency);
//   4. reprogrammed random coefficients again.
// Each output is compared with sum_k ref(x[n-k], c_k) computed from the
// reference arithmetic in spt_ref_pkg over the testbench's own history of
// samples, and the accept-to-output latency with 1 + the largest term
// count among the coefficients. The testbench also offers samples while the
// filter is busy and counts those stalls. Every mechanism (1/2/3-term
// products, subtraction of term 2 and term 3, correction, negative
// coefficient, negative sample, zero coefficient, stall, reprogramming)
// must occur at least once.
module fir_filter_tb;
  import spt_pkg::*;
  import spt_ref_pkg::*;

  localparam int TAPS = 16;
  localparam int OW   = MAG_W + 1 + $clog2(TAPS);

  logic clk = 0, rst_n = 0;
  logic coef_we = 0;
  logic [$clog2(TAPS)-1:0] coef_addr = '0;
  spt_ctrl_t coef_data = '0;
  logic in_valid = 0, in_ready, out_valid;
  logic [15:0] in_sample = '0;
  logic [OW-1:0] out_sample;

  fir_filter dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  spt_ctrl_t coef [TAPS];
  logic [15:0] hist [TAPS];
  typedef enum int {M_T1, M_T2, M_T3, M_SUB1, M_SUB2, M_CORR, M_NEGC, M_NEGX,
                    M_ZERO, M_STALL, M_REPROG, M_N} mech_t;
  int mech [M_N];

  task automatic write_coef(input int k, input spt_ctrl_t c);
    @(negedge clk);
    while (!in_ready) @(negedge clk);
    coef_we = 1; coef_addr = $clog2(TAPS)'(k); coef_data = c;
    @(negedge clk);
    coef_we = 0;
    coef[k] = c;
  endtask

  task automatic program_random(input int max_terms);
    for (int k = 0; k < TAPS; k++) begin
      spt_ctrl_t c;
      c = rand_ctrl();
      if (max_terms == 1 || $urandom_range(0, 2) == 0) c.en1 = 1'b0;
      else if (max_terms == 2) c.en2 = 1'b0;
      if (k == 3 && max_terms > 1) c = SPT_ZERO;
      write_coef(k, c);
    end
    mech[M_REPROG]++;
  endtask

  task automatic push(input logic [15:0] x, input bit hold_busy);
    int lat, exp, maxt;
    if (hold_busy) begin
      // offer the sample while the previous one may still be in flight
      @(negedge clk);
    end else begin
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
    in_valid = 1; in_sample = x;
    while (!in_ready) begin
      mech[M_STALL]++;
      @(negedge clk);
    end
    for (int k = TAPS - 1; k > 0; k--) hist[k] = hist[k-1];
    hist[0] = x;
    exp = 0; maxt = 0;
    for (int k = 0; k < TAPS; k++) begin
      exp += sm_to_int(spt_mul_ref(hist[k], coef[k]));
      if (n_terms(coef[k]) > maxt) maxt = n_terms(coef[k]);
      mech[M_T1 + n_terms(coef[k]) - 1]++;
      if (coef[k].en1 && coef[k].sub1) mech[M_SUB1]++;
      if (coef[k].en1 && coef[k].en2 && coef[k].sub2) mech[M_SUB2]++;
      if (coef[k].en1 && coef[k].corr) mech[M_CORR]++;
      if (coef[k].sg) mech[M_NEGC]++;
      if (coef[k] == SPT_ZERO) mech[M_ZERO]++;
    end
    if (x[15] && x[14:0] != 0) mech[M_NEGX]++;
    @(posedge clk);                      // sample accepted at this edge
    #1; in_valid = 0;
    lat = 0;
    do begin
      @(posedge clk); #1; lat++;
    end while (!out_valid && lat < 50);
    checks++;
    if ($signed(out_sample) != OW'(exp)) begin
      failures++;
      $display("FAIL output %0d exp %0d", $signed(out_sample), exp);
    end
    checks++;
    if (lat != 1 + maxt) begin
      failures++;
      $display("FAIL latency %0d exp %0d", lat, 1 + maxt);
    end
  endtask

  initial begin
    for (int k = 0; k < TAPS; k++) begin
      coef[k] = SPT_ZERO;
      hist[k] = '0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 4; n++) push(16'($urandom), 0);
    program_random(3);
    for (int n = 0; n < 60; n++) push(16'($urandom), n % 2 == 1);
    program_random(1);
    for (int n = 0; n < 20; n++) push(16'($urandom), 1);
    program_random(3);
    push(16'h7fff, 1);
    push(16'hffff, 1);
    push(16'h8000, 1);
    for (int n = 0; n < 40; n++) push(16'($urandom), n % 3 == 0);
    for (int m = 0; m < M_N; m++) begin
      checks++;
      if (mech[m] == 0) begin
        failures++;
        $display("FAIL mechanism %s never exercised", mech_t'(m));
      end
    end
    $display("mechanisms: 1-term=%0d 2-term=%0d 3-term=%0d sub1=%0d sub2=%0d corr=%0d negcoef=%0d negx=%0d zero=%0d stall=%0d reprogram=%0d",
             mech[M_T1], mech[M_T2], mech[M_T3], mech[M_SUB1], mech[M_SUB2], mech[M_CORR],
             mech[M_NEGC], mech[M_NEGX], mech[M_ZERO], mech[M_STALL], mech[M_REPROG]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// fir_taps_tb: runs the 4-tap and 8-tap filter configurations side by side
// (the 16-tap default is covered by fir_filter_tb), each through fir_run,
// and sums their checks.
module fir_taps_tb;
  logic clk = 0;
  logic done4, done8;
  int checks4, failures4, checks8, failures8;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  fir_run #(.TAPS(4), .N_SAMPLES(80)) u_run4 (.clk, .done(done4), .checks(checks4), .failures(failures4));
  fir_run #(.TAPS(8), .N_SAMPLES(80)) u_run8 (.clk, .done(done8), .checks(checks8), .failures(failures8));

  initial begin
    wait (done4 && done8);
    checks   = checks4 + checks8;
    failures = failures4 + failures8;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures = failures4 + failures8 + 1;
    $display("TB_RESULT checks=%0d failures=%0d", checks4 + checks8, failures);
    $finish;
  end
endmodule

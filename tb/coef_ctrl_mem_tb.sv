// coef_ctrl_mem_tb: checks the reset contents (zero coefficient in every
// word), random writes against a shadow copy, that only the addressed word
// changes, and that writes with we low do nothing.
module coef_ctrl_mem_tb;
  import spt_pkg::*;
  localparam int TAPS = 16;

  logic clk = 0, rst_n = 0, we = 0;
  logic [3:0] waddr = '0;
  spt_ctrl_t wdata = '0;
  spt_ctrl_t words [TAPS];
  spt_ctrl_t shadow [TAPS];
  int checks = 0, failures = 0;

  coef_ctrl_mem #(.TAPS(TAPS)) dut (.*);

  always #5 clk = ~clk;

  task automatic compare(input string what);
    for (int i = 0; i < TAPS; i++) begin
      checks++;
      if (words[i] !== shadow[i]) begin
        failures++;
        $display("FAIL %s word %0d: %h exp %h", what, i, words[i], shadow[i]);
      end
    end
  endtask

  initial begin
    for (int i = 0; i < TAPS; i++) shadow[i] = SPT_ZERO;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1 compare("reset");
    for (int n = 0; n < 100; n++) begin
      @(negedge clk);
      we = n % 4 != 3;
      waddr = 4'($urandom);
      wdata = spt_ctrl_t'($urandom);
      if (we) shadow[waddr] = wdata;
      @(posedge clk); #1;
      compare("write");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

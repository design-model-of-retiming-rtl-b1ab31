// shift_module_tb: random multiplicands and every shift amount. Checks
// y = floor(x / 2^ctl) of the value latched while en was high, and that the
// latch keeps its value when x changes with en low.
module shift_module_tb;
  localparam int W = 15;
  logic clk = 0, en;
  logic [W-1:0] x, y;
  logic [3:0] ctl;
  int checks = 0, failures = 0;

  shift_module #(.W(W), .SW(4)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    en = 0; x = 0; ctl = 0;
    for (int n = 0; n < 320; n++) begin
      int xv;
      x = W'($urandom); ctl = 4'(n);
      xv = int'(x);
      en = 1;
      @(posedge clk); #1;
      checks++;
      if (int'(y) != xv / (1 << ctl)) begin
        failures++;
        $display("FAIL x=%0d ctl=%0d y=%0d", xv, ctl, y);
      end
      en = 0; x = ~x;
      @(posedge clk); #1;
      checks++;
      if (int'(y) != xv / (1 << ctl)) begin
        failures++;
        $display("FAIL hold x=%0d ctl=%0d y=%0d", xv, ctl, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

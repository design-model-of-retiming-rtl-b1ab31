// add_sub_tb: random operands for all four (sub, corr) modes. Checks that y
// equals a + b + corr or a - b - corr modulo 2^15 one clock edge after ea,
// and that y holds when the operands change with ea low.
module add_sub_tb;
  localparam int W = 15;
  logic clk = 0, ea, sub, corr;
  logic [W-1:0] a, b, y;
  int checks = 0, failures = 0;

  add_sub #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    ea = 0; sub = 0; corr = 0; a = 0; b = 0;
    for (int n = 0; n < 400; n++) begin
      int exp;
      logic [W-1:0] held;
      a = W'($urandom); b = W'($urandom);
      {sub, corr} = 2'(n);
      if (n % 50 == 0) b = a;                 // equal operands
      exp = sub ? int'(a) - int'(b) - int'(corr) : int'(a) + int'(b) + int'(corr);
      ea = 1;
      @(posedge clk); #1;
      checks++;
      if (y !== W'(exp)) begin
        failures++;
        $display("FAIL a=%0d b=%0d sub=%b corr=%b y=%0d exp=%0d", a, b, sub, corr, y, W'(exp));
      end
      held = y;
      ea = 0; a = ~a; b = ~b;
      @(posedge clk); #1;
      checks++;
      if (y !== held) begin
        failures++;
        $display("FAIL hold: y=%0d exp=%0d", y, held);
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

// latch_adder_tb: exhaustive check of the latch adder cell. For every
// (a, b, cin) the carry is checked immediately, the sum one clock edge after
// ea is high, and the sum is checked to hold when the inputs change with ea
// low.
module latch_adder_tb;
  logic clk = 0, a, b, cin, ea, s, cout;
  int checks = 0, failures = 0;

  latch_adder dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b exp %b", what, got, exp);
    end
  endtask

  initial begin
    ea = 0; a = 0; b = 0; cin = 0;
    for (int v = 0; v < 8; v++) begin
      logic held;
      {a, b, cin} = 3'(v);
      ea = 1;
      #1 chk(cout, (a & b) | (a & cin) | (b & cin), "cout");
      @(posedge clk); #1;
      chk(s, a ^ b ^ cin, "sum");
      held = s;
      ea = 0;
      {a, b, cin} = ~3'(v);
      @(posedge clk); #1;
      chk(s, held, "hold");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

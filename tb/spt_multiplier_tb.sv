// spt_multiplier_tb: random sign-magnitude multiplicands and random
// coefficient control words of 1, 2 and 3 terms, with and without
// subtraction and correction, plus a few edge values (zero, full scale,
// zero coefficient). Each product runs a full four-phase handshake; the
// product is compared with the arithmetic reference in spt_ref_pkg and the
// REQ-to-ACK latency with 1, 2 or 3 edges for 1, 2 or 3 terms.
module spt_multiplier_tb;
  import spt_pkg::*;
  import spt_ref_pkg::*;

  logic clk = 0, rst_n = 0, req = 0, ack;
  logic [15:0] multiplicand = '0, product;
  spt_ctrl_t ctrl = '0;
  int checks = 0, failures = 0;
  int seen_terms [4] = '{0, 0, 0, 0};

  spt_multiplier dut (.*);

  always #5 clk = ~clk;

  task automatic run(input logic [15:0] x, input spt_ctrl_t c);
    int lat;
    logic [15:0] exp;
    @(negedge clk);
    multiplicand = x; ctrl = c; req = 1;
    lat = 0;
    do begin
      @(posedge clk); #1; lat++;
    end while (!ack && lat < 20);
    exp = spt_mul_ref(x, c);
    checks++;
    if (product !== exp) begin
      failures++;
      $display("FAIL x=%h ctrl=%p product=%h exp=%h", x, c, product, exp);
    end
    checks++;
    if (lat != n_terms(c)) begin
      failures++;
      $display("FAIL latency %0d exp %0d", lat, n_terms(c));
    end
    seen_terms[n_terms(c)]++;
    @(negedge clk); req = 0;
    lat = 0;
    do begin
      @(posedge clk); #1; lat++;
    end while (ack && lat < 20);
    checks++;
    if (product !== exp) begin          // product held after the handshake
      failures++;
      $display("FAIL product not held: %h exp %h", product, exp);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(16'h7fff, SPT_ZERO);
    run(16'h0000, '{sg: 1'b1, en1: 1'b0, en2: 1'b0, ctl1: 4'd0, default: '0});
    run(16'hffff, '{sg: 1'b0, en1: 1'b0, en2: 1'b0, ctl1: 4'd0, default: '0});
    for (int n = 0; n < 600; n++) begin
      spt_ctrl_t c;
      c = rand_ctrl();
      if (n % 3 == 0) c.en1 = 1'b0;
      run(16'($urandom), c);
    end
    for (int t = 1; t <= 3; t++) begin
      checks++;
      if (seen_terms[t] == 0) begin
        failures++;
        $display("FAIL no product with %0d terms", t);
      end
    end
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

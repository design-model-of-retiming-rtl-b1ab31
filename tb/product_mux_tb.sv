// product_mux_tb: random stage outputs and every (en1, en2, sg, sign)
// combination; checks the selected magnitude and the product sign.
module product_mux_tb;
  localparam int W = 15;
  logic en1, en2, sg, x_sign;
  logic [W-1:0] sm1, as1, as2;
  logic [W:0] product;
  int checks = 0, failures = 0;

  product_mux #(.W(W)) dut (.*);

  initial begin
    for (int n = 0; n < 256; n++) begin
      logic [W-1:0] exp_mag;
      sm1 = W'($urandom); as1 = W'($urandom); as2 = W'($urandom);
      {en1, en2, sg, x_sign} = 4'(n);
      #1;
      exp_mag = (en1 == 0) ? sm1 : (en2 ? as2 : as1);
      checks++;
      if (product !== {sg != x_sign, exp_mag}) begin
        failures++;
        $display("FAIL en1=%b en2=%b sg=%b xs=%b got %h", en1, en2, sg, x_sign, product);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

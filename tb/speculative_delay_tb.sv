// speculative_delay_tb: for each term-count case (en1, en2) and two sets of
// delay lengths, raises REQ and measures, in clock edges after REQ is first
// sampled, when EA1, EA2 and ACK rise; then lowers REQ and measures when ACK
// falls. Expected (S, A1, A2 = the three delays):
//   EA1 at S (only with en1), EA2 at S+A1 (only with en1 & en2),
//   ACK at S, S+A2 or S+A1+A2 for 1, 2 or 3 terms;
//   ACK falls max(S, A2 if en1, S+A1 if en1 & en2) edges after REQ falls,
//   when the whole line has cleared.
module speculative_delay_tb;
  logic clk = 0, rst_n = 0, req = 0, en1 = 0, en2 = 0;
  logic [1:0] ea1, ea2, ack;
  int checks = 0, failures = 0;

  localparam int S [2]  = '{1, 2};
  localparam int A1 [2] = '{1, 3};
  localparam int A2 [2] = '{1, 2};

  speculative_delay dut0 (.clk, .rst_n, .req, .en1, .en2,
                          .ea1(ea1[0]), .ea2(ea2[0]), .ack(ack[0]));
  speculative_delay #(.SHIFT_DLY(2), .ADD1_DLY(3), .ADD2_DLY(2)) dut1 (
    .clk, .rst_n, .req, .en1, .en2, .ea1(ea1[1]), .ea2(ea2[1]), .ack(ack[1]));

  always #5 clk = ~clk;

  task automatic chk(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d exp %0d (en1=%b en2=%b)", what, got, exp, en1, en2);
    end
  endtask

  function automatic int max3(input int p, input int q, input int r);
    int m;
    m = p > q ? p : q;
    return m > r ? m : r;
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 3; c++) begin
      int t_ea1 [2], t_ea2 [2], t_ack [2], t_fall [2];
      en1 = (c >= 1); en2 = (c == 2);
      t_ea1 = '{-1, -1}; t_ea2 = '{-1, -1}; t_ack = '{-1, -1};
      @(negedge clk); req = 1;
      for (int e = 1; e <= 12; e++) begin
        @(posedge clk); #1;
        for (int d = 0; d < 2; d++) begin
          if (ea1[d] && t_ea1[d] < 0) t_ea1[d] = e;
          if (ea2[d] && t_ea2[d] < 0) t_ea2[d] = e;
          if (ack[d] && t_ack[d] < 0) t_ack[d] = e;
        end
      end
      for (int d = 0; d < 2; d++) begin
        int exp_ack;
        exp_ack = S[d] + (en1 ? A2[d] : 0) + (en1 && en2 ? A1[d] : 0);
        chk(t_ea1[d], en1 ? S[d] : -1, $sformatf("EA1 time dut%0d", d));
        chk(t_ea2[d], (en1 && en2) ? S[d] + A1[d] : -1, $sformatf("EA2 time dut%0d", d));
        chk(t_ack[d], exp_ack, $sformatf("ACK time dut%0d", d));
      end
      @(negedge clk); req = 0;
      t_fall = '{-1, -1};
      for (int e = 1; e <= 12; e++) begin
        @(posedge clk); #1;
        for (int d = 0; d < 2; d++) if (!ack[d] && t_fall[d] < 0) t_fall[d] = e;
      end
      for (int d = 0; d < 2; d++)
        chk(t_fall[d], max3(S[d], en1 ? A2[d] : 0, (en1 && en2) ? S[d] + A1[d] : 0),
            $sformatf("ACK fall dut%0d", d));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_mq_oe_gen: exhaustive check of the output-enable generator: with the
// code-block started every commit is enabled; before, the first commit in
// slot order is dropped and the rest pass.
module tb_mq_oe_gen;
  logic [3:0] commit, oe;
  logic       started, started_next;
  int checks = 0, failures = 0;

  mq_oe_gen dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] exp_oe;
    logic       dropped;
    for (int s = 0; s < 2; s++)
      for (int c = 0; c < 16; c++) begin
        commit = 4'(c); started = s[0];
        #1;
        exp_oe = 4'(c);
        dropped = 1'b0;
        if (!s[0])
          for (int k = 0; k < 4; k++)
            if (exp_oe[k] && !dropped) begin exp_oe[k] = 1'b0; dropped = 1'b1; end
        checks++;
        if (oe != exp_oe || started_next != (s[0] || c != 0)) begin
          failures++;
          $display("commit=%b started=%0d: oe=%b next=%0d", commit, started, oe, started_next);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

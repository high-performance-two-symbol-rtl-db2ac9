// tb_mq_update_c: checks the conditional Qe addition on the 28-bit code
// register and the CARRY bit (bit 27 of C after a left shift by CT) for
// random values, with the lower half forced near overflow so that the
// 12-bit incrementer is exercised.
module tb_mq_update_c;
  import mq_pkg::*;

  logic [27:0] c_in, c_out;
  logic        r, carry;
  logic [15:0] qe;
  logic [3:0]  ct;
  int checks = 0, failures = 0, n_inc = 0, n_carry = 0;

  mq_update_c dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned exp_c, shifted;
    for (int k = 0; k < 20000; k++) begin
      c_in = 28'($urandom);
      if (k % 3 == 0) c_in[15:0] = 16'hFFFF - 16'($urandom_range(0, 'h3000));
      r  = 1'($urandom);
      qe = 16'($urandom_range(1, 'h5601));
      ct = 4'($urandom_range(1, 12));
      #1;
      exp_c = r ? (longint'(c_in) + longint'(qe)) & 'hFFFFFFF : longint'(c_in);
      shifted = exp_c << ct;
      if (r && (longint'(c_in[15:0]) + longint'(qe) > 'hFFFF)) n_inc++;
      if (shifted[27]) n_carry++;
      checks++;
      if (c_out != 28'(exp_c) || carry != shifted[27]) begin
        failures++;
        if (failures < 10) $display("C=%07x r=%0d qe=%04x ct=%0d: got %07x/%0d expected %07x/%0d",
                                    c_in, r, qe, ct, c_out, carry, exp_c, shifted[27]);
      end
    end
    checks++;
    if (n_inc == 0 || n_carry == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_mq_update_a: checks the single-symbol interval update against the
// sequential MQ procedures (CODEMPS / CODELPS followed by a bit-by-bit
// RENORME of A) for every probability state, both MPS senses, both decisions
// and random normalised intervals A, plus the corner A = 0x8000 and 0xFFFF.
module tb_mq_update_a;
  import mq_pkg::*;
  import mq_ref_pkg::*;

  logic [15:0] a_in, a_out, qe;
  logic        d, r;
  logic [3:0]  ra;
  cx_state_t   st_in, st_out;
  int checks = 0, failures = 0;
  int n_exch = 0;

  mq_update_a dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(input int i, input int m, input int dd, input int av);
    int q, an, exp_r, exp_ra, exp_idx, exp_mps;
    q = QE[i]; an = av - q; exp_idx = i; exp_mps = m; exp_ra = 0;
    if (dd == m) begin
      if ((an & 'h8000) != 0) exp_r = 1;
      else begin
        if (an < q) begin an = q; exp_r = 0; n_exch++; end else exp_r = 1;
        exp_idx = NMPS[i];
      end
    end else begin
      if (an < q) begin exp_r = 1; n_exch++; end else begin an = q; exp_r = 0; end
      if (SWTCH[i] == 1) exp_mps = 1 - m;
      exp_idx = NLPS[i];
    end
    while ((an & 'h8000) == 0) begin an = an << 1; exp_ra++; end
    a_in = 16'(av); d = dd[0]; st_in.mps = m[0]; st_in.idx = 6'(i);
    #1;
    checks++;
    if (a_out != 16'(an) || qe != 16'(q) || r != exp_r[0] || ra != 4'(exp_ra) ||
        st_out.idx != 6'(exp_idx) || st_out.mps != exp_mps[0]) begin
      failures++;
      if (failures < 10)
        $display("I=%0d mps=%0d d=%0d A=%04x: got A=%04x qe=%04x r=%0d ra=%0d idx=%0d mps=%0d, expected A=%04x r=%0d ra=%0d idx=%0d mps=%0d",
                 i, m, dd, av, a_out, qe, r, ra, st_out.idx, st_out.mps, an & 'hFFFF, exp_r, exp_ra, exp_idx, exp_mps);
    end
  endtask

  initial begin
    for (int i = 0; i < 47; i++)
      for (int m = 0; m < 2; m++)
        for (int dd = 0; dd < 2; dd++) begin
          check_one(i, m, dd, 'h8000);
          check_one(i, m, dd, 'hFFFF);
          check_one(i, m, dd, 2 * QE[i] > 'h8000 ? 2 * QE[i] - 1 : 'h8000);
          for (int k = 0; k < 200; k++) check_one(i, m, dd, 'h8000 + $urandom_range(0, 'h7FFF));
        end
    checks++;
    if (n_exch == 0) begin failures++; $display("conditional exchange never tested"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

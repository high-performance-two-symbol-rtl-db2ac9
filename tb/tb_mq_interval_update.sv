// tb_mq_interval_update: checks the first pipeline stage against a sequential
// model of the MQ interval recursion (CODEMPS / CODELPS, bit-by-bit RENORME
// of A, context adaptation). Random cycles carry two symbols, one symbol, none,
// or a flush; same-context pairs are frequent, so the bypass of the first
// symbol's new state to the second symbol is exercised. Each cycle's
// registered Qe, R, RA, the valid and flush flags, the interval passed with a
// flush and the A register are compared one clock after the inputs.
module tb_mq_interval_update;
  import mq_pkg::*;
  import mq_ref_pkg::*;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic [1:0] sym_valid = '0;
  logic [4:0] cx1 = '0, cx2 = '0;
  logic       d1 = 1'b0, d2 = 1'b0, flush = 1'b0;
  sym_op_t    op1, op2;
  logic [1:0] op_valid;
  logic       op_flush;
  logic [15:0] op_a, a_reg;

  int checks = 0, failures = 0, n_same = 0, n_flush = 0, n_single = 0;
  int ma;
  int midx [19];
  int mmps [19];

  mq_interval_update dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void model_init();
    ma = 'h8000;
    for (int i = 0; i < 19; i++) begin midx[i] = 0; mmps[i] = 0; end
    midx[0] = 4; midx[17] = 3; midx[18] = 46;
  endfunction

  // One symbol through the model; returns Qe, R and RA.
  function automatic sym_op_t model_code(input int cx, input int d);
    int i, q, an, r, ra;
    i = midx[cx]; q = QE[i]; an = ma - q; ra = 0;
    if (d == mmps[cx]) begin
      if ((an & 'h8000) != 0) r = 1;
      else begin
        if (an < q) begin an = q; r = 0; end else r = 1;
        midx[cx] = NMPS[i];
      end
    end else begin
      if (an < q) r = 1; else begin an = q; r = 0; end
      if (SWTCH[i] == 1) mmps[cx] = 1 - mmps[cx];
      midx[cx] = NLPS[i];
    end
    while ((an & 'h8000) == 0) begin an = an << 1; ra++; end
    ma = an;
    return '{qe: 16'(q), r: r[0], ra: 4'(ra)};
  endfunction

  initial begin
    sym_op_t e1, e2;
    logic [1:0] ev;
    logic       ef;
    int         ea;
    model_init();
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 50000; k++) begin
      int sel, p;
      @(negedge clk);
      sel = $urandom_range(0, 99);
      p = (k / 2000) % 3;   // symbol statistics change every 2000 cycles
      flush = (sel == 0);
      sym_valid = (sel < 5) ? 2'b00 : (sel < 12) ? 2'b01 : 2'b11;
      if (sel == 1) sym_valid = 2'b10;   // second alone: ignored
      cx1 = 5'($urandom_range(0, 18));
      cx2 = ($urandom_range(0, 2) == 0) ? cx1 : 5'($urandom_range(0, 18));
      d1 = (p == 0) ? 1'($urandom) : ($urandom_range(0, 99) < (p == 1 ? 10 : 1));
      d2 = (p == 0) ? 1'($urandom) : ($urandom_range(0, 99) < (p == 1 ? 10 : 1));
      e1 = '0; e2 = '0; ev = 2'b00; ef = flush; ea = ma;
      if (flush) begin
        n_flush++;
        model_init();
      end else begin
        if (sym_valid[0]) begin
          e1 = model_code(cx1, d1); ev[0] = 1'b1;
          if (sym_valid[1]) begin
            e2 = model_code(cx2, d2); ev[1] = 1'b1;
            if (cx1 == cx2) n_same++;
          end else n_single++;
        end
      end
      @(posedge clk);
      #1;
      checks++;
      if (op_valid != ev || op_flush != ef || op1 != e1 || op2 != e2 ||
          (ef && op_a != 16'(ea)) || a_reg != 16'(ma)) begin
        failures++;
        if (failures < 10)
          $display("cycle %0d: op1=%p op2=%p v=%b f=%0d a=%04x; expected %p %p %b %0d %04x",
                   k, op1, op2, op_valid, op_flush, a_reg, e1, e2, ev, ef, ma);
      end
    end
    checks++;
    if (n_same == 0 || n_flush == 0 || n_single == 0) failures++;
    $display("same-context pairs %0d, single symbols %0d, flushes %0d", n_same, n_single, n_flush);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

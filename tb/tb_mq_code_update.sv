// tb_mq_code_update: checks the second pipeline stage on its own. The test
// generates legal per-symbol work (Qe, R, RA) from a model of the interval A
// with Qe drawn at random from the probability table, often from its
// smallest entries so that renormalisations of up to 15 bits occur, and feeds
// it two symbols (or one, or none) per clock, with a termination every few
// hundred cycles. The sequential reference applies the same work one shift at
// a time. After every clock the code register, CT and B must equal the
// reference, and the bytes on BO1..BO4 (with OE1..OE4) must form the
// reference code stream of each code-block.
module tb_mq_code_update;
  import mq_pkg::*;
  import mq_ref_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0;
  sym_op_t     op1 = '0, op2 = '0;
  logic        op_flush = 1'b0;
  logic [15:0] op_a = '0;
  logic [7:0]  bo [4];
  logic [3:0]  oe;
  logic        last;
  logic [27:0] c_reg;
  logic [3:0]  ct_reg;
  logic [7:0]  b_reg;

  int checks = 0, failures = 0, n_four = 0, n_last = 0;
  int ma;
  byte unsigned got [$];
  mq_ref m;

  mq_code_update dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    for (int k = 0; k < 4; k++) if (oe[k]) got.push_back(bo[k]);
    if (oe == 4'hF) n_four++;
  end

  // Legal work for one symbol: MPS or LPS coded with probability Qe.
  function automatic sym_op_t gen_op(input int use_small);
    int i, q, an, r, ra;
    i = use_small ? $urandom_range(39, 45) : $urandom_range(0, 46);
    q = QE[i]; an = ma - q; ra = 0;
    if ($urandom_range(0, 1) == 0) begin       // MPS
      if ((an & 'h8000) != 0) r = 1;
      else if (an < q) begin an = q; r = 0; end
      else r = 1;
    end else begin                             // LPS
      if (an < q) r = 1; else begin an = q; r = 0; end
    end
    while ((an & 'h8000) == 0) begin an = an << 1; ra++; end
    ma = an;
    return '{qe: 16'(q), r: r[0], ra: 4'(ra)};
  endfunction

  initial begin
    int blk_cycles, nblk;
    m = new();
    ma = 'h8000;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    nblk = 0;
    for (int k = 0; k < 300000; k++) begin
      int sel, use_small;
      @(negedge clk);
      sel = $urandom_range(0, 299);
      use_small = ($urandom_range(0, 1) == 0);
      op1 = '0; op2 = '0; op_flush = 1'b0;
      if (sel == 0) begin
        op_flush = 1'b1; op_a = 16'(ma);
        m.flush_with(ma);
        ma = 'h8000;
      end else if (sel > 20) begin
        op1 = gen_op(use_small); m.apply_op(op1.qe, op1.r, op1.ra);
        if (sel > 40) begin
          op2 = gen_op(use_small); m.apply_op(op2.qe, op2.r, op2.ra);
        end
      end
      @(posedge clk);
      #1;
      checks++;
      if (c_reg != 28'(m.c) || ct_reg != 4'(m.ct) || b_reg != 8'(m.b) || last != op_flush) begin
        failures++;
        if (failures < 10) $display("cycle %0d: C=%07x CT=%0d B=%02x, expected %07x %0d %02x",
                                    k, c_reg, ct_reg, b_reg, m.c, m.ct, m.b);
      end
      if (op_flush) begin
        op_flush = 1'b0;
        @(posedge clk);   // the collector takes the termination bytes here
        #1;
        n_last++;
        checks++;
        if (got.size() != m.out.size()) begin
          failures++;
          $display("block %0d: %0d bytes, expected %0d", nblk, got.size(), m.out.size());
        end
        for (int j = 0; j < got.size() && j < m.out.size(); j++) begin
          checks++;
          if (got[j] != m.out[j]) failures++;
        end
        got.delete(); m.out.delete();
        nblk++;
      end
    end
    $display("blocks %0d, two byte-outs %0d, stuffed second bytes %0d, carries %0d, stuffed %0d, four-byte cycles %0d",
             nblk, m.n_two_bo, m.n_ec, m.n_carry, m.n_stuff, n_four);
    checks++;
    if (nblk == 0 || m.n_two_bo == 0 || m.n_ec == 0 || m.n_carry == 0 || n_four == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

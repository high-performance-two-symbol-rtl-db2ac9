// mq_interval_update: first pipeline stage of the two-symbol MQ encoder.
//
// It holds the interval register A and the context state bank, and codes two
// CX-D pairs per clock. Two mq_update_a units are chained through A: the
// second one starts from the first one's renormalised A. Their context states
// are read from the bank in parallel; when CX2 equals CX1 a multiplexer hands
// the second unit the state the first unit has just produced instead of the
// stale bank entry. For each symbol the stage registers the work the
// code-update stage must do to C: Qe, the range selection R (add Qe or not)
// and the renormalisation shift RA.
//
// Interface: sym_valid[0] qualifies (cx1, d1), sym_valid[1] qualifies
// (cx2, d2) and counts only together with sym_valid[0]; a missing symbol
// becomes a no-op (R = 0, RA = 0) and leaves A and the contexts unchanged.
// flush ends a code-block: the current A is passed down with the flush flag so
// that the code stage can terminate the code stream, and A and every context
// return to their start values in the same edge. Symbols presented together
// with flush are ignored.
// Timing: one cycle; outputs are registers, valid the cycle after the inputs.
module mq_interval_update
  import mq_pkg::*;
#(
  parameter int unsigned NUM_CX = 19,
  parameter int unsigned CX_W   = 5
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [1:0]      sym_valid,
  input  logic [CX_W-1:0] cx1,
  input  logic            d1,
  input  logic [CX_W-1:0] cx2,
  input  logic            d2,
  input  logic            flush,
  // to the code-update stage (registered)
  output sym_op_t         op1,
  output sym_op_t         op2,
  output logic [1:0]      op_valid,
  output logic            op_flush,
  output logic [A_W-1:0]  op_a,
  // interval register, for observation
  output logic [A_W-1:0]  a_reg
);

  logic            v1, v2;
  cx_state_t       rd1, rd2, st2_in, nst1, nst2;
  logic [A_W-1:0]  a1, a2;
  logic [QE_W-1:0] qe1, qe2;
  logic            r1, r2;
  logic [RA_W-1:0] ra1, ra2;
  logic            same_cx;

  assign v1      = sym_valid[0] && !flush;
  assign v2      = sym_valid[1] && v1;
  assign same_cx = (cx1 == cx2);
  // Bypass: the second symbol sees the first symbol's updated state.
  assign st2_in  = same_cx ? nst1 : rd2;

  mq_cx_state #(.NUM_CX(NUM_CX), .CX_W(CX_W)) u_cx_state (
    .clk    (clk),
    .rst_n  (rst_n),
    .clear  (flush),
    .rd_cx1 (cx1),
    .rd_cx2 (cx2),
    .rd_st1 (rd1),
    .rd_st2 (rd2),
    .we1    (v1),
    .wr_cx1 (cx1),
    .wr_st1 (nst1),
    .we2    (v2),
    .wr_cx2 (cx2),
    .wr_st2 (nst2)
  );

  mq_update_a u_update_a1 (
    .a_in (a_reg), .d(d1), .st_in(rd1),
    .a_out(a1), .qe(qe1), .r(r1), .ra(ra1), .st_out(nst1)
  );

  mq_update_a u_update_a2 (
    .a_in (a1), .d(d2), .st_in(st2_in),
    .a_out(a2), .qe(qe2), .r(r2), .ra(ra2), .st_out(nst2)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_reg    <= A_INIT;
      op1      <= '0;
      op2      <= '0;
      op_valid <= '0;
      op_flush <= 1'b0;
      op_a     <= '0;
    end else begin
      op_valid <= {v2, v1};
      op_flush <= flush;
      op_a     <= a_reg;
      op1      <= v1 ? sym_op_t'{qe1, r1, ra1} : sym_op_t'('0);
      op2      <= v2 ? sym_op_t'{qe2, r2, ra2} : sym_op_t'('0);
      if (flush)   a_reg <= A_INIT;
      else if (v2) a_reg <= a2;
      else if (v1) a_reg <= a1;
    end
  end

endmodule

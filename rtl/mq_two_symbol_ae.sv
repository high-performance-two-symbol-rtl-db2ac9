// mq_two_symbol_ae: two-symbol-per-cycle MQ arithmetic encoder for the
// JPEG 2000 EBCOT tier-1 coder.
//
// The MQ coder's recursion is split into two pipeline stages. Stage 1
// (mq_interval_update) updates the interval A and the context states for two
// CX-D pairs per clock and hands, per symbol, Qe, the range selection R and
// the renormalisation shift RA to stage 2. Stage 2 (mq_code_update) updates
// the code register C, the counter CT and the byte buffer B for both symbols
// in the next clock and emits up to four code bytes. Because the shift of C
// is known from stage 1, C never waits for A's leading-zero detection.
//
// Interface:
//   sym_valid[0] with (cx1, d1): first symbol; sym_valid[1] with (cx2, d2):
//   second symbol, coded after the first (ignored without sym_valid[0]).
//   flush: ends a code-block (no symbols in that cycle); its bytes carry last.
//   bo[0..3] / oe[3:0]: code bytes BO1..BO4 in stream order, each valid when
//   its OE bit is set (bit 0 = OE1).
// Timing: a symbol pair presented at edge t affects bo/oe after edge t+2; a
// pair is accepted every clock, there is no back-pressure. The encoder is
// ready for a new code-block the cycle after flush.
module mq_two_symbol_ae
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
  output logic [7:0]      bo [4],
  output logic [3:0]      oe,
  output logic            last
);

  sym_op_t         op1, op2;
  logic [1:0]      op_valid;
  logic            op_flush;
  logic [A_W-1:0]  op_a, a_reg;
  logic [CT_W-1:0] ct_reg;

  mq_interval_update #(.NUM_CX(NUM_CX), .CX_W(CX_W)) u_interval_update (
    .clk      (clk),
    .rst_n    (rst_n),
    .sym_valid(sym_valid),
    .cx1      (cx1),
    .d1       (d1),
    .cx2      (cx2),
    .d2       (d2),
    .flush    (flush),
    .op1      (op1),
    .op2      (op2),
    .op_valid (op_valid),
    .op_flush (op_flush),
    .op_a     (op_a),
    .a_reg    (a_reg)
  );

  mq_code_update u_code_update (
    .clk     (clk),
    .rst_n   (rst_n),
    .op1     (op1),
    .op2     (op2),
    .op_flush(op_flush),
    .op_a    (op_a),
    .bo      (bo),
    .oe      (oe),
    .last    (last),
    .c_reg   (),
    .ct_reg  (ct_reg),
    .b_reg   ()
  );

  // Interval register stays normalised; CT never reaches zero between ops.
  a_normalised: assert property (@(posedge clk) disable iff (!rst_n) a_reg >= A_INIT);
  ct_in_range:  assert property (@(posedge clk) disable iff (!rst_n)
                                 ct_reg >= 4'd1 && ct_reg <= CT_INIT);
  flush_alone:  assert property (@(posedge clk) disable iff (!rst_n)
                                 op_flush |-> op_valid == 2'b00);

endmodule

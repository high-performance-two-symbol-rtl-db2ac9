// mq_code_update: second pipeline stage of the two-symbol MQ encoder.
//
// It owns the code register C (28 bits: a 12-bit upper part whose MSB is the
// carry, and the 16-bit lower part), the free-bit counter CT and the byte
// buffer B, and applies the two symbols' work (Qe, R, RA) from the first
// stage in one clock. For each symbol:
//   Update C       adds Qe when R is set and extracts CARRY;
//   Mask Generator gives the mask of the bits that leave through BYTEOUT;
//   shifter        renormalises the masked C by RA in a single step;
//   Byte Output    produces the committed bytes, the next B and CT, and the
//                  error-compensation mask ECMASK for a stuffed second byte.
// The renormalised C of the first symbol feeds the Update C of the second one,
// so the second symbol's addition runs in parallel with the first symbol's
// byte output. Up to four bytes leave per cycle on BO1..BO4 (first symbol's
// two, then the second symbol's two), qualified by OE1..OE4 from the OE
// generator.
//
// The ECMASK repair is applied to the first symbol's mask, before the second
// symbol's addition: applied after it, a carry out of that addition could
// reach the restored bit and be lost. This placement is this design's choice.
//
// End of a code-block (op_flush): the stage performs the standard MQ
// termination in one cycle. It sets the low bits of C as far as the final
// interval allows (C + A from the first stage bounds it), then the first
// symbol slot shifts C by CT with one byte-out and the second slot by the new
// CT with one more, and the remaining B is sent on BO4 unless it is 0xFF.
// The cycle after, C, CT and B hold their start values again. The
// termination is not part of the description this design follows; it is the
// JPEG 2000 FLUSH procedure, added so that a code stream can be completed.
//
// Interface: op1/op2/op_flush/op_a from mq_interval_update; registered
// outputs bo[0..3] (BO1..BO4), oe[3:0] (bit 0 = OE1) and last (high with the
// bytes of a termination). Timing: outputs appear one clock after the ops.
module mq_code_update
  import mq_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  sym_op_t         op1,
  input  sym_op_t         op2,
  input  logic            op_flush,
  input  logic [A_W-1:0]  op_a,
  output logic [7:0]      bo [4],
  output logic [3:0]      oe,
  output logic            last,
  // code state registers, for observation
  output logic [C_W-1:0]  c_reg,
  output logic [CT_W-1:0] ct_reg,
  output logic [7:0]      b_reg
);

  logic            started;

  // termination: SETBITS
  logic [C_W:0]    c_sum;
  logic [C_W-1:0]  c_set;

  // symbol slot 1
  logic [C_W-1:0]  c_in1, c_add1, mask1, ecm1, c_ren1;
  logic            r1, carry1;
  logic [RA_W-1:0] ra1;
  logic [7:0]      bo1a, bo1b, b_n1;
  logic            oe1a, oe1b;
  logic [CT_W-1:0] ct_n1;

  // symbol slot 2
  logic [C_W-1:0]  c_add2, mask2, ecm2, c_ren2;
  logic            r2, carry2;
  logic [RA_W-1:0] ra2;
  logic [7:0]      bo2a, bo2b, b_n2;
  logic            oe2a, oe2b;
  logic [CT_W-1:0] ct_n2;

  logic [3:0]      commit, oe_n;
  logic            started_n;
  logic [7:0]      bo4;

  always_comb begin
    c_sum = {1'b0, c_reg} + {13'd0, op_a};
    c_set = c_reg | 28'h000_FFFF;
    if ({1'b0, c_set} >= c_sum) c_set = c_set - 28'h000_8000;
  end

  assign c_in1 = op_flush ? c_set : c_reg;
  assign r1    = op_flush ? 1'b0 : op1.r;
  assign ra1   = op_flush ? ct_reg : op1.ra;

  mq_update_c u_update_c1 (
    .c_in(c_in1), .r(r1), .qe(op1.qe), .ct(ct_reg), .c_out(c_add1), .carry(carry1)
  );
  mq_mask_gen u_mask_gen1 (
    .carry(carry1), .b(b_reg), .ct(ct_reg), .ra(ra1), .mask(mask1)
  );
  mq_byte_output u_byte_output1 (
    .c(c_add1), .b(b_reg), .ct(ct_reg), .ra(ra1), .carry(carry1),
    .bo_a(bo1a), .oe_a(oe1a), .bo_b(bo1b), .oe_b(oe1b),
    .b_next(b_n1), .ct_next(ct_n1), .ecmask(ecm1)
  );
  assign c_ren1 = (c_add1 & (mask1 | ecm1)) << ra1;

  assign r2  = op_flush ? 1'b0 : op2.r;
  assign ra2 = op_flush ? ct_n1 : op2.ra;

  mq_update_c u_update_c2 (
    .c_in(c_ren1), .r(r2), .qe(op2.qe), .ct(ct_n1), .c_out(c_add2), .carry(carry2)
  );
  mq_mask_gen u_mask_gen2 (
    .carry(carry2), .b(b_n1), .ct(ct_n1), .ra(ra2), .mask(mask2)
  );
  mq_byte_output u_byte_output2 (
    .c(c_add2), .b(b_n1), .ct(ct_n1), .ra(ra2), .carry(carry2),
    .bo_a(bo2a), .oe_a(oe2a), .bo_b(bo2b), .oe_b(oe2b),
    .b_next(b_n2), .ct_next(ct_n2), .ecmask(ecm2)
  );
  assign c_ren2 = (c_add2 & (mask2 | ecm2)) << ra2;

  // On termination the fourth slot carries the last B, dropped if 0xFF.
  assign bo4    = op_flush ? b_n2 : bo2b;
  assign commit = {op_flush ? (b_n2 != 8'hFF) : oe2b, oe2a, oe1b, oe1a};

  mq_oe_gen u_oe_gen (
    .commit(commit), .started(started), .oe(oe_n), .started_next(started_n)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c_reg   <= '0;
      ct_reg  <= CT_INIT;
      b_reg   <= '0;
      started <= 1'b0;
      oe      <= '0;
      last    <= 1'b0;
      for (int i = 0; i < 4; i++) bo[i] <= '0;
    end else begin
      if (op_flush) begin
        c_reg   <= '0;
        ct_reg  <= CT_INIT;
        b_reg   <= '0;
        started <= 1'b0;
      end else begin
        c_reg   <= c_ren2;
        ct_reg  <= ct_n2;
        b_reg   <= b_n2;
        started <= started_n;
      end
      oe    <= oe_n;
      last  <= op_flush;
      bo[0] <= bo1a;
      bo[1] <= bo1b;
      bo[2] <= bo2a;
      bo[3] <= bo4;
    end
  end

endmodule

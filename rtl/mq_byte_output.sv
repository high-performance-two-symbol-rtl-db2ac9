// mq_byte_output: the byte-out logic for one symbol (combinational).
//
// Given C after the Qe addition but before renormalisation, it works out what
// the RA-bit renormalisation would emit, without iterating:
//   * first byte-out (RA >= CT): the byte B leaves, incremented by CARRY
//     unless B is 0xFF; the new B is taken from C at the CT-shifted position,
//     7 bits after a stuffed byte (B = 0xFF, or B = 0xFE with CARRY), else 8;
//     CT becomes 7 or 8;
//   * second byte-out (RA >= CT + new CT): the byte just formed leaves as it
//     is (no addition can reach it within one symbol, so its carry is 0), and
//     a third B is taken from C; it is stuffed only if the byte that left is
//     0xFF.
// At most two byte-outs fit in one renormalisation of up to 15 shifts, since
// after a stuffed byte the next byte is below 0x80 and cannot be stuffed.
// The mask generator assumes the second byte-out is not stuffed; when it is,
// one more bit of C must survive, and ECMASK (aligned to the un-renormalised
// C) marks that bit.
//
// The unit's role (bytes, stuffing, ECMASK) follows the architecture; its
// closed-form insides are this design's own.
//
// Interface: c (after Update C), b, ct, ra, carry in; the byte(s) committed
// (bo_a with oe_a, bo_b with oe_b, in stream order), the next B and CT and
// ecmask out. No clock.
module mq_byte_output
  import mq_pkg::*;
(
  input  logic [C_W-1:0]  c,
  input  logic [7:0]      b,
  input  logic [CT_W-1:0] ct,
  input  logic [RA_W-1:0] ra,
  input  logic            carry,
  output logic [7:0]      bo_a,
  output logic            oe_a,
  output logic [7:0]      bo_b,
  output logic            oe_b,
  output logic [7:0]      b_next,
  output logic [CT_W-1:0] ct_next,
  output logic [C_W-1:0]  ecmask
);

  logic [C_W-1:0]  cs1;        // C aligned for the first byte-out
  logic [27:19]    cs2;        // top of C aligned for the second byte-out
  logic            stuff1, stuff2;
  logic [7:0]      b1, b2;      // B after the first / second byte-out
  logic [CT_W-1:0] ct1, ct2;
  logic [4:0]      rem1;        // shifts left after the first byte-out
  logic [3:0]      rem2;        // shifts left after the second byte-out

  always_comb begin
    cs1    = c << ct;
    stuff1 = (b == 8'hFF) || (b == 8'hFE && carry);
    bo_a   = (b == 8'hFF) ? b : b + {7'd0, carry};
    if (b == 8'hFF)  b1 = cs1[27:20];
    else if (stuff1) b1 = {1'b0, cs1[26:20]};
    else             b1 = cs1[26:19];
    ct1    = stuff1 ? 4'd7 : 4'd8;

    cs2    = 9'(((cs1 & (stuff1 ? 28'h00F_FFFF : 28'h007_FFFF)) << ct1) >> 19);
    stuff2 = (b1 == 8'hFF);
    b2     = stuff2 ? cs2[27:20] : cs2[26:19];
    ct2    = stuff2 ? 4'd7 : 4'd8;
    bo_b   = b1;

    oe_a   = ({1'b0, ra} >= {1'b0, ct});
    rem1   = {1'b0, ra} - {1'b0, ct};
    oe_b   = oe_a && (rem1 >= {1'b0, ct1});
    rem2   = rem1[3:0] - ct1;

    if (!oe_a) begin
      b_next  = b;
      ct_next = ct - ra;
    end else if (!oe_b) begin
      b_next  = b1;
      ct_next = ct1 - rem1[3:0];
    end else begin
      b_next  = b2;
      ct_next = ct2 - rem2;
    end

    // Bit 19 after both byte-outs, moved back by CT + CT1 shifts.
    ecmask = (oe_b && stuff2) ? (28'h008_0000 >> ({1'b0, ct} + {1'b0, ct1})) : '0;
  end

endmodule

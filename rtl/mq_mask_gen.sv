// mq_mask_gen: builds the MASK that removes from C the bits that leave C
// through BYTEOUT while this symbol's renormalisation shifts C by RA
// (combinational).
//
// Rather than shift C one bit at a time and cut bytes off in between, the
// encoder masks C once and shifts it once: a byte-out only clears the bits
// above a fixed boundary, and clearing before or after the shift gives the
// same result. The first byte-out happens after CT shifts; it leaves 20 bits
// when bit stuffing is needed (B = 0xFF, or B = 0xFE with CARRY) and 19 bits
// otherwise, and sets CT to 7 or 8. A second byte-out follows when RA reaches
// CT+7 (after stuffing) or CT+8 (without). So RA is compared with CT, CT+7 and
// CT+8, a candidate mask is picked for the stuffing and the non-stuffing
// branch, aligned to the un-renormalised C by a right shift of CT, and the
// comparisons of B with 0xFF and 0xFE combined with CARRY select the branch.
// The masks, in the coordinates of C after the first CT shifts, are
//   no byte out          : all ones
//   one byte, stuffed    : 0x00FFFFF      one byte, plain : 0x007FFFF
//   two bytes, 1st stuffed: 0x0000FFF     two bytes, plain: 0x00007FF
// The two-byte masks assume the second byte is not stuffed; when it is, the
// byte-output unit supplies the missing bit as ECMASK.
//
// The comparisons, the alignment shift and the stuffing selection follow the
// architecture; the mask constants above are derived here from the BYTEOUT
// procedure.
//
// Interface: carry, b, ct, ra in; mask out. No clock.
module mq_mask_gen
  import mq_pkg::*;
(
  input  logic            carry,
  input  logic [7:0]      b,
  input  logic [CT_W-1:0] ct,
  input  logic [RA_W-1:0] ra,
  output logic [C_W-1:0]  mask
);

  localparam logic [C_W-1:0] M_ONE_STUFF = 28'h00F_FFFF;
  localparam logic [C_W-1:0] M_ONE_PLAIN = 28'h007_FFFF;
  localparam logic [C_W-1:0] M_TWO_STUFF = 28'h000_0FFF;
  localparam logic [C_W-1:0] M_TWO_PLAIN = 28'h000_07FF;
  localparam logic [C_W-1:0] M_NONE      = 28'hFFF_FFFF;

  logic [4:0]     ra5, ct5;
  logic           ge_ct, ge_ct7, ge_ct8;
  logic [C_W-1:0] cand_stuff, cand_plain;
  logic           stuff;

  always_comb begin
    ra5    = {1'b0, ra};
    ct5    = {1'b0, ct};
    ge_ct  = (ra5 >= ct5);
    ge_ct7 = (ra5 >= ct5 + 5'd7);
    ge_ct8 = (ra5 >= ct5 + 5'd8);
    cand_stuff = (ge_ct7 ? M_TWO_STUFF : M_ONE_STUFF) >> ct;
    cand_plain = (ge_ct8 ? M_TWO_PLAIN : M_ONE_PLAIN) >> ct;
    stuff  = (b == 8'hFF) || (b == 8'hFE && carry);
    if (!ge_ct)     mask = M_NONE;
    else if (stuff) mask = cand_stuff;
    else            mask = cand_plain;
  end

endmodule

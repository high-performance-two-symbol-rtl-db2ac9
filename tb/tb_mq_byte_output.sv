// tb_mq_byte_output: checks the one-symbol byte-out logic against the
// sequential reference (shift C one bit at a time, BYTEOUT whenever CT reaches
// zero). For random C, B, CT and RA it compares the committed bytes and their
// enables, the next B and CT, and, through ECMASK, the renormalised C:
// (C AND (MASK OR ECMASK)) << RA must equal the reference C, where MASK is the
// mask generator's rule (second byte-out assumed unstuffed). C is often given
// 0xFF where the new byte forms, and B is often 0xFE or 0xFF, so that carry,
// stuffing and a stuffed second byte all occur. Inputs that a running
// encoder cannot produce (a carry into the byte after 0xFF with that byte
// non-zero) are excluded.
module tb_mq_byte_output;
  import mq_pkg::*;
  import mq_ref_pkg::*;

  logic [27:0] c, ecmask;
  logic [7:0]  b, bo_a, bo_b, b_next;
  logic [3:0]  ct, ra, ct_next;
  logic        carry, oe_a, oe_b;
  int checks = 0, failures = 0;
  int n_one = 0, n_two = 0, n_ec = 0, n_carry = 0;
  mq_ref m;

  mq_byte_output dut (.*);

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint unsigned maskgen_rule(input int ctv, input int rav, input int bv, input int cy);
    longint unsigned kept = 'hFFFFFFF;
    int nbo = 0;
    logic stuff;
    for (int s = 0; s < rav; s++) begin
      kept = kept << 1;
      ctv--;
      if (ctv == 0) begin
        stuff = (nbo == 0) && (bv == 'hFF || (bv == 'hFE && cy == 1));
        kept &= stuff ? 'hFFFFF : 'h7FFFF;
        ctv = stuff ? 7 : 8;
        nbo++;
      end
    end
    return kept >> rav;
  endfunction

  initial begin
    int ctv, rav, nb;
    longint unsigned cv, sh, got_c, mk;
    m = new();
    for (int k = 0; k < 50000; k++) begin
      ctv = $urandom_range(1, 12);
      rav = $urandom_range(0, 15);
      cv  = longint'($urandom) & ((64'd1 << (28 - ctv)) - 1);
      if ($urandom_range(0, 2) == 0 && ctv <= 7) cv |= (64'hFF << (19 - ctv));
      if ($urandom_range(0, 2) == 0 && ctv <= 7) cv |= (64'h7F << (20 - ctv));
      m.init();
      m.ct = ctv; m.bp = 0; m.out.delete();
      case ($urandom_range(0, 3))
        0: m.b = 'hFF;
        1: m.b = 'hFE;
        default: m.b = $urandom_range(0, 255);
      endcase
      // After a 0xFF byte, a carry into the new byte leaves the rest of it
      // zero (C + A stays below the next byte boundary), so never 0xFF.
      if (m.b == 'hFF && cv[27 - ctv]) cv &= ~(64'h7F << (20 - ctv));
      m.c = int'(cv);
      sh = cv << ctv;
      c = 28'(cv); ct = 4'(ctv); ra = 4'(rav); b = 8'(m.b); carry = sh[27];
      #1;
      m.apply_op(0, 0, rav);
      nb = m.out.size();
      if (nb == 1) n_one++;
      if (nb == 2) n_two++;
      if (ecmask != 0) n_ec++;
      if (nb >= 1 && carry) n_carry++;
      mk = maskgen_rule(ctv, rav, b, carry) | longint'(ecmask);
      got_c = ((cv & mk) << rav) & 'hFFFFFFF;
      checks++;
      if (oe_a != (nb >= 1) || oe_b != (nb >= 2) ||
          (nb >= 1 && bo_a != m.out[0]) || (nb >= 2 && bo_b != m.out[1]) ||
          b_next != 8'(m.b) || ct_next != 4'(m.ct) || got_c != longint'(m.c)) begin
        failures++;
        if (failures < 10)
          $display("C=%07x B=%02x CT=%0d RA=%0d: oe=%0d%0d bo=%02x,%02x B=%02x CT=%0d C=%07x; ref n=%0d B=%02x CT=%0d C=%07x",
                   c, b, ct, ra, oe_a, oe_b, bo_a, bo_b, b_next, ct_next, got_c, nb, m.b, m.ct, m.c);
      end
    end
    $display("one byte %0d, two bytes %0d, stuffed second %0d, carry %0d", n_one, n_two, n_ec, n_carry);
    checks++;
    if (n_one == 0 || n_two == 0 || n_ec == 0 || n_carry == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

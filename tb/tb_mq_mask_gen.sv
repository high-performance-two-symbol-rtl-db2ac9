// tb_mq_mask_gen: checks the BYTEOUT mask for every CT (1..12), every RA
// (0..15), both CARRY values and byte buffers that do and do not need bit
// stuffing. The expected mask is found by following the renormalisation one
// shift at a time and clearing, at each byte-out, the bits above the 20-bit
// (stuffed) or 19-bit boundary, as the mask generator is specified to do: it
// treats a second byte-out as unstuffed, since that case is repaired by the
// byte-output unit.
module tb_mq_mask_gen;
  import mq_pkg::*;

  logic        carry;
  logic [7:0]  b;
  logic [3:0]  ct, ra;
  logic [27:0] mask;
  int checks = 0, failures = 0, n_two = 0, n_stuff = 0;

  mq_mask_gen dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [27:0] model(input int ctv, input int rav, input int bv, input int cy);
    longint unsigned kept;
    int nbo;
    logic stuff;
    kept = 'hFFFFFFF;
    nbo = 0;
    for (int s = 0; s < rav; s++) begin
      kept = kept << 1;
      ctv--;
      if (ctv == 0) begin
        stuff = (nbo == 0) && (bv == 'hFF || (bv == 'hFE && cy == 1));
        if (stuff) n_stuff++;
        kept &= stuff ? 'hFFFFF : 'h7FFFF;
        ctv = stuff ? 7 : 8;
        nbo++;
      end
    end
    if (nbo == 2) n_two++;
    return 28'(kept >> rav) | (nbo == 0 ? 28'hFFFFFFF : 28'h0);
  endfunction

  initial begin
    int bvals [5] = '{'hFF, 'hFE, 'h00, 'h7F, 'hFD};
    logic [27:0] exp_m;
    for (int c = 1; c <= 12; c++)
      for (int a = 0; a <= 15; a++)
        for (int cy = 0; cy < 2; cy++)
          for (int k = 0; k < 5; k++) begin
            ct = 4'(c); ra = 4'(a); carry = cy[0]; b = 8'(bvals[k]);
            #1;
            exp_m = model(c, a, bvals[k], cy);
            checks++;
            if (mask != exp_m) begin
              failures++;
              if (failures < 10) $display("ct=%0d ra=%0d b=%02x carry=%0d: %07x expected %07x", c, a, b, cy, mask, exp_m);
            end
          end
    checks++;
    if (n_two == 0 || n_stuff == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

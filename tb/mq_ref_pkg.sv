// mq_ref_pkg: bit-exact software model of the JPEG 2000 MQ encoder, used as
// the reference in the testbenches.
//
// It follows the sequential procedures of the standard one symbol at a time:
// CODEMPS / CODELPS, RENORME (shift A and C one bit per step, BYTEOUT when CT
// reaches 0), BYTEOUT with carry propagation and bit stuffing, and FLUSH. It
// shares no code or tables with the RTL: the probability table is written out
// again here as plain arrays. Besides the code bytes it counts events of
// interest (carries, stuffed bytes, conditional exchanges, byte-outs per
// symbol) so that tests can show they were exercised.
package mq_ref_pkg;

  localparam int QE   [47] = '{
    'h5601,'h3401,'h1801,'h0AC1,'h0521,'h0221,'h5601,'h5401,'h4801,'h3801,
    'h3001,'h2401,'h1C01,'h1601,'h5601,'h5401,'h5101,'h4801,'h3801,'h3401,
    'h3001,'h2801,'h2401,'h2201,'h1C01,'h1801,'h1601,'h1401,'h1201,'h1101,
    'h0AC1,'h09C1,'h08A1,'h0521,'h0441,'h02A1,'h0221,'h0141,'h0111,'h0085,
    'h0049,'h0025,'h0015,'h0009,'h0005,'h0001,'h5601};
  localparam int NMPS [47] = '{
     1, 2, 3, 4, 5,38, 7, 8, 9,10,11,12,13,29,15,16,17,18,19,20,
    21,22,23,24,25,26,27,28,29,30,31,32,33,34,35,36,37,38,39,40,
    41,42,43,44,45,45,46};
  localparam int NLPS [47] = '{
     1, 6, 9,12,29,33, 6,14,14,14,17,18,20,21,14,14,15,16,17,18,
    19,19,20,21,22,23,24,25,26,27,28,29,30,31,32,33,34,35,36,37,
    38,39,40,41,42,43,46};
  localparam int SWTCH [47] = '{
     1, 0, 0, 0, 0, 0, 1, 0, 0, 0, 0, 0, 0, 0, 1, 0, 0, 0, 0, 0,
     0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0,
     0, 0, 0, 0, 0, 0, 0};

  class mq_ref;
    int unsigned a, c, ct, b;
    int          bp;            // bytes committed so far, -1 = none
    int          idx [32];
    int          mps [32];
    byte unsigned out [$];
    // event counters
    int n_carry, n_stuff, n_exch, n_two_bo, n_ra15, n_bo, n_ec;
    int bo_in_renorm;

    function new();
      reset_counters();
      init();
    endfunction

    function void reset_counters();
      n_ec = 0; bo_in_renorm = 0;
      n_carry = 0; n_stuff = 0; n_exch = 0; n_two_bo = 0; n_ra15 = 0; n_bo = 0;
    endfunction

    function void init();
      a = 'h8000; c = 0; ct = 12; b = 0; bp = -1;
      for (int i = 0; i < 32; i++) begin
        idx[i] = 0; mps[i] = 0;
      end
      idx[0] = 4; idx[17] = 3; idx[18] = 46;
    endfunction

    // Commit the current B to the stream; the byte before the stream start
    // is not part of it.
    function void commit_b();
      if (bp >= 0) out.push_back(byte'(b));
      bp++;
    endfunction

    function void byteout();
      n_bo++;
      if (bo_in_renorm == 1 && b == 'hFF) n_ec++;
      bo_in_renorm++;
      if (b == 'hFF) begin
        n_stuff++;
        commit_b(); b = (c >> 20) & 'hFF; c &= 'hFFFFF; ct = 7;
      end else if (c < 'h8000000) begin
        commit_b(); b = (c >> 19) & 'hFF; c &= 'h7FFFF; ct = 8;
      end else begin
        n_carry++;
        b++;
        if (b == 'hFF) begin
          n_stuff++;
          c &= 'h7FFFFFF;
          commit_b(); b = (c >> 20) & 'hFF; c &= 'hFFFFF; ct = 7;
        end else begin
          commit_b(); b = (c >> 19) & 'hFF; c &= 'h7FFFF; ct = 8;
        end
      end
    endfunction

    function void renorme();
      int shifts = 0, bos = n_bo;
      bo_in_renorm = 0;
      do begin
        a = (a << 1) & 'hFFFF; c = c << 1; ct--; shifts++;
        if (ct == 0) byteout();
      end while ((a & 'h8000) == 0);
      if (n_bo - bos >= 2) n_two_bo++;
      if (shifts == 15) n_ra15++;
    endfunction

    function void encode(int cx, int d);
      int i, qe;
      i = idx[cx]; qe = QE[i];
      a -= qe;
      if (d == mps[cx]) begin
        if ((a & 'h8000) == 0) begin
          if (a < qe) begin a = qe; n_exch++; end
          else c += qe;
          idx[cx] = NMPS[i];
          renorme();
        end else c += qe;
      end else begin
        if (a < qe) begin c += qe; n_exch++; end
        else a = qe;
        if (SWTCH[i] == 1) mps[cx] = 1 - mps[cx];
        idx[cx] = NLPS[i];
        renorme();
      end
    endfunction

    // Code-register work of one symbol alone: add Qe when r is set, then
    // shift C by ra bits with byte-outs, exactly as RENORME does.
    function void apply_op(int unsigned qe, int r, int ra);
      int bos = n_bo;
      bo_in_renorm = 0;
      if (r != 0) c += qe;
      for (int s = 0; s < ra; s++) begin
        c = c << 1; ct--;
        if (ct == 0) byteout();
      end
      if (n_bo - bos >= 2) n_two_bo++;
    endfunction

    // Termination with an explicitly given interval A.
    function void flush_with(int unsigned a_val);
      a = a_val;
      flush();
    endfunction

    function void flush();
      int unsigned tempc;
      bo_in_renorm = 2;
      tempc = c + a;
      c = c | 'hFFFF;
      if (c >= tempc) c -= 'h8000;
      c = c << ct; byteout();
      c = c << ct; byteout();
      if (b != 'hFF) commit_b();
      init();
    endfunction
  endclass

endpackage

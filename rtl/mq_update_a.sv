// mq_update_a: codes one CX-D pair into the interval register A (combinational).
//
// The new interval is either A-Qe or Qe. Which one is decided by whether D is
// the MPS and by the conditional exchange test A-Qe < Qe, done here as
// A < 2*Qe so that it does not wait for the subtractor. The two candidates are
// renormalised in parallel instead of after the selection:
//   * A-Qe is always above 0x29FF (A >= 0x8000, Qe <= 0x5601), so it needs a
//     shift of 0, 1 or 2, found from its top two bits;
//   * Qe comes renormalised from the RQe table, with its shift from the RA
//     table, so that path needs no shifter at all.
// R tells the code-update stage whether C gains Qe (R = 1 exactly when A-Qe is
// the new interval); RA is the renormalisation shift that C must follow.
// The next probability index and MPS sense follow the JPEG 2000 MQ-coder rules:
// NMPS after an MPS that renormalises, NLPS after an LPS, MPS flipped on an
// LPS in a switching state.
//
// The parallel RQe/RA and A-Qe paths follow the architecture; the
// probability table itself is the JPEG 2000 one.
//
// Interface: a_in, d and the context's state in; a_out (renormalised), qe, r,
// ra and the context's next state out. No clock; purely combinational.
module mq_update_a
  import mq_pkg::*;
(
  input  logic [A_W-1:0]  a_in,
  input  logic            d,
  input  cx_state_t       st_in,
  output logic [A_W-1:0]  a_out,
  output logic [QE_W-1:0] qe,
  output logic            r,
  output logic [RA_W-1:0] ra,
  output cx_state_t       st_out
);

  qe_entry_t        ent;
  logic [A_W-1:0]   a_sub;      // A - Qe
  logic [A_W-1:0]   a_sub_n;    // A - Qe renormalised
  logic [RA_W-1:0]  ra_sub;     // its shift, 0..2
  logic             exch;       // conditional exchange: A - Qe < Qe
  logic             is_mps;
  logic             sel_qe;     // new interval is Qe

  always_comb begin
    ent    = qe_table(st_in.idx);
    qe     = ent.qe;
    is_mps = (d == st_in.mps);
    a_sub  = a_in - ent.qe;
    exch   = ({1'b0, a_in} < {ent.qe, 1'b0});

    // A - Qe >= 0x2A00: at most two leading zeros.
    if (a_sub[15]) begin
      a_sub_n = a_sub;
      ra_sub  = 4'd0;
    end else if (a_sub[14]) begin
      a_sub_n = {a_sub[14:0], 1'b0};
      ra_sub  = 4'd1;
    end else begin
      a_sub_n = {a_sub[13:0], 2'b00};
      ra_sub  = 4'd2;
    end

    // MPS: exchange picks Qe. LPS: no exchange picks Qe.
    sel_qe = is_mps ? exch : !exch;
    r      = !sel_qe;
    if (sel_qe) begin
      a_out = rqe_table(st_in.idx);
      ra    = ra_table(st_in.idx);
    end else begin
      a_out = a_sub_n;
      ra    = ra_sub;
    end

    st_out = st_in;
    if (!is_mps) begin
      st_out.idx = ent.nlps;
      if (ent.sw) st_out.mps = !st_in.mps;
    end else if (!a_sub[15]) begin
      st_out.idx = ent.nmps;
    end
  end

endmodule

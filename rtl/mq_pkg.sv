// mq_pkg: constants, types and probability tables shared by the two-symbol
// MQ arithmetic encoder.
//
// The probability estimation table is the 47-state table of the JPEG 2000 MQ
// coder (ITU-T T.800 Annex C): for every state index I it gives the LPS
// probability Qe, the next index after an MPS renormalisation (NMPS), the next
// index after an LPS (NLPS) and whether the MPS sense switches on an LPS.
// Besides it, the encoder uses two derived tables so that the interval update
// needs no leading-zero counter and no shifter on the "A = Qe" path:
//   RA table  : number of left shifts that bring Qe[I] to >= 0x8000
//   RQe table : Qe[I] << RA[I], i.e. the renormalised Qe
// Both are computed here from Qe by constant functions, so the three tables can
// never disagree. The register widths (A 16 bits, C 28 bits with a 12-bit
// upper part whose MSB is the carry) follow the description of the design.
package mq_pkg;

  localparam int unsigned A_W     = 16;  // interval register A
  localparam int unsigned C_W     = 28;  // code register C (C12 | C16)
  localparam int unsigned QE_W    = 16;  // LPS probability
  localparam int unsigned IDX_W   = 6;   // probability state index, 0..46
  localparam int unsigned RA_W    = 4;   // renormalisation shift, 0..15
  localparam int unsigned CT_W    = 4;   // free-bit counter, 0..12

  localparam logic [A_W-1:0] A_INIT  = 16'h8000;
  localparam logic [CT_W-1:0] CT_INIT = 4'd12;

  typedef logic [IDX_W-1:0] idx_t;

  // One context's adaptive state: MPS sense and probability index.
  typedef struct packed {
    logic mps;
    idx_t idx;
  } cx_state_t;

  // One row of the probability estimation table.
  typedef struct packed {
    logic [QE_W-1:0] qe;
    idx_t            nmps;
    idx_t            nlps;
    logic            sw;
  } qe_entry_t;

  // Work passed from the interval-update stage to the code-update stage for
  // one symbol: R = 1 adds Qe to C, RA is the number of left shifts of C.
  typedef struct packed {
    logic [QE_W-1:0] qe;
    logic            r;
    logic [RA_W-1:0] ra;
  } sym_op_t;

  function automatic qe_entry_t qe_table(input idx_t i);
    qe_entry_t e;
    case (i)
      6'd0 : e = '{16'h5601, 6'd1 , 6'd1 , 1'b1};
      6'd1 : e = '{16'h3401, 6'd2 , 6'd6 , 1'b0};
      6'd2 : e = '{16'h1801, 6'd3 , 6'd9 , 1'b0};
      6'd3 : e = '{16'h0AC1, 6'd4 , 6'd12, 1'b0};
      6'd4 : e = '{16'h0521, 6'd5 , 6'd29, 1'b0};
      6'd5 : e = '{16'h0221, 6'd38, 6'd33, 1'b0};
      6'd6 : e = '{16'h5601, 6'd7 , 6'd6 , 1'b1};
      6'd7 : e = '{16'h5401, 6'd8 , 6'd14, 1'b0};
      6'd8 : e = '{16'h4801, 6'd9 , 6'd14, 1'b0};
      6'd9 : e = '{16'h3801, 6'd10, 6'd14, 1'b0};
      6'd10: e = '{16'h3001, 6'd11, 6'd17, 1'b0};
      6'd11: e = '{16'h2401, 6'd12, 6'd18, 1'b0};
      6'd12: e = '{16'h1C01, 6'd13, 6'd20, 1'b0};
      6'd13: e = '{16'h1601, 6'd29, 6'd21, 1'b0};
      6'd14: e = '{16'h5601, 6'd15, 6'd14, 1'b1};
      6'd15: e = '{16'h5401, 6'd16, 6'd14, 1'b0};
      6'd16: e = '{16'h5101, 6'd17, 6'd15, 1'b0};
      6'd17: e = '{16'h4801, 6'd18, 6'd16, 1'b0};
      6'd18: e = '{16'h3801, 6'd19, 6'd17, 1'b0};
      6'd19: e = '{16'h3401, 6'd20, 6'd18, 1'b0};
      6'd20: e = '{16'h3001, 6'd21, 6'd19, 1'b0};
      6'd21: e = '{16'h2801, 6'd22, 6'd19, 1'b0};
      6'd22: e = '{16'h2401, 6'd23, 6'd20, 1'b0};
      6'd23: e = '{16'h2201, 6'd24, 6'd21, 1'b0};
      6'd24: e = '{16'h1C01, 6'd25, 6'd22, 1'b0};
      6'd25: e = '{16'h1801, 6'd26, 6'd23, 1'b0};
      6'd26: e = '{16'h1601, 6'd27, 6'd24, 1'b0};
      6'd27: e = '{16'h1401, 6'd28, 6'd25, 1'b0};
      6'd28: e = '{16'h1201, 6'd29, 6'd26, 1'b0};
      6'd29: e = '{16'h1101, 6'd30, 6'd27, 1'b0};
      6'd30: e = '{16'h0AC1, 6'd31, 6'd28, 1'b0};
      6'd31: e = '{16'h09C1, 6'd32, 6'd29, 1'b0};
      6'd32: e = '{16'h08A1, 6'd33, 6'd30, 1'b0};
      6'd33: e = '{16'h0521, 6'd34, 6'd31, 1'b0};
      6'd34: e = '{16'h0441, 6'd35, 6'd32, 1'b0};
      6'd35: e = '{16'h02A1, 6'd36, 6'd33, 1'b0};
      6'd36: e = '{16'h0221, 6'd37, 6'd34, 1'b0};
      6'd37: e = '{16'h0141, 6'd38, 6'd35, 1'b0};
      6'd38: e = '{16'h0111, 6'd39, 6'd36, 1'b0};
      6'd39: e = '{16'h0085, 6'd40, 6'd37, 1'b0};
      6'd40: e = '{16'h0049, 6'd41, 6'd38, 1'b0};
      6'd41: e = '{16'h0025, 6'd42, 6'd39, 1'b0};
      6'd42: e = '{16'h0015, 6'd43, 6'd40, 1'b0};
      6'd43: e = '{16'h0009, 6'd44, 6'd41, 1'b0};
      6'd44: e = '{16'h0005, 6'd45, 6'd42, 1'b0};
      6'd45: e = '{16'h0001, 6'd45, 6'd43, 1'b0};
      6'd46: e = '{16'h5601, 6'd46, 6'd46, 1'b0};
      default: e = '{16'h5601, 6'd46, 6'd46, 1'b0};
    endcase
    return e;
  endfunction

  // Number of leading zeros of a non-zero 16-bit value (0..15).
  function automatic logic [RA_W-1:0] lead_zeros(input logic [A_W-1:0] v);
    logic [RA_W-1:0] n;
    logic            seen;
    n    = '0;
    seen = 1'b0;
    for (int b = A_W - 1; b >= 1; b--) begin
      seen = seen | v[b];
      if (!seen) n = RA_W'(A_W - b);
    end
    return n;
  endfunction

  // RA table entry: renormalisation shift when A becomes Qe[I].
  function automatic logic [RA_W-1:0] ra_table(input idx_t i);
    return lead_zeros(qe_table(i).qe);
  endfunction

  // RQe table entry: Qe[I] already renormalised.
  function automatic logic [A_W-1:0] rqe_table(input idx_t i);
    return qe_table(i).qe << ra_table(i);
  endfunction

  // Initial state of a context at the start of a code-block. JPEG 2000 starts
  // the uniform context (18) at index 46, the run-length context (17) at 3,
  // the all-zero-neighbourhood zero-coding context (0) at 4 and every other
  // context at 0, all with MPS = 0.
  function automatic cx_state_t cx_init(input int unsigned cx);
    cx_state_t s;
    s.mps = 1'b0;
    case (cx)
      0:       s.idx = 6'd4;
      17:      s.idx = 6'd3;
      18:      s.idx = 6'd46;
      default: s.idx = 6'd0;
    endcase
    return s;
  endfunction

endpackage

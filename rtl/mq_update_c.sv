// mq_update_c: adds Qe to the code register C when the range selection R is
// set, and extracts the CARRY bit that the first byte-out of this symbol will
// see (combinational).
//
// The 28-bit addition is split the way the interval arithmetic allows: Qe only
// reaches the 16-bit lower part C16, so a 16-bit adder handles C16 + Qe and
// its carry-out drives a 12-bit incrementer on the upper part C12. CARRY is
// the bit that lands on bit 27 after C is shifted left by CT, i.e. bit
// 27-CT; it is taken from both the unchanged and the added C and picked by R,
// so it is ready as soon as the adder is.
//
// The adder/incrementer split and the CARRY selection follow the
// architecture.
//
// Interface: c_in, r, qe, ct in; c_out and carry out. No clock.
module mq_update_c
  import mq_pkg::*;
(
  input  logic [C_W-1:0]  c_in,
  input  logic            r,
  input  logic [QE_W-1:0] qe,
  input  logic [CT_W-1:0] ct,
  output logic [C_W-1:0]  c_out,
  output logic            carry
);

  logic [16:0]    low_sum;    // C16 + Qe with carry-out
  logic [11:0]    high_inc;   // C12 + 1
  logic [C_W-1:0] c_add;
  logic [4:0]     pos;        // 27 - CT

  always_comb begin
    low_sum  = {1'b0, c_in[15:0]} + {1'b0, qe};
    high_inc = c_in[27:16] + 12'd1;
    c_add    = {low_sum[16] ? high_inc : c_in[27:16], low_sum[15:0]};
    c_out    = r ? c_add : c_in;
    pos      = 5'd27 - {1'b0, ct};
    carry    = r ? c_add[pos] : c_in[pos];
  end

endmodule

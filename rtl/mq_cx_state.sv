// mq_cx_state: the context state register bank (MPS sense and probability
// index for every context).
//
// Two asynchronous read ports serve the two symbols coded in a cycle; two
// write ports store their updated states at the clock edge. When both symbols
// use the same context, write port 2 wins, because the second symbol's state
// already includes the first symbol's update (the bypass is outside, in the
// interval-update stage). Reset, and the synchronous clear used at the end of
// a code-block, load every context with its JPEG 2000 start state.
//
// The bank with its MPS and index fields and the same-context bypass around
// it follow the architecture; the context count, the flip-flop realisation,
// the write priority and the clear input are this design's choices.
//
// Parameters: NUM_CX contexts (19 in JPEG 2000), CX_W bits of context number.
// Timing: reads are combinational, writes take effect at the next rising edge.
module mq_cx_state
  import mq_pkg::*;
#(
  parameter int unsigned NUM_CX = 19,
  parameter int unsigned CX_W   = 5
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            clear,
  input  logic [CX_W-1:0] rd_cx1,
  input  logic [CX_W-1:0] rd_cx2,
  output cx_state_t       rd_st1,
  output cx_state_t       rd_st2,
  input  logic            we1,
  input  logic [CX_W-1:0] wr_cx1,
  input  cx_state_t       wr_st1,
  input  logic            we2,
  input  logic [CX_W-1:0] wr_cx2,
  input  cx_state_t       wr_st2
);

  cx_state_t bank [NUM_CX];

  // Context numbers at or beyond NUM_CX read as context 0.
  always_comb begin
    rd_st1 = (32'(rd_cx1) < NUM_CX) ? bank[rd_cx1] : bank[0];
    rd_st2 = (32'(rd_cx2) < NUM_CX) ? bank[rd_cx2] : bank[0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_CX; i++) bank[i] <= cx_init(i);
    end else if (clear) begin
      for (int i = 0; i < NUM_CX; i++) bank[i] <= cx_init(i);
    end else begin
      for (int i = 0; i < NUM_CX; i++) begin
        if (we2 && 32'(wr_cx2) == i)      bank[i] <= wr_st2;
        else if (we1 && 32'(wr_cx1) == i) bank[i] <= wr_st1;
      end
    end
  end

endmodule

// tb_mq_two_symbol_ae: end-to-end test of the two-symbol MQ encoder.
//
// Several code-blocks of random CX-D pairs are coded by the encoder and by the
// sequential reference model (mq_ref_pkg); the code streams must match byte
// for byte. The code-blocks use different symbol statistics (balanced, skewed,
// very skewed, and a mix with bursts) so that carries, bit stuffing, the
// conditional exchange, two byte-outs in one symbol, a stuffed second byte,
// 15-bit renormalisations, same-context pairs, single-symbol cycles, idle
// cycles and four-byte cycles all occur; each is counted and one that never
// happens counts as a failure. The test also checks the pipeline latency (the
// termination bytes appear two clocks after flush) and that one pair is
// accepted every clock. The encoder runs at its default parameters.
module tb_mq_two_symbol_ae;
  import mq_ref_pkg::*;

  localparam int NBLK = 15;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic [1:0] sym_valid = '0;
  logic [4:0] cx1 = '0, cx2 = '0;
  logic       d1 = 1'b0, d2 = 1'b0, flush = 1'b0;
  logic [7:0] bo [4];
  logic [3:0] oe;
  logic       last;

  int checks = 0, failures = 0;
  int n_same_cx = 0, n_single = 0, n_idle = 0, n_four = 0, n_last = 0;
  int cycles = 0;
  byte unsigned got [$];
  mq_ref ref_m;

  mq_two_symbol_ae dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  // collect output bytes in stream order
  always @(posedge clk) if (rst_n) begin
    for (int k = 0; k < 4; k++) if (oe[k]) got.push_back(bo[k]);
    if (oe == 4'hF) n_four++;
    if (last) n_last++;
  end

  initial begin : watchdog
    repeat (20000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // A symbol for a given statistic: mode 0 balanced, 1 skewed, 2 long MPS runs
  // on two contexts broken by bursts of six LPS (large renormalisations),
  // 3 skewed with balanced stretches, 4 one context climbing to its smallest
  // Qe between bursts of four LPS (up to 15-bit renormalisations); contexts
  // from 0..18.
  function automatic void gen(input int mode, input int pos, output int cx, output int d);
    int u;
    cx = (mode == 4) ? 0 : (mode == 2) ? $urandom_range(0, 1) : $urandom_range(0, 18);
    u = $urandom_range(0, 9999);
    case (mode)
      0: d = u < 5000;
      1: d = u < 600;
      2: d = (pos % 2000) < 6;
      4: d = (pos % 20000) < 4;
      default: d = ((pos / 64) % 5 == 0) ? (u < 5000) : (u < 150);
    endcase
  endfunction

  initial begin
    int nsym, cx_a, d_a, cx_b, d_b, mode, t_flush, t_last;
    ref_m = new();
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    for (int blk = 0; blk < NBLK; blk++) begin
      int i, pairs, c0;
      mode = blk % 5;
      nsym = (mode == 2) ? 3000000 : (mode == 4) ? 1000000 : 500 + $urandom_range(0, 3000);
      got.delete();
      ref_m.out.delete();
      i = 0; pairs = 0; c0 = cycles;
      while (i < nsym) begin
        int r;
        r = $urandom_range(0, 99);
        @(negedge clk);
        if (r < 4) begin
          sym_valid = 2'b00; n_idle++;
        end else begin
          gen(mode, i, cx_a, d_a);
          cx1 = 5'(cx_a); d1 = d_a[0];
          ref_m.encode(cx_a, d_a);
          i++;
          if (r < 10 || i == nsym) begin
            sym_valid = 2'b01; n_single++;
            cx2 = 5'($urandom_range(0, 18)); d2 = 1'($urandom);
          end else begin
            gen(mode, i, cx_b, d_b);
            if ($urandom_range(0, 3) == 0) cx_b = cx_a;
            cx2 = 5'(cx_b); d2 = d_b[0];
            ref_m.encode(cx_b, d_b);
            if (cx_b == cx_a) n_same_cx++;
            i++;
            sym_valid = 2'b11;
            pairs++;
          end
        end
      end
      @(negedge clk);
      sym_valid = 2'b00;
      flush = 1'b1;
      t_flush = cycles;
      ref_m.flush();
      @(negedge clk);
      flush = 1'b0;
      // throughput: one clock per input cycle, nothing stalled
      checks++;
      if (t_flush - c0 != (cycles - 1) - c0) failures++;
      wait (last === 1'b1);
      t_last = cycles;
      @(posedge clk);   // the collector samples the termination bytes here
      @(negedge clk);
      checks++;
      if (t_last - t_flush != 2) begin
        failures++;
        $display("latency %0d != 2", t_last - t_flush);
      end
      checks++;
      if (got.size() != ref_m.out.size()) begin
        failures++;
        $display("block %0d: %0d bytes, expected %0d", blk, got.size(), ref_m.out.size());
      end
      for (int k = 0; k < ref_m.out.size() && k < got.size(); k++) begin
        checks++;
        if (got[k] != ref_m.out[k]) begin
          failures++;
          if (failures < 10) $display("block %0d byte %0d: %02x expected %02x", blk, k, got[k], ref_m.out[k]);
        end
      end
      $display("block %0d mode %0d: %0d symbols, %0d bytes", blk, mode, nsym, ref_m.out.size());
    end
    $display("events: carry=%0d stuff=%0d exch=%0d two_byteouts=%0d stuffed_second=%0d ra15=%0d same_cx=%0d single=%0d idle=%0d four_bytes=%0d flush=%0d",
             ref_m.n_carry, ref_m.n_stuff, ref_m.n_exch, ref_m.n_two_bo, ref_m.n_ec, ref_m.n_ra15,
             n_same_cx, n_single, n_idle, n_four, n_last);
    if (ref_m.n_carry == 0)  begin failures++; $display("no carry"); end
    if (ref_m.n_stuff == 0)  begin failures++; $display("no stuffing"); end
    if (ref_m.n_exch == 0)   begin failures++; $display("no exchange"); end
    if (ref_m.n_two_bo == 0) begin failures++; $display("no two byte-outs"); end
    if (ref_m.n_ec == 0)     begin failures++; $display("no stuffed second byte"); end
    if (ref_m.n_ra15 == 0)   begin failures++; $display("no 15-bit shift"); end
    if (n_same_cx == 0)      begin failures++; $display("no same-context pair"); end
    if (n_single == 0)       begin failures++; $display("no single symbol"); end
    if (n_idle == 0)         begin failures++; $display("no idle"); end
    if (n_four == 0)         begin failures++; $display("no four-byte cycle"); end
    if (n_last != NBLK)      begin failures++; $display("flush count"); end
    checks += 11;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

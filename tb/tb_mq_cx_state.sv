// tb_mq_cx_state: checks the context state bank against an array model:
// start states after reset and after clear, both read ports, both write ports,
// and that write port 2 wins when both write the same context.
module tb_mq_cx_state;
  import mq_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0, clear = 1'b0;
  logic [4:0]  rd_cx1 = '0, rd_cx2 = '0, wr_cx1 = '0, wr_cx2 = '0;
  cx_state_t   rd_st1, rd_st2, wr_st1 = '0, wr_st2 = '0;
  logic        we1 = 1'b0, we2 = 1'b0;
  int checks = 0, failures = 0, n_collide = 0, n_clear = 0;
  logic [6:0]  model [19];

  mq_cx_state dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [6:0] start_state(input int cx);
    return (cx == 0) ? 7'd4 : (cx == 17) ? 7'd3 : (cx == 18) ? 7'd46 : 7'd0;
  endfunction

  task automatic check_all();
    for (int i = 0; i < 19; i++) begin
      rd_cx1 = 5'(i); rd_cx2 = 5'(18 - i);
      #1;
      checks++;
      if (rd_st1 != model[i] || rd_st2 != model[18 - i]) begin
        failures++;
        if (failures < 10) $display("cx %0d: %0h/%0h expected %0h/%0h", i, rd_st1, rd_st2, model[i], model[18 - i]);
      end
    end
  endtask

  initial begin
    for (int i = 0; i < 19; i++) model[i] = start_state(i);
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check_all();
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      we1 = 1'($urandom); we2 = 1'($urandom);
      wr_cx1 = 5'($urandom_range(0, 18));
      wr_cx2 = ($urandom_range(0, 3) == 0) ? wr_cx1 : 5'($urandom_range(0, 18));
      wr_st1 = cx_state_t'($urandom); wr_st2 = cx_state_t'($urandom);
      clear = ($urandom_range(0, 199) == 0);
      @(posedge clk);
      if (clear) begin
        n_clear++;
        for (int i = 0; i < 19; i++) model[i] = start_state(i);
      end else begin
        if (we1 && we2 && wr_cx1 == wr_cx2) n_collide++;
        if (we1) model[wr_cx1] = wr_st1;
        if (we2) model[wr_cx2] = wr_st2;
      end
      @(negedge clk);
      we1 = 1'b0; we2 = 1'b0; clear = 1'b0;
      if (k % 10 == 0) check_all();
      else begin
        rd_cx1 = 5'($urandom_range(0, 18)); rd_cx2 = 5'($urandom_range(0, 18));
        #1;
        checks++;
        if (rd_st1 != model[rd_cx1] || rd_st2 != model[rd_cx2]) failures++;
      end
    end
    checks++;
    if (n_collide == 0 || n_clear == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

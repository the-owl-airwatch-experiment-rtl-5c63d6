// tb_pattern_register: latches random patterns, checks cur/prev pipeline,
// the valid pulse and clear.
module tb_pattern_register;
  localparam int M = 20;
  logic clk = 0, rst_n = 0, latch = 0, clear = 0, valid;
  logic [M-1:0] bits, cur, prev, e_cur = '0, e_prev = '0;
  int checks = 0, failures = 0;

  pattern_register #(.N_MC(M)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk); rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      latch = ($urandom % 3) == 0;
      clear = ($urandom % 40) == 0;
      bits  = M'($urandom);
      @(negedge clk);
      if (clear) begin e_cur = '0; e_prev = '0; end
      else if (latch) begin e_prev = e_cur; e_cur = bits; end
      checks += 3;
      if (cur != e_cur)   begin failures++; $display("cur"); end
      if (prev != e_prev) begin failures++; $display("prev"); end
      if (valid != (latch && !clear)) begin failures++; $display("valid"); end
      latch = 0; clear = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

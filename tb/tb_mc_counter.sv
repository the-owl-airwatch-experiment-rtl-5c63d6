// tb_mc_counter: random timing pulses over GTUs of 30 clocks; at every
// gtu_start the over flag must say whether the GTU just ended had at least
// thr pulses, and the count must restart (pulse in the strobe clock counted).
module tb_mc_counter;
  logic clk = 0, rst_n = 0, timing = 0, gtu_start = 0;
  logic [7:0] thr, count;
  logic over;
  int checks = 0, failures = 0, n = 0, n_over = 0, n_under = 0;

  mc_counter #(.CW(8)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    thr = 8'd8;
    @(negedge clk); rst_n = 1;
    for (int g = 0; g < 200; g++) begin
      for (int k = 0; k < 30; k++) begin
        gtu_start = (k == 0);
        timing = ($urandom % 100) < (g % 60);
        if (k == 0 && g > 0) begin
          checks += 2;
          if (count != 8'(n)) begin failures++; $display("g %0d count %0d exp %0d", g, count, n); end
          if (over != (n >= 8)) begin failures++; $display("g %0d over wrong", g); end
          if (n >= 8) n_over++; else n_under++;
        end
        if (k == 0) n = 0;
        if (timing) n++;
        @(negedge clk);
      end
    end
    checks++;
    if (n_over == 0 || n_under == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_gtu_control: checks the GTU period, that RESET and SET_COUNT are low
// for exactly the first clock of every GTU, and the GTUs counter.
module tb_gtu_control;
  localparam int G = 7;
  logic clk = 0, rst_n = 0, gtu_start, reset_n, set_count_n;
  logic [31:0] gtu_count;
  int checks = 0, failures = 0, cyc = 0;

  gtu_control #(.GTU_CYCLES(G), .TS_W(32)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(longint got, longint exp, string what);
    checks++;
    if (got != exp) begin failures++; $display("cyc %0d %s got %0d exp %0d", cyc, what, got, exp); end
  endtask

  initial begin
    @(negedge clk); rst_n = 1;
    for (cyc = 0; cyc < 10 * G + 3; cyc++) begin
      chk(gtu_start, (cyc % G) == 0, "gtu_start");
      chk(reset_n, (cyc % G) != 0, "reset_n");
      chk(set_count_n, (cyc % G) != 0, "set_count_n");
      chk(gtu_count, cyc / G, "gtu_count");
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_timing_memory: random timing-channel pulses over GTUs of 12 clocks;
// a model records per GTU the pulse count and the clock of the first pulse
// (255 if none). After 20 GTUs (the ring of 16 wraps) acquisition stops and
// every word is read back, newest first.
module tb_timing_memory;
  localparam int D = 16, G = 12;
  logic clk = 0, rst_n = 0, timing = 0, gtu_start = 0, we = 1, rd_en = 0;
  logic [3:0] rd_back;
  logic [15:0] rdata;
  int checks = 0, failures = 0, cnt, first, seen_any = 0;
  logic [15:0] hist [$];

  timing_memory #(.DEPTH(D), .GTU_CYCLES(G)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk); rst_n = 1;
    for (int g = 0; g <= 20; g++) begin
      for (int k = 0; k < G; k++) begin
        gtu_start = (k == 0);
        if (k == 0 && g > 0) hist.push_back({8'(first), 8'(cnt)});
        if (g == 20) begin timing = 0; break; end
        timing = ($urandom % 100) < (g * 4);
        if (k == 0) begin cnt = 0; first = 255; end
        if (timing) begin cnt++; if (first == 255) first = k; end
        @(negedge clk);
      end
    end
    @(negedge clk); gtu_start = 0; we = 0;
    for (int k = 0; k < D; k++) begin
      rd_en = 1; rd_back = 4'(k);
      @(negedge clk); rd_en = 0;
      checks++;
      if (rdata != hist[hist.size()-1-k]) begin
        failures++; $display("back %0d got %h exp %h", k, rdata, hist[hist.size()-1-k]);
      end
      if (rdata[15:8] != 8'hFF) seen_any++;
      @(negedge clk);
    end
    checks++;
    if (seen_any == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

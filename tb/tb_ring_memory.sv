// tb_ring_memory: writes random words into a 16-deep ring, some GTU strobes
// skipped, more than twice around, freezes it and reads every offset
// backward, comparing with a model of the last 16 words written.
module tb_ring_memory;
  localparam int W = 12, D = 16;
  logic clk = 0, rst_n = 0, we = 0, rd_en = 0;
  logic [W-1:0] wdata, rdata;
  logic [3:0] rd_back;
  logic [4:0] filled;
  int checks = 0, failures = 0;
  logic [W-1:0] hist [$];

  ring_memory #(.WIDTH(W), .DEPTH(D)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(int got, int exp, string what);
    checks++;
    if (got != exp) begin failures++; $display("%s got %0h exp %0h", what, got, exp); end
  endtask

  task automatic read_all(int n);
    for (int k = 0; k < n; k++) begin
      @(negedge clk); rd_en = 1; rd_back = 4'(k);
      @(negedge clk); rd_en = 0;
      chk(int'(rdata), int'(hist[hist.size()-1-k]), $sformatf("back %0d", k));
    end
  endtask

  initial begin
    @(negedge clk); rst_n = 1;
    // partly filled
    for (int i = 0; i < 5; i++) begin
      @(negedge clk); we = 1; wdata = W'($urandom); hist.push_back(wdata);
      @(negedge clk); we = 0;
    end
    chk(int'(filled), 5, "filled 5");
    read_all(5);
    for (int i = 0; i < 37; i++) begin
      @(negedge clk); we = ($urandom % 4) != 0; wdata = W'($urandom);
      if (we) hist.push_back(wdata);
      @(negedge clk); we = 0;
    end
    chk(int'(filled), D, "filled saturates");
    read_all(D);
    // wrap: offset D-1 then 0 again
    @(negedge clk); rd_en = 1; rd_back = 0;
    @(negedge clk); rd_en = 0; chk(int'(rdata), int'(hist[hist.size()-1]), "newest again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

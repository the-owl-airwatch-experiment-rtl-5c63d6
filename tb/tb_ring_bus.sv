// tb_ring_bus: random read requests; exactly the addressed macrocell must
// get its read enable and its byte must come back one clock later.
module tb_ring_bus;
  import oa_pkg::*;
  localparam int M = 6;
  logic clk = 0, rst_n = 0;
  bus_req_t req;
  logic [M-1:0] mc_rd_en;
  logic [7:0] mc_rd_data [M];
  logic [7:0] rd_data;
  int checks = 0, failures = 0, exp_q = 0;

  ring_bus #(.N_MC(M)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req = '0;
    for (int i = 0; i < M; i++) mc_rd_data[i] = 8'(17 * i + 3);
    @(negedge clk); rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      req.en = ($urandom % 4) != 0;
      req.mc = 8'($urandom % (M + 1));
      #1 checks++;
      for (int i = 0; i < M; i++)
        if (mc_rd_en[i] != (req.en && int'(req.mc) == i)) begin failures++; $display("decode"); end
      @(negedge clk);
      checks++;
      exp_q = (req.en && int'(req.mc) < M) ? 17 * int'(req.mc) + 3 : 0;
      if (int'(rd_data) != exp_q) begin failures++; $display("data %0d exp %0d", rd_data, exp_q); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_fire: a 1 x 2 array of 4 x 4 macrocells. One pixel of macrocell 1
// (row 1, column 2) gets 5 photoelectrons in a GTU with b = 2. Only
// timing[1] may pulse (4 times), and after the GTU strobe macrocell 1 must
// hold X = column 2, Y = row 1, timing count 4, while macrocell 0 holds 0.
module tb_fire;
  import oa_pkg::*;
  localparam int N = 4, M = 2;
  logic clk = 0, rst_n = 0;
  logic [N-1:0][N-1:0] pix_in [M];
  logic [3:0] set_ths = 4'd2;
  logic set_count_n = 1, reset_n = 1, gtu_start = 0, acq_en = 1;
  logic [M-1:0] timing, mc_rd_en = '0;
  mem_sel_e rd_mem = MEM_X;
  logic [BACK_W-1:0] rd_back = '0;
  logic [BYTE_W-1:0] rd_byte = '0;
  logic [7:0] mc_rd_data [M];
  int checks = 0, failures = 0, t0 = 0, t1 = 0;

  fire #(.MC_ROWS(1), .MC_COLS(2), .N(N), .DEPTH(8), .GTU_CYCLES(10), .CNT_W(4)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) begin if (timing[0]) t0++; if (timing[1]) t1++; end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(int got, int exp, string what);
    checks++;
    if (got != exp) begin failures++; $display("%s got %0d exp %0d", what, got, exp); end
  endtask

  task automatic strobe();
    gtu_start = 1; reset_n = 0; set_count_n = 0;
    @(negedge clk);
    gtu_start = 0; reset_n = 1; set_count_n = 1;
  endtask

  initial begin
    pix_in[0] = '0; pix_in[1] = '0;
    @(negedge clk); rst_n = 1;
    strobe();
    for (int k = 0; k < 10; k++) begin
      pix_in[1][1][2] = (k % 2) == 0;
      @(negedge clk);
    end
    pix_in[1][1][2] = 0;
    strobe();
    acq_en = 0;
    chk(t0, 0, "timing pulses of macrocell 0");
    chk(t1, 4, "timing pulses of macrocell 1");
    for (int m = 0; m < M; m++)
      for (int s = 0; s < 3; s++) begin
        mc_rd_en = M'(1 << m); rd_mem = mem_sel_e'(s); rd_byte = '0;
        @(negedge clk); mc_rd_en = '0;
        chk(int'(mc_rd_data[m]), (m == 0) ? 0 : (s == 0 ? 4 : (s == 1 ? 2 : 4)), $sformatf("mc %0d mem %0d", m, s));
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

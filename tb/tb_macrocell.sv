// tb_macrocell: a 4 x 4 macrocell with 8-deep ring memories and GTUs of 10
// clocks. Random photoelectrons hit the pixels (a few pixels busier than
// the rest) with b = 2. A model of the pixels gives, per GTU, the X word
// (column OR), the Y word (row OR) and the timing-channel pulse count and
// first arrival; timing_out is checked every clock. After 11 GTUs (the
// ring wraps) acquisition stops and every byte of all three memories is
// read back over the bus port and compared.
module tb_macrocell;
  import oa_pkg::*;
  localparam int N = 4, D = 8, G = 10;
  logic clk = 0, rst_n = 0;
  logic [N-1:0][N-1:0] pix_in = '0;
  logic [3:0] set_ths = 4'd2;
  logic set_count_n = 1, reset_n = 1, gtu_start = 0, acq_en = 1, timing_out;
  logic rd_en = 0;
  mem_sel_e rd_mem = MEM_X;
  logic [BACK_W-1:0] rd_back = '0;
  logic [BYTE_W-1:0] rd_byte = '0;
  logic [7:0] rd_data;
  int checks = 0, failures = 0;

  macrocell #(.N(N), .DEPTH(D), .GTU_CYCLES(G), .CNT_W(4)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(int got, int exp, string what);
    checks++;
    if (got != exp) begin failures++; if (failures < 10) $display("%s got %0h exp %0h", what, got, exp); end
  endtask

  int cnt [N][N];
  bit prev_in [N][N];
  int xw [$], yw [$], tw [$];
  int tc, tf, xv, yv, x_nonzero = 0;

  initial begin
    @(negedge clk); rst_n = 1;
    for (int g = 0; g <= 11; g++) begin
      for (int k = 0; k < G; k++) begin
        bit tim;
        gtu_start = (k == 0); reset_n = (k != 0); set_count_n = (k != 0);
        if (k == 0 && g > 0) begin
          xv = 0; yv = 0;
          for (int r = 0; r < N; r++) for (int c = 0; c < N; c++)
            if (cnt[r][c] >= 2) begin xv |= 1 << c; yv |= 1 << r; end
          xw.push_back(xv); yw.push_back(yv); tw.push_back((tf << 8) | tc);
          if (xv != 0) x_nonzero++;
        end
        if (g == 11) break;
        if (k == 0) begin tc = 0; tf = 255; foreach (cnt[r, c]) cnt[r][c] = 0; end
        tim = 0;
        for (int r = 0; r < N; r++) for (int c = 0; c < N; c++) begin
          bit v, p;
          v = ($urandom % 100) < ((r == c) ? 45 : 6);
          pix_in[r][c] = v;
          p = v && !prev_in[r][c];
          if (p) cnt[r][c]++;
          if (p && cnt[r][c] >= 2) tim = 1;
        end
        if (tim) begin tc++; if (tf == 255) tf = k; end
        #1 chk(timing_out, tim, "timing_out");
        @(negedge clk);
        foreach (prev_in[r, c]) prev_in[r][c] = pix_in[r][c];
      end
    end
    @(posedge clk); #1;
    acq_en = 0; gtu_start = 0; reset_n = 1; set_count_n = 1;
    @(negedge clk);
    for (int k = 0; k < D; k++) begin
      int e [3];
      e[0] = xw[xw.size()-1-k]; e[1] = yw[yw.size()-1-k]; e[2] = tw[tw.size()-1-k];
      for (int m = 0; m < 3; m++)
        for (int b = 0; b < 2; b++) begin
          rd_en = 1; rd_mem = mem_sel_e'(m); rd_back = BACK_W'(k); rd_byte = BYTE_W'(b);
          @(negedge clk); rd_en = 0;
          chk(int'(rd_data), (e[m] >> (8 * b)) & 255, $sformatf("mem %0d back %0d byte %0d", m, k, b));
        end
    end
    checks++;
    if (x_nonzero < 3) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_pixel_frontend: random photoelectron pulses on one pixel, GTUs of 20
// clocks with the RESET/SET_COUNT strobe in the first clock, thresholds b
// from 0 to 7. A model counts the rising edges of IN per GTU; the output
// flag must be high from the clock after the b-th edge until the next
// strobe, and to_timing must repeat exactly the edges from the b-th on.
module tb_pixel_frontend;
  logic clk = 0, rst_n = 0, in_sig = 0, set_count_n = 1, reset_n = 1;
  logic [3:0] set_ths;
  logic wx, wy, tt;
  int checks = 0, failures = 0, cyc = 0;
  int cnt = 0, b; bit in_prev = 0, m_hit = 0, pulse, exp_tt;
  int fired = 0, timing_pulses = 0;

  pixel_frontend #(.CNT_W(4)) dut (.clk, .rst_n, .in_sig, .set_ths, .set_count_n, .reset_n,
                                   .wired_or_x(wx), .wired_or_y(wy), .to_timing(tt));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit got, bit exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("cycle %0d %s got %0b exp %0b", cyc, what, got, exp);
    end
  endtask

  initial begin
    set_ths = 4'd5;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int g = 0; g < 400; g++) begin
      set_ths = 4'(g % 8);
      b = (set_ths == 0) ? 1 : int'(set_ths);
      for (int k = 0; k < 20; k++) begin
        @(negedge clk);
        cyc++;
        // outputs registered at the last edge
        chk(wx, m_hit, "wired_or_x");
        chk(wy, m_hit, "wired_or_y");
        set_count_n = (k != 0);
        reset_n     = (k != 0);
        in_sig      = (($urandom % 3) == 0);
        pulse = in_sig & ~in_prev;
        if (k == 0) cnt = 0;
        if (pulse) cnt++;
        exp_tt = pulse && (cnt >= b);
        #1 chk(tt, exp_tt, "to_timing");
        if (exp_tt) timing_pulses++;
        @(posedge clk);
        in_prev = in_sig;
        if (!m_hit && cnt >= b) fired++;
        m_hit = (cnt >= b);
      end
    end
    checks++;
    if (fired < 100 || timing_pulses < 100) failures++;
    $display("GTUs with threshold reached: %0d, timing pulses: %0d", fired, timing_pulses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

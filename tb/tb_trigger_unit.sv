// tb_trigger_unit: random patterns that tend to persist are fed each GTU;
// a model of the persistency rule (overlap with the previous pattern
// extends the run, a disjoint one restarts it at 1, an empty one ends it)
// predicts run_len, the trigger and the run breaks. Enable is dropped now
// and then, which must clear the run.
module tb_trigger_unit;
  localparam int M = 12;
  logic clk = 0, rst_n = 0, enable = 1, valid = 0, trig, run_break;
  logic [M-1:0] cur = '0, prev = '0;
  logic [7:0] persist_len, run_len;
  int checks = 0, failures = 0, run = 0, need, n_trig = 0, n_break = 0, nr;
  bit e_trig, e_break;

  trigger_unit #(.N_MC(M), .LEN_W(8)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    persist_len = 8'd4;
    @(negedge clk); rst_n = 1;
    for (int g = 0; g < 2000; g++) begin
      if (g % 500 == 250) persist_len = 8'd0;
      if (g % 500 == 0)   persist_len = 8'(2 + g / 500);
      need = (persist_len == 0) ? 1 : int'(persist_len);
      enable = ($urandom % 50) != 0;
      prev = cur;
      case ($urandom % 6)
        0: cur = '0;
        1: cur = M'($urandom);
        default: cur = cur | M'(1 << ($urandom % M));
      endcase
      if (cur == '0) cur = (($urandom % 2) == 0) ? '0 : M'(1 << ($urandom % M));
      valid = 1;
      if (cur == '0) nr = 0; else if ((cur & prev) != '0) nr = run + 1; else nr = 1;
      e_trig = 0; e_break = 0;
      if (!enable) run = 0;
      else begin
        e_break = (run != 0) && (nr <= run) && (nr < need);
        if (nr >= need) begin e_trig = 1; run = 0; end else run = nr;
      end
      @(negedge clk);
      valid = 0;
      checks += 3;
      if (trig != e_trig) begin failures++; $display("g %0d trig %0b exp %0b", g, trig, e_trig); end
      if (run_break != e_break) begin failures++; $display("g %0d break", g); end
      if (int'(run_len) != run) begin failures++; $display("g %0d run %0d exp %0d", g, run_len, run); end
      if (trig) n_trig++;
      if (run_break) n_break++;
      @(negedge clk);
      checks++;
      if (trig) begin failures++; $display("trig longer than one clock"); end
    end
    checks++;
    if (n_trig < 10 || n_break < 10) failures++;
    $display("triggers %0d, broken runs %0d", n_trig, n_break);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

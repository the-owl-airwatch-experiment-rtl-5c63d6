// tb_oust: OUST with 3 macrocells, GTUs of 10 clocks and 8-deep memories.
// The macrocell timing channels are driven directly and a bus model answers
// each macrocell read one clock later. Macrocell 2 is over the threshold of
// 3 pulses for 2 GTUs with persistency 2: the trigger must fire once, record
// the GTU number and the pattern, stop acquisition, read 3 x 4 x 4 bytes in
// order, and restart. The GTU strobes are checked against the period.
module tb_oust;
  import oa_pkg::*;
  localparam int M = 3, G = 10;
  logic clk = 0, rst_n = 0;
  logic [M-1:0] timing = '0, trig_pattern, pattern, mc_rd_en;
  logic [7:0] mc_thr = 8'd3, persist_len = 8'd2, run_len, out_data;
  logic [LEN_W-1:0] read_len = LEN_W'(4);
  logic gtu_start, reset_n, set_count_n, acq_en, out_valid, out_sof, out_eof, trig, run_break, busy, done;
  logic [31:0] gtu_count, trig_gtu;
  mem_sel_e rd_mem;
  logic [BACK_W-1:0] rd_back;
  logic [BYTE_W-1:0] rd_byte;
  logic [7:0] mc_rd_data [M];
  int checks = 0, failures = 0, n = 0, n_trig = 0, cyc = 0, tg = -1;

  oust #(.N_MC(M), .N(4), .DEPTH(8), .GTU_CYCLES(G)) dut (.*);
  always #5 clk = ~clk;

  function automatic logic [7:0] code(int m, int s, int b, int k);
    return 8'(m * 50 + s * 13 + b * 5 + k + 1);
  endfunction
  always_ff @(posedge clk)
    for (int m = 0; m < M; m++) mc_rd_data[m] <= mc_rd_en[m] ? code(m, rd_mem, rd_back, rd_byte) : 8'hEE;

  task automatic chk(longint got, longint exp, string what);
    checks++;
    if (got != exp) begin failures++; if (failures < 10) $display("%s got %0d exp %0d", what, got, exp); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // read-out stream: macrocell, memory, back, byte
  int em = 0, es = 0, eb = 0, ek = 0;
  always @(negedge clk) if (rst_n) begin
    cyc++;
    chk(gtu_start, ((cyc - 1) % G) == 0, "gtu period");
    chk(reset_n, !gtu_start, "reset strobe");
    if (trig) begin n_trig++; tg = gtu_count; end
    if (busy) chk(acq_en, 0, "acquisition stopped while busy");
    if (out_valid) begin
      chk(out_data, code(em, es, eb, ek), "event byte");
      chk(out_sof, n == 0, "sof");
      chk(out_eof, n == M * 4 * 4 - 1, "eof");
      n++;
      ek++;
      if (ek == ((es == 2) ? 2 : 1)) begin ek = 0; eb++;
        if (eb == 4) begin eb = 0; es++;
          if (es == 3) begin es = 0; em++; end end end
    end
  end

  initial begin
    @(negedge clk); rst_n = 1;
    for (int g = 0; g < 12; g++)
      for (int k = 0; k < G; k++) begin
        timing = '0;
        if (g >= 3 && g < 5 && k < 4) timing[2] = 1;   // over threshold
        if (g == 1 && k < 4) timing[0] = 1;             // single GTU, no persistency
        @(negedge clk);
      end
    chk(n_trig, 1, "one trigger");
    chk(trig_pattern, 3'b100, "trigger pattern");
    chk(trig_gtu, tg, "trigger GTU recorded");
    chk(tg, 5, "trigger in the GTU after the second over-threshold GTU");
    chk(n, M * 4 * 4, "event length");
    chk(busy, 0, "read-out finished");
    chk(acq_en, 1, "acquisition restarted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

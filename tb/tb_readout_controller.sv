// tb_readout_controller: a bus model answers every read one clock later
// with a byte computed from (macrocell, memory, offset, byte). Three
// triggers with read lengths 3, 0 (taken as 1) and 40 (limited to DEPTH)
// must each give one event of N_MC*len*(2*ceil(n/8)+2) bytes in the
// documented order, framed by sof/eof, with acquisition stopped while busy
// and a done pulse at the end. A trigger while busy must be ignored.
module tb_readout_controller;
  import oa_pkg::*;
  localparam int M = 3, N = 10, D = 8, NB = 2;
  logic clk = 0, rst_n = 0, trig = 0, acq_en, busy, done;
  logic [LEN_W-1:0] read_len;
  bus_req_t req;
  logic [7:0] rd_data = 0, out_data;
  logic out_valid, out_sof, out_eof;
  int checks = 0, failures = 0, cyc = 0;
  byte unsigned exp_q [$];

  readout_controller #(.N_MC(M), .N(N), .DEPTH(D)) dut (.*);
  always #5 clk = ~clk;

  function automatic byte unsigned code(int mc, int mem, int back, int b);
    return 8'(mc * 61 + mem * 29 + back * 7 + b * 3 + 1);
  endfunction

  always_ff @(posedge clk) rd_data <= req.en ? code(req.mc, req.mem, req.back, req.byte_idx) : 8'h00;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(int got, int exp, string what);
    checks++;
    if (got != exp) begin failures++; if (failures < 10) $display("%s got %0d exp %0d", what, got, exp); end
  endtask

  task automatic run_event(int rl);
    int len, n, busy_cycles;
    len = (rl == 0) ? 1 : (rl > D ? D : rl);
    exp_q.delete();
    for (int mc = 0; mc < M; mc++)
      for (int mem = 0; mem < 3; mem++)
        for (int g = 0; g < len; g++)
          for (int b = 0; b < ((mem == 2) ? 2 : NB); b++) exp_q.push_back(code(mc, mem, g, b));
    read_len = LEN_W'(rl);
    @(negedge clk); trig = 1;
    @(negedge clk); trig = 0;
    chk(busy, 1, "busy after trigger");
    chk(acq_en, 0, "acquisition stopped");
    n = 0; busy_cycles = 0;
    while (busy || out_valid) begin
      if (busy) busy_cycles++;
      if (n == 5) begin trig = 1; end
      if (out_valid) begin
        chk(out_sof, n == 0, "sof");
        chk(out_eof, n == exp_q.size() - 1, "eof");
        if (n < exp_q.size()) chk(int'(out_data), int'(exp_q[n]), $sformatf("byte %0d", n));
        n++;
      end
      if (busy) chk(acq_en, 0, "acq_en low while busy");
      @(negedge clk); trig = 0;
    end
    chk(n, exp_q.size(), "event length");
    chk(busy_cycles, exp_q.size() + 1, "read-out cycles (one byte per clock)");
    chk(acq_en, 1, "acquisition restarted");
  endtask

  int n_done = 0;
  always @(posedge clk) if (done) n_done++;

  initial begin
    @(negedge clk); rst_n = 1;
    repeat (3) @(negedge clk);
    chk(acq_en, 1, "idle acquiring");
    run_event(3);
    run_event(0);
    run_event(40);
    chk(n_done, 3, "done pulses");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_oa_harness: end-to-end scenario for oa_top, shared by the small and
// the full-size testbench. With FULL set, oa_top is used with its own
// default parameters; otherwise with the sizes given here.
// Background: every pixel of every macrocell sees at most one photoelectron
// per GTU, which the pixel count b = 2 must reject. Tracks: one lit pixel
// (a pulse every other clock, 5 photoelectrons per GTU) moving along the
// diagonal of a macrocell, one pixel per GTU. Sequence:
//   1. more GTUs of background than the ring memory holds (ring wraps);
//   2. a 2-GTU track in macrocell 1, then background (a broken run);
//   3. a PERSIST-GTU track in macrocell 0, which must trigger: the event is
//      checked byte by byte, and the ring memories must have stopped while
//      it was read (the newest word is the last track GTU);
//   4. after the restart, a track in the last macrocell triggers again.
// Each mechanism is counted, and one that never happened is a failure.
module tb_oa_harness #(
  parameter bit FULL       = 1'b0,
  parameter int MC_ROWS    = 2,
  parameter int MC_COLS    = 2,
  parameter int N          = 4,
  parameter int DEPTH      = 16,
  parameter int GTU_CYCLES = 10,
  parameter int READ_LEN   = 5,
  parameter int PERSIST    = 4,
  parameter int BG_GTUS    = 20
) ();
  import oa_pkg::*;
  localparam int M  = MC_ROWS * MC_COLS;
  localparam int NB = (N + 7) / 8;

  logic clk = 0, rst_n = 0;
  logic [N-1:0][N-1:0] pix_in [M];
  logic [3:0] pix_ths = 4'd2;
  logic [7:0] mc_thr = 8'd3, persist_len = 8'(PERSIST);
  logic [LEN_W-1:0] read_len = LEN_W'(READ_LEN);
  logic out_valid, out_sof, out_eof, trig, run_break, gtu_start, busy, done;
  logic [7:0] out_data, run_len;
  logic [31:0] trig_gtu, gtu_count;
  logic [M-1:0] trig_pattern, pattern;

  if (FULL) begin : g_full
    oa_top dut (.*);
  end else begin : g_small
    oa_top #(.MC_ROWS(MC_ROWS), .MC_COLS(MC_COLS), .N(N), .DEPTH(DEPTH),
             .GTU_CYCLES(GTU_CYCLES), .CNT_W(4)) dut (.*);
  end

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_trig = 0, n_break = 0, n_busy_gtu = 0, n_done = 0, n_pattern = 0, n_sof = 0, n_eof = 0;
  int n_bg_pulses = 0, gtus_before = 0;
  byte unsigned ev [$];

  task automatic chk(longint got, longint exp, string what);
    checks++;
    if (got != exp) begin failures++; if (failures < 20) $display("%s: got %0d expected %0d", what, got, exp); end
  endtask

  initial begin
    repeat (400 * GTU_CYCLES + 200 * M * READ_LEN * (2 * NB + 2)) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (trig) n_trig++;
    if (run_break) n_break++;
    if (gtu_start && busy) n_busy_gtu++;
    if (done) n_done++;
    if (gtu_start && pattern != '0) n_pattern++;
    if (out_valid) ev.push_back(out_data);
    if (out_valid && out_sof) n_sof++;
    if (out_valid && out_eof) n_eof++;
  end

  // one GTU of stimulus; track_mc < 0 for background only
  task automatic gtu(int track_mc, int step);
    int bg_k [M][N][N];
    foreach (bg_k[m, r, c]) bg_k[m][r][c] = (($urandom % 5) == 0) ? int'($urandom % GTU_CYCLES) : -1;
    for (int k = 0; k < GTU_CYCLES; k++) begin
      for (int m = 0; m < M; m++)
        for (int r = 0; r < N; r++)
          for (int c = 0; c < N; c++) begin
            if (m == track_mc && r == step % N && c == step % N) pix_in[m][r][c] = ((k % 2) == 0);
            else begin
              pix_in[m][r][c] = (bg_k[m][r][c] == k);
              if (bg_k[m][r][c] == k) n_bg_pulses++;
            end
          end
      @(negedge clk);
    end
  endtask

  // align to the clock where gtu_start is high
  task automatic sync_gtu();
    while (!gtu_start) @(negedge clk);
  endtask

  task automatic check_event(int tmc, int first_step, int len);
    int exp_len, idx;
    exp_len = M * len * (2 * NB + 2);
    chk(ev.size(), exp_len, "event length");
    if (ev.size() != exp_len) return;
    idx = 0;
    for (int m = 0; m < M; m++)
      for (int mem = 0; mem < 3; mem++)
        for (int g = 0; g < len; g++) begin
          // back g is track step PERSIST-1-g when inside the track
          int st, lit;
          st  = PERSIST - 1 - g;
          lit = (m == tmc && st >= 0);
          if (mem < 2) begin
            for (int b = 0; b < NB; b++) begin
              int pos, e;
              pos = (first_step + st) % N;
              e = (lit && pos / 8 == b) ? (1 << (pos % 8)) : 0;
              chk(ev[idx], e, $sformatf("mc %0d mem %0d back %0d byte %0d", m, mem, g, b));
              idx++;
            end
          end else begin
            // 5 photoelectrons at clocks 0,2,4,6,8; b = 2: timing from clock 2
            chk(ev[idx],     lit ? 4 : 0,   $sformatf("mc %0d timing count back %0d", m, g));
            chk(ev[idx + 1], lit ? 2 : 255, $sformatf("mc %0d timing first back %0d", m, g));
            idx += 2;
          end
        end
  endtask

  initial begin
    foreach (pix_in[m]) pix_in[m] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    sync_gtu();
    // 1. background, longer than the ring
    for (int g = 0; g < BG_GTUS; g++) gtu(-1, 0);
    chk(n_trig, 0, "no trigger on background");
    chk(n_pattern, 0, "background never sets a pattern bit");
    // 2. short track, broken
    for (int g = 0; g < 2; g++) gtu(1, g);
    for (int g = 0; g < 3; g++) gtu(-1, 0);
    chk(n_trig, 0, "short track does not trigger");
    // 3. persistent track in macrocell 0
    ev.delete();
    for (int g = 0; g < PERSIST; g++) gtu(0, g);
    while (!busy) gtu(-1, 0);
    chk(n_trig, 1, "first trigger");
    chk(trig_pattern, 1, "trigger pattern");
    while (busy) gtu(-1, 0);
    repeat (2) @(negedge clk);
    check_event(0, 0, READ_LEN);
    chk(n_busy_gtu > 0, 1, "GTUs passed while stopped");
    // 4. restart, second trigger in the last macrocell
    sync_gtu();
    ev.delete();
    for (int g = 0; g < 3; g++) gtu(-1, 0);
    for (int g = 0; g < PERSIST; g++) gtu(M - 1, g + 1);
    while (!busy) gtu(-1, 0);
    chk(n_trig, 2, "second trigger");
    chk(trig_pattern, 1 << (M - 1), "second trigger pattern");
    while (busy) gtu(-1, 0);
    repeat (2) @(negedge clk);
    check_event(M - 1, 1, READ_LEN);
    gtus_before = BG_GTUS;
    $display("mechanisms: ring wrap (GTUs before first trigger) %0d > %0d, background pulses rejected %0d,",
             gtus_before, DEPTH, n_bg_pulses);
    $display("  pattern bits %0d, broken runs %0d, triggers %0d, GTUs stopped %0d, events %0d/%0d, restarts %0d",
             n_pattern, n_break, n_trig, n_busy_gtu, n_sof, n_eof, n_done);
    chk(gtus_before > DEPTH || FULL, 1, "ring memory wrapped");
    chk(n_bg_pulses > 0, 1, "background pulses injected");
    chk(n_pattern > 0, 1, "pattern bits set");
    chk(n_break > 0, 1, "broken persistency run");
    chk(n_sof, 2, "event starts");
    chk(n_eof, 2, "event ends");
    chk(n_done, 2, "acquisition restarts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

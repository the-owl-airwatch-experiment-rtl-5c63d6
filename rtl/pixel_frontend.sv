// pixel_frontend: digital part of one pixel front-end.
// The discriminator output IN is sampled on clk and every rising edge is one
// photoelectron. A down-counter is loaded with the programmable count b
// (set_ths) while SET_COUNT is low; each photoelectron decrements it, and the
// one that brings it to zero sets the output flag, which then stays high
// until RESET goes low. The flag drives both the X and the Y wired-OR lines.
// The timing output repeats the photoelectron pulses from the b-th one on,
// so S photoelectrons in a GTU give S-b+1 timing pulses.
// Timing: control strobes and IN are sampled on clk; the flag is registered,
// so it rises on the edge after the b-th pulse; to_timing is combinational.
// RESET and SET_COUNT are active low as in the waveform of the design; they
// are meant to be pulsed together for one clock at the start of each GTU,
// and a pulse arriving in that clock is counted into the new GTU. IN is taken
// to be already synchronous to clk. b = 0 behaves as b = 1.
module pixel_frontend #(
  parameter int CNT_W = oa_pkg::CNT_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_sig,
  input  logic [CNT_W-1:0] set_ths,
  input  logic             set_count_n,
  input  logic             reset_n,
  output logic             wired_or_x,
  output logic             wired_or_y,
  output logic             to_timing
);
  logic             in_q;
  logic             pulse;
  logic             hit;
  logic [CNT_W-1:0] remaining;
  logic [CNT_W-1:0] start_val;
  logic             reach;

  assign pulse     = in_sig & ~in_q;
  // value of the counter seen by this clock's pulse
  assign start_val = set_count_n ? remaining : set_ths;
  assign reach     = pulse && (start_val <= CNT_W'(1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_q      <= 1'b0;
      hit       <= 1'b0;
      remaining <= '0;
    end else begin
      in_q <= in_sig;
      if (pulse && start_val != '0) remaining <= start_val - CNT_W'(1);
      else                          remaining <= start_val;
      if (!reset_n) hit <= reach;
      else          hit <= hit | reach;
    end
  end

  assign wired_or_x = hit;
  assign wired_or_y = hit;
  assign to_timing  = pulse & (hit & reset_n | reach);
endmodule

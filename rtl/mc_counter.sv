// mc_counter: OUST programmable counter of one macrocell.
// It counts the clocks in which the macrocell timing channel is high during
// a GTU, saturating at its maximum. over is combinational: high while the
// count reached so far is at or above the programmed threshold thr. Read in
// the gtu_start clock, before the counter restarts, it tells whether the
// GTU just ended was over threshold; that is when the pattern register
// latches it. A timing pulse in the gtu_start clock is counted into the new
// GTU. What the counter counts is this design's reading of the design
// (the timing-channel pulses of its macrocell).
module mc_counter #(
  parameter int CW = oa_pkg::MCC_W
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          timing,
  input  logic          gtu_start,
  input  logic [CW-1:0] thr,
  output logic [CW-1:0] count,
  output logic          over
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                   count <= '0;
    else if (gtu_start)           count <= CW'(timing);
    else if (timing && !(&count)) count <= count + CW'(1);
  end

  assign over = (count >= thr);
endmodule

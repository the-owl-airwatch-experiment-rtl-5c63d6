// timing_memory: record of the macrocell timing channel.
// The timing channel is the OR of the timing outputs of all pixel front-ends
// of a macrocell. Within each GTU this block counts the clocks in which the
// channel is high (the photoelectron count, saturating at 255) and notes the
// clock of the first one (the relative arrival time, 255 if none). At each
// GTU strobe the pair of the GTU just ended is written, as the 16-bit word
// {first arrival, count}, into a ring memory of the same depth as the X and
// Y memories, and the accumulators restart; a pulse in the strobe clock
// belongs to the new GTU. The read port is that of ring_memory (one clock).
// The two quantities recorded follow the description of the timing channel;
// how they are measured is this design's own simple choice.
module timing_memory #(
  parameter int DEPTH      = oa_pkg::RING_DEPTH,
  parameter int GTU_CYCLES = oa_pkg::GTU_CYCLES
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     timing,
  input  logic                     gtu_start,
  input  logic                     we,
  input  logic                     rd_en,
  input  logic [$clog2(DEPTH)-1:0] rd_back,
  output logic [15:0]              rdata
);
  logic [7:0] phase;
  logic [7:0] count;
  logic [7:0] first;
  logic       seen;
  logic [7:0] cur_phase;

  initial assert (GTU_CYCLES <= 255) else $error("GTU_CYCLES must fit in 8 bits");

  assign cur_phase = gtu_start ? 8'd0 : phase;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= '0;
      count <= '0;
      first <= 8'hFF;
      seen  <= 1'b0;
    end else if (gtu_start) begin
      phase <= 8'd1;
      count <= {7'd0, timing};
      first <= timing ? 8'd0 : 8'hFF;
      seen  <= timing;
    end else begin
      if (phase != 8'hFF) phase <= phase + 8'd1;
      if (timing && count != 8'hFF) count <= count + 8'd1;
      if (timing && !seen) begin
        first <= cur_phase;
        seen  <= 1'b1;
      end
    end
  end

  ring_memory #(.WIDTH(16), .DEPTH(DEPTH)) u_ring (
    .clk, .rst_n,
    .we     (we && gtu_start),
    .wdata  ({first, count}),
    .rd_en, .rd_back, .rdata,
    .filled ()
  );
endmodule

// gtu_control: Gate Time Unit timing of the control module.
// A cycle counter divides the sampling clock into GTUs of GTU_CYCLES clocks.
// gtu_start is high in the first clock of every GTU, the first clock after
// reset included. In that clock the active-low strobes reset_n (clear the
// pixel flags) and set_count_n (reload the programmable count b) go low,
// which is the one-clock low pulse of both at each GTU boundary. gtu_count
// is the GTUs counter: the number of the current GTU, 0 for the first; it
// steps at the same edge as the GTU boundary.
module gtu_control #(
  parameter int GTU_CYCLES = oa_pkg::GTU_CYCLES,
  parameter int TS_W       = oa_pkg::TS_W
) (
  input  logic            clk,
  input  logic            rst_n,
  output logic            gtu_start,
  output logic            reset_n,
  output logic            set_count_n,
  output logic [TS_W-1:0] gtu_count
);
  localparam int PW = $clog2(GTU_CYCLES + 1);

  logic [PW-1:0] phase;

  initial assert (GTU_CYCLES >= 4) else $error("GTU_CYCLES must be at least 4");

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase     <= '0;
      gtu_count <= '0;
    end else if (phase == PW'(GTU_CYCLES - 1)) begin
      phase     <= '0;
      gtu_count <= gtu_count + 1'b1;
    end else begin
      phase <= phase + PW'(1);
    end
  end

  assign gtu_start   = (phase == '0);
  assign reset_n     = ~gtu_start;
  assign set_count_n = ~gtu_start;
endmodule

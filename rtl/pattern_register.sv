// pattern_register: latch-pattern register of the OUST, one bit per
// macrocell. On latch (the gtu_start clock) it takes the over-threshold bits
// of the GTU just ended into cur and moves the old cur into prev, so the
// trigger logic can compare the previous pattern with the current one in
// pipeline. valid pulses the clock after each latch, when cur and prev hold
// the new pair; clear empties both (used when acquisition restarts).
module pattern_register #(
  parameter int N_MC = oa_pkg::N_MC
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            latch,
  input  logic            clear,
  input  logic [N_MC-1:0] bits,
  output logic [N_MC-1:0] cur,
  output logic [N_MC-1:0] prev,
  output logic            valid
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur   <= '0;
      prev  <= '0;
      valid <= 1'b0;
    end else if (clear) begin
      cur   <= '0;
      prev  <= '0;
      valid <= 1'b0;
    end else begin
      valid <= latch;
      if (latch) begin
        cur  <= bits;
        prev <= cur;
      end
    end
  end
endmodule

// trigger_unit: persistency trigger on the pattern register.
// Every time a new pattern is valid it is compared with the previous one.
// The run length counts the consecutive GTUs of an over-threshold pattern
// that persists: a pattern sharing at least one set bit with the previous
// pattern extends the run, a non-empty pattern that shares none starts a new
// run of 1, and an empty pattern ends it. When the run reaches persist_len
// GTUs (0 is taken as 1) and the unit is enabled, trig pulses for one clock
// (the clock after valid) and the run restarts. While disabled (acquisition
// stopped) the run is held at 0. The design names the criterion (a minimum
// over-threshold persistency, found by comparing the previous with the
// current pattern); the overlap rule is this design's own.
module trigger_unit #(
  parameter int N_MC  = oa_pkg::N_MC,
  parameter int LEN_W = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             enable,
  input  logic             valid,
  input  logic [N_MC-1:0]  cur,
  input  logic [N_MC-1:0]  prev,
  input  logic [LEN_W-1:0] persist_len,
  output logic [LEN_W-1:0] run_len,
  output logic             trig,
  output logic             run_break
);
  logic [LEN_W-1:0] next_run;
  logic [LEN_W-1:0] need;

  assign need = (persist_len == '0) ? LEN_W'(1) : persist_len;

  always_comb begin
    if (cur == '0)                  next_run = '0;
    else if ((cur & prev) != '0)    next_run = (&run_len) ? run_len : run_len + LEN_W'(1);
    else                            next_run = LEN_W'(1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run_len   <= '0;
      trig      <= 1'b0;
      run_break <= 1'b0;
    end else if (!enable) begin
      run_len   <= '0;
      trig      <= 1'b0;
      run_break <= 1'b0;
    end else begin
      trig      <= 1'b0;
      run_break <= 1'b0;
      if (valid) begin
        run_break <= (run_len != '0) && (next_run <= run_len) && (next_run < need);
        if (next_run >= need) begin
          trig    <= 1'b1;
          run_len <= '0;
        end else begin
          run_len <= next_run;
        end
      end
    end
  end
endmodule

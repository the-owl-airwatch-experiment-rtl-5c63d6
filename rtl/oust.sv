// oust: On-board Unit System Trigger and control module.
// It holds the GTU control (GTU timing, clear and set-count strobes, GTUs
// counter), one programmable counter per macrocell, the latch-pattern
// register, the persistency trigger, the read-out controller and the data &
// address bus to the macrocells. Each GTU: the counters count the timing
// pulses of their macrocells; at gtu_start the pattern register latches
// which macrocells reached mc_thr; one clock later the pattern is compared
// with the previous one and, after persist_len persistent GTUs, the trigger
// fires. The trigger stops acquisition, records the GTU number and the
// pattern (trig_gtu, trig_pattern), and the ring memories are read out as an
// event byte stream; then acquisition restarts with an empty pattern
// history. The design runs this trigger in microprocessor firmware; here the
// simple algorithm is logic, and the thresholds come in as inputs.
module oust
  import oa_pkg::mem_sel_e, oa_pkg::MEM_X, oa_pkg::MEM_Y, oa_pkg::MEM_T,
         oa_pkg::bus_req_t, oa_pkg::BUS_W, oa_pkg::BACK_W, oa_pkg::BYTE_W,
         oa_pkg::MC_IDX_W, oa_pkg::LEN_W, oa_pkg::TS_W, oa_pkg::MCC_W,
         oa_pkg::xy_bytes, oa_pkg::T_BYTES;
#(
  parameter int N_MC       = oa_pkg::N_MC,
  parameter int N          = oa_pkg::N_PIX,
  parameter int DEPTH      = oa_pkg::RING_DEPTH,
  parameter int GTU_CYCLES = oa_pkg::GTU_CYCLES
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [N_MC-1:0]  timing,
  input  logic [MCC_W-1:0] mc_thr,
  input  logic [7:0]       persist_len,
  input  logic [LEN_W-1:0] read_len,
  output logic             gtu_start,
  output logic             reset_n,
  output logic             set_count_n,
  output logic [TS_W-1:0]  gtu_count,
  output logic             acq_en,
  output logic [N_MC-1:0]  mc_rd_en,
  output mem_sel_e         rd_mem,
  output logic [BACK_W-1:0] rd_back,
  output logic [BYTE_W-1:0] rd_byte,
  input  logic [BUS_W-1:0] mc_rd_data [N_MC],
  output logic             out_valid,
  output logic [BUS_W-1:0] out_data,
  output logic             out_sof,
  output logic             out_eof,
  output logic             trig,
  output logic [TS_W-1:0]  trig_gtu,
  output logic [N_MC-1:0]  trig_pattern,
  output logic [N_MC-1:0]  pattern,
  output logic [7:0]       run_len,
  output logic             run_break,
  output logic             busy,
  output logic             done
);
  logic [N_MC-1:0] over, prev;
  logic            pat_valid;
  bus_req_t        req;
  logic [BUS_W-1:0] rd_data;

  gtu_control #(.GTU_CYCLES(GTU_CYCLES), .TS_W(TS_W)) u_gtu (
    .clk, .rst_n, .gtu_start, .reset_n, .set_count_n, .gtu_count
  );

  for (genvar m = 0; m < N_MC; m++) begin : g_cnt
    mc_counter #(.CW(MCC_W)) u_cnt (
      .clk, .rst_n, .timing(timing[m]), .gtu_start, .thr(mc_thr),
      .count(), .over(over[m])
    );
  end

  pattern_register #(.N_MC(N_MC)) u_pat (
    .clk, .rst_n, .latch(gtu_start), .clear(done), .bits(over),
    .cur(pattern), .prev, .valid(pat_valid)
  );

  trigger_unit #(.N_MC(N_MC), .LEN_W(8)) u_trig (
    .clk, .rst_n, .enable(acq_en), .valid(pat_valid), .cur(pattern), .prev,
    .persist_len, .run_len, .trig, .run_break
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      trig_gtu     <= '0;
      trig_pattern <= '0;
    end else if (trig && !busy) begin
      trig_gtu     <= gtu_count;
      trig_pattern <= pattern;
    end
  end

  readout_controller #(.N_MC(N_MC), .N(N), .DEPTH(DEPTH)) u_ro (
    .clk, .rst_n, .trig, .read_len, .acq_en, .busy, .done,
    .req, .rd_data, .out_valid, .out_data, .out_sof, .out_eof
  );

  ring_bus #(.N_MC(N_MC)) u_bus (
    .clk, .rst_n, .req, .mc_rd_en, .mc_rd_data, .rd_data
  );

  assign rd_mem  = req.mem;
  assign rd_back = req.back;
  assign rd_byte = req.byte_idx;
endmodule

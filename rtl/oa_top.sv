// oa_top: read-out electronics of the OWL-AIRWATCH focal plane.
// FIRE (the macrocells with their pixel front-ends and ring memories) and
// OUST (GTU control, macrocell counters, pattern register, trigger, read-out
// and bus) wired together. Inputs: the digitized discriminator output of
// every pixel, the pixel count b (pix_ths), the macrocell counting threshold
// (mc_thr), the persistency length in GTUs and the read-out length in GTUs.
// Output: after each trigger, one event as a byte stream (see
// readout_controller for its order), plus the trigger GTU number and pattern.
module oa_top
  import oa_pkg::mem_sel_e, oa_pkg::MEM_X, oa_pkg::MEM_Y, oa_pkg::MEM_T,
         oa_pkg::bus_req_t, oa_pkg::BUS_W, oa_pkg::BACK_W, oa_pkg::BYTE_W,
         oa_pkg::MC_IDX_W, oa_pkg::LEN_W, oa_pkg::TS_W, oa_pkg::MCC_W,
         oa_pkg::xy_bytes, oa_pkg::T_BYTES;
#(
  parameter int MC_ROWS    = oa_pkg::MC_ROWS,
  parameter int MC_COLS    = oa_pkg::MC_COLS,
  parameter int N          = oa_pkg::N_PIX,
  parameter int DEPTH      = oa_pkg::RING_DEPTH,
  parameter int GTU_CYCLES = oa_pkg::GTU_CYCLES,
  parameter int CNT_W      = oa_pkg::CNT_W,
  localparam int N_MC      = MC_ROWS * MC_COLS
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [N-1:0][N-1:0] pix_in [N_MC],
  input  logic [CNT_W-1:0]    pix_ths,
  input  logic [MCC_W-1:0]    mc_thr,
  input  logic [7:0]          persist_len,
  input  logic [LEN_W-1:0]    read_len,
  output logic                out_valid,
  output logic [BUS_W-1:0]    out_data,
  output logic                out_sof,
  output logic                out_eof,
  output logic                trig,
  output logic [TS_W-1:0]     trig_gtu,
  output logic [N_MC-1:0]     trig_pattern,
  output logic [N_MC-1:0]     pattern,
  output logic [7:0]          run_len,
  output logic                run_break,
  output logic                gtu_start,
  output logic [TS_W-1:0]     gtu_count,
  output logic                busy,
  output logic                done
);
  logic             reset_n, set_count_n, acq_en;
  logic [N_MC-1:0]  timing, mc_rd_en;
  mem_sel_e         rd_mem;
  logic [BACK_W-1:0] rd_back;
  logic [BYTE_W-1:0] rd_byte;
  logic [BUS_W-1:0] mc_rd_data [N_MC];

  fire #(.MC_ROWS(MC_ROWS), .MC_COLS(MC_COLS), .N(N), .DEPTH(DEPTH),
         .GTU_CYCLES(GTU_CYCLES), .CNT_W(CNT_W)) u_fire (
    .clk, .rst_n, .pix_in, .set_ths(pix_ths), .set_count_n, .reset_n,
    .gtu_start, .acq_en, .timing, .mc_rd_en, .rd_mem, .rd_back, .rd_byte,
    .mc_rd_data
  );

  oust #(.N_MC(N_MC), .N(N), .DEPTH(DEPTH), .GTU_CYCLES(GTU_CYCLES)) u_oust (
    .clk, .rst_n, .timing, .mc_thr, .persist_len, .read_len,
    .gtu_start, .reset_n, .set_count_n, .gtu_count, .acq_en,
    .mc_rd_en, .rd_mem, .rd_back, .rd_byte, .mc_rd_data,
    .out_valid, .out_data, .out_sof, .out_eof,
    .trig, .trig_gtu, .trig_pattern, .pattern, .run_len, .run_break,
    .busy, .done
  );
endmodule

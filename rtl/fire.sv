// fire: the FIRE system, the array of MC_ROWS x MC_COLS macrocells that
// covers the focal plane, one macrocell per focal-plane macrocell. Macrocell
// m = row*MC_COLS + col gets the pixels pix_in[m], its timing channel is
// timing[m] and its bus read port is mc_rd_en[m] / mc_rd_data[m]; the GTU
// strobes, the pixel threshold and the bus address are common to all.
module fire
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
  input  logic [CNT_W-1:0]    set_ths,
  input  logic                set_count_n,
  input  logic                reset_n,
  input  logic                gtu_start,
  input  logic                acq_en,
  output logic [N_MC-1:0]     timing,
  input  logic [N_MC-1:0]     mc_rd_en,
  input  mem_sel_e            rd_mem,
  input  logic [BACK_W-1:0]   rd_back,
  input  logic [BYTE_W-1:0]   rd_byte,
  output logic [BUS_W-1:0]    mc_rd_data [N_MC]
);
  for (genvar m = 0; m < N_MC; m++) begin : g_mc
    macrocell #(.N(N), .DEPTH(DEPTH), .GTU_CYCLES(GTU_CYCLES), .CNT_W(CNT_W)) u_mc (
      .clk, .rst_n,
      .pix_in      (pix_in[m]),
      .set_ths, .set_count_n, .reset_n, .gtu_start, .acq_en,
      .timing_out  (timing[m]),
      .rd_en       (mc_rd_en[m]),
      .rd_mem, .rd_back, .rd_byte,
      .rd_data     (mc_rd_data[m])
    );
  end
endmodule

// ring_bus: the data & address bus between the OUST/control module and the
// ring memories of all macrocells. The request's macrocell address is
// decoded into one read enable per macrocell; the byte returned by the
// addressed macrocell one clock later is multiplexed onto rd_data, which is
// 0 when no read was made. One master (the read-out controller), read only.
module ring_bus
  import oa_pkg::mem_sel_e, oa_pkg::MEM_X, oa_pkg::MEM_Y, oa_pkg::MEM_T,
         oa_pkg::bus_req_t, oa_pkg::BUS_W, oa_pkg::BACK_W, oa_pkg::BYTE_W,
         oa_pkg::MC_IDX_W, oa_pkg::LEN_W, oa_pkg::TS_W, oa_pkg::MCC_W,
         oa_pkg::xy_bytes, oa_pkg::T_BYTES;
#(
  parameter int N_MC = oa_pkg::N_MC
) (
  input  logic             clk,
  input  logic             rst_n,
  input  bus_req_t         req,
  output logic [N_MC-1:0]  mc_rd_en,
  input  logic [BUS_W-1:0] mc_rd_data [N_MC],
  output logic [BUS_W-1:0] rd_data
);
  logic [MC_IDX_W-1:0] sel_q;
  logic                en_q;

  always_comb begin
    for (int i = 0; i < N_MC; i++) mc_rd_en[i] = req.en && (req.mc == MC_IDX_W'(i));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sel_q <= '0;
      en_q  <= 1'b0;
    end else begin
      sel_q <= req.mc;
      en_q  <= req.en && (int'(req.mc) < N_MC);
    end
  end

  always_comb begin
    rd_data = '0;
    for (int i = 0; i < N_MC; i++)
      if (en_q && sel_q == MC_IDX_W'(i)) rd_data = mc_rd_data[i];
  end
endmodule

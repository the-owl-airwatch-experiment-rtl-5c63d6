// macrocell: one FIRE module serving n x n pixels of the focal plane.
// Each pixel has a pixel_frontend. Their flags are OR-ed by column into the
// n X lines and by row into the n Y lines, so a macrocell has 2n position
// channels instead of n*n. At every GTU strobe, while acquisition is enabled,
// the X and Y words of the GTU just ended are written into the X and Y ring
// memories. The timing outputs of all pixels are OR-ed into the macrocell
// timing channel, which goes to the OUST counter (timing_out) and to the
// timing memory.
// Bus read port: rd_en with a memory select, a GTU offset backward from the
// newest word and a byte index; rd_data is valid the following clock. X bit
// c is column c, Y bit r is row r; byte k carries bits 8k+7..8k.
// Pixel (r, c) is pix_in[r][c]. The wired-OR is written as a plain OR; the
// row/column split, the ring memories and the timing channel follow the
// design, the bus format is this design's own.
module macrocell
  import oa_pkg::mem_sel_e, oa_pkg::MEM_X, oa_pkg::MEM_Y, oa_pkg::MEM_T,
         oa_pkg::bus_req_t, oa_pkg::BUS_W, oa_pkg::BACK_W, oa_pkg::BYTE_W,
         oa_pkg::MC_IDX_W, oa_pkg::LEN_W, oa_pkg::TS_W, oa_pkg::MCC_W,
         oa_pkg::xy_bytes, oa_pkg::T_BYTES;
#(
  parameter int N          = oa_pkg::N_PIX,
  parameter int DEPTH      = oa_pkg::RING_DEPTH,
  parameter int GTU_CYCLES = oa_pkg::GTU_CYCLES,
  parameter int CNT_W      = oa_pkg::CNT_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0][N-1:0]  pix_in,
  input  logic [CNT_W-1:0]     set_ths,
  input  logic                 set_count_n,
  input  logic                 reset_n,
  input  logic                 gtu_start,
  input  logic                 acq_en,
  output logic                 timing_out,
  input  logic                 rd_en,
  input  mem_sel_e             rd_mem,
  input  logic [BACK_W-1:0]    rd_back,
  input  logic [BYTE_W-1:0]    rd_byte,
  output logic [BUS_W-1:0]     rd_data
);
  localparam int AW = $clog2(DEPTH);
  localparam int NB = xy_bytes(N);

  logic [N-1:0][N-1:0] flag_x, flag_y, tim;
  logic [N-1:0]        x_word, y_word;

  for (genvar r = 0; r < N; r++) begin : g_row
    for (genvar c = 0; c < N; c++) begin : g_col
      pixel_frontend #(.CNT_W(CNT_W)) u_pix (
        .clk, .rst_n,
        .in_sig      (pix_in[r][c]),
        .set_ths,
        .set_count_n,
        .reset_n,
        .wired_or_x  (flag_x[r][c]),
        .wired_or_y  (flag_y[r][c]),
        .to_timing   (tim[r][c])
      );
    end
  end

  always_comb begin
    x_word     = '0;
    y_word     = '0;
    timing_out = 1'b0;
    for (int r = 0; r < N; r++) begin
      for (int c = 0; c < N; c++) begin
        x_word[c]  = x_word[c] | flag_x[r][c];
        y_word[r]  = y_word[r] | flag_y[r][c];
        timing_out = timing_out | tim[r][c];
      end
    end
  end

  logic              wr;
  logic [N-1:0]      x_q, y_q;
  logic [15:0]       t_q;
  logic [AW-1:0]     back;
  mem_sel_e          mem_q;
  logic [BYTE_W-1:0] byte_q;

  assign wr   = gtu_start & acq_en;
  assign back = rd_back[AW-1:0];

  ring_memory #(.WIDTH(N), .DEPTH(DEPTH)) u_xmem (
    .clk, .rst_n, .we(wr), .wdata(x_word),
    .rd_en(rd_en && rd_mem == MEM_X), .rd_back(back), .rdata(x_q), .filled()
  );
  ring_memory #(.WIDTH(N), .DEPTH(DEPTH)) u_ymem (
    .clk, .rst_n, .we(wr), .wdata(y_word),
    .rd_en(rd_en && rd_mem == MEM_Y), .rd_back(back), .rdata(y_q), .filled()
  );
  timing_memory #(.DEPTH(DEPTH), .GTU_CYCLES(GTU_CYCLES)) u_tmem (
    .clk, .rst_n, .timing(timing_out), .gtu_start, .we(acq_en),
    .rd_en(rd_en && rd_mem == MEM_T), .rd_back(back), .rdata(t_q)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mem_q  <= MEM_X;
      byte_q <= '0;
    end else if (rd_en) begin
      mem_q  <= rd_mem;
      byte_q <= rd_byte;
    end
  end

  // byte select of the word read the previous clock
  logic [NB*BUS_W-1:0] x_pad, y_pad;
  assign x_pad = (NB*BUS_W)'(x_q);
  assign y_pad = (NB*BUS_W)'(y_q);

  always_comb begin
    rd_data = '0;
    unique case (mem_q)
      MEM_X:   if (int'(byte_q) < NB) rd_data = x_pad[byte_q*BUS_W +: BUS_W];
      MEM_Y:   if (int'(byte_q) < NB) rd_data = y_pad[byte_q*BUS_W +: BUS_W];
      MEM_T:   rd_data = byte_q[0] ? t_q[15:8] : t_q[7:0];
      default: rd_data = '0;
    endcase
  end
endmodule

// readout_controller: stop acquisition and read the ring memories.
// In IDLE acquisition runs (acq_en high). A trigger latches the read-out
// length (read_len GTUs, limited to 1..DEPTH), drops acq_en, which freezes
// every ring memory, and starts the read-out: for each macrocell in turn
// (0 to N_MC-1) it reads the X memory, then the Y memory, then the timing
// memory, each backward from the newest word for the latched number of
// GTUs, one byte per clock over the data & address bus (ceil(n/8) bytes per
// X or Y word, 2 per timing word, low byte first). Bus reads take one clock,
// so the byte stream (out_valid/out_data) trails the requests by one clock;
// out_sof marks the first byte of the event and out_eof the last. The
// telemetry side is assumed to take one byte per clock. After the last byte
// done pulses, acquisition restarts and the controller is IDLE again.
// An event is N_MC * read_len * (2*ceil(n/8) + 2) bytes long.
module readout_controller
  import oa_pkg::mem_sel_e, oa_pkg::MEM_X, oa_pkg::MEM_Y, oa_pkg::MEM_T,
         oa_pkg::bus_req_t, oa_pkg::BUS_W, oa_pkg::BACK_W, oa_pkg::BYTE_W,
         oa_pkg::MC_IDX_W, oa_pkg::LEN_W, oa_pkg::TS_W, oa_pkg::MCC_W,
         oa_pkg::xy_bytes, oa_pkg::T_BYTES;
#(
  parameter int N_MC  = oa_pkg::N_MC,
  parameter int N     = oa_pkg::N_PIX,
  parameter int DEPTH = oa_pkg::RING_DEPTH
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             trig,
  input  logic [LEN_W-1:0] read_len,
  output logic             acq_en,
  output logic             busy,
  output logic             done,
  output bus_req_t         req,
  input  logic [BUS_W-1:0] rd_data,
  output logic             out_valid,
  output logic [BUS_W-1:0] out_data,
  output logic             out_sof,
  output logic             out_eof
);
  localparam int NB = xy_bytes(N);

  typedef enum logic [1:0] {S_IDLE, S_READ, S_FLUSH} state_e;

  state_e              state;
  logic [MC_IDX_W-1:0] mc;
  mem_sel_e            mem;
  logic [BACK_W-1:0]   back;
  logic [BYTE_W-1:0]   bidx;
  logic [BACK_W-1:0]   len;
  logic                first_q;

  logic [BYTE_W-1:0]   last_byte;
  logic                last_b, last_g, last_m, last_mc;
  logic [BACK_W-1:0]   len_clamped;

  initial assert (N_MC <= 256 && DEPTH <= 32768) else $error("size exceeds bus fields");

  always_comb begin
    if (read_len == '0)                          len_clamped = BACK_W'(1);
    else if (BACK_W'(read_len) > BACK_W'(DEPTH)) len_clamped = BACK_W'(DEPTH);
    else                                         len_clamped = BACK_W'(read_len);
  end

  assign last_byte = (mem == MEM_T) ? BYTE_W'(T_BYTES - 1) : BYTE_W'(NB - 1);
  assign last_b    = (bidx == last_byte);
  assign last_g    = (back == len - BACK_W'(1));
  assign last_m    = (mem == MEM_T);
  assign last_mc   = (mc == MC_IDX_W'(N_MC - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      mc      <= '0;
      mem     <= MEM_X;
      back    <= '0;
      bidx    <= '0;
      len     <= BACK_W'(1);
      first_q <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: if (trig) begin
          state   <= S_READ;
          len     <= len_clamped;
          mc      <= '0;
          mem     <= MEM_X;
          back    <= '0;
          bidx    <= '0;
          first_q <= 1'b1;
        end
        S_READ: begin
          first_q <= 1'b0;
          if (!last_b) bidx <= bidx + 1'b1;
          else begin
            bidx <= '0;
            if (!last_g) back <= back + 1'b1;
            else begin
              back <= '0;
              if (!last_m) mem <= (mem == MEM_X) ? MEM_Y : MEM_T;
              else begin
                mem <= MEM_X;
                if (!last_mc) mc <= mc + 1'b1;
                else          state <= S_FLUSH;
              end
            end
          end
        end
        S_FLUSH: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy   = (state != S_IDLE);
  assign acq_en = (state == S_IDLE);
  assign done   = (state == S_FLUSH);

  always_comb begin
    req          = '0;
    req.en       = (state == S_READ);
    req.mc       = mc;
    req.mem      = mem;
    req.back     = back;
    req.byte_idx = bidx;
  end

  // the byte read in clock t is on the bus in clock t+1
  logic sof_d, eof_d, val_d;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      val_d <= 1'b0;
      sof_d <= 1'b0;
      eof_d <= 1'b0;
    end else begin
      val_d <= (state == S_READ);
      sof_d <= (state == S_READ) && first_q;
      eof_d <= (state == S_READ) && last_b && last_g && last_m && last_mc;
    end
  end

  assign out_valid = val_d;
  assign out_data  = val_d ? rd_data : '0;
  assign out_sof   = sof_d;
  assign out_eof   = eof_d;
endmodule

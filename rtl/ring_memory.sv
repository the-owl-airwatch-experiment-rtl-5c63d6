// ring_memory: circular buffer of one word per GTU.
// we is the write strobe, given once per GTU while acquisition runs: the
// word on wdata is written at the write pointer and the pointer advances, so
// the memory always holds the last DEPTH GTUs. When acquisition stops, the
// strobe stops too and the contents are frozen
// and are read backward: rd_back = 0 addresses the newest word, 1 the word
// before it, and so on, wrapping around the ring. The read is synchronous:
// rdata is valid the clock after rd_en. filled counts how many words were
// written, saturating at DEPTH. DEPTH must be a power of two.
module ring_memory #(
  parameter int WIDTH = oa_pkg::N_PIX,
  parameter int DEPTH = oa_pkg::RING_DEPTH
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     we,
  input  logic [WIDTH-1:0]         wdata,
  input  logic                     rd_en,
  input  logic [$clog2(DEPTH)-1:0] rd_back,
  output logic [WIDTH-1:0]         rdata,
  output logic [$clog2(DEPTH):0]   filled
);
  localparam int AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wptr;
  logic [AW-1:0]    raddr;

  initial assert (DEPTH == (1 << AW)) else $error("DEPTH must be a power of two");

  assign raddr = wptr - AW'(1) - rd_back;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr   <= '0;
      filled <= '0;
    end else if (we) begin
      wptr <= wptr + AW'(1);
      if (filled != (AW+1)'(DEPTH)) filled <= filled + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (we) mem[wptr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (rd_en) rdata <= mem[raddr];
  end
endmodule

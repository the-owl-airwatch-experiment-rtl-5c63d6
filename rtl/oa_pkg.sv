// oa_pkg: sizes and shared types of the OWL-AIRWATCH read-out electronics.
// The focal plane is 10 x 10 macrocells; each macrocell holds n x n pixels
// (n = 71 gives about 500000 pixels in all) and an X and a Y ring memory of
// 2048 words. The clock period, the GTU length and the counter widths are
// this design's own choices. The bus request carries a macrocell address,
// a memory select, a GTU offset counted backward from the newest word and a
// byte index; its fields are wide enough for any size the modules allow.
package oa_pkg;
  localparam int MC_ROWS    = 10;
  localparam int MC_COLS    = 10;
  localparam int N_MC       = MC_ROWS * MC_COLS;
  localparam int N_PIX      = 24;   // 71 in the full focal plane, see README
  localparam int RING_DEPTH = 2048;
  localparam int BUS_W      = 8;
  localparam int GTU_CYCLES = 100;   // 1 us GTU at a 100 MHz sampling clock
  localparam int CNT_W      = 4;     // pixel programmable count b, 0..15
  localparam int MCC_W      = 8;     // OUST macrocell counter width
  localparam int TS_W       = 32;    // GTU counter width
  localparam int LEN_W      = 12;    // read-out length field (up to 2048 GTUs)

  localparam int MC_IDX_W   = 8;
  localparam int BACK_W     = 16;
  localparam int BYTE_W     = 8;

  typedef enum logic [1:0] {
    MEM_X = 2'd0,   // X projection: column wired-OR lines
    MEM_Y = 2'd1,   // Y projection: row wired-OR lines
    MEM_T = 2'd2    // timing memory: {first arrival, pulse count}
  } mem_sel_e;

  typedef struct packed {
    logic                en;
    logic [MC_IDX_W-1:0] mc;
    mem_sel_e            mem;
    logic [BACK_W-1:0]   back;     // 0 = newest word
    logic [BYTE_W-1:0]   byte_idx; // byte 0 = bits 7:0
  } bus_req_t;

  // Bytes needed to carry one X or Y word of n bits.
  function automatic int xy_bytes(int n);
    return (n + BUS_W - 1) / BUS_W;
  endfunction

  localparam int T_BYTES = 2;
endpackage

// tb_oa_top: the end-to-end scenario of tb_oa_harness on a reduced focal
// plane: 2 x 2 macrocells of 4 x 4 pixels, 16-deep ring memories, GTUs of
// 10 clocks, persistency 4 GTUs, read-out of 5 GTUs.
module tb_oa_top;
  tb_oa_harness #(.FULL(1'b0), .MC_ROWS(2), .MC_COLS(2), .N(4), .DEPTH(16),
                  .GTU_CYCLES(10), .READ_LEN(5), .PERSIST(4), .BG_GTUS(20)) h ();
endmodule

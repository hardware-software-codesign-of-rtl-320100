// sa_top_tb -- end-to-end test of the multiplexed systolic array at reduced
// size: a 16 x 16 array with multiplexer rows 4, 6, 8 and 12 (a scaled copy
// of rows 16/26/32/48/52 of the 64 x 64 array), 64 output rows, 16-vector
// buffers. Row 6 keeps its multiplexer only in columns 0 to 9, as in an
// optimised placement, so in mode {6, 6, 4} columns 10 to 15 run bands of
// 12 and 4 rows. Four layers run in four modes: the conventional array, bands
// {6, 6, 4} (rows 6 and 12, the analogue of {26x1, 12x1}), {8, 8} (row 8)
// and {4, 4, 4, 4} (rows 4, 8, 12). See sa_top_bench for what is checked.
module sa_top_tb;
  localparam int unsigned K = 16;

  function automatic logic [K-1:0][K-1:0] mask_init();
    logic [K-1:0][K-1:0] m;
    m = '1;
    for (int c = 10; c < K; c++) m[6][c] = 1'b0;
    return m;
  endfunction

  sa_top_bench #(
    .K(K), .IDX_W(6), .D_MAX(16),
    .MUX_ROWS(K'((1 << 4) | (1 << 6) | (1 << 8) | (1 << 12))),
    .MUX_MASK(mask_init()),
    .NM(4),
    // MODES[0] is the rightmost element
    .MODES({K'((1 << 4) | (1 << 8) | (1 << 12)), K'(1 << 8), K'((1 << 6) | (1 << 12)), K'(0)}),
    .NOUT_USED(64), .C(24), .D(12), .FULL(1'b0), .WATCHDOG(200000)
  ) u_bench ();
endmodule

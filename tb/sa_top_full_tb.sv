// sa_top_full_tb -- end-to-end test of the multiplexed systolic array at its
// default size: 64 x 64 PEs, multiplexer rows 16, 26, 32, 48 and 52, 512
// output rows, 64-vector buffers, with sa_top's parameters left at their
// defaults. Three layers of 128 output rows x 96 inputs x 64 vectors run in
// the three modes the block-size sets need: rows 26 and 52 ({26x1, 12x1}),
// row 32 ({32x1}) and rows 16, 32, 48 ({16x1}). See sa_top_bench for what is
// checked.
module sa_top_full_tb;
  localparam int unsigned K = 64;
  sa_top_bench #(
    .K(K), .IDX_W(9), .D_MAX(64),
    .MUX_ROWS(K'(sa_pkg::MUX_ROWS_64)),
    .NM(3),
    // MODES[0] is the rightmost element
    .MODES({K'((64'd1 << 16) | (64'd1 << 32) | (64'd1 << 48)), K'(64'd1 << 32),
            K'((64'd1 << 26) | (64'd1 << 52))}),
    .NOUT_USED(128), .C(96), .D(64), .FULL(1'b1), .WATCHDOG(400000)
  ) u_bench ();
endmodule

// sa_pe -- weight-stationary processing element of the multiplexed systolic
// array.
//
// The PE keeps one preloaded weight and, every cycle, multiplies the input
// arriving at it and passes that input on to the PE below. As in the
// document, the PE has no adder: products are not accumulated left to right
// inside the array but go to the row's selection module, which adds the
// products that belong to the same output row. A PE in a multiplexer row
// (HAS_MUX = 1) carries the inserted 8-bit 2:1 multiplexer: with sel_buf high
// it takes a fresh input x_buf from the input buffer instead of x_top from the
// PE above, so the rows from here down form an independent band.
//
// Timing: x_out and prod are registered; the input selected in cycle n
// appears on x_out and its product on prod in cycle n+1. w_load writes w_in
// into the weight register at the clock edge (weights are only loaded while
// no round is running). Synchronous active-low reset clears all registers;
// the reset style and the per-row load enable are this design's choices.
module sa_pe
  import sa_pkg::*;
#(
  parameter bit HAS_MUX = 1'b0
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  w_load,
  input  data_t w_in,
  input  data_t x_top,
  input  data_t x_buf,
  input  logic  sel_buf,
  output data_t x_out,
  output prod_t prod
);

  data_t w_q, x_q, x_sel;
  prod_t p_q;

  // The inserted input multiplexer exists only in multiplexer rows.
  if (HAS_MUX) begin : g_mux
    assign x_sel = sel_buf ? x_buf : x_top;
  end else begin : g_nomux
    assign x_sel = x_top;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      w_q <= '0;
      x_q <= '0;
      p_q <= '0;
    end else begin
      if (w_load) w_q <= w_in;
      x_q <= x_sel;
      p_q <= w_q * x_sel;
    end
  end

  assign x_out = x_q;
  assign prod  = p_q;

endmodule

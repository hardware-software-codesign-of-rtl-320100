// sa_obuf -- output buffer of the multiplexed systolic array.
//
// Holds one 32-bit accumulator per (output row index, input vector index t),
// for 2^IDX_W output rows and D_MAX vectors. Every cycle each of the K
// selection modules may deliver up to K run sums (wr_en/wr_idx/wr_val), each
// with the vector wr_t and band slot wr_slot it belongs to; each is added
// into the accumulator at (wr_idx, wr_t) of bank wr_slot. Rows that are the
// same distance below their band start see the same vector in the same
// cycle, so the buffer keeps one bank per band slot: within one slot, equal
// t means equal row, and within one row of one slot a run's index appears
// only once, a rule the weight mapping has to keep (equal indexes of one
// band in one PE row must be adjacent). Hence no two lanes write the same
// accumulator in the same cycle. Accumulating rather than overwriting lets
// successive rounds (further column blocks of the same output rows) add up.
//
// The read port returns the sum of all banks at (rd_idx, rd_t) one cycle
// after rd_en. clr zeroes every accumulator in one cycle; it takes
// precedence over writes in that cycle.
//
// The document only says that results are stored "into the right position
// of the output buffer"; the banking, the accumulate-on-write behaviour and
// the sizes are this design's choices.
module sa_obuf
  import sa_pkg::*;
#(
  parameter int unsigned K     = 64,
  parameter int unsigned NSLOT = 6,
  parameter int unsigned IDX_W = 9,
  parameter int unsigned D_MAX = 64,
  localparam int unsigned TW   = idx_bits(D_MAX),
  localparam int unsigned SW   = idx_bits(NSLOT),
  localparam int unsigned NOUT = 1 << IDX_W
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          clr,
  input  logic [K-1:0][K-1:0]           wr_en,
  input  logic [K-1:0][K-1:0][IDX_W-1:0] wr_idx,
  input  acc_t [K-1:0][K-1:0]           wr_val,
  input  logic [K-1:0][K-1:0][TW-1:0]  wr_t,
  input  logic [K-1:0][K-1:0][SW-1:0]  wr_slot,
  input  logic                          rd_en,
  input  logic [IDX_W-1:0]              rd_idx,
  input  logic [TW-1:0]                 rd_t,
  output acc_t                          rd_data
);

  acc_t acc [NSLOT][NOUT][D_MAX];

  always_ff @(posedge clk) begin
    if (clr) begin
      for (int s = 0; s < NSLOT; s++)
        for (int i = 0; i < NOUT; i++)
          for (int t = 0; t < D_MAX; t++)
            acc[s][i][t] <= '0;
    end else begin
      for (int r = 0; r < K; r++)
        for (int c = 0; c < K; c++)
          if (wr_en[r][c])
            acc[wr_slot[r][c]][wr_idx[r][c]][wr_t[r][c]]
              <= acc[wr_slot[r][c]][wr_idx[r][c]][wr_t[r][c]] + wr_val[r][c];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_data <= '0;
    end else if (rd_en) begin
      acc_t sum;
      sum = '0;
      for (int s = 0; s < NSLOT; s++) sum += acc[s][rd_idx][rd_t];
      rd_data <= sum;
    end
  end

endmodule

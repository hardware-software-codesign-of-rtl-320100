// sa_inbuf -- input buffer of the multiplexed systolic array.
//
// The array needs one input stream for its top row and one more for every
// multiplexer row that can start a band: NSLOT = 1 + number of multiplexer
// rows streams, each K columns wide. The buffer keeps one bank per stream
// (slot); a bank entry is a whole input vector of K 8-bit values, and a bank
// holds up to D_MAX vectors (the D input columns of one round). The host
// writes one vector of one slot per cycle. During a round all banks are read
// at the same vector index, so every band receives vector t at the same
// time. Slots whose band is disabled in the current mode are read but
// ignored by the array.
//
// The document only says that new inputs are fetched from a buffer; the
// banking, the sizes and the ports are this design's choices.
//
// Timing: write at the clock edge; read data on x_out one cycle after rd_en.
module sa_inbuf
  import sa_pkg::*;
#(
  parameter int unsigned K     = 64,
  parameter int unsigned NSLOT = 6,
  parameter int unsigned D_MAX = 64,
  localparam int unsigned TW   = idx_bits(D_MAX),
  localparam int unsigned SW   = idx_bits(NSLOT)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      wr_en,
  input  logic [SW-1:0]             wr_slot,
  input  logic [TW-1:0]             wr_addr,
  input  data_t [K-1:0]             wr_data,
  input  logic                      rd_en,
  input  logic [TW-1:0]             rd_addr,
  output data_t [NSLOT-1:0][K-1:0]  x_out
);

  for (genvar s = 0; s < NSLOT; s++) begin : g_bank
    data_t [K-1:0] mem [D_MAX];

    always_ff @(posedge clk) begin
      if (wr_en && wr_slot == SW'(s)) mem[wr_addr] <= wr_data;
    end

    always_ff @(posedge clk) begin
      if (!rst_n) x_out[s] <= '0;
      else if (rd_en) x_out[s] <= mem[rd_addr];
    end
  end

endmodule

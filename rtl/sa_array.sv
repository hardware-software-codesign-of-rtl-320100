// sa_array -- K x K weight-stationary systolic array with inserted input
// multiplexer rows.
//
// Inputs flow from the top of each column downwards, one PE per cycle; each
// PE multiplies the passing input with its stationary weight. A PE in a row
// set in MUX_ROWS has a 2:1 input multiplexer if its column is set in that
// row of MUX_MASK (all columns by default: full multiplexer rows; a sparser
// mask describes an optimised placement where only some columns of a row
// keep their multiplexer). The mode input band_en
// enables a subset of those rows: an enabled row starts a new band that takes
// a fresh input vector from the input buffer, so the array acts as several
// smaller independent arrays stacked vertically (for example bands of 26, 26
// and 12 rows for the block sizes {26x1, 12x1}). In a column without the
// multiplexer the band above simply continues. With band_en all zero the
// array is the conventional one. Inputs for the top row and for every
// multiplexer row arrive on x_slot, slot 0 being the top row and slot s the
// s-th multiplexer row from the top. This follows the document's structure;
// the slot numbering and the tag pipeline are this design's own.
//
// Because the products of a row are summed outside the array, all columns of
// a band receive their input in the same cycle (no column skew). A tag
// (valid, vector index t) enters every band start together with the data and
// moves down one row per cycle beside it, so row r's products in cycle n
// belong to the vector tagged row_t[r]. row_slot[r] names the band a row
// belongs to (static while the mode is unchanged). A product appears one
// cycle after its input reaches the PE; a band of height H has its last row's
// product H cycles after the vector entered the band.
//
// Weights are loaded one row per cycle: w_load_row is one-hot over the rows
// and w_row holds the K weights of that row.
module sa_array
  import sa_pkg::*;
#(
  parameter int unsigned K         = 64,
  parameter int unsigned D_MAX     = 64,
  parameter logic [K-1:0] MUX_ROWS = K'(MUX_ROWS_64),
  parameter logic [K-1:0][K-1:0] MUX_MASK = '1,
  localparam int unsigned NSLOT    = num_slots(256'(MUX_ROWS), K),
  localparam int unsigned SW       = idx_bits(NSLOT),
  localparam int unsigned TW       = idx_bits(D_MAX)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [K-1:0]                  band_en,
  input  logic [K-1:0]                  w_load_row,
  input  data_t [K-1:0]                 w_row,
  input  data_t [NSLOT-1:0][K-1:0]      x_slot,
  input  logic                          in_valid,
  input  logic [TW-1:0]                 in_t,
  output prod_t [K-1:0][K-1:0]          prod,
  output logic  [K-1:0][K-1:0]          pe_valid,
  output logic  [K-1:0][K-1:0][TW-1:0]  pe_t,
  output logic  [K-1:0][K-1:0][SW-1:0]  pe_slot
);

  data_t [K-1:0][K-1:0]          x_down;   // x_out of each PE
  logic                          start   [K][K];   // PE starts a band in this mode
  logic                          tag_v_q [K][K];
  logic  [SW-1:0]                slot_w  [K][K];   // band slot of each PE
  logic  [TW-1:0]                tag_t_q [K][K];

  for (genvar r = 0; r < K; r++) begin : g_row
    localparam int unsigned RSLOT = slot_of_row(256'(MUX_ROWS), r);

    for (genvar c = 0; c < K; c++) begin : g_col
      localparam bit PMUX = (r > 0) && MUX_ROWS[r] && MUX_MASK[r][c];
      data_t x_top_w, x_buf_w;

      if (r == 0) begin : g_top
        assign start[r][c]   = 1'b1;
        assign slot_w[r][c]  = '0;
        assign x_top_w       = x_slot[0][c];
        assign x_buf_w       = '0;
      end else if (PMUX) begin : g_mux
        assign start[r][c]   = band_en[r];
        assign slot_w[r][c]  = band_en[r] ? SW'(RSLOT) : slot_w[r-1][c];
        assign x_top_w       = x_down[r-1][c];
        assign x_buf_w       = x_slot[RSLOT][c];
      end else begin : g_plain
        assign start[r][c]   = 1'b0;
        assign slot_w[r][c]  = slot_w[r-1][c];
        assign x_top_w       = x_down[r-1][c];
        assign x_buf_w       = '0;
      end

      // Tag travelling down with the data.
      always_ff @(posedge clk) begin
        if (!rst_n) begin
          tag_v_q[r][c] <= 1'b0;
          tag_t_q[r][c] <= '0;
        end else if (start[r][c]) begin
          tag_v_q[r][c] <= in_valid;
          tag_t_q[r][c] <= in_t;
        end else begin
          tag_v_q[r][c] <= tag_v_q[(r > 0) ? r-1 : 0][c];
          tag_t_q[r][c] <= tag_t_q[(r > 0) ? r-1 : 0][c];
        end
      end

      assign pe_valid[r][c] = tag_v_q[r][c];
      assign pe_slot[r][c]  = slot_w[r][c];
      assign pe_t[r][c]     = tag_t_q[r][c];

      sa_pe #(.HAS_MUX(PMUX)) u_pe (
        .clk     (clk),
        .rst_n   (rst_n),
        .w_load  (w_load_row[r]),
        .w_in    (w_row[c]),
        .x_top   (x_top_w),
        .x_buf   (x_buf_w),
        .sel_buf (band_en[r]),
        .x_out   (x_down[r][c]),
        .prod    (prod[r][c])
      );
    end
  end


endmodule

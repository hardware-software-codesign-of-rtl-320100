// sa_top -- flexible multiplexed systolic array for pruned CNN layers.
//
// A weight-stationary K x K array (K = 64) computes Y = W * X for a layer
// whose pruned weight matrix has been compacted offline: rows were swapped so
// that the surviving weights form a dense cluster, and the cluster was
// covered with column blocks of two heights p and q (for example 26x1 and
// 12x1). A block occupies a vertical run of PEs in one column and multiplies
// one input stream. Inserted multiplexer rows (rows 16, 26, 32, 48 and 52 by
// default) can split the array into stacked bands, each fed with its own
// input stream from the input buffer, so blocks that need different input
// vectors run at the same time. MUX_MASK (all ones by default) can drop the
// multiplexer from single PEs of those rows, to describe an optimised,
// partly populated placement. Each weight carries the index of its
// original output row; the controller turns the indexes into add-or-store
// flags, each row's selection module sums adjacent products of the same
// output row, and the output buffer accumulates the sums at
// (output row, vector).
//
// Host interface (all inputs sampled at the rising clock edge, synchronous
// active-low reset):
//   cfg_we/cfg_band_en   mode: enabled multiplexer rows (only while idle)
//   wl_*                 load one PE row: K weights, K output-row indexes and
//                        K slot-valid bits (only while idle)
//   ib_*                 write input vector ib_addr of band slot ib_slot
//                        (slot 0 = top row, slot s = s-th multiplexer row)
//   start/d_len          run one round over input vectors 0 .. d_len-1;
//                        busy until the one-cycle done pulse
//   ob_clr, ob_rd_*      clear the output buffer; read Y[ob_rd_idx][ob_rd_t]
//                        one cycle after ob_rd_en
// A round takes d_len + H + 3 cycles from the start edge to the done pulse,
// H being the height of the tallest band in any column.
//
// The array structure, the multiplexers, the index-driven controller and
// the selection modules follow the document; the host interface, the buffer
// organisation, the per-PE mask, the tag pipeline and the timing are this
// design's choices.
module sa_top
  import sa_pkg::*;
#(
  parameter int unsigned K         = 64,
  parameter int unsigned IDX_W     = 9,
  parameter int unsigned D_MAX     = 64,
  parameter logic [K-1:0] MUX_ROWS = K'(MUX_ROWS_64),
  parameter logic [K-1:0][K-1:0] MUX_MASK = '1,
  localparam int unsigned NSLOT    = num_slots(256'(MUX_ROWS), K),
  localparam int unsigned SW       = idx_bits(NSLOT),
  localparam int unsigned TW       = idx_bits(D_MAX),
  localparam int unsigned KW       = idx_bits(K)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     cfg_we,
  input  logic [K-1:0]             cfg_band_en,
  input  logic                     wl_valid,
  input  logic [KW-1:0]            wl_row,
  input  data_t [K-1:0]            wl_w,
  input  logic [K-1:0][IDX_W-1:0]  wl_idx,
  input  logic [K-1:0]             wl_wv,
  input  logic                     ib_we,
  input  logic [SW-1:0]            ib_slot,
  input  logic [TW-1:0]            ib_addr,
  input  data_t [K-1:0]            ib_data,
  input  logic                     start,
  input  logic [TW:0]              d_len,
  output logic                     busy,
  output logic                     done,
  input  logic                     ob_clr,
  input  logic                     ob_rd_en,
  input  logic [IDX_W-1:0]         ob_rd_idx,
  input  logic [TW-1:0]            ob_rd_t,
  output acc_t                     ob_rd_data
);

  // controller outputs
  logic                           rd_en, tag_valid;
  logic [TW-1:0]                  rd_addr, tag_t;
  logic [K-1:0]                   band_en;
  logic [K-1:0][K-1:0][IDX_W-1:0] idx;
  logic [K-1:0][K-1:0]            wv, add_left;
  logic                           pipe_busy;

  // datapath
  data_t [NSLOT-1:0][K-1:0]       x_slot;
  logic  [K-1:0]                  w_load_row;
  prod_t [K-1:0][K-1:0]           prod;
  logic  [K-1:0][K-1:0]           pe_valid;
  logic  [K-1:0][K-1:0][TW-1:0]   pe_t;
  logic  [K-1:0][K-1:0][SW-1:0]   pe_slot;

  // selection module outputs
  logic  [K-1:0][K-1:0]           sel_wr_en;
  logic  [K-1:0][K-1:0][IDX_W-1:0] sel_wr_idx;
  acc_t  [K-1:0][K-1:0]           sel_wr_val;
  logic  [K-1:0]                  sel_busy;
  logic  [K-1:0][K-1:0][TW-1:0]   sel_t;
  logic  [K-1:0][K-1:0][SW-1:0]   sel_slot;

  assign w_load_row = (wl_valid && !busy) ? (K'(1) << wl_row) : '0;
  assign pipe_busy  = (|pe_valid) || (|sel_busy);

  sa_ctrl #(.K(K), .IDX_W(IDX_W), .D_MAX(D_MAX), .MUX_ROWS(MUX_ROWS), .MUX_MASK(MUX_MASK)) u_ctrl (
    .clk, .rst_n,
    .cfg_we, .cfg_band_en,
    .wl_valid, .wl_row, .wl_idx, .wl_wv,
    .start, .d_len, .pipe_busy, .busy, .done,
    .rd_en, .rd_addr, .tag_valid, .tag_t,
    .band_en, .idx, .wv, .add_left
  );

  sa_inbuf #(.K(K), .NSLOT(NSLOT), .D_MAX(D_MAX)) u_inbuf (
    .clk, .rst_n,
    .wr_en   (ib_we),
    .wr_slot (ib_slot),
    .wr_addr (ib_addr),
    .wr_data (ib_data),
    .rd_en, .rd_addr,
    .x_out   (x_slot)
  );

  sa_array #(.K(K), .D_MAX(D_MAX), .MUX_ROWS(MUX_ROWS), .MUX_MASK(MUX_MASK)) u_array (
    .clk, .rst_n,
    .band_en,
    .w_load_row,
    .w_row    (wl_w),
    .x_slot,
    .in_valid (tag_valid),
    .in_t     (tag_t),
    .prod, .pe_valid, .pe_t, .pe_slot
  );

  for (genvar r = 0; r < K; r++) begin : g_sel
    sa_sel #(.K(K), .IDX_W(IDX_W), .TW(TW), .SW(SW)) u_sel (
      .clk, .rst_n,
      .prod      (prod[r]),
      .add_left  (add_left[r]),
      .idx       (idx[r]),
      .wv        (wv[r]),
      .in_valid  (pe_valid[r]),
      .in_t      (pe_t[r]),
      .in_slot   (pe_slot[r]),
      .wr_en     (sel_wr_en[r]),
      .wr_idx    (sel_wr_idx[r]),
      .wr_val    (sel_wr_val[r]),
      .wr_t      (sel_t[r]),
      .wr_slot   (sel_slot[r]),
      .out_busy  (sel_busy[r])
    );
  end

  sa_obuf #(.K(K), .NSLOT(NSLOT), .IDX_W(IDX_W), .D_MAX(D_MAX)) u_obuf (
    .clk, .rst_n,
    .clr     (ob_clr),
    .wr_en   (sel_wr_en),
    .wr_idx  (sel_wr_idx),
    .wr_val  (sel_wr_val),
    .wr_t    (sel_t),
    .wr_slot (sel_slot),
    .rd_en   (ob_rd_en),
    .rd_idx  (ob_rd_idx),
    .rd_t    (ob_rd_t),
    .rd_data (ob_rd_data)
  );

endmodule

// sa_ctrl -- controller of the multiplexed systolic array.
//
// Mode: cfg_band_en selects which multiplexer rows are enabled, i.e. how the
// array is split into bands (for example rows 26 and 52 for the block sizes
// {26x1, 12x1}, row 32 for {32x1}, rows 16, 32 and 48 for {16x1}, none for
// the conventional array). Bits of rows without multiplexers are dropped.
//
// Indexes: with every row of weights the host supplies, for each PE, the
// original output row (index) of that weight and whether the PE holds a
// weight at all (wv). As the document describes, the controller uses the
// indexes to decide, for every product, whether it is added to its left
// neighbour's product or stored on its own: add_left[r][c] is set when the
// weights in columns c-1 and c of row r have the same index. An empty slot
// inherits the index of its left neighbour, so it joins that run and adds
// zero. The flags are computed once, when the row is loaded, and held in
// registers; the selection modules use them every cycle. With partially
// populated multiplexer rows (MUX_MASK), neighbouring PEs of one row can
// belong to different bands in the current mode; the flag is then cleared,
// because their products belong to different input vectors.
//
// Sequencer (this design's own protocol): a start pulse with d_len (1 to
// D_MAX) begins a round. For d_len cycles the controller reads input vector
// t = 0 .. d_len-1 from the input buffer (rd_en/rd_addr) and, one cycle later
// when the buffer data is valid, presents the tag (tag_valid, tag_t) that
// travels with it through the array. It then waits until pipe_busy is low,
// meaning no product is in flight, and pulses done for one cycle. busy is
// high from the cycle after start until done. Mode and index writes are
// ignored while busy.
module sa_ctrl
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
  input  logic                          clk,
  input  logic                          rst_n,
  // mode
  input  logic                          cfg_we,
  input  logic [K-1:0]                  cfg_band_en,
  // index load, one PE row per cycle
  input  logic                          wl_valid,
  input  logic [KW-1:0]                 wl_row,
  input  logic [K-1:0][IDX_W-1:0]       wl_idx,
  input  logic [K-1:0]                  wl_wv,
  // round control
  input  logic                          start,
  input  logic [TW:0]                   d_len,
  input  logic                          pipe_busy,
  output logic                          busy,
  output logic                          done,
  // input buffer read and tag
  output logic                          rd_en,
  output logic [TW-1:0]                 rd_addr,
  output logic                          tag_valid,
  output logic [TW-1:0]                 tag_t,
  // control to array and selection modules
  output logic [K-1:0]                  band_en,
  output logic [K-1:0][K-1:0][IDX_W-1:0] idx,
  output logic [K-1:0][K-1:0]           wv,
  output logic [K-1:0][K-1:0]           add_left
);

  seq_state_e state_q;
  logic [TW-1:0] cnt_q;
  logic [TW:0]   len_q;
  logic [K-1:0]  band_q;
  logic [K-1:0][K-1:0][IDX_W-1:0] idx_q;
  logic [K-1:0][K-1:0]            wv_q, add_q;

  // Effective index of the row being loaded: an empty slot takes the index
  // of its left neighbour.
  logic [K-1:0][IDX_W-1:0] eff_idx;
  logic [K-1:0]            eff_add;
  for (genvar c = 0; c < K; c++) begin : g_eff
    if (c == 0) begin : g_c0
      assign eff_idx[c] = wl_idx[c];
      assign eff_add[c] = 1'b0;
    end else begin : g_cn
      assign eff_idx[c] = wl_wv[c] ? wl_idx[c] : eff_idx[c-1];
      assign eff_add[c] = (eff_idx[c] == eff_idx[c-1]);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      band_q <= '0;
      for (int r = 0; r < K; r++) idx_q[r] <= '0;
      wv_q   <= '0;
      add_q  <= '0;
    end else if (state_q == SEQ_IDLE) begin
      if (cfg_we) band_q <= cfg_band_en & MUX_ROWS & ~K'(1);
      if (wl_valid) begin
        idx_q[wl_row] <= eff_idx;
        wv_q[wl_row]  <= wl_wv;
        add_q[wl_row] <= eff_add;
      end
    end
  end

  // Band slot of every PE in the current mode, and whether a PE is in the
  // same band as its left neighbour.
  logic [K-1:0][K-1:0][SW-1:0] pe_slot;
  logic [K-1:0][K-1:0]         same_band;
  for (genvar r = 0; r < K; r++) begin : g_band_r
    localparam int unsigned RSLOT = slot_of_row(256'(MUX_ROWS), r);
    for (genvar c = 0; c < K; c++) begin : g_band_c
      if (r == 0) begin : g_top
        assign pe_slot[r][c] = '0;
      end else if (MUX_ROWS[r] && MUX_MASK[r][c]) begin : g_mux
        assign pe_slot[r][c] = band_q[r] ? SW'(RSLOT) : pe_slot[r-1][c];
      end else begin : g_plain
        assign pe_slot[r][c] = pe_slot[r-1][c];
      end
      if (c == 0) begin : g_c0
        assign same_band[r][c] = 1'b0;
      end else begin : g_cn
        assign same_band[r][c] = (pe_slot[r][c] == pe_slot[r][c-1]);
      end
    end
  end

  // Round sequencer.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q   <= SEQ_IDLE;
      cnt_q     <= '0;
      len_q     <= '0;
      done      <= 1'b0;
      tag_valid <= 1'b0;
      tag_t     <= '0;
    end else begin
      done      <= 1'b0;
      tag_valid <= rd_en;
      tag_t     <= rd_addr;
      unique case (state_q)
        SEQ_IDLE: begin
          if (start && d_len != '0 && d_len <= (TW+1)'(D_MAX)) begin
            state_q <= SEQ_STREAM;
            cnt_q   <= '0;
            len_q   <= d_len;
          end
        end
        SEQ_STREAM: begin
          cnt_q <= cnt_q + 1'b1;
          if ((TW+1)'(cnt_q) == len_q - 1'b1) state_q <= SEQ_DRAIN;
        end
        SEQ_DRAIN: begin
          if (!pipe_busy && !tag_valid) begin
            state_q <= SEQ_IDLE;
            done    <= 1'b1;
          end
        end
        default: state_q <= SEQ_IDLE;
      endcase
    end
  end

  assign rd_en    = (state_q == SEQ_STREAM);
  assign rd_addr  = cnt_q;
  assign busy     = (state_q != SEQ_IDLE);
  assign band_en  = band_q;
  assign idx      = idx_q;
  assign wv       = wv_q;
  assign add_left = add_q & same_band;

  // A round must not be started with an out-of-range length.
  a_len: assert property (@(posedge clk) disable iff (!rst_n)
    (start && state_q == SEQ_IDLE) |-> (d_len != '0 && d_len <= (TW+1)'(D_MAX)))
    else $error("sa_ctrl: d_len out of range");

endmodule

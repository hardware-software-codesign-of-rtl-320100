// sa_sel -- selection module of one PE row.
//
// The PEs of the multiplexed array hold weights whose original output rows
// (indexes) differ from column to column, because the weight matrix was
// compacted by row swapping and covered with blocks before mapping. The
// selection module therefore replaces the left-to-right adder chain of a
// conventional array: it adds the products of adjacent columns that the
// controller marks as belonging to the same output row (add_left[c] = 1 means
// "column c continues the run of column c-1") and hands every run's sum,
// together with the run's index, to the output buffer.
//
// The additions are done by a segmented parallel-prefix adder tree of
// log2(K) levels (Hillis-Steele scan with run-start flags): after the last
// level, the entry at the last column of each run holds the run's total. A run
// whose columns are all empty (wv = 0) is not stored. The tree structure is
// this design's choice; the document specifies the function only.
//
// Every product comes with its own tag (in_valid, in_t, in_slot): with
// partially populated multiplexer rows, PEs of one row can belong to
// different bands and carry different input vectors. The controller never
// joins columns of different bands into one run, so a run's tag is that of
// its last column, which is passed on with the run's sum.
//
// Timing: combinational tree followed by one register stage; the results
// for the products and tags of cycle n are on wr_* in cycle n+1. out_busy
// is high in cycle n+1 when any product of cycle n was valid.
module sa_sel
  import sa_pkg::*;
#(
  parameter int unsigned K     = 64,
  parameter int unsigned IDX_W = 9,
  parameter int unsigned TW    = 6,
  parameter int unsigned SW    = 3
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  prod_t [K-1:0]             prod,
  input  logic  [K-1:0]             add_left,
  input  logic  [K-1:0][IDX_W-1:0]  idx,
  input  logic  [K-1:0]             wv,
  input  logic  [K-1:0]             in_valid,
  input  logic  [K-1:0][TW-1:0]     in_t,
  input  logic  [K-1:0][SW-1:0]     in_slot,
  output logic  [K-1:0]             wr_en,
  output logic  [K-1:0][IDX_W-1:0]  wr_idx,
  output acc_t  [K-1:0]             wr_val,
  output logic  [K-1:0][TW-1:0]     wr_t,
  output logic  [K-1:0][SW-1:0]     wr_slot,
  output logic                      out_busy
);

  localparam int unsigned LV = idx_bits(K);

  // Level l of the scan: running sum, "run start seen" flag, "any weight" flag.
  acc_t [LV:0][K-1:0] s;
  logic [LV:0][K-1:0] f;
  logic [LV:0][K-1:0] a;
  logic [K-1:0]       run_end;

  for (genvar c = 0; c < K; c++) begin : g_in
    assign s[0][c] = acc_t'(prod[c]);
    assign f[0][c] = (c == 0) || !add_left[c];
    assign a[0][c] = wv[c];
    if (c == K - 1) begin : g_last
      assign run_end[c] = 1'b1;
    end else begin : g_mid
      assign run_end[c] = !add_left[c+1];
    end
  end

  for (genvar l = 0; l < LV; l++) begin : g_lvl
    for (genvar c = 0; c < K; c++) begin : g_col
      if (c >= (1 << l)) begin : g_add
        // A column that has not yet met the start of its run adds the
        // partial sum 2^l columns to its left.
        assign s[l+1][c] = f[l][c] ? s[l][c] : s[l][c] + s[l][c - (1 << l)];
        assign f[l+1][c] = f[l][c] | f[l][c - (1 << l)];
        assign a[l+1][c] = f[l][c] ? a[l][c] : a[l][c] | a[l][c - (1 << l)];
      end else begin : g_pass
        assign s[l+1][c] = s[l][c];
        assign f[l+1][c] = f[l][c];
        assign a[l+1][c] = a[l][c];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_en    <= '0;
      wr_idx   <= '0;
      wr_val   <= '0;
      wr_t     <= '0;
      wr_slot  <= '0;
      out_busy <= 1'b0;
    end else begin
      for (int c = 0; c < K; c++) begin
        wr_en[c]   <= in_valid[c] && run_end[c] && a[LV][c];
        wr_idx[c]  <= idx[c];
        wr_val[c]  <= s[LV][c];
        wr_t[c]    <= in_t[c];
        wr_slot[c] <= in_slot[c];
      end
      out_busy <= |in_valid;
    end
  end

endmodule

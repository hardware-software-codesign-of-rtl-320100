// sa_top_bench -- end-to-end test bench of the multiplexed systolic array,
// used at reduced size by sa_top_tb and at full size by sa_top_full_tb.
//
// For every mode in MODES the bench plays one pruned layer:
//   * a random weight matrix W (NOUT_USED output rows x C inputs, about a
//     third of the weights non-zero) is drawn; pairs of input columns share
//     one sparsity pattern, so adjacent blocks often carry the same output
//     rows and the selection modules have to add them;
//   * each column of W is compacted (its non-zero weights pushed together,
//     their original row numbers kept as indexes);
//   * round after round, every band of every PE column (bands may differ
//     from column to column when a multiplexer row is only partly
//     populated) receives a block: the next weights of one column of W, as
//     many as the band is high (p x 1 or q x 1 blocks); a column of W is
//     skipped for now if its block would put the same index twice,
//     non-adjacently, into one band of a PE row;
//   * per round the PE rows are loaded, each band's input buffer slot gets
//     the input vectors of the blocks placed in it, and the round is run;
//     done must rise D + H + 3 cycles after start, H being the
//     tallest band;
//   * finally every output Y[i][t] is read back and compared with W * X
//     computed directly from W and X.
// The bench counts how often each mechanism was exercised (band splits,
// mode changes, products added to a neighbour, products stored alone, empty
// PE slots, rounds accumulating into earlier results, output clear) and
// counts a failure for any that never happened.
module sa_top_bench
  import sa_pkg::*;
#(
  parameter int unsigned K         = 16,
  parameter int unsigned IDX_W     = 6,
  parameter int unsigned D_MAX     = 16,
  parameter logic [K-1:0] MUX_ROWS = K'((1 << 4) | (1 << 6) | (1 << 8) | (1 << 12)),
  parameter logic [K-1:0][K-1:0] MUX_MASK = '1,
  parameter int unsigned NM        = 4,
  parameter logic [NM-1:0][K-1:0] MODES = '0,
  parameter int unsigned NOUT_USED = 64,
  parameter int unsigned C         = 24,
  parameter int unsigned D         = 12,
  parameter bit          FULL      = 1'b0,
  parameter int unsigned WATCHDOG  = 200000
) ();

  localparam int unsigned NSLOT = num_slots(256'(MUX_ROWS), K);
  localparam int unsigned SW    = idx_bits(NSLOT);
  localparam int unsigned TW    = idx_bits(D_MAX);
  localparam int unsigned KW    = idx_bits(K);

  logic clk = 1'b0, rst_n = 1'b0;
  logic cfg_we = 1'b0;
  logic [K-1:0] cfg_band_en = '0;
  logic wl_valid = 1'b0;
  logic [KW-1:0] wl_row = '0;
  data_t [K-1:0] wl_w = '0;
  logic [K-1:0][IDX_W-1:0] wl_idx = '0;
  logic [K-1:0] wl_wv = '0;
  logic ib_we = 1'b0;
  logic [SW-1:0] ib_slot = '0;
  logic [TW-1:0] ib_addr = '0;
  data_t [K-1:0] ib_data = '0;
  logic start = 1'b0;
  logic [TW:0] d_len = '0;
  logic busy, done;
  logic ob_clr = 1'b0, ob_rd_en = 1'b0;
  logic [IDX_W-1:0] ob_rd_idx = '0;
  logic [TW-1:0] ob_rd_t = '0;
  acc_t ob_rd_data;

  always #5 clk = ~clk;

  if (FULL) begin : g_full
    sa_top dut (.*);
  end else begin : g_small
    sa_top #(.K(K), .IDX_W(IDX_W), .D_MAX(D_MAX), .MUX_ROWS(MUX_ROWS), .MUX_MASK(MUX_MASK)) dut (.*);
  end

  int checks = 0, failures = 0;
  // mechanism counters
  int n_split = 0, n_mode_change = 0, n_add = 0, n_store = 0, n_empty = 0;
  int n_multi_round = 0, n_clear = 0, n_deferred = 0;

  initial begin : watchdog
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // layer data
  int wmat [NOUT_USED][C];
  int xmat [C][D];
  // compacted columns
  int nz_cnt [C];
  int nz_row [C][NOUT_USED];
  int nb;
  // one round's placement
  int  pe_w   [K][K];
  int  pe_idx [K][K];
  bit  pe_v   [K][K];
  int  slot_col [NSLOT][K];   // input column of W feeding (slot, PE column), -1 none

  initial begin
    logic [K-1:0] prev_mode;
    int hmax, cyc, rounds, placed, s, r;
    bit legal;
    acc_t yref;
    prev_mode = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(negedge clk);

    for (int m = 0; m < int'(NM); m++) begin
      logic [K-1:0] mode;
      int cb_start [K][K];   // band start row of PE (r, c)
      int cb_slot  [K][K];   // band slot of PE (r, c)
      int nzpos [C];         // next compacted weight of each column of W
      int remaining, last_pick;
      mode = MODES[m];
      last_pick = -1;
      // ---- bands of this mode, column by column
      hmax = 0;
      nb = 1;
      for (int c = 0; c < int'(K); c++) begin
        int nbc;
        nbc = 0;
        for (r = 0; r < int'(K); r++) begin
          if (r == 0 || (mode[r] && MUX_ROWS[r] && MUX_MASK[r][c])) begin
            cb_start[r][c] = r; cb_slot[r][c] = slot_of_row(256'(MUX_ROWS), r); nbc++;
          end else begin
            cb_start[r][c] = cb_start[r-1][c]; cb_slot[r][c] = cb_slot[r-1][c];
          end
          if (r - cb_start[r][c] + 1 > hmax) hmax = r - cb_start[r][c] + 1;
        end
        if (nbc > nb) nb = nbc;
      end
      if (nb > 1) n_split++;
      if (m > 0 && mode != prev_mode) n_mode_change++;
      prev_mode = mode;

      // ---- random pruned layer
      for (int j = 0; j < int'(C); j++) begin
        for (int i = 0; i < int'(NOUT_USED); i++) begin
          if (j % 2 == 1) wmat[i][j] = (wmat[i][j-1] != 0) ? ($urandom % 255) - 127 : 0;
          else wmat[i][j] = (($urandom % 3) == 0) ? ($urandom % 255) - 127 : 0;
        end
        for (int t = 0; t < int'(D); t++) xmat[j][t] = ($urandom % 256) - 128;
      end
      // ---- compaction
      remaining = 0;
      for (int j = 0; j < int'(C); j++) begin
        nz_cnt[j] = 0;
        nzpos[j] = 0;
        for (int i = 0; i < int'(NOUT_USED); i++)
          if (wmat[i][j] != 0) begin nz_row[j][nz_cnt[j]] = i; nz_cnt[j]++; end
        remaining += nz_cnt[j];
      end

      // ---- clear output buffer
      @(negedge clk);
      ob_clr = 1'b1;
      @(negedge clk);
      ob_clr = 1'b0;
      n_clear++;

      // ---- mode
      cfg_we = 1'b1; cfg_band_en = mode;
      @(negedge clk);
      cfg_we = 1'b0;

      rounds = 0;
      while (remaining > 0) begin
        int eff [K][K];       // effective index per (row, column) so far
        for (r = 0; r < int'(K); r++)
          for (int c = 0; c < int'(K); c++) begin
            pe_w[r][c] = 0; pe_idx[r][c] = 0; pe_v[r][c] = 1'b0; eff[r][c] = -1;
          end
        for (s = 0; s < int'(NSLOT); s++) for (int c = 0; c < int'(K); c++) slot_col[s][c] = -1;
        placed = 0;
        for (int c = 0; c < int'(K); c++) begin
          for (int bs = 0; bs < int'(K); bs++) begin
            int pick, h;
            if (cb_start[bs][c] != bs) continue;           // not a band start
            h = 1;
            while (bs + h < int'(K) && cb_start[bs + h][c] == bs) h++;
            pick = -1;
            // try the columns of W in turn, starting after the last pick,
            // so that neighbouring PE columns tend to get neighbouring columns
            for (int jj = 0; jj < int'(C) && pick < 0; jj++) begin
              int j;
              j = (last_pick + 1 + jj) % int'(C);
              if (nzpos[j] >= nz_cnt[j]) continue;
              legal = 1'b1;
              for (int l = 0; l < h && legal; l++) begin
                int id;
                bit joins;
                if (nzpos[j] + l >= nz_cnt[j]) break;
                id = nz_row[j][nzpos[j] + l];
                r = bs + l;
                joins = (c > 0) && cb_slot[r][c-1] == cb_slot[r][c] && eff[r][c-1] == id;
                for (int cc = 0; cc < c; cc++)
                  if (pe_v[r][cc] && cb_slot[r][cc] == cb_slot[r][c] && pe_idx[r][cc] == id && !joins)
                    legal = 1'b0;
              end
              if (legal) pick = j;
              else n_deferred++;
            end
            for (int l = 0; l < h; l++) begin
              r = bs + l;
              eff[r][c] = (c > 0) ? eff[r][c-1] : -1;
              if (pick >= 0 && nzpos[pick] + l < nz_cnt[pick]) begin
                int id;
                id = nz_row[pick][nzpos[pick] + l];
                pe_v[r][c] = 1'b1; pe_idx[r][c] = id;
                pe_w[r][c] = wmat[id][pick];
                if (c > 0 && cb_slot[r][c-1] == cb_slot[r][c] && eff[r][c-1] == id) n_add++;
                eff[r][c] = id;
              end else begin
                n_empty++;
              end
            end
            if (pick >= 0) begin
              int took;
              last_pick = pick;
              took = (nz_cnt[pick] - nzpos[pick] < h) ? nz_cnt[pick] - nzpos[pick] : h;
              slot_col[cb_slot[bs][c]][c] = pick;
              nzpos[pick] += took;
              remaining -= took;
              placed++;
            end
          end
        end
        check(placed > 0, "round places at least one block");
        if (placed == 0) break;
        // count stores: run ends
        for (r = 0; r < int'(K); r++)
          for (int c = 0; c < int'(K); c++)
            if (pe_v[r][c]) begin
              bit last;
              last = 1'b1;
              for (int cc = c + 1; cc < int'(K); cc++) begin
                if (cb_slot[r][cc] != cb_slot[r][c]) break;
                if (pe_v[r][cc]) begin last = (pe_idx[r][cc] != pe_idx[r][c]); break; end
              end
              if (last) n_store++;
            end

        // ---- load PE rows
        for (r = 0; r < int'(K); r++) begin
          @(negedge clk);
          wl_valid = 1'b1; wl_row = KW'(r);
          for (int c = 0; c < int'(K); c++) begin
            wl_w[c]   = data_t'(pe_w[r][c]);
            wl_idx[c] = pe_v[r][c] ? IDX_W'(pe_idx[r][c]) : IDX_W'($urandom);
            wl_wv[c]  = pe_v[r][c];
          end
        end
        @(negedge clk);
        wl_valid = 1'b0;
        // ---- input buffer: every slot, every vector
        for (s = 0; s < int'(NSLOT); s++) begin
          for (int t = 0; t < int'(D); t++) begin
            ib_we = 1'b1; ib_slot = SW'(s); ib_addr = TW'(t);
            for (int c = 0; c < int'(K); c++)
              ib_data[c] = (slot_col[s][c] >= 0) ? data_t'(xmat[slot_col[s][c]][t]) : data_t'($urandom);
            @(negedge clk);
          end
        end
        ib_we = 1'b0;
        // ---- run the round
        start = 1'b1; d_len = (TW+1)'(D);
        @(negedge clk);
        start = 1'b0;
        cyc = 1;
        while (!done && cyc < 100000) begin
          @(negedge clk);
          cyc++;
        end
        // done rises D + H + 3 clock edges after the edge that samples start
        check(cyc - 1 == int'(D) + hmax + 3,
              $sformatf("mode %0d round %0d took %0d cycles, expected %0d", m, rounds, cyc - 1, int'(D) + hmax + 3));
        rounds++;
      end
      if (rounds > 1) n_multi_round++;

      // ---- read back and compare with W * X
      for (int i = 0; i < int'(NOUT_USED); i++) begin
        for (int t = 0; t < int'(D); t++) begin
          yref = '0;
          for (int j = 0; j < int'(C); j++) yref += acc_t'(wmat[i][j] * xmat[j][t]);
          ob_rd_en = 1'b1; ob_rd_idx = IDX_W'(i); ob_rd_t = TW'(t);
          @(negedge clk);
          ob_rd_en = 1'b0;
          check(ob_rd_data == yref,
                $sformatf("mode %0d Y[%0d][%0d] = %0d, expected %0d", m, i, t, ob_rd_data, yref));
        end
      end
      $display("mode %0d (band_en %h): %0d bands, tallest %0d, %0d rounds", m, mode, nb, hmax, rounds);
    end

    $display("mechanisms: split=%0d mode_change=%0d add=%0d store=%0d empty=%0d multi_round=%0d clear=%0d deferred=%0d",
             n_split, n_mode_change, n_add, n_store, n_empty, n_multi_round, n_clear, n_deferred);
    check(n_split > 0, "band split used");
    check(n_mode_change > 0 || NM == 1, "mode change used");
    check(n_add > 0, "products added to neighbour");
    check(n_store > 0, "products stored");
    check(n_empty > 0, "empty PE slots");
    check(n_multi_round > 0, "multi-round accumulation");
    check(n_clear > 0, "output clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// sa_ctrl_tb -- self-checking test of the controller.
//
// Checks (1) that mode writes keep only multiplexer rows, (2) that the
// add/store flags and effective indexes of a loaded row match a reference
// (equal adjacent indexes are added, empty slots join their left run),
// (3) that a round reads vectors 0..d_len-1 on consecutive cycles, presents
// the tag one cycle later, waits for pipe_busy to fall and pulses done with
// the expected cycle count, and (4) that writes are ignored while busy.
module sa_ctrl_tb;
  import sa_pkg::*;

  localparam int unsigned K = 64, IDX_W = 9, D_MAX = 64, TW = 6, KW = 6;
  localparam logic [K-1:0] MUX_ROWS = K'(MUX_ROWS_64);

  logic clk = 1'b0, rst_n = 1'b0;
  logic cfg_we = 1'b0;
  logic [K-1:0] cfg_band_en = '0;
  logic wl_valid = 1'b0;
  logic [KW-1:0] wl_row = '0;
  logic [K-1:0][IDX_W-1:0] wl_idx = '0;
  logic [K-1:0] wl_wv = '0;
  logic start = 1'b0;
  logic [TW:0] d_len = '0;
  logic pipe_busy;
  logic busy, done, rd_en, tag_valid;
  logic [TW-1:0] rd_addr, tag_t;
  logic [K-1:0] band_en;
  logic [K-1:0][K-1:0][IDX_W-1:0] idx;
  logic [K-1:0][K-1:0] wv, add_left;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sa_ctrl #(.K(K), .IDX_W(IDX_W), .D_MAX(D_MAX), .MUX_ROWS(MUX_ROWS)) dut (.*);

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
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

  // pipeline model: busy for EXTRA cycles after the last tag
  int extra = 5;
  int busy_cnt = 0;
  always @(posedge clk) begin
    if (tag_valid) busy_cnt <= extra;
    else if (busy_cnt > 0) busy_cnt <= busy_cnt - 1;
  end
  assign pipe_busy = (busy_cnt > 0);

  initial begin
    logic [K-1:0][IDX_W-1:0] ref_idx;
    logic [K-1:0] ref_add;
    logic [K-1:0][IDX_W-1:0] rows_idx [K];
    logic [K-1:0] rows_wv [K];
    int cyc, n_rd, exp_t;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);

    // (1) mode masking
    @(negedge clk);
    cfg_we = 1'b1; cfg_band_en = '1;
    @(negedge clk);
    cfg_we = 1'b0;
    check(band_en == (MUX_ROWS & ~K'(1)), "mode masked to multiplexer rows");

    // (2) index rows
    for (int r = 0; r < K; r++) begin
      for (int c = 0; c < K; c++) begin
        // short runs of equal indexes with some empty slots
        rows_idx[r][c] = (c == 0 || ($urandom % 3 == 0)) ? IDX_W'($urandom) : rows_idx[r][c-1];
        rows_wv[r][c]  = ($urandom % 6) != 0;
      end
      @(negedge clk);
      wl_valid = 1'b1; wl_row = KW'(r); wl_idx = rows_idx[r]; wl_wv = rows_wv[r];
    end
    @(negedge clk);
    wl_valid = 1'b0;
    for (int r = 0; r < K; r++) begin
      for (int c = 0; c < K; c++) begin
        ref_idx[c] = (c == 0 || rows_wv[r][c]) ? rows_idx[r][c] : ref_idx[c-1];
        ref_add[c] = (c > 0) && (ref_idx[c] == ref_idx[c-1]);
      end
      check(idx[r] == ref_idx, $sformatf("effective indexes row %0d", r));
      check(add_left[r] == ref_add, $sformatf("add flags row %0d", r));
      check(wv[r] == rows_wv[r], $sformatf("valid bits row %0d", r));
    end

    // (3) rounds of several lengths
    foreach (extra_list[i]) begin
      extra = extra_list[i];
      @(negedge clk);
      d_len = (TW+1)'(len_list[i]);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      cyc = 1; n_rd = 0; exp_t = 0;
      // writes while busy must be ignored
      cfg_we = 1'b1; cfg_band_en = '0;
      wl_valid = 1'b1; wl_row = '0; wl_idx = '0; wl_wv = '0;
      while (!done) begin
        if (rd_en) begin
          check(rd_addr == TW'(n_rd), "read addresses in order");
          n_rd++;
        end
        if (tag_valid) begin
          check(tag_t == TW'(exp_t), "tag follows read by one cycle");
          exp_t++;
        end
        @(negedge clk);
        cyc++;
        cfg_we = 1'b0; wl_valid = 1'b0;
        if (cyc > 500) break;
      end
      check(n_rd == len_list[i], "round reads d_len vectors");
      check(exp_t == len_list[i], "round tags d_len vectors");
      // stream d_len cycles, tag one later, pipe_busy "extra" more, then one cycle to decide and one to pulse done
      check(cyc == len_list[i] + extra + 3,
            $sformatf("round cycles %0d expected %0d", cyc, len_list[i] + extra + 3));
      check(!busy, "idle after done");
      check(band_en == (MUX_ROWS & ~K'(1)), "mode unchanged by write while busy");
      check(add_left[0] == ref_add_row0(rows_idx[0], rows_wv[0]) && wv[0] == rows_wv[0], "indexes unchanged while busy");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int extra_list[4] = '{5, 1, 12, 64};
  int len_list[4]   = '{1, 64, 17, 40};

  function automatic logic [K-1:0] ref_add_row0(input logic [K-1:0][IDX_W-1:0] ri, input logic [K-1:0] rv);
    logic [K-1:0][IDX_W-1:0] e;
    logic [K-1:0] a;
    for (int c = 0; c < K; c++) begin
      e[c] = (c == 0 || rv[c]) ? ri[c] : e[c-1];
      a[c] = (c > 0) && (e[c] == e[c-1]);
    end
    return a;
  endfunction
endmodule

// sa_sel_tb -- self-checking test of the selection module.
//
// Drives random rows of products with random run structure (add_left),
// random empty slots and random indexes, and compares the registered run
// sums, store enables and indexes with a sequential reference computed in
// the testbench. Lanes are grouped into random bands with their own tags, as
// with partially populated multiplexer rows; runs never cross a band. Also
// checks the one-cycle latency of the tags.
module sa_sel_tb;
  import sa_pkg::*;

  localparam int unsigned K = 64, IDX_W = 9, TW = 6, SW = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  prod_t [K-1:0] prod;
  logic  [K-1:0] add_left, wv;
  logic  [K-1:0][IDX_W-1:0] idx;
  logic [K-1:0] in_valid;
  logic [K-1:0][TW-1:0] in_t;
  logic [K-1:0][SW-1:0] in_slot;
  logic [K-1:0] wr_en;
  logic [K-1:0][IDX_W-1:0] wr_idx;
  acc_t [K-1:0] wr_val;
  logic [K-1:0][TW-1:0] wr_t;
  logic [K-1:0][SW-1:0] wr_slot;
  logic out_busy;
  int checks = 0, failures = 0;
  int n_add = 0, n_store = 0;

  always #5 clk = ~clk;

  sa_sel #(.K(K), .IDX_W(IDX_W), .TW(TW), .SW(SW)) dut (.*);

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    acc_t run;
    logic any;
    logic [K-1:0] exp_en;
    acc_t [K-1:0] exp_val;
    in_valid = '0; in_t = '0; in_slot = '0;
    prod = '0; add_left = '0; wv = '0; idx = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int it = 0; it < 2000; it++) begin
      @(negedge clk);
      for (int c = 0; c < K; c++) begin
        bit newband;
        newband = (c == 0) || (($urandom % 16) == 0);
        if (newband) begin
          in_valid[c] = ($urandom % 8) != 0;
          in_t[c]     = TW'($urandom);
          in_slot[c]  = SW'($urandom % 6);
        end else begin
          in_valid[c] = in_valid[c-1]; in_t[c] = in_t[c-1]; in_slot[c] = in_slot[c-1];
        end
        prod[c]     = prod_t'($urandom);
        add_left[c] = !newband && (($urandom % 4) != 0);
        wv[c]       = ($urandom % 5) != 0;
        idx[c]      = IDX_W'($urandom);
      end
      if (it % 3 == 0) add_left = '0;                // every product stored alone
      // reference: walk the row once
      run = '0; any = 1'b0;
      for (int c = 0; c < K; c++) begin
        if (c == 0 || !add_left[c]) begin run = '0; any = 1'b0; end
        run += acc_t'(prod[c]);
        any |= wv[c];
        exp_val[c] = run;
        exp_en[c]  = in_valid[c] && any && (c == K - 1 || !add_left[c+1]);
        if (add_left[c]) n_add++;
        if (exp_en[c]) n_store++;
      end
      @(posedge clk);
      #1;
      checks++;
      if (out_busy !== (|in_valid) || wr_t !== in_t || wr_slot !== in_slot) begin
        failures++;
        $display("tag mismatch at %0d", it);
      end
      for (int c = 0; c < K; c++) begin
        checks++;
        if (wr_en[c] !== exp_en[c] || (exp_en[c] && (wr_val[c] !== exp_val[c] || wr_idx[c] !== idx[c]))) begin
          failures++;
          if (failures < 10)
            $display("it %0d col %0d: en %b/%b val %0d/%0d", it, c, wr_en[c], exp_en[c], wr_val[c], exp_val[c]);
        end
      end
    end
    checks++;
    if (n_add == 0 || n_store == 0) failures++;
    $display("runs joined: %0d, stores: %0d", n_add, n_store);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// sa_obuf_tb -- self-checking test of the output buffer.
//
// Every cycle, random rows deliver run sums at random output indexes; rows
// are given distinct (band slot, vector) pairs and distinct indexes within a
// row, as the array guarantees. A reference array accumulates the same
// values. The test reads back addresses that were written and random ones,
// checking the bank sum, then clears the buffer and checks zeros.
module sa_obuf_tb;
  import sa_pkg::*;

  localparam int unsigned K = 64, NSLOT = 6, IDX_W = 9, D_MAX = 64, TW = 6, SW = 3;
  localparam int unsigned NOUT = 1 << IDX_W;

  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0;
  logic [K-1:0][K-1:0] wr_en = '0;
  logic [K-1:0][K-1:0][IDX_W-1:0] wr_idx = '0;
  acc_t [K-1:0][K-1:0] wr_val = '0;
  logic [K-1:0][K-1:0][TW-1:0] wr_t = '0;
  logic [K-1:0][K-1:0][SW-1:0] wr_slot = '0;
  logic rd_en = 1'b0;
  logic [IDX_W-1:0] rd_idx = '0;
  logic [TW-1:0] rd_t = '0;
  acc_t rd_data;
  acc_t model [NOUT][D_MAX];
  int checks = 0, failures = 0;
  int n_multi_bank = 0;

  always #5 clk = ~clk;

  sa_obuf #(.K(K), .NSLOT(NSLOT), .IDX_W(IDX_W), .D_MAX(D_MAX)) dut (.*);

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic read_check(input int i, input int t);
    @(negedge clk);
    rd_en = 1'b1; rd_idx = IDX_W'(i); rd_t = TW'(t);
    @(negedge clk);
    rd_en = 1'b0;
    checks++;
    if (rd_data !== model[i][t]) begin
      failures++;
      if (failures < 10) $display("idx %0d t %0d: %0d expected %0d", i, t, rd_data, model[i][t]);
    end
  endtask

  initial begin
    int base;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(negedge clk);
    clr = 1'b1;
    @(negedge clk);
    clr = 1'b0;
    for (int i = 0; i < NOUT; i++) for (int t = 0; t < D_MAX; t++) model[i][t] = '0;
    for (int cyc = 0; cyc < 200; cyc++) begin
      @(negedge clk);
      wr_en = '0;
      // row r: slot r % NSLOT, vector (cyc + r / NSLOT) % D_MAX -> distinct pairs
      for (int r = 0; r < K; r++) begin
        base = $urandom % NOUT;
        for (int c = 0; c < K; c++) begin
          wr_slot[r][c] = SW'(r % NSLOT);
          wr_t[r][c]    = TW'((cyc + r / NSLOT) % D_MAX);
          wr_en[r][c]  = ($urandom % 3) == 0;
          wr_idx[r][c] = IDX_W'((base + c) % NOUT);        // distinct within a row
          wr_val[r][c] = acc_t'($signed($urandom % 65536) - 32768);
          if (wr_en[r][c]) model[wr_idx[r][c]][wr_t[r][c]] += wr_val[r][c];
        end
      end
    end
    @(negedge clk);
    wr_en = '0;
    for (int n = 0; n < 400; n++) read_check($urandom % NOUT, $urandom % D_MAX);
    // values landing in several banks: the same (idx, t) from different slots
    @(negedge clk);
    for (int r = 0; r < NSLOT; r++) begin
      wr_slot[r][0] = SW'(r); wr_t[r][0] = TW'(3);
      wr_en[r][0] = 1'b1; wr_idx[r][0] = IDX_W'(7); wr_val[r][0] = acc_t'(r + 1);
      model[7][3] += acc_t'(r + 1);
      n_multi_bank++;
    end
    @(negedge clk);
    wr_en = '0;
    read_check(7, 3);
    @(negedge clk);
    clr = 1'b1;
    @(negedge clk);
    clr = 1'b0;
    for (int i = 0; i < NOUT; i++) for (int t = 0; t < D_MAX; t++) model[i][t] = '0;
    for (int n = 0; n < 50; n++) read_check($urandom % NOUT, $urandom % D_MAX);
    checks++;
    if (n_multi_bank == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

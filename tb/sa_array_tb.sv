// sa_array_tb -- self-checking test of the multiplexed systolic array at its
// full 64 x 64 size with multiplexer rows 16, 26, 32, 48, 52, where rows 26
// and 48 keep their multiplexer only in even columns (a partially populated
// placement, as an optimised structure would have).
//
// For each of five modes (conventional array; rows 26+52 for {26x1,12x1};
// row 32 for {32x1}; rows 16+32+48 for {16x1}; all five rows) the test loads
// random weights, streams D input vectors into every slot (the value of
// column c of vector t in slot s is a fixed hash of s, t, c) and checks every
// product of every row against weight * input of that row's band, the band
// slot of each PE, and that a PE at distance l below its band start shows
// vector t exactly l+1 cycles after it entered.
module sa_array_tb;
  import sa_pkg::*;

  localparam int unsigned K = 64, D_MAX = 64, TW = 6;
  localparam logic [K-1:0] MUX_ROWS = K'(MUX_ROWS_64);
  localparam int unsigned NSLOT = 6, SW = 3;
  localparam int unsigned D = 20;
  localparam logic [K-1:0][K-1:0] MUX_MASK = mask_init();

  function automatic logic [K-1:0][K-1:0] mask_init();
    logic [K-1:0][K-1:0] m;
    m = '1;
    for (int c = 1; c < K; c += 2) begin
      m[26][c] = 1'b0;
      m[48][c] = 1'b0;
    end
    return m;
  endfunction

  logic clk = 1'b0, rst_n = 1'b0;
  logic [K-1:0] band_en = '0, w_load_row = '0;
  data_t [K-1:0] w_row = '0;
  data_t [NSLOT-1:0][K-1:0] x_slot = '0;
  logic in_valid = 1'b0;
  logic [TW-1:0] in_t = '0;
  prod_t [K-1:0][K-1:0] prod;
  logic [K-1:0][K-1:0] pe_valid;
  logic [K-1:0][K-1:0][TW-1:0] pe_t;
  logic [K-1:0][K-1:0][SW-1:0] pe_slot;
  data_t wmod [K][K];
  int checks = 0, failures = 0;
  int n_mux_bands = 0;

  always #5 clk = ~clk;

  sa_array #(.K(K), .D_MAX(D_MAX), .MUX_ROWS(MUX_ROWS), .MUX_MASK(MUX_MASK)) dut (.*);

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic data_t xval(int s, int t, int c);
    return data_t'((s * 71 + t * 13 + c * 29 + s * t * 7 + c * t) % 256);
  endfunction

  logic [K-1:0] modes [5];
  initial begin
    modes[0] = '0;
    modes[1] = (K'(1) << 26) | (K'(1) << 52);
    modes[2] = (K'(1) << 32);
    modes[3] = (K'(1) << 16) | (K'(1) << 32) | (K'(1) << 48);
    modes[4] = MUX_ROWS;
  end

  initial begin
    int bstart [K][K];
    int bslot [K][K];
    int first_seen [K][K];
    int nvalid [K][K];
    int cyc;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int m = 0; m < 5; m++) begin
      // reference band structure, column by column
      for (int c = 0; c < K; c++)
        for (int r = 0; r < K; r++) begin
          if (r == 0) begin bstart[r][c] = 0; bslot[r][c] = 0; end
          else if (modes[m][r] && MUX_ROWS[r] && MUX_MASK[r][c]) begin
            bstart[r][c] = r; bslot[r][c] = slot_of_row(256'(MUX_ROWS), r);
          end else begin bstart[r][c] = bstart[r-1][c]; bslot[r][c] = bslot[r-1][c]; end
          first_seen[r][c] = -1; nvalid[r][c] = 0;
        end
      // load weights
      for (int r = 0; r < K; r++) begin
        @(negedge clk);
        w_load_row = K'(1) << r;
        for (int c = 0; c < K; c++) begin
          w_row[c] = data_t'($urandom);
          wmod[r][c] = w_row[c];
        end
      end
      @(negedge clk);
      w_load_row = '0;
      band_en = modes[m];
      // stream D vectors and check outputs as they appear
      for (cyc = 0; cyc < D + K + 4; cyc++) begin
        @(negedge clk);
        in_valid = (cyc < D);
        in_t = TW'(cyc);
        for (int ss = 0; ss < NSLOT; ss++)
          for (int c = 0; c < K; c++) x_slot[ss][c] = (cyc < D) ? xval(ss, cyc, c) : data_t'(8'h55);
        // outputs in this cycle come from earlier inputs
        for (int r = 0; r < K; r++) begin
          for (int c = 0; c < K; c++) begin
            checks++;
            if (pe_slot[r][c] !== SW'(bslot[r][c])) begin
              failures++;
              if (failures < 10) $display("mode %0d PE %0d,%0d slot %0d expected %0d", m, r, c, pe_slot[r][c], bslot[r][c]);
            end
            if (pe_valid[r][c]) begin
              if (first_seen[r][c] < 0) first_seen[r][c] = cyc;
              nvalid[r][c]++;
              checks++;
              if (int'(pe_t[r][c]) != cyc - 1 - (r - bstart[r][c])) begin
                failures++;
                if (failures < 10) $display("mode %0d PE %0d,%0d: t=%0d at cycle %0d", m, r, c, pe_t[r][c], cyc);
              end
              checks++;
              if (prod[r][c] !== prod_t'(wmod[r][c] * xval(bslot[r][c], int'(pe_t[r][c]), c))) begin
                failures++;
                if (failures < 10) $display("mode %0d PE %0d,%0d product wrong", m, r, c);
              end
            end
          end
        end
      end
      for (int r = 0; r < K; r++)
        for (int c = 0; c < K; c++) begin
          checks++;
          if (nvalid[r][c] != D || first_seen[r][c] != 1 + (r - bstart[r][c])) begin
            failures++;
            if (failures < 10) $display("mode %0d PE %0d,%0d: %0d vectors, first at %0d", m, r, c, nvalid[r][c], first_seen[r][c]);
          end
        end
      if (modes[m] != '0) n_mux_bands++;
    end
    checks++;
    if (n_mux_bands == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

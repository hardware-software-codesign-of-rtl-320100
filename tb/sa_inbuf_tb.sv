// sa_inbuf_tb -- self-checking test of the input buffer: fills every slot
// with random vectors, then reads all slots in lockstep at random and
// sequential addresses and checks the data one cycle after rd_en, and that
// the output holds while rd_en is low.
module sa_inbuf_tb;
  import sa_pkg::*;

  localparam int unsigned K = 64, NSLOT = 6, D_MAX = 64, TW = 6, SW = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  logic wr_en = 1'b0, rd_en = 1'b0;
  logic [SW-1:0] wr_slot = '0;
  logic [TW-1:0] wr_addr = '0, rd_addr = '0;
  data_t [K-1:0] wr_data = '0;
  data_t [NSLOT-1:0][K-1:0] x_out;
  data_t [K-1:0] model [NSLOT][D_MAX];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sa_inbuf #(.K(K), .NSLOT(NSLOT), .D_MAX(D_MAX)) dut (.*);

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [TW-1:0] a;
    data_t [NSLOT-1:0][K-1:0] held;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int s = 0; s < NSLOT; s++)
      for (int d = 0; d < D_MAX; d++) begin
        @(negedge clk);
        wr_en = 1'b1; wr_slot = SW'(s); wr_addr = TW'(d);
        for (int c = 0; c < K; c++) wr_data[c] = data_t'($urandom);
        model[s][d] = wr_data;
      end
    @(negedge clk);
    wr_en = 1'b0;
    for (int i = 0; i < 2 * D_MAX; i++) begin
      a = (i < D_MAX) ? TW'(i) : TW'($urandom);
      @(negedge clk);
      rd_en = 1'b1; rd_addr = a;
      @(negedge clk);
      rd_en = 1'b0; rd_addr = ~a;
      for (int s = 0; s < NSLOT; s++) begin
        checks++;
        if (x_out[s] !== model[s][a]) begin
          failures++;
          if (failures < 10) $display("slot %0d addr %0d mismatch", s, a);
        end
      end
      held = x_out;
      @(negedge clk);
      checks++;
      if (x_out !== held) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// sa_pe_tb -- self-checking test of the processing element with its input
// multiplexer: random weights, inputs and select values; checks that the
// selected input is forwarded one cycle later and that the registered product
// equals weight * selected input (signed 8-bit operands).
module sa_pe_tb;
  import sa_pkg::*;

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  logic  w_load = 1'b0, sel_buf = 1'b0;
  data_t w_in = '0, x_top = '0, x_buf = '0;
  data_t x_out;
  prod_t prod;
  int    checks = 0, failures = 0;

  always #5 clk = ~clk;

  sa_pe #(.HAS_MUX(1'b1)) dut (.*);

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    data_t w_model, x_exp;
    int    n_mux = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    w_model = '0;
    for (int i = 0; i < 1000; i++) begin
      // new stimulus
      w_load  <= ($urandom % 4 == 0);
      w_in    <= data_t'($urandom);
      x_top   <= data_t'($urandom);
      x_buf   <= data_t'($urandom);
      sel_buf <= $urandom % 2;
      @(posedge clk);
      #1;
      x_exp = sel_buf ? x_buf : x_top;
      if (sel_buf) n_mux++;
      checks++;
      if (x_out !== x_exp || prod !== prod_t'(w_model * x_exp)) begin
        failures++;
        $display("mismatch at %0d: x_out=%0d exp=%0d prod=%0d exp=%0d", i, x_out, x_exp,
                 prod, prod_t'(w_model * x_exp));
      end
      if (w_load) w_model = w_in;
    end
    checks++;
    if (n_mux == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

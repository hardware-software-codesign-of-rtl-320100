// sa_pkg -- types, constants and helper functions shared by the multiplexed
// weight-stationary systolic array.
//
// Data and weights are signed 8-bit values (the multiplexers in the array are
// 8 bits wide); a PE product is 16 bits and the output accumulators are 32
// bits. The default multiplexer placement is the five full rows 16, 26, 32,
// 48 and 52 of a 64x64 array: the union of the band boundaries needed for the
// block-size sets {26x1,12x1}, {32x1} and {16x1}. The accumulator width and
// the helper functions are choices of this implementation.
package sa_pkg;

  localparam int unsigned DATA_W = 8;
  localparam int unsigned PROD_W = 2 * DATA_W;
  localparam int unsigned ACC_W  = 32;

  typedef logic signed [DATA_W-1:0] data_t;
  typedef logic signed [PROD_W-1:0] prod_t;
  typedef logic signed [ACC_W-1:0]  acc_t;

  // Rows 16, 26, 32, 48 and 52 of a 64-row array carry multiplexers.
  localparam logic [63:0] MUX_ROWS_64 = (64'd1 << 16) | (64'd1 << 26) | (64'd1 << 32)
                                      | (64'd1 << 48) | (64'd1 << 52);

  // Sequencer states of the controller.
  typedef enum logic [1:0] {
    SEQ_IDLE   = 2'd0,
    SEQ_STREAM = 2'd1,
    SEQ_DRAIN  = 2'd2
  } seq_state_e;

  // Number of rows that can start a band: row 0 plus every multiplexer row.
  function automatic int unsigned num_slots(input logic [255:0] mux_rows, input int unsigned k);
    int unsigned n;
    n = 1;
    for (int unsigned r = 1; r < k; r++) if (mux_rows[r]) n++;
    return n;
  endfunction

  // Slot number of row r when r starts a band (row 0 is slot 0, then the
  // multiplexer rows in increasing order).
  function automatic int unsigned slot_of_row(input logic [255:0] mux_rows, input int unsigned r);
    int unsigned n;
    n = 0;
    for (int unsigned i = 1; i <= r; i++) if (mux_rows[i]) n++;
    return n;
  endfunction

  // Number of bits needed to index n items (at least 1).
  function automatic int unsigned idx_bits(input int unsigned n);
    return (n <= 2) ? 1 : $clog2(n);
  endfunction

endpackage

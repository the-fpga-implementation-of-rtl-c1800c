// gs_top: Gaussian-smoothing co-processor for Harris corner detection.
//
// The host computes image derivatives and their products and streams the
// pixels of each product image through this block, one single-precision word
// per exchange, to have them smoothed by a 3x3 Gaussian kernel. The block is
// an Avalon-MM slave (gs_pio_regs) behind the host bridge, a nine-word input
// FIFO (gs_input_fifo) and a pipelined floating-point convolver with its
// state machine and result register (gs_convolver).
//
// One exchange, as the host performs it:
//   1. read status (0x60) until ready = 1;
//   2. write the pixel to source_out (0x40), then flip data_flag (0x30);
//   3. poll result_flag (0x20) until it is 1 (only once the FIFO holds nine
//      pixels does each new pixel start a convolution);
//   4. write result_retrieve = 1 (0x10), read data_in (0x50), write
//      result_retrieve = 0; result_flag then drops.
// Writing 1 then 0 to reset (0x00) empties the FIFO.
//
// ready is high when the FIFO is not being reset, no convolution is running,
// none is about to start and no unread result is waiting. With the default
// latencies a convolution takes 33 cycles from the cycle the ninth word of a
// window is shifted in to result_flag.
//
// The parts and their connection follow the design. The status word, the
// ready rule and the slot of result_flag are this implementation's choices.
module gs_top
  import gs_pkg::*;
#(
  parameter int unsigned MUL_LAT = 4,
  parameter int unsigned ADD_LAT = 6
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [7:0]  avs_address,
  input  logic        avs_write,
  input  logic [31:0] avs_writedata,
  input  logic        avs_read,
  output logic [31:0] avs_readdata,
  output logic        avs_readdatavalid
);

  logic  sw_reset, result_retrieve, data_flag;
  fp32_t source;
  fp32_t window [TAPS];
  logic  fifo_done, window_valid;
  fp32_t result_final;
  logic  result_flag, busy, ready;

  gs_pio_regs u_pio (
    .clk, .rst_n,
    .avs_address, .avs_write, .avs_writedata, .avs_read,
    .avs_readdata, .avs_readdatavalid,
    .sw_reset, .result_retrieve, .data_flag, .source,
    .result_flag, .result(result_final), .ready, .fifo_done, .busy
  );

  gs_input_fifo u_fifo (
    .clk, .rst_n, .sw(sw_reset), .data_flag, .source_in(source),
    .fifo(window), .done(fifo_done), .window_valid
  );

  gs_convolver #(.MUL_LAT(MUL_LAT), .ADD_LAT(ADD_LAT)) u_conv (
    .clk, .rst_n, .start(window_valid), .window,
    .result_retrieve, .result_final, .result_flag, .busy
  );

  assign ready = !sw_reset && !busy && !window_valid && !result_flag;

endmodule

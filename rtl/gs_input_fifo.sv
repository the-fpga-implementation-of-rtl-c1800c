// gs_input_fifo: single-input, nine-output pixel FIFO.
//
// Holds the last TAPS pixels written by the host so that a whole 3x3
// convolution can run in one pass. The host presents a pixel on source_in and
// then flips data_flag; every change of data_flag (either direction) shifts
// the pixel in. Because a new word is signalled by a toggle rather than by a
// level, two equal pixels in a row are still seen as two words. The newest
// pixel sits in fifo[TAPS-1] (No.8) and the oldest in fifo[0] (No.0); the
// oldest is dropped when a new one arrives. All words are zero after reset.
//
// done is high once TAPS pixels have been received since the last reset.
// window_valid pulses for one cycle, in the cycle after a shift, whenever the
// FIFO is full: fifo[] then holds a new complete window and the convolver may
// start. The shift happens at the clock edge after the data_flag change is
// seen, so fifo[] shows a new word one cycle after the toggle.
//
// sw is the host-controlled reset of the FIFO (the PIO "reset" register); it
// clears the words and the fill count and re-arms the toggle detector to the
// present level of data_flag. rst_n is the asynchronous power-on reset.
//
// The toggle protocol, the nine outputs, their order and done follow the
// design; the window_valid strobe and the toggle re-arm on sw are choices of
// this implementation.
module gs_input_fifo
  import gs_pkg::*;
#(
  parameter int unsigned DEPTH = TAPS
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  sw,
  input  logic  data_flag,
  input  fp32_t source_in,
  output fp32_t fifo [DEPTH],
  output logic  done,
  output logic  window_valid
);

  logic                       flag_q;
  logic [$clog2(DEPTH+1)-1:0] count;
  logic                       push;

  assign push = (data_flag != flag_q) && !sw;
  assign done = (count == DEPTH[$clog2(DEPTH+1)-1:0]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      flag_q       <= 1'b0;
      count        <= '0;
      window_valid <= 1'b0;
      for (int i = 0; i < int'(DEPTH); i++) fifo[i] <= '0;
    end else if (sw) begin
      flag_q       <= data_flag;
      count        <= '0;
      window_valid <= 1'b0;
      for (int i = 0; i < int'(DEPTH); i++) fifo[i] <= '0;
    end else begin
      flag_q       <= data_flag;
      window_valid <= 1'b0;
      if (push) begin
        for (int i = 0; i < int'(DEPTH) - 1; i++) fifo[i] <= fifo[i+1];
        fifo[DEPTH-1] <= source_in;
        if (!done) count <= count + 1'b1;
        window_valid <= (count >= DEPTH[$clog2(DEPTH+1)-1:0] - 1'b1);
      end
    end
  end

endmodule

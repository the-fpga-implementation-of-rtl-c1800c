// gs_stage_register: enable-loaded register bank between convolution stages.
//
// Holds N single-precision words. Whatever arrives on d is ignored until the
// enable has a rising edge; in that cycle the words are loaded, and they are
// on q from the next cycle until the next rising edge, however long enable
// stays high. Holding the words lets the following adder level, and any word
// that is passed on unchanged to a later level, read stable operands. All words
// are zero after reset. Loading on the rising edge of the enable follows the
// design; detecting it with a registered copy of the enable is this
// implementation's way of doing so in the one clock domain.
module gs_stage_register
  import gs_pkg::*;
#(
  parameter int unsigned N = TAPS
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  enable,
  input  fp32_t d [N],
  output fp32_t q [N]
);

  logic en_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      en_q <= 1'b0;
      for (int i = 0; i < int'(N); i++) q[i] <= '0;
    end else begin
      en_q <= enable;
      if (enable && !en_q)
        for (int i = 0; i < int'(N); i++) q[i] <= d[i];
    end
  end

endmodule

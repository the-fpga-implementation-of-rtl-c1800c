// gs_result_register: final result and its handshake with the host.
//
// On the rising edge of enable the convolution sum on pre_result_final is
// stored in result_final and result_flag goes high: a new result may be read.
// The host answers by raising result_retrieve while it reads and lowering it
// when it is done; on that falling edge result_flag goes low again, so the
// host, which polls far faster than this logic computes, never takes the same
// result twice. result_final holds its value until the next enable edge. Both
// edges are detected against registered copies of the inputs, so result_flag
// changes one clock edge after the input edge is seen. If both edges are seen
// in the same cycle the new result wins. This follows the design; the
// same-cycle priority is this implementation's choice.
module gs_result_register
  import gs_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  enable,
  input  fp32_t pre_result_final,
  input  logic  result_retrieve,
  output fp32_t result_final,
  output logic  result_flag
);

  logic en_q, retrieve_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      en_q         <= 1'b0;
      retrieve_q   <= 1'b0;
      result_final <= '0;
      result_flag  <= 1'b0;
    end else begin
      en_q       <= enable;
      retrieve_q <= result_retrieve;
      if (enable && !en_q) begin
        result_final <= pre_result_final;
        result_flag  <= 1'b1;
      end else if (retrieve_q && !result_retrieve) begin
        result_flag  <= 1'b0;
      end
    end
  end

endmodule

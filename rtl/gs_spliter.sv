// gs_spliter: state decoder of the convolution state machine.
//
// Turns the arbiter's state number into the register enables: the enable that
// belongs to the current state is high and all others are low (ST_IDLE drives
// none). Purely combinational. An enable stays high for as long as the arbiter
// holds its state; the registers load on its rising edge. This follows the
// design's spliter; the packing of the enables into a struct is this
// implementation's.
module gs_spliter
  import gs_pkg::*;
(
  input  gs_state_e   state,
  output gs_enables_t en
);

  always_comb begin
    en = '0;
    unique case (state)
      ST_ADD1:   en.en_add1   = 1'b1;
      ST_ADD2:   en.en_add2   = 1'b1;
      ST_ADD3:   en.en_add3   = 1'b1;
      ST_ADD4:   en.en_add4   = 1'b1;
      ST_RESULT: en.en_result = 1'b1;
      default:   en = '0;
    endcase
  end

endmodule

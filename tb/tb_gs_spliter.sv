// tb_gs_spliter: checks that each state number raises exactly its enable.
module tb_gs_spliter;
  import gs_pkg::*;

  gs_state_e   state;
  gs_enables_t en;
  int checks = 0, failures = 0;

  gs_spliter dut (.state, .en);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    gs_enables_t e;
    for (int s = 0; s < 8; s++) begin
      state = gs_state_e'(s);
      #1;
      e = '0;
      case (s)
        1: e = 5'b00001;
        2: e = 5'b00010;
        3: e = 5'b00100;
        4: e = 5'b01000;
        5: e = 5'b10000;
        default: e = '0;
      endcase
      checks++;
      if (en !== e) begin
        failures++;
        $display("FAIL state %0d: en=%b expected %b", s, en, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

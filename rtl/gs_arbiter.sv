// gs_arbiter: cycle counter of the convolution state machine.
//
// When start is high while the arbiter is idle, it begins counting clock
// cycles; cycle 0 is the cycle in which start is seen. Its output, state, is a
// number in sequence that names the convolution stage whose operands are ready
// (gs_pkg::gs_state_e):
//   ST_ADD1   from cycle MUL_LAT: the nine products are on the multiplier outputs
//   ST_ADD2   from cycle MUL_LAT + 1*(ADD_LAT+1): first adder level done
//   ST_ADD3   from cycle MUL_LAT + 2*(ADD_LAT+1)
//   ST_ADD4   from cycle MUL_LAT + 3*(ADD_LAT+1)
//   ST_RESULT in cycle MUL_LAT + 4*(ADD_LAT+1), for one cycle
// and ST_IDLE otherwise. The extra cycle per adder level is the stage
// register that the enable loads. busy is high from the cycle after start
// until ST_RESULT; a start while busy is ignored.
//
// The counter started by the FIFO's done and the 3-bit state number decoded by
// a separate spliter follow the design; the exact cycle on which each state
// begins is derived here from the multiplier and adder latencies.
module gs_arbiter
  import gs_pkg::*;
#(
  parameter int unsigned MUL_LAT = 4,
  parameter int unsigned ADD_LAT = 6
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      start,
  output gs_state_e state,
  output logic      busy
);

  localparam int unsigned STEP   = ADD_LAT + 1;
  localparam int unsigned T_ADD1 = MUL_LAT;
  localparam int unsigned T_ADD2 = MUL_LAT + 1 * STEP;
  localparam int unsigned T_ADD3 = MUL_LAT + 2 * STEP;
  localparam int unsigned T_ADD4 = MUL_LAT + 3 * STEP;
  localparam int unsigned T_RES  = MUL_LAT + 4 * STEP;
  localparam int unsigned CW     = $clog2(T_RES + 1);

  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      cnt  <= '0;
    end else if (!busy) begin
      if (start) begin
        busy <= 1'b1;
        cnt  <= CW'(1);
      end
    end else if (cnt == CW'(T_RES)) begin
      busy <= 1'b0;
      cnt  <= '0;
    end else begin
      cnt <= cnt + 1'b1;
    end
  end

  always_comb begin
    state = ST_IDLE;
    if (busy) begin
      if      (cnt == CW'(T_RES))  state = ST_RESULT;
      else if (cnt >= CW'(T_ADD4)) state = ST_ADD4;
      else if (cnt >= CW'(T_ADD3)) state = ST_ADD3;
      else if (cnt >= CW'(T_ADD2)) state = ST_ADD2;
      else if (cnt >= CW'(T_ADD1)) state = ST_ADD1;
    end
  end

  initial begin
    assert (MUL_LAT >= 1) else $error("gs_arbiter: MUL_LAT must be at least 1");
  end

endmodule

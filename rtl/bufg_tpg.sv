// bufg_tpg: test pattern generator for the clock buffer BIST.
//
// A 2-bit twisted ring (Johnson) counter supplies the two clock inputs: the I0
// flip-flop takes the inverse of I1 and the I1 flip-flop takes I0, so I0 and I1 are
// square waves of a quarter of the BIST clock rate, 90 degrees apart, and pass
// through all four value combinations. Configuration initialises I0 = 0 and I1 = 1,
// so the two inputs differ on the very first clock cycle.
//
// A finite state machine, enabled once per ring cycle, steps through the eight
// patterns of the six BUFGCTRL control inputs (bist_pkg::BUFG_PATTERNS) and wraps.
// The enable is the decode of the ring state I0 = I1 = 1; the FSM starts at the first
// pattern after configuration and wraps after the eighth: both are this design's
// choices. Each pattern is thus held for four clocks, a full pass is 32 clocks.
module bufg_tpg
  import bist_pkg::*;
(
  input  logic       clk,
  input  logic       gsr,     // configuration global set/reset, async
  output logic       i0,
  output logic       i1,
  output bufg_ctrl_t ctrl,
  output logic [2:0] state
);
  logic enable;

  always_ff @(posedge clk or posedge gsr) begin
    if (gsr) begin
      i0 <= 1'b0;
      i1 <= 1'b1;
    end else begin
      i0 <= ~i1;
      i1 <= i0;
    end
  end

  assign enable = i0 & i1;

  always_ff @(posedge clk or posedge gsr) begin
    if (gsr)         state <= '0;
    else if (enable) state <= state + 3'd1;
  end

  assign ctrl = BUFG_PATTERNS[state];
endmodule

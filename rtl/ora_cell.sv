// ora_cell: comparison-based output response analyzer with iterative-OR chain stage.
//
// Each pair (a[i], b[i]) carries the same output of two identically configured BUTs.
// Any mismatch, seen on a clock edge with ce high, clears the ORA flip-flop; the
// flip-flop feeds back into the AND of the comparisons, so a 0 is held until the next
// configuration. The flip-flop is set to 1 (pass) by the configuration global
// set/reset (gsr). The chain stage is the CLB carry multiplexer: a passing ORA (1)
// passes the carry of the previous ORA, a failing one (0) drives a constant 1, so the
// last carry-out of a chain is 1 if any ORA failed.
//
// Comparing two output pairs per ORA follows the CLB ORA of the method; the clock
// buffer BIST uses NPAIR = 1 for diagnosis down to one buffer. Timing: the flag
// updates on the rising edge of clk; carry_out is combinational. An assertion checks
// that a failing flag stays failing until the next gsr.
module ora_cell #(
  parameter int unsigned NPAIR = 2
) (
  input  logic             clk,
  input  logic             gsr,       // async, sets the flag to 1
  input  logic             ce,        // clock enable
  input  logic [NPAIR-1:0] a,         // outputs of BUT j
  input  logic [NPAIR-1:0] b,         // same outputs of BUT k
  input  logic             carry_in,  // fail indication of the previous ORA (1 = fail)
  output logic             flag,      // 1 = pass so far
  output logic             carry_out
);
  always_ff @(posedge clk or posedge gsr) begin
    if (gsr)     flag <= 1'b1;
    else if (ce) flag <= flag & (&(~(a ^ b)));
  end

  assign carry_out = flag ? carry_in : 1'b1;

  // A recorded failure is only cleared by a new configuration. failed_before is
  // cleared by gsr at once, so a configuration between two edges is not reported.
  logic failed_before;

  always_ff @(posedge clk or posedge gsr) begin
    if (gsr) failed_before <= 1'b0;
    else     failed_before <= !flag;
  end

  a_fail_sticky: assert property (@(posedge clk) disable iff (gsr) failed_before |-> !flag)
    else $error("ORA flag returned to pass without configuration");
endmodule

// bufgctrl: global clock buffer with glitch-free switching between two clocks.
//
// Input Ik is requested when Sk and CEk are both active (after the programmable
// inversion of each control input). Each input has an enable that changes only on an
// edge of that input itself: normally the edge where the input moves to the INIT_OUT
// level (falling edge for INIT_OUT = 0, rising edge for INIT_OUT = 1), and it only
// turns on while the other input's enable is off. So the old clock is cut while it
// sits at the INIT_OUT level, the output rests at INIT_OUT, and the new clock is let
// in while it too sits at that level: no runt pulse. IGNOREk = 1 lets enable k change
// on either edge of Ik, so the switch no longer waits for the INIT_OUT-level edge.
// If neither or both inputs are enabled the output rests at INIT_OUT.
// Configuration (gsr) loads the enables with PRESELECT_I0 and PRESELECT_I1; since
// enables only change on input edges, a preselected input drives the output from
// configuration until its first edge, whatever the control inputs are.
//
// The pins and the nine configuration options follow the published BIST method; the internal
// switching mechanism is a common glitch-free multiplexer chosen to give the
// described behaviour, not a description of the silicon. Each enable is a dual-edge
// register built from a rising-edge and a falling-edge flip-flop whose XOR is the
// enable. O is combinational in I0, I1 and the enables.
module bufgctrl
  import bist_pkg::*;
(
  input  bufg_cfg_t cfg,
  input  logic      gsr,
  input  logic      i0,
  input  logic      i1,
  input  logic      s0,
  input  logic      ce0,
  input  logic      ignore0,
  input  logic      s1,
  input  logic      ce1,
  input  logic      ignore1,
  output logic      o
);
  bufg_ctrl_t pins;
  bufg_ctrl_t ctl;
  logic req0, req1;
  logic next0, next1;
  logic e0p, e0n, e1p, e1n;
  logic en0, en1;
  logic c0, c1;

  assign pins  = '{ig1: ignore1, ig0: ignore0, ce1: ce1, s1: s1, ce0: ce0, s0: s0};
  assign ctl   = pins ^ cfg.inv;
  assign req0  = ctl.s0 & ctl.ce0;
  assign req1  = ctl.s1 & ctl.ce1;
  assign en0   = e0p ^ e0n;
  assign en1   = e1p ^ e1n;
  assign next0 = req0 & ~en1;
  assign next1 = req1 & ~en0;

  // c rises where the input reaches the INIT_OUT level.
  assign c0 = i0 ^ ~cfg.init_out;
  assign c1 = i1 ^ ~cfg.init_out;

  // INIT_OUT-level edge: the enable always takes its next value.
  always_ff @(posedge c0 or posedge gsr) begin
    if (gsr) e0p <= cfg.preselect_i0;
    else     e0p <= next0 ^ e0n;
  end

  // Opposite edge: only with IGNORE.
  always_ff @(negedge c0 or posedge gsr) begin
    if (gsr)          e0n <= 1'b0;
    else if (ctl.ig0) e0n <= next0 ^ e0p;
  end

  always_ff @(posedge c1 or posedge gsr) begin
    if (gsr) e1p <= cfg.preselect_i1;
    else     e1p <= next1 ^ e1n;
  end

  always_ff @(negedge c1 or posedge gsr) begin
    if (gsr)          e1n <= 1'b0;
    else if (ctl.ig1) e1n <= next1 ^ e1p;
  end

  always_comb begin
    if (en0 && !en1)      o = i0;
    else if (en1 && !en0) o = i1;
    else                  o = cfg.init_out;
  end
endmodule

// tb_bufgctrl: checks the global clock buffer model.
//  - after configuration, a preselected input drives O at once; no or both
//    preselected inputs leave O at INIT_OUT;
//  - with two unrelated clocks on I0 and I1, switching with S/CE moves O from one
//    clock to the other without any pulse shorter than the shorter half period, for
//    both INIT_OUT values and for inverted control inputs;
//  - IGNORE lets the switch happen on the next edge of either polarity instead of
//    the INIT_OUT-level edge; deselecting both inputs parks O at INIT_OUT.
module tb_bufgctrl;
  import bist_pkg::*;
  timeunit 1ns;
  timeprecision 1ps;
  bufg_cfg_t cfg;
  logic gsr = 1'b0;
  logic i0, i1, s0, ce0, ig0, s1, ce1, ig1, o;
  logic run_clocks = 1'b0;
  logic monitor = 1'b0;
  realtime last_change = 0;
  int checks = 0, failures = 0;
  int switches = 0;

  bufgctrl dut (.cfg, .gsr, .i0, .i1, .s0, .ce0, .ignore0(ig0), .s1, .ce1, .ignore1(ig1), .o);

  // unrelated clocks: half periods 5 and 7
  always #5 if (run_clocks) i0 = ~i0;
  always #7 if (run_clocks) i1 = ~i1;

  // glitch monitor: every O phase must last at least the shorter half period
  always @(o) begin
    if (monitor && ($realtime - last_change) < 5.0) begin
      failures++;
      $display("runt pulse on O at %0t (%0t long)", $realtime, $realtime - last_change);
    end
    last_change = $realtime;
  end

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin failures++; $display("%0t %s: O=%b expected %b", $realtime, what, got, exp); end
  endtask

  // drive the logical controls; pins carry them through the configured inversion
  task automatic ctl(logic vs0, logic vce0, logic vig0, logic vs1, logic vce1, logic vig1);
    s0  = vs0  ^ cfg.inv.s0;  ce0 = vce0 ^ cfg.inv.ce0; ig0 = vig0 ^ cfg.inv.ig0;
    s1  = vs1  ^ cfg.inv.s1;  ce1 = vce1 ^ cfg.inv.ce1; ig1 = vig1 ^ cfg.inv.ig1;
  endtask

  task automatic configure(bufg_cfg_t c);
    run_clocks = 1'b0; monitor = 1'b0;
    cfg = c;
    i0 = 1'b0; i1 = 1'b1;
    ctl(0, 0, 0, 0, 0, 0);
    #1 gsr = 1'b1; #1 gsr = 1'b0; #1.5;
  endtask

  task automatic tracks(string what, bit sel1, int samples);
    for (int k = 0; k < samples; k++) begin
      if (sel1) @(i1); else @(i0);
      #1;
      check(what, o, sel1 ? i1 : i0);
    end
  endtask

  initial begin
    bufg_cfg_t c;
    // configuration start-up values
    configure(BUFG_CFG1);
    check("config 1: preselected I0 = 0", o, 1'b0);
    configure(BUFG_CFG2);
    check("config 2: preselected I1 = 1", o, 1'b1);
    c = BUFG_CFG1; c.preselect_i0 = 1'b0;
    configure(c);
    check("nothing preselected: INIT_OUT", o, 1'b1);
    c = BUFG_CFG2; c.preselect_i0 = 1'b1;
    configure(c);
    check("both preselected: INIT_OUT", o, 1'b0);

    // glitch-free switching, both INIT_OUT values, plain and inverted controls
    for (int v = 0; v < 4; v++) begin
      c = '{inv: (v >= 2) ? 6'b111111 : 6'b000000, preselect_i0: 1'b0, preselect_i1: 1'b0,
            init_out: 1'(v % 2)};
      configure(c);
      check("idle at INIT_OUT", o, c.init_out);
      run_clocks = 1'b1;
      #50;
      monitor = 1'b1;
      last_change = $realtime;
      for (int r = 0; r < 6; r++) begin
        ctl(1, 1, 0, 0, 0, 0);
        #(37.5 + $urandom % 11);
        tracks("follows I0", 1'b0, 10);
        switches++;
        ctl(0, 0, 0, 1, 1, 0);
        #(37.5 + $urandom % 11);
        tracks("follows I1", 1'b1, 10);
        switches++;
      end
      // S alone or CE alone does not select
      ctl(1, 0, 0, 0, 1, 0);
      #60.3;
      for (int k = 0; k < 10; k++) begin #3; check("parked at INIT_OUT", o, c.init_out); end
      monitor = 1'b0;
      // IGNORE: the switch no longer waits for the INIT_OUT-level edge. I0 is
      // enabled on its very next edge, whichever polarity that edge has.
      ctl(1, 1, 1, 0, 0, 1);
      @(i0);
      #0.1 check("ignore: I0 enabled on its next edge", o, i0);
      @(i0);
      #0.1 check("ignore: I0 still selected", o, i0);
      // back to I1 with ignore on both: I0 is cut on its next edge, I1 let in on
      // its next edge after that
      ctl(0, 0, 1, 1, 1, 1);
      @(i0);
      @(i1);
      #0.1 check("ignore: I1 enabled", o, i1);
      @(i1);
      #0.1 check("ignore: I1 still selected", o, i1);
      ctl(0, 0, 0, 0, 0, 0);
      #60;
    end
    checks++;
    if (switches != 48) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

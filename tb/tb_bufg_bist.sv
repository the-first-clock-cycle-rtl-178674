// tb_bufg_bist: runs the clock buffer BIST on all 32 buffers.
//  - configurations #1 and #2 pass on fault-free buffers;
//  - the 18 single configuration-bit faults (each of the nine options of one buffer
//    flipped away from its value in configuration #1 or #2) are injected one at a time;
//    a detected fault must be flagged exactly by the two ORAs that watch the faulty
//    buffer. All are expected to be detected except the IGNORE0/IGNORE1 inversion
//    faults in configuration #2: there the only control pattern that requests an
//    input requests both, so with this buffer model I0 is never selected and the
//    IGNORE timing of that configuration is never observed;
//  - the faults on PRESELECT_I0/PRESELECT_I1 are detected on the first clock edge.
module tb_bufg_bist;
  import bist_pkg::*;
  localparam int unsigned N = 32;
  localparam int unsigned CYCLES = 64;
  logic          clk = 1'b0, gsr = 1'b0;
  bufg_cfg_t     cfg [N];
  logic          pass;
  logic [N-1:0]  flags, bo;
  logic [2:0]    pattern;
  int checks = 0, failures = 0;
  int detected = 0, first_cycle = 0;

  bufg_bist #(.N_BUF(N)) dut (.clk, .gsr, .cfg, .pass, .ora_flags(flags), .bufg_o(bo), .pattern);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // flip option k (0-8: S0 CE0 IG0 S1 CE1 IG1 inversion, PRESELECT_I0, PRESELECT_I1, INIT_OUT)
  function automatic bufg_cfg_t flip(bufg_cfg_t c, int k);
    case (k)
      0: c.inv.s0  = ~c.inv.s0;
      1: c.inv.ce0 = ~c.inv.ce0;
      2: c.inv.ig0 = ~c.inv.ig0;
      3: c.inv.s1  = ~c.inv.s1;
      4: c.inv.ce1 = ~c.inv.ce1;
      5: c.inv.ig1 = ~c.inv.ig1;
      6: c.preselect_i0 = ~c.preselect_i0;
      7: c.preselect_i1 = ~c.preselect_i1;
      default: c.init_out = ~c.init_out;
    endcase
    return c;
  endfunction

  task automatic session(bufg_cfg_t c, int fb, int fk, output bit first_fail);
    foreach (cfg[n]) cfg[n] = c;
    if (fb >= 0) cfg[fb] = flip(c, fk);
    @(negedge clk);
    gsr = 1'b1; #2 gsr = 1'b0;
    @(negedge clk);                 // one rising edge after configuration
    first_fail = !pass;
    repeat (CYCLES - 1) @(negedge clk);
  endtask

  initial begin
    bit ff;
    int fb;
    session(BUFG_CFG1, -1, 0, ff);
    check("config #1 fault-free passes", pass && &flags);
    session(BUFG_CFG2, -1, 0, ff);
    check("config #2 fault-free passes", pass && &flags);
    for (int c = 0; c < 2; c++) begin
      for (int k = 0; k < 9; k++) begin
        fb = (5 + 7 * k + c) % N;
        session(c == 0 ? BUFG_CFG1 : BUFG_CFG2, fb, k, ff);
        if (c == 1 && (k == 2 || k == 5)) begin
          check($sformatf("config #2 option %0d fault not observable", k), pass);
          continue;
        end
        check($sformatf("config #%0d option %0d fault detected", c + 1, k), !pass);
        check($sformatf("config #%0d option %0d: ORAs %0d and %0d flag, no others", c + 1, k,
                        (fb + N - 1) % N, fb),
              flags == ~((N'(1) << fb) | (N'(1) << ((fb + N - 1) % N))));
        if (!pass) detected++;
        if (ff) first_cycle++;
        if (k == 6 || k == 7) check($sformatf("config #%0d option %0d on first edge", c + 1, k), ff);
      end
    end
    $display("faults detected %0d of 18, %0d of them on the first clock edge", detected, first_cycle);
    check("16 faults detected", detected == 16);
    check("4 faults detected on the first clock edge", first_cycle == 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

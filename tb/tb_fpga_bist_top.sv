// tb_fpga_bist_top: end-to-end test of both BIST circuits at full size (8 CRC modules,
// 32 clock buffers, default parameters). For each circuit it performs a test session
// the way the FPGA would: configuration #1 with a configuration set pulse, the whole
// BIST sequence, pass/fail read-out; then configuration #2 by rewriting only the BUT
// options. It then repeats sessions with one injected configuration-bit fault and
// checks that the single pass/fail bit falls and that the ORA flags point at the
// faulty BUT. The two circuits run concurrently on their own clocks.
//
// Mechanisms counted (each must occur at least once):
//   crc_masked   CRC registers disagree after power-up while the ORAs are disabled
//   crc_mode64   a session in CRC64 mode passes       crc_mode32  one in CRC32 mode
//   crc_clkinv   a session with falling-edge CRCCLK passes
//   crc_sameedge a session with TPGs/ORAs on the falling edge passes
//   crc_detect   an injected CRC fault makes pass fall
//   bufg_switch  a buffer output changes from following I0 to following I1
//   bufg_first   an injected preselect fault is caught on the first clock edge
//   bufg_detect  an injected buffer fault makes pass fall
module tb_fpga_bist_top;
  import bist_pkg::*;
  localparam int unsigned NC = 8;
  localparam int unsigned NB = 32;

  logic            crc_clk = 1'b0, crc_gsr = 1'b0, crc_inv = 1'b0;
  crc_cfg_t        crc_cfg [NC];
  logic            crc_pass, crc_done;
  logic [NC*32-1:0] crc_flags;
  logic            bufg_clk = 1'b0, bufg_gsr = 1'b0;
  bufg_cfg_t       bufg_cfg [NB];
  logic            bufg_pass;
  logic [NB-1:0]   bufg_flags, bufg_o;
  logic [2:0]      bufg_pattern;

  int checks = 0, failures = 0;
  int crc_masked = 0, crc_mode64 = 0, crc_mode32 = 0, crc_clkinv = 0, crc_sameedge = 0;
  int crc_detect = 0, bufg_switch = 0, bufg_first = 0, bufg_detect = 0;

  fpga_bist_top dut (
    .crc_clk, .crc_gsr, .crc_cfg, .crc_tpg_ora_inv(crc_inv), .crc_pass, .crc_done,
    .crc_ora_flags(crc_flags),
    .bufg_clk, .bufg_gsr, .bufg_cfg, .bufg_pass, .bufg_ora_flags(bufg_flags), .bufg_o,
    .bufg_pattern
  );

  always #5 crc_clk = ~crc_clk;
  always #4 bufg_clk = ~bufg_clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int zeros(logic [NC*32-1:0] v);
    int n = 0;
    foreach (v[k]) n += (v[k] == 1'b0);
    return n;
  endfunction

  task automatic crc_session(crc_cfg_t c, logic inv, int fm, crc_cfg_t fc, output bit pass_o,
                             output int nfail);
    int cycles;
    foreach (crc_cfg[m]) crc_cfg[m] = c;
    if (fm >= 0) crc_cfg[fm] = fc;
    crc_inv = inv;
    @(negedge crc_clk);
    crc_gsr = 1'b1; #2 crc_gsr = 1'b0;
    cycles = 0;
    while (!crc_done && cycles < 1100) begin
      @(negedge crc_clk); #1;
      cycles++;
      if (cycles < 256 && !crc_cfg[0].clkinv_a && crc_flags == '1 &&
          dut.u_crc_bist.bout[0] != dut.u_crc_bist.bout[1]) crc_masked++;
    end
    check("CRC BIST sequence ends", crc_done);
    repeat (4) @(negedge crc_clk);
    pass_o = crc_pass;
    nfail = zeros(crc_flags);
  endtask

  task automatic bufg_session(bufg_cfg_t c, int fb, bufg_cfg_t fc, output bit first_fail,
                              output bit pass_o);
    logic prev_sel1;
    foreach (bufg_cfg[n]) bufg_cfg[n] = c;
    if (fb >= 0) bufg_cfg[fb] = fc;
    @(negedge bufg_clk);
    bufg_gsr = 1'b1; #2 bufg_gsr = 1'b0;
    @(negedge bufg_clk);
    first_fail = !bufg_pass;
    prev_sel1 = 1'b0;
    for (int k = 0; k < 64; k++) begin
      @(negedge bufg_clk);
      // buffer 0 is driven by TPG 1; watch which of its inputs it follows
      if (dut.u_bufg_bist.g_but[0].u_buf.en1 && !dut.u_bufg_bist.g_but[0].u_buf.en0) begin
        if (!prev_sel1) bufg_switch++;
        prev_sel1 = 1'b1;
      end else if (dut.u_bufg_bist.g_but[0].u_buf.en0 && !dut.u_bufg_bist.g_but[0].u_buf.en1) begin
        prev_sel1 = 1'b0;
      end
    end
    pass_o = bufg_pass;
  endtask

  initial begin
    fork
      begin : crc_side
        bit p;
        int nf;
        crc_cfg_t f;
        repeat (2) @(negedge crc_clk);
        crc_session(CRC_CFG1, 1'b0, -1, CRC_CFG1, p, nf);
        check("CRC config #1 (CRC64 mode) passes", p && nf == 0);
        if (p) crc_mode64++;
        crc_session(CRC_CFG2, 1'b0, -1, CRC_CFG2, p, nf);
        check("CRC config #2 (CRC32 mode, falling-edge CRCCLK) passes", p && nf == 0);
        if (p) begin crc_mode32++; crc_clkinv++; end
        crc_session(CRC_CFG2, 1'b1, -1, CRC_CFG2, p, nf);
        check("CRC config #2 with TPG/ORA on the falling edge passes", p && nf == 0);
        if (p) crc_sameedge++;
        f = CRC_CFG1; f.init_a[17] = ~f.init_a[17];
        crc_session(CRC_CFG1, 1'b0, 6, f, p, nf);
        check("CRC_INIT fault in module 6 detected", !p);
        check($sformatf("... by 32 ORAs (%0d)", nf), nf == 32);
        check("... all in pairs 5 and 6", &crc_flags[NC*32-1:7*32] && &crc_flags[5*32-1:0]);
        if (!p) crc_detect++;
        f = CRC_CFG2; f.mode64 = 1'b1;
        crc_session(CRC_CFG2, 1'b0, 3, f, p, nf);
        check("CRC64 mode bit fault in module 3 detected", !p);
        if (!p) crc_detect++;
      end
      begin : bufg_side
        bit ff, p;
        bufg_cfg_t f;
        repeat (2) @(negedge bufg_clk);
        bufg_session(BUFG_CFG1, -1, BUFG_CFG1, ff, p);
        check("clock buffer config #1 passes", p && !ff && bufg_flags == '1);
        bufg_session(BUFG_CFG2, -1, BUFG_CFG2, ff, p);
        check("clock buffer config #2 passes", p && !ff && bufg_flags == '1);
        f = BUFG_CFG1; f.preselect_i0 = 1'b0;
        bufg_session(BUFG_CFG1, 12, f, ff, p);
        check("PRESELECT_I0 fault caught on the first edge", ff);
        check("... located at buffer 12", bufg_flags == ~(NB'(3) << 11));
        if (ff) bufg_first++;
        if (!p) bufg_detect++;
        f = BUFG_CFG2; f.preselect_i1 = 1'b0;
        bufg_session(BUFG_CFG2, 0, f, ff, p);
        check("PRESELECT_I1 fault caught on the first edge", ff);
        check("... located at buffer 0", bufg_flags == ~(NB'(1) | (NB'(1) << (NB - 1))));
        if (ff) bufg_first++;
        f = BUFG_CFG1; f.inv.ce1 = 1'b1;
        bufg_session(BUFG_CFG1, 25, f, ff, p);
        check("CE1 inversion fault detected", !p);
        if (!p) bufg_detect++;
        f = BUFG_CFG2; f.init_out = 1'b1;
        bufg_session(BUFG_CFG2, 7, f, ff, p);
        check("INIT_OUT fault detected", !p);
        if (!p) bufg_detect++;
      end
    join
    $display("mechanisms: crc_masked=%0d crc_mode64=%0d crc_mode32=%0d crc_clkinv=%0d crc_sameedge=%0d crc_detect=%0d bufg_switch=%0d bufg_first=%0d bufg_detect=%0d",
             crc_masked, crc_mode64, crc_mode32, crc_clkinv, crc_sameedge, crc_detect,
             bufg_switch, bufg_first, bufg_detect);
    check("crc_masked seen", crc_masked > 0);
    check("crc_mode64 seen", crc_mode64 > 0);
    check("crc_mode32 seen", crc_mode32 > 0);
    check("crc_clkinv seen", crc_clkinv > 0);
    check("crc_sameedge seen", crc_sameedge > 0);
    check("crc_detect seen", crc_detect > 0);
    check("bufg_switch seen", bufg_switch > 0);
    check("bufg_first seen", bufg_first > 0);
    check("bufg_detect seen", bufg_detect > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

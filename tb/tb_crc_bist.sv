// tb_crc_bist: runs the CRC module BIST through whole 1,024-clock sequences.
//  - configurations #1 and #2 (and #2 with TPGs/ORAs on the falling edge) pass on a
//    fault-free column, although the CRC registers power up to random values: the
//    testbench confirms the modules disagree before CRCRESET and that the ORAs are
//    blind then;
//  - done rises after exactly 1,024 clocks;
//  - single configuration-bit faults (a CRC_INIT bit of unit A or B, the CRC64 mode
//    bit, a clock-inversion bit) make pass fall, and an INIT fault is flagged by
//    exactly the 32 ORAs that watch the faulty unit.
module tb_crc_bist;
  import bist_pkg::*;
  localparam int unsigned N = 4;
  logic           clk = 1'b0, gsr = 1'b0, inv;
  crc_cfg_t       cfg [N];
  logic           pass, done;
  logic [N*32-1:0] flags;
  int checks = 0, failures = 0;
  int early_mismatch;

  crc_bist #(.N_MOD(N)) dut (.clk, .gsr, .cfg, .tpg_ora_inv(inv), .pass, .done, .ora_flags(flags));

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

  // one BIST run; returns the number of failing ORAs
  task automatic session(crc_cfg_t c, logic v, int fm, crc_cfg_t fc, output int nfail);
    int cycles;
    foreach (cfg[m]) cfg[m] = c;
    if (fm >= 0) cfg[fm] = fc;
    inv = v;
    @(negedge clk);
    gsr = 1'b1; #2 gsr = 1'b0;
    cycles = 0;
    early_mismatch = 0;
    while (!done && cycles < 1100) begin
      @(negedge clk);
      #1;
      cycles++;
      if (cycles < 256 && dut.bout[0] != dut.bout[1]) early_mismatch++;
    end
    check($sformatf("done after 1024 clocks (saw %0d)", cycles), cycles == 1024 || (v && cycles == 1025));
    repeat (8) @(negedge clk);
    nfail = 0;
    foreach (flags[k]) nfail += (flags[k] == 1'b0);
    check("pass equals the AND of all ORA flags", pass == (nfail == 0));
  endtask

  initial begin
    int nf;
    crc_cfg_t f;
    inv = 1'b0;
    foreach (cfg[m]) cfg[m] = CRC_CFG1;
    repeat (2) @(negedge clk);

    session(CRC_CFG1, 1'b0, -1, CRC_CFG1, nf);
    check("config #1 fault-free passes", pass && nf == 0);
    check("registers disagree before CRCRESET (random power-up)", early_mismatch > 0);
    session(CRC_CFG2, 1'b0, -1, CRC_CFG2, nf);
    check("config #2 fault-free passes", pass && nf == 0);
    session(CRC_CFG2, 1'b1, -1, CRC_CFG2, nf);
    check("config #2, same-edge TPG/ORA, passes", pass && nf == 0);

    f = CRC_CFG1; f.init_a[5] = ~f.init_a[5];
    session(CRC_CFG1, 1'b0, 1, f, nf);
    check("INIT A fault detected", !pass);
    check($sformatf("INIT A fault flagged by 32 ORAs (%0d)", nf), nf == 32);
    check("only ORAs of pairs 0 and 1 flag", &flags[127:64]);

    f = CRC_CFG2; f.init_b[30] = ~f.init_b[30];
    session(CRC_CFG2, 1'b0, 2, f, nf);
    check("INIT B fault detected", !pass);
    check($sformatf("INIT B fault flagged by 32 ORAs (%0d)", nf), nf == 32);

    f = CRC_CFG1; f.mode64 = 1'b0;
    session(CRC_CFG1, 1'b0, 3, f, nf);
    check("CRC64 mode bit fault detected", !pass);

    f = CRC_CFG2; f.mode64 = 1'b1;
    session(CRC_CFG2, 1'b0, 0, f, nf);
    check("CRC64 mode bit fault detected in config #2", !pass);

    f = CRC_CFG2; f.clkinv_b = 1'b0;
    session(CRC_CFG2, 1'b0, 1, f, nf);
    check("clock inversion fault detected", !pass);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_crc_fault_injection: configuration-memory fault injection on the CRC BIST.
//
// The two CRC modules of one transceiver (modules 0 and 1 of the column) have 67
// configuration bits each (CRC_INIT and clock inversion of both units, CRC64 mode),
// 134 bits and 268 single stuck-at faults in all. Each fault is injected into the
// configuration of that module only, and both BIST configurations are run as a test
// session (configuration #1, then #2). A stuck-at fault is only a fault in a
// configuration whose intended value differs from the stuck value, so each
// configuration alone should detect half of the faults and the two together all of
// them. Every fault that is detected must be flagged by exactly 32 ORAs.
module tb_crc_fault_injection;
  import bist_pkg::*;
  localparam int unsigned N = 8;
  localparam int unsigned NBITS = $bits(crc_cfg_t);
  logic             clk = 1'b0, gsr = 1'b0;
  crc_cfg_t         cfg [N];
  logic             pass, done;
  logic [N*32-1:0]  flags;
  int checks = 0, failures = 0;
  int det1 = 0, det2 = 0, det_any = 0, total = 0, ora32 = 0;

  crc_bist dut (.clk, .gsr, .cfg, .tpg_ora_inv(1'b0), .pass, .done, .ora_flags(flags));

  always #5 clk = ~clk;

  initial begin
    #20ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // returns the number of failing ORAs (0 = pass)
  task automatic run(crc_cfg_t good, int fm, int bit_i, logic stuck, output int nfail);
    crc_cfg_t f;
    foreach (cfg[m]) cfg[m] = good;
    f = good;
    f[bit_i] = stuck;
    if (fm >= 0) cfg[fm] = f;
    @(negedge clk);
    gsr = 1'b1; #2 gsr = 1'b0;
    while (!done) @(negedge clk);
    @(negedge clk);
    nfail = 0;
    foreach (flags[k]) nfail += (flags[k] == 1'b0);
    checks++;
    if ((nfail == 0) != pass) begin failures++; $display("pass bit disagrees with ORA flags"); end
  endtask

  initial begin
    int n1, n2;
    repeat (2) @(negedge clk);
    run(CRC_CFG1, -1, 0, 1'b0, n1);
    run(CRC_CFG2, -1, 0, 1'b0, n2);
    checks++;
    if (n1 != 0 || n2 != 0) begin failures++; $display("fault-free column fails"); end
    for (int m = 0; m < 2; m++) begin
      for (int b = 0; b < int'(NBITS); b++) begin
        for (int s = 0; s < 2; s++) begin
          total++;
          run(CRC_CFG1, m, b, 1'(s), n1);
          run(CRC_CFG2, m, b, 1'(s), n2);
          if (n1 > 0) det1++;
          if (n2 > 0) det2++;
          if (n1 > 0 || n2 > 0) det_any++;
          else $display("undetected: module %0d bit %0d stuck-at-%0d", m, b, s);
          if ((n1 == 0 || n1 == 32) && (n2 == 0 || n2 == 32)) ora32++;
          else $display("module %0d bit %0d s-a-%0d flagged by %0d / %0d ORAs", m, b, s, n1, n2);
        end
      end
    end
    $display("faults %0d: config #1 detects %0d, config #2 detects %0d, together %0d",
             total, det1, det2, det_any);
    checks += 5;
    if (total != 268)       failures++;
    if (det1 != total / 2)  failures++;
    if (det2 != total / 2)  failures++;
    if (det_any != total)   failures++;
    if (ora32 != total)     failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

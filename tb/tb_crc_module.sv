// tb_crc_module: checks that unit A of a CRC module absorbs the 64-bit word {CRCIN of
// A, CRCIN of B} in CRC64 mode and its own CRCIN in CRC32 mode, that unit B is always an
// independent CRC32 on its own pins, and that each unit uses its own CRC_INIT.
module tb_crc_module;
  import bist_pkg::*;
  import crc_ref_pkg::*;
  logic        clk = 1'b0;
  crc_cfg_t    cfg;
  logic        reset, valid;
  logic [2:0]  width_a, width_b;
  logic [31:0] in_a, in_b, out_a, out_b;
  logic [31:0] ma, mb;
  int checks = 0, failures = 0;

  crc_module dut (.cfg, .clk_a(clk), .reset_a(reset), .valid_a(valid), .width_a, .crcin_a(in_a),
                  .crcout_a(out_a), .clk_b(clk), .reset_b(reset), .valid_b(valid), .width_b,
                  .crcin_b(in_b), .crcout_b(out_b));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(crc_cfg_t c, int cycles);
    cfg = c;
    reset = 1'b1; valid = 1'b0; width_a = '0; width_b = '0; in_a = '0; in_b = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    ma = c.init_a; mb = c.init_b;
    checks += 2;
    if (out_a !== ma || out_b !== mb) begin
      failures++; $display("init: %h %h", out_a, out_b);
    end
    reset = 1'b0;
    for (int n = 0; n < cycles; n++) begin
      valid = 1'b1; width_a = 3'($urandom); width_b = 3'($urandom);
      in_a = $urandom; in_b = $urandom;
      ma = c.mode64 ? ref_crc64(ma, in_a, in_b, width_a) : ref_crc32(ma, in_a, width_a);
      mb = ref_crc32(mb, in_b, width_b);
      @(negedge clk);
      checks += 2;
      if (out_a !== ma) begin failures++; $display("A mode64=%b: %h vs %h", c.mode64, out_a, ma); end
      if (out_b !== mb) begin failures++; $display("B: %h vs %h", out_b, mb); end
    end
  endtask

  initial begin
    crc_cfg_t c;
    c = CRC_CFG1; c.init_b = 32'h1234_5678;
    run(c, 400);
    c = CRC_CFG1; c.mode64 = 1'b0; c.init_a = 32'hDEAD_BEEF;
    run(c, 400);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_crc_tpg: checks the counter TPG for the CRC BIST: zero after configuration set,
// the bit-to-pin assignment on every clock, the 1,024-clock sequence (CRCRESET high in
// clocks 256-511 and 768-1023, ORA enable only in the second half) and the done flag.
module tb_crc_tpg;
  logic        clk = 1'b0, gsr = 1'b0;
  logic [63:0] crcin;
  logic [2:0]  width;
  logic        valid, reset, ce, done;
  logic [9:0]  count;
  int checks = 0, failures = 0;
  int ce_cycles = 0, reset_cycles = 0;

  crc_tpg dut (.clk, .gsr, .crcin, .crcdatawidth(width), .crcdatavalid(valid), .crcreset(reset),
               .ora_ce(ce), .done, .count);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c;
    #1 gsr = 1'b1;
    #11 gsr = 1'b0;
    for (int n = 0; n < 1100; n++) begin
      c = n % 1024;
      checks++;
      if (count !== 10'(c)) begin failures++; $display("count %0d vs %0d", count, c); end
      for (int i = 0; i < 64; i++) begin
        checks++;
        if (crcin[i] !== ((c >> (i % 4)) & 1)) begin failures++; $display("CRCIN%0d at %0d", i, c); end
      end
      checks += 5;
      if (width !== 3'((c >> 4) & 7)) failures++;
      if (valid !== ((c >> 7) & 1))   failures++;
      if (reset !== ((c >> 8) & 1))   failures++;
      if (ce !== ((c >> 9) & 1))      failures++;
      if (done !== (n >= 1024))       begin failures++; $display("done at %0d", n); end
      if (n < 1024) begin
        ce_cycles += ce;
        reset_cycles += (reset && n < 512);
      end
      @(posedge clk); #1;
    end
    checks += 2;
    if (ce_cycles != 512)    begin failures++; $display("ORA enabled %0d clocks", ce_cycles); end
    if (reset_cycles != 256) begin failures++; $display("reset in first half %0d", reset_cycles); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

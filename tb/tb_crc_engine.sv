// tb_crc_engine: checks one CRC32 unit in CRC32 and CRC64 mode, for every data width,
// against the bit-level reference model, including synchronous CRC_INIT loading,
// data-valid hold and falling-edge clocking (a second instance with clkinv = 1 must
// update half a clock later than the rising-edge one, to the same value).
module tb_crc_engine;
  import crc_ref_pkg::*;
  logic        clk = 1'b0;
  logic        mode64;
  logic [31:0] crc_init;
  logic        crcreset, crcdatavalid;
  logic [2:0]  crcdatawidth;
  logic [31:0] crcin, crcin_ext;
  logic [31:0] out_p, out_n;
  logic [31:0] model, model_old;
  int checks = 0, failures = 0;

  crc_engine dut_p (.crcclk(clk), .clkinv(1'b0), .mode64, .crc_init, .crcreset, .crcdatavalid,
                    .crcdatawidth, .crcin, .crcin_ext, .crcout(out_p));
  crc_engine dut_n (.crcclk(clk), .clkinv(1'b1), .mode64, .crc_init, .crcreset, .crcdatavalid,
                    .crcdatawidth, .crcin, .crcin_ext, .crcout(out_n));

  // posedge at 5, 15, ...; negedge at 10, 20, ...
  always #5 clk = ~clk;

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mode64 = 1'b0; crc_init = 32'hAAAA_AAAA; crcreset = 1'b1; crcdatavalid = 1'b0;
    crcdatawidth = 3'd0; crcin = '0; crcin_ext = '0;
    #2;
    @(posedge clk); @(posedge clk);
    #1 check("reset loads CRC_INIT (rising edge)", out_p, 32'hAAAA_AAAA);
    @(negedge clk);
    #1 check("reset loads CRC_INIT (falling edge)", out_n, 32'hAAAA_AAAA);
    model = 32'hAAAA_AAAA;
    for (int n = 0; n < 3000; n++) begin
      // inputs change at 2 ns after a falling edge, away from both clock edges
      #1;
      mode64       = (n / 500) % 2 == 1;
      crcdatawidth = 3'($urandom);
      crcdatavalid = ($urandom % 8) != 0;
      crcreset     = ($urandom % 64) == 0;
      crc_init     = $urandom;
      crcin        = $urandom;
      crcin_ext    = $urandom;
      model_old    = model;
      if (crcreset)          model = crc_init;
      else if (!crcdatavalid) model = model;
      else if (mode64)       model = ref_crc64(model, crcin, crcin_ext, crcdatawidth);
      else                   model = ref_crc32(model, crcin, crcdatawidth);
      @(posedge clk);
      #1;
      check("rising-edge unit after edge", out_p, model);
      check("falling-edge unit not yet updated", out_n, model_old);
      @(negedge clk);
      #1;
      check("falling-edge unit after edge", out_n, model);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// crc_module: a CRC module of the transceiver column, made of two CRC32 units.
//
// Unit A can also operate as the CRC64 unit. As in the hard block, the CRC64 shares
// every pin of unit A (CRCCLK, CRCRESET, CRCDATAVALID, CRCDATAWIDTH, the 32 CRCOUT
// pins and CRCIN[63:32] = unit A's CRCIN[31:0]) while its CRCIN[31:0] are unit B's
// CRCIN[31:0]. Unit B keeps working as an independent CRC32 in both modes, so the
// two units expose 64 outputs in either configuration.
//
// The configuration (cfg) carries the 67 configuration memory bits: CRC_INIT and
// clock inversion of each unit and the CRC64 mode bit. Timing: each unit updates on
// its selected CRCCLK edge; outputs are the registers, no added latency.
module crc_module
  import bist_pkg::*;
(
  input  crc_cfg_t    cfg,
  input  logic        clk_a,
  input  logic        reset_a,
  input  logic        valid_a,
  input  logic [2:0]  width_a,
  input  logic [31:0] crcin_a,
  output logic [31:0] crcout_a,
  input  logic        clk_b,
  input  logic        reset_b,
  input  logic        valid_b,
  input  logic [2:0]  width_b,
  input  logic [31:0] crcin_b,
  output logic [31:0] crcout_b
);
  crc_engine u_a (
    .crcclk      (clk_a),
    .clkinv      (cfg.clkinv_a),
    .mode64      (cfg.mode64),
    .crc_init    (cfg.init_a),
    .crcreset    (reset_a),
    .crcdatavalid(valid_a),
    .crcdatawidth(width_a),
    .crcin       (crcin_a),
    .crcin_ext   (crcin_b),
    .crcout      (crcout_a)
  );

  crc_engine u_b (
    .crcclk      (clk_b),
    .clkinv      (cfg.clkinv_b),
    .mode64      (1'b0),
    .crc_init    (cfg.init_b),
    .crcreset    (reset_b),
    .crcdatavalid(valid_b),
    .crcdatawidth(width_b),
    .crcin       (crcin_b),
    .crcin_ext   (32'd0),
    .crcout      (crcout_b)
  );
endmodule

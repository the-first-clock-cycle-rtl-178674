// fpga_bist_top: the two BIST circuits for hard FPGA resources, side by side.
//
// The CRC module BIST (crc_bist) tests a column of CRC modules and the clock buffer
// BIST (bufg_bist) tests the global clock buffers. In the FPGA they are separate
// configurations downloaded one after the other; here they are independent circuits
// with their own BIST clock, configuration global set/reset and configuration inputs,
// and each returns a single pass/fail bit plus its ORA flip-flops for diagnosis.
//
// A test session of either circuit is: write the per-BUT configuration (all BUTs
// equal to configuration #1), pulse gsr, apply the BIST clock, read pass; then
// rewrite only the BUT options (configuration #2, a partial reconfiguration), pulse
// gsr again and repeat. CRC BIST: 2**10 clocks per configuration. Clock buffer BIST:
// the eight control patterns take 32 clocks.
//
// The split into two circuits, their BIST configurations and the single pass/fail
// bit follow the published method; the number of CRC modules (N_CRC_MOD = 8) is an
// assumed column size, since it depends on the device.
module fpga_bist_top
  import bist_pkg::*;
#(
  parameter int unsigned N_CRC_MOD = 8,   // CRC modules in the transceiver column
  parameter int unsigned N_BUFG    = 32   // global clock buffers
) (
  // CRC module BIST
  input  logic                    crc_clk,
  input  logic                    crc_gsr,
  input  crc_cfg_t                crc_cfg [N_CRC_MOD],
  input  logic                    crc_tpg_ora_inv,
  output logic                    crc_pass,
  output logic                    crc_done,
  output logic [N_CRC_MOD*32-1:0] crc_ora_flags,
  // clock buffer BIST
  input  logic                    bufg_clk,
  input  logic                    bufg_gsr,
  input  bufg_cfg_t               bufg_cfg [N_BUFG],
  output logic                    bufg_pass,
  output logic [N_BUFG-1:0]       bufg_ora_flags,
  output logic [N_BUFG-1:0]       bufg_o,
  output logic [2:0]              bufg_pattern
);
  crc_bist #(.N_MOD(N_CRC_MOD), .TPG_WIDTH(10)) u_crc_bist (
    .clk        (crc_clk),
    .gsr        (crc_gsr),
    .cfg        (crc_cfg),
    .tpg_ora_inv(crc_tpg_ora_inv),
    .pass       (crc_pass),
    .done       (crc_done),
    .ora_flags  (crc_ora_flags)
  );

  bufg_bist #(.N_BUF(N_BUFG)) u_bufg_bist (
    .clk      (bufg_clk),
    .gsr      (bufg_gsr),
    .cfg      (bufg_cfg),
    .pass     (bufg_pass),
    .ora_flags(bufg_ora_flags),
    .bufg_o   (bufg_o),
    .pattern  (bufg_pattern)
  );
endmodule

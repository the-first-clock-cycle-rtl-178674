// crc_bist: circular-comparison BIST of a column of CRC modules.
//
// N_MOD CRC modules (the BUTs) receive patterns from two counter TPGs: TPG 0 drives
// the odd-numbered modules, TPG 1 the even ones, so a faulty TPG makes neighbours
// disagree. Module m is compared with module m+1 (the last with module 0): all 64
// outputs of each pair (unit A then unit B, i.e. CRC64 + CRC32 in configuration #1,
// two CRC32 in configuration #2) go to 32 ORAs of two output pairs each. Every output
// is therefore watched by two ORAs, and a fault in one CRC32 unit shows in 32 ORAs.
// The ORAs of pair m take their clock enable from TPG (m mod 2), i.e. from counter bit
// 9, so nothing is compared before the CRC registers have been through CRCRESET. The
// ORAs form one iterative-OR chain; pass is its inverted end.
//
// cfg[m] is the configuration memory of module m (normally all equal to CRC_CFG1 or
// CRC_CFG2). tpg_ora_inv = 1 clocks the TPGs and ORAs on the falling edge of clk
// (the "same edge" variant of configuration #2); the CRC units always take clk as
// CRCCLK and apply their own inversion. gsr is the configuration global set/reset.
// The sequence ends after 2**TPG_WIDTH clocks (done); the result is then stable.
module crc_bist
  import bist_pkg::*;
#(
  parameter int unsigned N_MOD     = 8,   // CRC modules in the column
  parameter int unsigned TPG_WIDTH = 10   // TPG counter bits
) (
  input  logic                clk,
  input  logic                gsr,
  input  crc_cfg_t            cfg [N_MOD],
  input  logic                tpg_ora_inv,
  output logic                pass,
  output logic                done,
  output logic [N_MOD*32-1:0] ora_flags   // for readback diagnosis, 1 = pass
);
  localparam int unsigned N_ORA = N_MOD * 32;

  logic                 tclk;
  logic [63:0]          t_crcin [2];
  logic [2:0]           t_width [2];
  logic                 t_valid [2];
  logic                 t_reset [2];
  logic                 t_ce    [2];
  logic                 t_done  [2];
  logic [63:0]          bout    [N_MOD];
  logic [N_ORA:0]       chain;

  assign tclk = clk ^ tpg_ora_inv;

  for (genvar t = 0; t < 2; t++) begin : g_tpg
    crc_tpg #(.WIDTH(TPG_WIDTH), .CRC_IN(64)) u_tpg (
      .clk         (tclk),
      .gsr         (gsr),
      .crcin       (t_crcin[t]),
      .crcdatawidth(t_width[t]),
      .crcdatavalid(t_valid[t]),
      .crcreset    (t_reset[t]),
      .ora_ce      (t_ce[t]),
      .done        (t_done[t]),
      .count       ()
    );
  end

  for (genvar m = 0; m < N_MOD; m++) begin : g_but
    localparam int unsigned T = (m % 2 == 1) ? 0 : 1;
    crc_module u_crc (
      .cfg     (cfg[m]),
      .clk_a   (clk),
      .reset_a (t_reset[T]),
      .valid_a (t_valid[T]),
      .width_a (t_width[T]),
      .crcin_a (t_crcin[T][63:32]),
      .crcout_a(bout[m][63:32]),
      .clk_b   (clk),
      .reset_b (t_reset[T]),
      .valid_b (t_valid[T]),
      .width_b (t_width[T]),
      .crcin_b (t_crcin[T][31:0]),
      .crcout_b(bout[m][31:0])
    );
  end

  assign chain[0] = 1'b0;

  for (genvar m = 0; m < N_MOD; m++) begin : g_pair
    localparam int unsigned NB = (m + 1) % N_MOD;
    for (genvar k = 0; k < 32; k++) begin : g_ora
      ora_cell #(.NPAIR(2)) u_ora (
        .clk      (tclk),
        .gsr      (gsr),
        .ce       (t_ce[m % 2]),
        .a        (bout[m][2*k +: 2]),
        .b        (bout[NB][2*k +: 2]),
        .carry_in (chain[m*32 + k]),
        .flag     (ora_flags[m*32 + k]),
        .carry_out(chain[m*32 + k + 1])
      );
    end
  end

  assign pass = ~chain[N_ORA];
  assign done = t_done[0];
endmodule

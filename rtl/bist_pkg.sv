// bist_pkg: types and constants shared by the FPGA resource BIST circuits.
//
// The design is a pair of Built-In Self-Test circuits for two hard resources of an
// FPGA: the CRC modules next to the gigabit transceivers and the 32 global clock
// buffers (BUFGCTRL). Each circuit uses the circular-comparison scheme: test pattern
// generators (TPGs) drive identically configured blocks under test (BUTs), and
// comparison output response analyzers (ORAs) compare neighbouring BUTs.
//
// The configuration memory bits of each BUT are modelled as static inputs (the
// structs below), so that a testbench can write the two BIST configurations and
// inject stuck-at faults into single configuration bits. The CRC polynomial, the
// two configurations and the clock-buffer control patterns follow the published BIST method;
// the field packing of the structs is this design's own choice.
package bist_pkg;

  // Characteristic polynomial of the CRC32 register:
  // x^32 + x^26 + x^23 + x^22 + x^16 + x^12 + x^11 + x^10 + x^8 + x^7 + x^5 + x^4 + x^2 + x + 1
  // Bit i set means the unit cell for register bit i carries the feedback XOR.
  localparam logic [31:0] CRC32_POLY = 32'h04C1_1DB7;

  // Configuration memory of one CRC module (two CRC32 units A and B; A doubles
  // as the CRC64 unit). 67 bits, matching 2 x (32 INIT + clock invert) + mode.
  typedef struct packed {
    logic        mode64;    // 1: unit A works as CRC64 (CRCIN of B is its low word)
    logic        clkinv_a;  // CRCCLK active edge of unit A (1 = falling)
    logic        clkinv_b;  // CRCCLK active edge of unit B
    logic [31:0] init_a;    // CRC_INIT of unit A
    logic [31:0] init_b;    // CRC_INIT of unit B
  } crc_cfg_t;

  // BIST configuration #1 and #2 for the CRC modules (Table I of the method).
  localparam crc_cfg_t CRC_CFG1 = '{mode64: 1'b1, clkinv_a: 1'b0, clkinv_b: 1'b0,
                                    init_a: 32'hAAAA_AAAA, init_b: 32'hAAAA_AAAA};
  localparam crc_cfg_t CRC_CFG2 = '{mode64: 1'b0, clkinv_a: 1'b1, clkinv_b: 1'b1,
                                    init_a: 32'h5555_5555, init_b: 32'h5555_5555};

  // Six control inputs of a BUFGCTRL, in the column order of the pattern table.
  typedef struct packed {
    logic ig1;
    logic ig0;
    logic ce1;
    logic s1;
    logic ce0;
    logic s0;
  } bufg_ctrl_t;

  // Configuration memory of one BUFGCTRL: nine options.
  typedef struct packed {
    bufg_ctrl_t inv;           // per-control-input inversion (active level)
    logic       preselect_i0;
    logic       preselect_i1;
    logic       init_out;
  } bufg_cfg_t;

  localparam bufg_cfg_t BUFG_CFG1 = '{inv: 6'b000000, preselect_i0: 1'b1,
                                      preselect_i1: 1'b0, init_out: 1'b1};
  localparam bufg_cfg_t BUFG_CFG2 = '{inv: 6'b111111, preselect_i0: 1'b0,
                                      preselect_i1: 1'b1, init_out: 1'b0};

  // The eight control patterns applied by the clock-buffer TPG FSM, in order.
  // Columns: IG1 IG0 CE1 S1 CE0 S0.
  localparam int unsigned BUFG_NPAT = 8;
  localparam bufg_ctrl_t BUFG_PATTERNS [BUFG_NPAT] = '{
    6'b001101,
    6'b001110,
    6'b001111,
    6'b000000,
    6'b011111,
    6'b101111,
    6'b000111,
    6'b001011
  };

endpackage

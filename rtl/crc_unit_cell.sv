// crc_unit_cell: one bit of the CRC register of a CRC32 unit.
//
// The next value is QIN (the previous register bit) XOR FEEDBACK (the register MSB,
// only in cells whose bit position is a term of the polynomial, TAP = 1) XOR CRCIN.
// CRCDATAVALID low holds the bit; CRCRESET high loads the CRC_INIT bit instead,
// synchronously and with priority over the data path. The structure (XOR, valid mux,
// reset mux, flip-flop) follows the gate-level unit cell of the method.
//
// The flip-flop deliberately has no configuration-time initialisation: the hard CRC
// register is not set by the FPGA download and powers up to an unknown value until
// CRCRESET is applied. The caller supplies the already-selected clock edge.
//
// Timing: one register bit, updated on the rising edge of clk.
module crc_unit_cell #(
  parameter bit TAP = 1'b0  // 1: include the feedback XOR
) (
  input  logic clk,       // CRCCLK after the active-edge selection
  input  logic qin,       // previous register bit (0 for bit 0)
  input  logic feedback,  // register MSB
  input  logic crcin,     // data bit (already masked by CRCDATAWIDTH)
  input  logic valid,     // CRCDATAVALID
  input  logic reset,     // CRCRESET, synchronous
  input  logic init,      // CRC_INIT bit
  output logic q
);
  logic shifted;
  logic d;

  always_comb begin
    shifted = (TAP ? (qin ^ feedback) : qin) ^ crcin;
    d       = reset ? init : (valid ? shifted : q);
  end

  always_ff @(posedge clk) q <= d;
endmodule

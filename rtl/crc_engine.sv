// crc_engine: one CRC32 unit of a CRC module, including the CRC64 extension.
//
// The register is 32 crc_unit_cell instances wired as a Galois shift register for
// the CRC32 polynomial (bit i takes bit i-1, cells at polynomial terms also XOR in
// bit 31), with one data bit XORed into every cell per clock. CRCDATAWIDTH selects
// how many bytes of the data word are valid. In CRC64 mode the unit takes a 64-bit
// word: its own CRCIN is the high word and the partner unit's CRCIN (crcin_ext) the
// low word; the high word is folded in first, combinationally, and the cells then
// fold in the low word, so a 64-bit word is absorbed in one clock.
//
// The cell structure and the polynomial follow the method. The byte-valid encoding
// (value w: bytes 0..w valid, counted from bit 0 of the 64-bit word), the order in
// which the two words of a CRC64 word are absorbed and the absence of any output
// inversion or bit reordering are this design's choices.
//
// Interface: CRCCLK with an active-edge option (clkinv = 1 clocks on the falling
// edge), CRCRESET (synchronous, loads CRC_INIT), CRCDATAVALID, CRCDATAWIDTH[2:0],
// CRCOUT[31:0] = the register. The register is not initialised at configuration.
module crc_engine
  import bist_pkg::*;
(
  input  logic        crcclk,
  input  logic        clkinv,        // configuration: 1 = falling-edge clocking
  input  logic        mode64,        // configuration: 1 = CRC64 mode
  input  logic [31:0] crc_init,      // configuration: CRC_INIT
  input  logic        crcreset,
  input  logic        crcdatavalid,
  input  logic [2:0]  crcdatawidth,
  input  logic [31:0] crcin,         // own CRCIN (high word of CRC64)
  input  logic [31:0] crcin_ext,     // partner's CRCIN (low word of CRC64)
  output logic [31:0] crcout
);
  logic        cclk;
  logic [31:0] q;
  logic [31:0] cell_qin;
  logic        cell_fb;
  logic [31:0] cell_din;

  // Bytes 0..nbytes-1 of a 32-bit word pass, the rest read as zero.
  function automatic logic [31:0] byte_mask(input logic [2:0] last_byte);
    logic [31:0] m;
    for (int b = 0; b < 4; b++) m[8*b +: 8] = (b <= int'(last_byte)) ? 8'hFF : 8'h00;
    return m;
  endfunction

  // One register step with a 32-bit data word, the same function as 32 unit cells.
  function automatic logic [31:0] crc_step(input logic [31:0] s, input logic [31:0] d);
    logic [31:0] n;
    n = {s[30:0], 1'b0} ^ (s[31] ? CRC32_POLY : 32'd0) ^ d;
    return n;
  endfunction

  always_comb begin
    logic [31:0] first;
    first = crc_step(q, crcin & byte_mask(crcdatawidth - 3'd4));
    if (!mode64) begin
      cell_qin = {q[30:0], 1'b0};
      cell_fb  = q[31];
      cell_din = crcin & byte_mask((crcdatawidth > 3'd3) ? 3'd3 : crcdatawidth);
    end else if (crcdatawidth > 3'd3) begin
      cell_qin = {first[30:0], 1'b0};
      cell_fb  = first[31];
      cell_din = crcin_ext;
    end else begin
      cell_qin = {q[30:0], 1'b0};
      cell_fb  = q[31];
      cell_din = crcin_ext & byte_mask(crcdatawidth);
    end
  end

  assign cclk = crcclk ^ clkinv;

  for (genvar i = 0; i < 32; i++) begin : g_cell
    crc_unit_cell #(.TAP(CRC32_POLY[i])) u_cell (
      .clk     (cclk),
      .qin     (cell_qin[i]),
      .feedback(cell_fb),
      .crcin   (cell_din[i]),
      .valid   (crcdatavalid),
      .reset   (crcreset),
      .init    (crc_init[i]),
      .q       (q[i])
    );
  end

  assign crcout = q;
endmodule

// crc_tpg: counter test pattern generator for the CRC module BIST.
//
// A binary up-counter (a DSP slice configured as a counter in the FPGA) whose bits
// are assigned to the CRC inputs as the method prescribes: bits 0-3 drive every
// fourth CRCIN bit (CRCIN[4k+j] = count[j]), bits 4-6 drive CRCDATAWIDTH, bit 7
// CRCDATAVALID, bit 8 CRCRESET and bit 9 the clock enable of the ORAs. With 10 bits
// the BIST sequence is 1,024 clocks: the ORAs are blind for the first 512 while
// CRCRESET (active in clocks 256-511) initialises the CRC registers, which the FPGA
// download does not do.
//
// Like every fabric flip-flop the counter is initialised to zero by the global
// set/reset of configuration (gsr). The sticky done flag, set when the counter wraps
// after the last pattern, is this design's addition for observing the end of the
// sequence. Timing: the count advances on every rising edge of clk.
module crc_tpg #(
  parameter int unsigned WIDTH  = 10,  // counter bits; the sequence is 2**WIDTH clocks
  parameter int unsigned CRC_IN = 64   // CRCIN bits driven
) (
  input  logic              clk,
  input  logic              gsr,          // configuration global set/reset, async
  output logic [CRC_IN-1:0] crcin,
  output logic [2:0]        crcdatawidth,
  output logic              crcdatavalid,
  output logic              crcreset,
  output logic              ora_ce,
  output logic              done,
  output logic [WIDTH-1:0]  count
);
  always_ff @(posedge clk or posedge gsr) begin
    if (gsr) begin
      count <= '0;
      done  <= 1'b0;
    end else begin
      count <= count + 1'b1;
      if (&count) done <= 1'b1;
    end
  end

  always_comb begin
    for (int i = 0; i < int'(CRC_IN); i++) crcin[i] = count[i % 4];
    crcdatawidth = count[6:4];
    crcdatavalid = count[7];
    crcreset     = count[WIDTH-2];
    ora_ce       = count[WIDTH-1];
  end
endmodule

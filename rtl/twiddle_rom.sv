// twiddle_rom: one of the two 256 x 40-bit twiddle-factor ROMs.
//
// Together the two ROMs hold W^k = exp(-j*2*pi*k/1024) for k = 0..511, the
// factors a radix-2 1024-point FFT needs. ROM 0 holds k = 0..255 and ROM 1
// holds k = 256..511. Each 40-bit word is {re, im}, 20 bits each, Q2.18:
//   re = round(2^18 * cos(2*pi*k/1024)),  im = round(-2^18 * sin(2*pi*k/1024))
// Reads are synchronous: rdata holds the word one cycle after re is high.
// Count and size follow the processor's description; the split of k between
// the two ROMs and the number format are this design's choices.
module twiddle_rom #(
  parameter int unsigned WORDS     = 256,
  parameter int unsigned W         = 40,
  parameter string       INIT_FILE = "rtl/twiddle_rom0.hex",
  localparam int unsigned AW       = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic          re,
  input  logic [AW-1:0] addr,
  output logic [W-1:0]  rdata
);

  logic [W-1:0] rom [WORDS];

  initial $readmemh(INIT_FILE, rom);

  always_ff @(posedge clk) begin
    if (re) rdata <= rom[addr];
  end

endmodule

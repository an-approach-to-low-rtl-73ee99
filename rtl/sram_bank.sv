// sram_bank: one array of the FFT main memory, 128 words x 36 bits, single
// ported.
//
// When en is high, a write (we = 1) stores wdata at addr at the clock edge,
// and a read (we = 0) returns mem[addr] on rdata one cycle later; rdata keeps
// its value while the array is not read. The size follows the processor's
// description; the single port and synchronous read are this design's
// choices (the hierarchical-bitline 6T circuit is not modelled).
module sram_bank #(
  parameter int unsigned WORDS = 128,
  parameter int unsigned W     = 36,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic          en,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [W-1:0]  wdata,
  output logic [W-1:0]  rdata
);

  logic [W-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end

endmodule

// cache_bank: one bank of the FFT data cache, 16 words x 40 bits, dual-ported
// (one write port and one read port usable in the same cycle).
//
// Writes happen at the rising clock edge when we is high. Reads are
// synchronous: rdata holds mem[raddr] one cycle after re is high and keeps
// its value otherwise. A read and a write of the same word in one cycle
// return the old word. Size and dual porting follow the processor's
// description; the synchronous read and the old-data rule are this design's
// choices (the circuit-level 10-transistor cell is not modelled).
module cache_bank #(
  parameter int unsigned WORDS = 16,
  parameter int unsigned W     = 40,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);

  logic [W-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

endmodule

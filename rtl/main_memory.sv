// main_memory: the 1024-word x 36-bit main data memory, built from eight
// 128 x 36-bit SRAM arrays (sram_bank).
//
// One access per cycle: address bits [9:7] pick the array, bits [6:0] the row,
// so only one array is active in any cycle. A read returns its word on rdata
// one cycle after en is high with we low. The total size and the eight
// arrays follow the processor's description; the address split and the
// single shared port are this design's choices.
module main_memory #(
  parameter int unsigned WORDS = 1024,
  parameter int unsigned BANKS = 8,
  parameter int unsigned W     = 36,
  localparam int unsigned AW   = $clog2(WORDS),
  localparam int unsigned BW   = $clog2(BANKS),
  localparam int unsigned RW   = AW - BW
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [W-1:0]  wdata,
  output logic [W-1:0]  rdata
);

  logic [W-1:0] q [BANKS];
  logic [BW-1:0] sel_q;

  for (genvar i = 0; i < int'(BANKS); i++) begin : g_arr
    sram_bank #(.WORDS(WORDS/BANKS), .W(W)) u_arr (
      .clk   (clk),
      .en    (en && addr[AW-1:RW] == BW'(i)),
      .we    (we),
      .addr  (addr[RW-1:0]),
      .wdata (wdata),
      .rdata (q[i])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         sel_q <= '0;
    else if (en && !we) sel_q <= addr[AW-1:RW];
  end

  assign rdata = q[sel_q];

endmodule

// ulpacc: core of the low-voltage accumulator test chip: a 16-word x 24-bit
// dual-ported memory feeding a 24-bit accumulator.
//
// Each cycle the memory can be written through its write port and read
// through its read port at the same time:
//   wr_en      : mem[wr_addr] <= wr_src ? acc : wr_data   (store the
//                accumulator, or load a word from outside)
//   acc_en     : mem[rd_addr] is read this cycle and added to acc in the
//                next one (acc wraps modulo 2^24)
//   acc_clr    : acc <= 0 (takes priority over an addition in the same cycle)
// acc is the accumulator register. A read of a word written in the same cycle
// returns the old word. The memory size, dual porting and accumulator width
// follow the test chip's description; the command interface is this design's
// choice (the chip's own controller and oscillator are not described), and
// the memory is the same dual-ported bank used for the FFT cache.
module ulpacc #(
  parameter int unsigned WORDS = 16,
  parameter int unsigned W     = 24,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          wr_en,
  input  logic          wr_src,
  input  logic [AW-1:0] wr_addr,
  input  logic [W-1:0]  wr_data,
  input  logic          acc_en,
  input  logic [AW-1:0] rd_addr,
  input  logic          acc_clr,
  output logic [W-1:0]  acc
);

  logic [W-1:0] rdata;
  logic         add_q;

  cache_bank #(.WORDS(WORDS), .W(W)) u_mem (
    .clk   (clk),
    .we    (wr_en),
    .waddr (wr_addr),
    .wdata (wr_src ? acc : wr_data),
    .re    (acc_en),
    .raddr (rd_addr),
    .rdata (rdata)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc   <= '0;
      add_q <= 1'b0;
    end else begin
      add_q <= acc_en;
      if (acc_clr)    acc <= '0;
      else if (add_q) acc <= acc + rdata;
    end
  end

endmodule

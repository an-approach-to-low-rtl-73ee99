// crossbar_rd: the CROSSB RD pipeline stage. It steers the words read from
// the two cache banks of the active set onto the butterfly's A and B inputs
// and registers them, together with the twiddle factor read in the same
// cycle.
//
// The two words of a butterfly always sit in different banks (bank = parity
// of the cache address), so a 2x2 swap is all the crossbar needs: swap = 1
// means A came from bank 1. One cycle of latency; valid is carried along.
// The stage itself is named in the processor's pipeline; its contents are
// this design's choice.
module crossbar_rd
  import spiffee_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic        swap,
  input  cache_word_t bank0_q,
  input  cache_word_t bank1_q,
  input  tw_word_t    w_in,
  output logic        out_valid,
  output cache_word_t a,
  output cache_word_t b,
  output tw_word_t    w
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      a         <= '0;
      b         <= '0;
      w         <= '0;
    end else begin
      out_valid <= in_valid;
      a         <= swap ? bank1_q : bank0_q;
      b         <= swap ? bank0_q : bank1_q;
      w         <= w_in;
    end
  end

endmodule

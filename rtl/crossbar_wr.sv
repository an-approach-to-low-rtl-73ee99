// crossbar_wr: the CROSSB WR pipeline stage. It steers the butterfly results
// X and Y to the cache bank that holds their address and registers the bank
// write ports, which the following MEM WR stage applies to the cache.
//
// X and Y go back to the addresses A and B came from, so they also land in
// different banks (bank = parity of the 5-bit cache address, row = its low
// four bits). One cycle of latency. The stage is named in the processor's
// pipeline; its contents are this design's choice.
module crossbar_wr
  import spiffee_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic             in_set,      // cache set being written
  input  logic [LOG2C-1:0] addr_x,
  input  logic [LOG2C-1:0] addr_y,
  input  cache_word_t      x,
  input  cache_word_t      y,
  output logic             we,
  output logic             set,
  output logic [LOG2C-2:0] row0,
  output logic [LOG2C-2:0] row1,
  output cache_word_t      data0,
  output cache_word_t      data1
);

  logic x_in_bank1;
  assign x_in_bank1 = cache_bank_of(addr_x);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      we    <= 1'b0;
      set   <= 1'b0;
      row0  <= '0;
      row1  <= '0;
      data0 <= '0;
      data1 <= '0;
    end else begin
      we    <= in_valid;
      set   <= in_set;
      row0  <= x_in_bank1 ? cache_row_of(addr_y) : cache_row_of(addr_x);
      row1  <= x_in_bank1 ? cache_row_of(addr_x) : cache_row_of(addr_y);
      data0 <= x_in_bank1 ? y : x;
      data1 <= x_in_bank1 ? x : y;
    end
  end

  // the two results of one butterfly must never target the same bank
  a_banks_differ: assert property (@(posedge clk) disable iff (!rst_n)
    in_valid |-> cache_bank_of(addr_x) != cache_bank_of(addr_y));

endmodule

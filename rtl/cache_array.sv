// cache_array: the FFT data cache, four 16 x 40-bit dual-ported banks
// organised as two sets of 32 words. While the butterfly datapath works in one
// set, the transfer side flushes the other set to main memory and loads it
// with the next group, so the datapath never waits for main memory.
//
// Within a set, word address c (5 bits) lives in bank parity(c) at row c[3:0];
// the two words of any butterfly therefore sit in different banks and can be
// read (and written back) in the same cycle.
//   datapath side : reads one row of each bank of dp_rd_set (dp_q0/dp_q1 one
//                   cycle later) and writes one row of each bank of dp_wr_set
//   transfer side : one word read (xf_q one cycle later) and one word written
//                   per cycle, addressed by the 5-bit cache address
// The datapath side has priority on a bank; the controller keeps the two
// sides in different sets, which the assertions check. Bank count and size
// follow the processor's description; the set organisation and the parity
// mapping are this design's choices.
module cache_array
  import spiffee_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  // datapath read
  input  logic             dp_re,
  input  logic             dp_rd_set,
  input  logic [LOG2C-2:0] dp_row0,
  input  logic [LOG2C-2:0] dp_row1,
  output cache_word_t      dp_q0,
  output cache_word_t      dp_q1,
  // datapath write
  input  logic             dp_we,
  input  logic             dp_wr_set,
  input  logic [LOG2C-2:0] dp_wrow0,
  input  logic [LOG2C-2:0] dp_wrow1,
  input  cache_word_t      dp_wdata0,
  input  cache_word_t      dp_wdata1,
  // transfer (main memory) side
  input  logic             xf_re,
  input  logic             xf_rd_set,
  input  logic [LOG2C-1:0] xf_raddr,
  output cache_word_t      xf_q,
  input  logic             xf_we,
  input  logic             xf_wr_set,
  input  logic [LOG2C-1:0] xf_waddr,
  input  cache_word_t      xf_wdata
);

  localparam int unsigned RW = LOG2C - 1;

  logic          b_we    [4];
  logic [RW-1:0] b_waddr [4];
  cache_word_t   b_wdata [4];
  logic          b_re    [4];
  logic [RW-1:0] b_raddr [4];
  cache_word_t   b_q     [4];

  logic          dp_rd_set_q;
  logic [1:0]    xf_bank_q;

  always_comb begin
    for (int bk = 0; bk < 4; bk++) begin
      logic bset, bpar;
      bset = bk[1];
      bpar = bk[0];
      // read port
      if (dp_re && bset == dp_rd_set) begin
        b_re[bk]    = 1'b1;
        b_raddr[bk] = bpar ? dp_row1 : dp_row0;
      end else if (xf_re && bset == xf_rd_set && bpar == cache_bank_of(xf_raddr)) begin
        b_re[bk]    = 1'b1;
        b_raddr[bk] = cache_row_of(xf_raddr);
      end else begin
        b_re[bk]    = 1'b0;
        b_raddr[bk] = '0;
      end
      // write port
      if (dp_we && bset == dp_wr_set) begin
        b_we[bk]    = 1'b1;
        b_waddr[bk] = bpar ? dp_wrow1 : dp_wrow0;
        b_wdata[bk] = bpar ? dp_wdata1 : dp_wdata0;
      end else if (xf_we && bset == xf_wr_set && bpar == cache_bank_of(xf_waddr)) begin
        b_we[bk]    = 1'b1;
        b_waddr[bk] = cache_row_of(xf_waddr);
        b_wdata[bk] = xf_wdata;
      end else begin
        b_we[bk]    = 1'b0;
        b_waddr[bk] = '0;
        b_wdata[bk] = '0;
      end
    end
  end

  for (genvar bk = 0; bk < 4; bk++) begin : g_bank
    cache_bank #(.WORDS(CWORDS/2), .W($bits(cache_word_t))) u_bank (
      .clk   (clk),
      .we    (b_we[bk]),
      .waddr (b_waddr[bk]),
      .wdata (b_wdata[bk]),
      .re    (b_re[bk]),
      .raddr (b_raddr[bk]),
      .rdata (b_q[bk])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dp_rd_set_q <= 1'b0;
      xf_bank_q   <= '0;
    end else begin
      if (dp_re) dp_rd_set_q <= dp_rd_set;
      if (xf_re) xf_bank_q   <= {xf_rd_set, cache_bank_of(xf_raddr)};
    end
  end

  assign dp_q0 = b_q[{dp_rd_set_q, 1'b0}];
  assign dp_q1 = b_q[{dp_rd_set_q, 1'b1}];
  assign xf_q  = b_q[xf_bank_q];

  a_rd_sets_differ: assert property (@(posedge clk) disable iff (!rst_n)
    (dp_re && xf_re) |-> dp_rd_set != xf_rd_set);
  a_wr_sets_differ: assert property (@(posedge clk) disable iff (!rst_n)
    (dp_we && xf_we) |-> dp_wr_set != xf_wr_set);

endmodule

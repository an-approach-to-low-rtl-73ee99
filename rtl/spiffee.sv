// spiffee: single-chip 1024-point complex FFT processor built around the
// cached FFT algorithm.
//
// The 1024 x 36-bit main memory (eight 128-word arrays) holds the data. The
// transform runs in two epochs; in each, 32-word groups are copied into one
// of two 32-word cache sets (four 16 x 40-bit banks) where five radix-2
// passes run out of the cache before the group is written back, so the
// butterfly unit works from the small, cheap-to-access cache rather than the
// large memory. A 9-stage pipeline completes one butterfly per cycle:
//   MEM RD, CROSSB RD, MULT1, MULT2, MULT3, ADD/SUB CMULT, ADD/SUB XY,
//   CROSSB WR, MEM WR
// Twiddle factors come from two 256 x 40-bit ROMs. The controller inserts a
// one-cycle bubble when a butterfly needs a result still in the pipeline.
//
// Clocking: osc_sel = 0 runs the chip from ext_clk, osc_sel = 1 from the
// on-chip programmable oscillator (period set by osc_ctrl). The selected
// clock is brought out on clk_mon; all other signals are synchronous to it.
//
// Host interface (only while busy is low): host_en with host_we = 1 writes
// input sample host_addr (natural order; it is stored at the bit-reversed
// address); host_en with host_we = 0 reads output bin host_addr, returned on
// host_rdata one cycle later. Samples and results are 18-bit re/im, Q1.17.
// start begins a transform; busy stays high until it is complete and done
// pulses once. The result is DFT(x)/1024 (every stage halves), in natural
// order. The memories, pipeline stages and clock selection follow the
// processor's description; the host interface and number formats are this
// design's choices.
//
// The ua_* ports belong to a separate design kept beside the processor: the
// core of a low-voltage test chip, a 16 x 24-bit dual-ported memory and a
// 24-bit accumulator (see ulpacc), with its own clock and reset.
module spiffee
  import spiffee_pkg::*;
(
  input  logic             ext_clk,
  input  logic             rst_n,
  input  logic             osc_sel,
  input  logic [3:0]       osc_ctrl,
  output logic             clk_mon,
  input  logic             start,
  output logic             busy,
  output logic             done,
  input  logic             host_en,
  input  logic             host_we,
  input  logic [LOG2N-1:0] host_addr,
  input  mem_word_t        host_wdata,
  output mem_word_t        host_rdata,
  // accumulator test chip, side by side with the FFT processor
  input  logic             ua_clk,
  input  logic             ua_rst_n,
  input  logic             ua_wr_en,
  input  logic             ua_wr_src,
  input  logic [3:0]       ua_wr_addr,
  input  logic [23:0]      ua_wr_data,
  input  logic             ua_acc_en,
  input  logic [3:0]       ua_rd_addr,
  input  logic             ua_acc_clr,
  output logic [23:0]      ua_acc
);

  // ------------------------------------------------------------ clocking
  logic osc_clk, clk;

  prog_oscillator #(.CTRL_W(4)) u_osc (
    .enable (osc_sel),
    .ctrl   (osc_ctrl),
    .clk_out(osc_clk)
  );

  assign clk     = osc_sel ? osc_clk : ext_clk;
  assign clk_mon = clk;

  // ---------------------------------------------------------- controller
  logic             rd_en, rd_set, tw_re;
  logic [LOG2C-2:0] rd_row0, rd_row1;
  logic [LOG2N-2:0] tw_addr;
  logic             xb_valid, xb_swap;
  logic             wb_valid, wb_set;
  logic [LOG2C-1:0] wb_addr_x, wb_addr_y;
  logic             c_mem_en, c_mem_we;
  logic [LOG2N-1:0] c_mem_addr;
  mem_word_t        c_mem_wdata, mem_rdata;
  logic             xf_re, xf_rd_set, xf_we, xf_wr_set;
  logic [LOG2C-1:0] xf_raddr, xf_waddr;
  cache_word_t      xf_q, xf_wdata;
  logic             ev_stall, ev_wait_load, ev_group_end;

  fft_controller u_ctrl (
    .clk, .rst_n, .start, .busy, .done,
    .rd_en, .rd_set, .rd_row0, .rd_row1, .tw_re, .tw_addr,
    .xb_valid, .xb_swap,
    .wb_valid, .wb_set, .wb_addr_x, .wb_addr_y,
    .mem_en(c_mem_en), .mem_we(c_mem_we), .mem_addr(c_mem_addr),
    .mem_wdata(c_mem_wdata), .mem_rdata(mem_rdata),
    .xf_re, .xf_rd_set, .xf_raddr, .xf_q, .xf_we, .xf_wr_set, .xf_waddr, .xf_wdata,
    .ev_stall, .ev_wait_load, .ev_group_end
  );

  // --------------------------------------------------------- main memory
  logic             m_en, m_we;
  logic [LOG2N-1:0] m_addr;
  mem_word_t        m_wdata;

  always_comb begin
    if (busy) begin
      m_en    = c_mem_en;
      m_we    = c_mem_we;
      m_addr  = c_mem_addr;
      m_wdata = c_mem_wdata;
    end else begin
      m_en    = host_en;
      m_we    = host_we;
      m_addr  = host_we ? bitrev(host_addr) : host_addr;
      m_wdata = host_wdata;
    end
  end

  main_memory #(.WORDS(N), .BANKS(8), .W($bits(mem_word_t))) u_mem (
    .clk, .rst_n, .en(m_en), .we(m_we), .addr(m_addr), .wdata(m_wdata), .rdata(mem_rdata)
  );

  assign host_rdata = mem_rdata;

  // --------------------------------------------------------------- cache
  logic             cw_we, cw_set;
  logic [LOG2C-2:0] cw_row0, cw_row1;
  cache_word_t      cw_data0, cw_data1, dp_q0, dp_q1;

  cache_array u_cache (
    .clk, .rst_n,
    .dp_re(rd_en), .dp_rd_set(rd_set), .dp_row0(rd_row0), .dp_row1(rd_row1),
    .dp_q0, .dp_q1,
    .dp_we(cw_we), .dp_wr_set(cw_set), .dp_wrow0(cw_row0), .dp_wrow1(cw_row1),
    .dp_wdata0(cw_data0), .dp_wdata1(cw_data1),
    .xf_re, .xf_rd_set, .xf_raddr, .xf_q, .xf_we, .xf_wr_set, .xf_waddr, .xf_wdata
  );

  // -------------------------------------------------------- twiddle ROMs
  logic [$bits(tw_word_t)-1:0] rom_q [2];
  logic                        rom_sel_q;
  tw_word_t                    w_rd;

  twiddle_rom #(.INIT_FILE("rtl/twiddle_rom0.hex")) u_rom0 (
    .clk, .re(tw_re && !tw_addr[LOG2N-2]), .addr(tw_addr[LOG2N-3:0]), .rdata(rom_q[0])
  );
  twiddle_rom #(.INIT_FILE("rtl/twiddle_rom1.hex")) u_rom1 (
    .clk, .re(tw_re && tw_addr[LOG2N-2]), .addr(tw_addr[LOG2N-3:0]), .rdata(rom_q[1])
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     rom_sel_q <= 1'b0;
    else if (tw_re) rom_sel_q <= tw_addr[LOG2N-2];
  end

  assign w_rd = rom_q[rom_sel_q];

  // ------------------------------------------------------------ datapath
  logic        dp_in_valid, dp_out_valid;
  cache_word_t a, b, x, y;
  tw_word_t    w;

  crossbar_rd u_xbr (
    .clk, .rst_n, .in_valid(xb_valid), .swap(xb_swap),
    .bank0_q(dp_q0), .bank1_q(dp_q1), .w_in(w_rd),
    .out_valid(dp_in_valid), .a, .b, .w
  );

  bfly_datapath u_dp (
    .clk, .rst_n, .in_valid(dp_in_valid), .a, .b, .w,
    .out_valid(dp_out_valid), .x, .y
  );

  crossbar_wr u_xbw (
    .clk, .rst_n, .in_valid(wb_valid), .in_set(wb_set),
    .addr_x(wb_addr_x), .addr_y(wb_addr_y), .x, .y,
    .we(cw_we), .set(cw_set), .row0(cw_row0), .row1(cw_row1),
    .data0(cw_data0), .data1(cw_data1)
  );

  // ------------------------------------------- accumulator test chip
  ulpacc u_ulpacc (
    .clk(ua_clk), .rst_n(ua_rst_n), .wr_en(ua_wr_en), .wr_src(ua_wr_src),
    .wr_addr(ua_wr_addr), .wr_data(ua_wr_data), .acc_en(ua_acc_en),
    .rd_addr(ua_rd_addr), .acc_clr(ua_acc_clr), .acc(ua_acc)
  );

  // the datapath's results must line up with the controller's write-back slot
  a_wb_aligned: assert property (@(posedge clk) disable iff (!rst_n)
    dp_out_valid == wb_valid);

endmodule

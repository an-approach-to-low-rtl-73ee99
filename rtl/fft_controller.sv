// fft_controller: sequencing for the cached 1024-point FFT.
//
// The transform is done in EPOCHS = 2 epochs. In each epoch the 1024 words are
// processed as 32 groups of 32 words; a group is copied from main memory into
// one cache set, all 5 radix-2 passes that touch only those 32 words are run
// in the cache (16 butterflies per pass, 80 per group), and the group is
// written back. Epoch 0 groups are 32 consecutive addresses, epoch 1 groups
// are addresses g + 32*i. Main memory holds the input in bit-reversed order,
// so the decimation-in-time passes (spans 1..512) leave the result in natural
// order. Group k (k = 0..63 counting both epochs) uses cache set k[0].
//
// Two engines run side by side:
//   issue engine    : one butterfly per cycle into the 9-stage pipeline. For
//                     pass p, butterfly b: A = b with a 0 inserted at bit p,
//                     B = A + 2^p; twiddle exponent (j mod 2^s) << (9-s) for
//                     global stage s = 5*epoch + p and global index j. A
//                     butterfly whose operands are still being computed in
//                     the pipeline (a read-after-write hazard) is held back
//                     one cycle and a bubble issued instead ("stall").
//   transfer engine : flushes finished groups from the idle set to main
//                     memory and loads the next groups, one word per cycle
//                     (33 cycles per group). A group of epoch 1 is loaded
//                     only after the last group of epoch 0 is back in memory.
// Pipeline timing: a butterfly issued in cycle t reads the cache and ROM in
// t (MEM RD), is steered in t+1 (CROSSB RD, xb_* outputs), and writes back in
// t+8 (MEM WR); wb_* present its write-back addresses in t+7 (CROSSB WR).
// A read in cycle t sees a write made in cycle t-1 or earlier, so a hazard is
// any match with the 8 butterflies issued in t-8 .. t-1.
// start begins a transform (ignored while busy); done pulses for one cycle
// when the last group is back in main memory. The epoch/group/pass structure,
// one butterfly per cycle and the pipeline stages follow the processor's
// description; the group ordering, the butterfly order inside a pass, the
// single-word transfer engine and all handshakes are this design's choices.
module fft_controller
  import spiffee_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  output logic             busy,
  output logic             done,
  // issue (MEM RD)
  output logic             rd_en,
  output logic             rd_set,
  output logic [LOG2C-2:0] rd_row0,
  output logic [LOG2C-2:0] rd_row1,
  output logic             tw_re,
  output logic [LOG2N-2:0] tw_addr,
  // CROSSB RD
  output logic             xb_valid,
  output logic             xb_swap,
  // CROSSB WR
  output logic             wb_valid,
  output logic             wb_set,
  output logic [LOG2C-1:0] wb_addr_x,
  output logic [LOG2C-1:0] wb_addr_y,
  // transfer: main memory
  output logic             mem_en,
  output logic             mem_we,
  output logic [LOG2N-1:0] mem_addr,
  output mem_word_t        mem_wdata,
  input  mem_word_t        mem_rdata,
  // transfer: cache
  output logic             xf_re,
  output logic             xf_rd_set,
  output logic [LOG2C-1:0] xf_raddr,
  input  cache_word_t      xf_q,
  output logic             xf_we,
  output logic             xf_wr_set,
  output logic [LOG2C-1:0] xf_waddr,
  output cache_word_t      xf_wdata,
  // events
  output logic             ev_stall,      // a hazard bubble was issued
  output logic             ev_wait_load,  // issue idle, next group not loaded
  output logic             ev_group_end   // last butterfly of a group issued
);

  localparam int unsigned NGRP_ALL = EPOCHS * GROUPS;   // 64
  localparam int unsigned KW       = $clog2(NGRP_ALL) + 1;
  localparam int unsigned NPASS    = LOG2C;
  localparam int unsigned BW       = $clog2(BFLY_PER_PASS);
  localparam int unsigned WB_POS   = PIPE_DEPTH - 2;    // CROSSB WR
  localparam int unsigned HZ_DEPTH = PIPE_DEPTH - 1;    // stages after MEM RD

  typedef struct packed {
    logic             valid;
    logic             set;
    logic             swap;
    logic [LOG2C-1:0] ax;
    logic [LOG2C-1:0] ay;
  } meta_t;

  typedef enum logic [1:0] {X_IDLE, X_LOAD, X_FLUSH} xstate_e;

  logic          running;
  logic [KW-1:0] nc, nl, nf;    // next group to compute / load / flush
  logic [2:0]    pass;
  logic [BW-1:0] bf;
  xstate_e       xs;
  logic [LOG2C:0] xi;
  logic [KW-2:0] xg;
  meta_t         meta [1:HZ_DEPTH];

  // ---------------------------------------------------------------- issue
  logic             can_issue, hazard, issue;
  logic [LOG2C-1:0] ca, cb, low_mask;
  logic [LOG2N-2:0] tw_e;
  logic [LOG2C-1:0] g_cur;
  logic             ep_cur;

  assign g_cur  = nc[LOG2C-1:0];
  assign ep_cur = nc[LOG2C];

  always_comb begin
    logic [LOG2C-1:0] lo;
    low_mask = LOG2C'((1 << pass) - 1);
    lo       = LOG2C'(bf) & low_mask;
    ca       = ((LOG2C'(bf) & ~low_mask) << 1) | lo;
    cb       = ca | LOG2C'(1 << pass);
    if (!ep_cur)
      tw_e = (LOG2N-1)'(ca & low_mask) << (LOG2N - 1 - 32'(pass));
    else
      tw_e = (LOG2N-1)'({ca & low_mask, g_cur}) << (LOG2C - 1 - 32'(pass));
  end

  always_comb begin
    hazard = 1'b0;
    for (int i = 1; i <= int'(HZ_DEPTH); i++)
      if (meta[i].valid && meta[i].set == nc[0] &&
          (meta[i].ax == ca || meta[i].ax == cb || meta[i].ay == ca || meta[i].ay == cb))
        hazard = 1'b1;
  end

  assign can_issue = running && (nc < KW'(NGRP_ALL)) && (nl > nc);
  assign issue     = can_issue && !hazard;

  assign rd_en   = issue;
  assign rd_set  = nc[0];
  assign rd_row0 = cache_bank_of(ca) ? cache_row_of(cb) : cache_row_of(ca);
  assign rd_row1 = cache_bank_of(ca) ? cache_row_of(ca) : cache_row_of(cb);
  assign tw_re   = issue;
  assign tw_addr = tw_e;

  assign ev_stall     = can_issue && hazard;
  assign ev_wait_load = running && (nc < KW'(NGRP_ALL)) && !(nl > nc);
  assign ev_group_end = issue && pass == 3'(NPASS - 1) && bf == '1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 1; i <= int'(HZ_DEPTH); i++) meta[i] <= '0;
    end else begin
      meta[1] <= '{valid: issue, set: nc[0], swap: cache_bank_of(ca), ax: ca, ay: cb};
      for (int i = 2; i <= int'(HZ_DEPTH); i++) meta[i] <= meta[i-1];
    end
  end

  assign xb_valid  = meta[1].valid;
  assign xb_swap   = meta[1].swap;
  assign wb_valid  = meta[WB_POS].valid;
  assign wb_set    = meta[WB_POS].set;
  assign wb_addr_x = meta[WB_POS].ax;
  assign wb_addr_y = meta[WB_POS].ay;

  // ------------------------------------------------------------- transfer
  logic load_ok, flush_ok, set_pending;

  always_comb begin
    set_pending = 1'b0;
    for (int i = 1; i <= int'(HZ_DEPTH); i++)
      if (meta[i].valid && meta[i].set == nf[0]) set_pending = 1'b1;
  end

  assign load_ok  = (nl < KW'(NGRP_ALL)) && (nl <= nf + 1'b1) &&
                    (nl < KW'(GROUPS) || nf >= KW'(GROUPS));
  assign flush_ok = (nf < KW'(NGRP_ALL)) && (nc > nf) && !set_pending;

  // main-memory address of word i of group k
  function automatic logic [LOG2N-1:0] grp_addr(logic [KW-2:0] k, logic [LOG2C-1:0] i);
    if (!k[LOG2C]) return {k[LOG2C-1:0], i};
    else           return {i, k[LOG2C-1:0]};
  endfunction

  logic [LOG2C-1:0] xi_lo, xi_prev;
  assign xi_lo   = xi[LOG2C-1:0];
  assign xi_prev = xi_lo - 1'b1;

  always_comb begin
    mem_en    = 1'b0;
    mem_we    = 1'b0;
    mem_addr  = '0;
    mem_wdata = '0;
    xf_re     = 1'b0;
    xf_rd_set = xg[0];
    xf_raddr  = xi_lo;
    xf_we     = 1'b0;
    xf_wr_set = xg[0];
    xf_waddr  = xi_prev;
    xf_wdata  = mem_to_cache(mem_rdata);
    unique case (xs)
      X_LOAD: begin
        // read main memory word xi, write the word read last cycle to the cache
        mem_en   = !xi[LOG2C];
        mem_addr = grp_addr(xg, xi_lo);
        xf_we    = (xi != '0);
      end
      X_FLUSH: begin
        // read cache word xi, write the word read last cycle to main memory
        xf_re     = !xi[LOG2C];
        mem_en    = (xi != '0);
        mem_we    = (xi != '0);
        mem_addr  = grp_addr(xg, xi_prev);
        mem_wdata = cache_to_mem(xf_q);
      end
      default: ;
    endcase
  end

  // ---------------------------------------------------------------- state
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0;
      done    <= 1'b0;
      nc      <= '0;
      nl      <= '0;
      nf      <= '0;
      pass    <= '0;
      bf      <= '0;
      xs      <= X_IDLE;
      xi      <= '0;
      xg      <= '0;
    end else begin
      done <= 1'b0;
      if (!running) begin
        if (start) begin
          running <= 1'b1;
          nc      <= '0;
          nl      <= '0;
          nf      <= '0;
          pass    <= '0;
          bf      <= '0;
          xs      <= X_IDLE;
        end
      end else begin
        // issue engine
        if (issue) begin
          bf <= bf + 1'b1;
          if (bf == '1) begin
            if (pass == 3'(NPASS - 1)) begin
              pass <= '0;
              nc   <= nc + 1'b1;
            end else begin
              pass <= pass + 1'b1;
            end
          end
        end
        // transfer engine
        unique case (xs)
          X_IDLE: begin
            xi <= '0;
            if (load_ok) begin
              xs <= X_LOAD;
              xg <= nl[KW-2:0];
            end else if (flush_ok) begin
              xs <= X_FLUSH;
              xg <= nf[KW-2:0];
            end else if (nf == KW'(NGRP_ALL)) begin
              running <= 1'b0;
              done    <= 1'b1;
            end
          end
          X_LOAD: begin
            xi <= xi + 1'b1;
            if (xi == (LOG2C+1)'(CWORDS)) begin
              xs <= X_IDLE;
              nl <= nl + 1'b1;
            end
          end
          X_FLUSH: begin
            xi <= xi + 1'b1;
            if (xi == (LOG2C+1)'(CWORDS)) begin
              xs <= X_IDLE;
              nf <= nf + 1'b1;
            end
          end
          default: xs <= X_IDLE;
        endcase
      end
    end
  end

  assign busy = running;

  // the issue engine must never read a set the transfer engine is loading
  a_no_load_conflict: assert property (@(posedge clk) disable iff (!rst_n)
    (xs == X_LOAD && rd_en) |-> xg[0] != rd_set);

endmodule

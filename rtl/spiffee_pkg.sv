// spiffee_pkg: sizes, number formats and small helper functions shared by the
// 1024-point cached-FFT processor.
//
// Number formats (each component of a complex word is two's complement):
//   main memory word : 18-bit re + 18-bit im, Q1.17   (36 bits per word)
//   cache word       : 20-bit re + 20-bit im, Q1.19   (40 bits per word)
//   twiddle factor   : 20-bit re + 20-bit im, Q2.18   (1.0 = 2^18)
//   datapath values  : 24-bit,                 Q3.21
// The word widths (36, 40, 20x20 multiply, 24-bit product and adders) follow
// the processor's description; the placement of the binary point is this
// design's choice.
package spiffee_pkg;

  // Transform and cached-FFT geometry
  localparam int unsigned N        = 1024;  // transform length
  localparam int unsigned LOG2N    = 10;
  localparam int unsigned EPOCHS   = 2;     // passes through main memory
  localparam int unsigned CWORDS   = 32;    // words per cache set, N^(1/EPOCHS)
  localparam int unsigned LOG2C    = 5;     // radix-2 passes per group
  localparam int unsigned GROUPS   = N / CWORDS;       // groups per epoch
  localparam int unsigned BFLY_PER_PASS = CWORDS / 2;  // 16
  localparam int unsigned PIPE_DEPTH    = 9;           // MEM RD .. MEM WR

  // Word widths
  localparam int unsigned MEM_W   = 18;  // per component in main memory
  localparam int unsigned CACHE_W = 20;  // per component in the cache
  localparam int unsigned TW_W    = 20;  // per component of a twiddle factor
  localparam int unsigned DP_W    = 24;  // multiplier product / adder width

  typedef struct packed {
    logic signed [MEM_W-1:0] re;
    logic signed [MEM_W-1:0] im;
  } mem_word_t;

  typedef struct packed {
    logic signed [CACHE_W-1:0] re;
    logic signed [CACHE_W-1:0] im;
  } cache_word_t;

  typedef struct packed {
    logic signed [TW_W-1:0] re;
    logic signed [TW_W-1:0] im;
  } tw_word_t;

  // Main-memory word to cache word: two guard bits are appended.
  function automatic cache_word_t mem_to_cache(mem_word_t m);
    cache_word_t c;
    c.re = {m.re, 2'b00};
    c.im = {m.im, 2'b00};
    return c;
  endfunction

  // Round one 20-bit cache component to 18 bits, saturating.
  function automatic logic signed [MEM_W-1:0] round_sat18(logic signed [CACHE_W-1:0] v);
    logic signed [CACHE_W:0] r;
    r = (CACHE_W+1)'(v) + (CACHE_W+1)'(2);
    r = r >>> 2;
    if (r > (CACHE_W+1)'(2**(MEM_W-1) - 1))
      return MEM_W'(2**(MEM_W-1) - 1);
    else if (r < -(CACHE_W+1)'(2**(MEM_W-1)))
      return MEM_W'(-(2**(MEM_W-1)));
    else
      return r[MEM_W-1:0];
  endfunction

  // Cache word to main-memory word (round to nearest, saturate).
  function automatic mem_word_t cache_to_mem(cache_word_t c);
    mem_word_t m;
    m.re = round_sat18(c.re);
    m.im = round_sat18(c.im);
    return m;
  endfunction

  // Cache address to bank: the two words of a butterfly differ in exactly one
  // address bit, so the parity of the address puts them in different banks.
  function automatic logic cache_bank_of(logic [LOG2C-1:0] a);
    return ^a;
  endfunction

  function automatic logic [LOG2C-2:0] cache_row_of(logic [LOG2C-1:0] a);
    return a[LOG2C-2:0];
  endfunction

  // 10-bit bit reversal (input reordering for the decimation-in-time FFT)
  function automatic logic [LOG2N-1:0] bitrev(logic [LOG2N-1:0] a);
    logic [LOG2N-1:0] r;
    for (int i = 0; i < int'(LOG2N); i++) r[i] = a[LOG2N-1-i];
    return r;
  endfunction

endpackage

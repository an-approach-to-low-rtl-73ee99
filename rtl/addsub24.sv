// addsub24: 24-bit two's complement adder/subtractor built as carry-lookahead
// groups connected by a ripple carry ("CLA-ripple").
//
// sum = a + b when sub = 0, a - b when sub = 1 (b is inverted and the carry-in
// set). Each GROUP-bit slice forms bit generate/propagate signals and computes
// all of its internal carries by lookahead; the group carry-out ripples into
// the next group. Purely combinational: the surrounding pipeline registers the
// result. The width and the CLA-ripple structure follow the processor's
// description; the 4-bit group size is this design's choice.
//
// Ports: a, b (W bits), sub, sum (W bits, wraps modulo 2^W), cout.
module addsub24 #(
  parameter int unsigned W     = 24,
  parameter int unsigned GROUP = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         sub,
  output logic [W-1:0] sum,
  output logic         cout
);

  localparam int unsigned NGRP = (W + GROUP - 1) / GROUP;

  logic [W-1:0]  bx;
  logic [W-1:0]  g, p;
  logic [W:0]    c;     // c[i] is the carry into bit i

  assign bx = b ^ {W{sub}};
  assign g  = a & bx;
  assign p  = a ^ bx;

  always_comb begin
    logic cin;
    cin = sub;
    c   = '0;
    for (int k = 0; k < int'(NGRP); k++) begin
      c[k * int'(GROUP)] = cin;
      // lookahead inside group k: c[i+1] = g[i] | p[i]&g[i-1] | ... | p[i..lo]&cin
      for (int i = k * int'(GROUP); i < (k + 1) * int'(GROUP) && i < int'(W); i++) begin
        logic term;
        logic prop;
        term = g[i];
        prop = p[i];
        for (int j = i - 1; j >= k * int'(GROUP); j--) begin
          term = term | (prop & g[j]);
          prop = prop & p[j];
        end
        c[i+1] = term | (prop & cin);
      end
      // the group carry-out ripples into the next group
      cin = c[((k + 1) * int'(GROUP) < int'(W)) ? (k + 1) * int'(GROUP) : int'(W)];
    end
  end

  assign sum  = p ^ c[W-1:0];
  assign cout = c[W];

endmodule

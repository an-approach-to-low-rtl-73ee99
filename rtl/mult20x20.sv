// mult20x20: pipelined two's complement multiplier, 20 x 20 bits with a
// rounded 24-bit product, spread over the three multiply stages (MULT1..MULT3)
// of the butterfly pipeline.
//
//   MULT1: two partial products, a * (unsigned low half of b) and
//          a * (signed high half of b)
//   MULT2: the partial products are aligned and summed into the full
//          (A_W+B_W)-bit product
//   MULT3: the product is rounded to nearest at bit DROP and the P_W bits
//          above it are kept
// Latency is 3 clock cycles, one new operand pair per cycle; in_valid is
// carried alongside to out_valid. The operand and product widths and the
// three stages follow the processor's description; the split into two
// partial products and the rounding are this design's choices.
// With a in Q1.19 and b in Q2.18, DROP = 16 gives the product in Q3.21.
module mult20x20 #(
  parameter int unsigned A_W  = 20,
  parameter int unsigned B_W  = 20,
  parameter int unsigned P_W  = 24,
  parameter int unsigned DROP = 16
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic signed [A_W-1:0] a,
  input  logic signed [B_W-1:0] b,
  output logic                  out_valid,
  output logic signed [P_W-1:0] p
);

  localparam int unsigned LO_W = B_W / 2;
  localparam int unsigned HI_W = B_W - LO_W;
  localparam int unsigned F_W  = A_W + B_W;

  logic signed [A_W+LO_W:0]   pp_lo_q;   // a * {0, b_lo}
  logic signed [A_W+HI_W-1:0] pp_hi_q;   // a * b_hi
  logic signed [F_W-1:0]      full_q;
  logic [2:0]                 v_q;

  logic signed [LO_W:0]  b_lo;
  logic signed [HI_W-1:0] b_hi;
  logic signed [F_W:0]   rnd;

  assign b_lo = $signed({1'b0, b[LO_W-1:0]});
  assign b_hi = b[B_W-1:LO_W];
  assign rnd  = (F_W+1)'(full_q) + (F_W+1)'(2**(DROP-1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pp_lo_q <= '0;
      pp_hi_q <= '0;
      full_q  <= '0;
      p       <= '0;
      v_q     <= '0;
    end else begin
      // MULT1
      pp_lo_q <= (A_W+LO_W+1)'(a) * (A_W+LO_W+1)'(b_lo);
      pp_hi_q <= (A_W+HI_W)'(a) * (A_W+HI_W)'(b_hi);
      // MULT2
      full_q  <= (F_W'(pp_hi_q) <<< LO_W) + F_W'(pp_lo_q);
      // MULT3
      p       <= rnd[DROP+P_W-1:DROP];
      v_q     <= {v_q[1:0], in_valid};
    end
  end

  assign out_valid = v_q[2];

endmodule

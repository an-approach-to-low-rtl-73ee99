// bfly_datapath: radix-2 decimation-in-time butterfly, one per clock cycle,
//   X = (A + B*W) / 2,   Y = (A - B*W) / 2
// built from four 20x20 multipliers and six 24-bit adder/subtractors.
//
// Pipeline (stage names of the processor's 9-stage pipeline):
//   MULT1..MULT3   Bre*Wre, Bim*Wim, Bre*Wim, Bim*Wre        (mult20x20 x4)
//   ADD/SUB CMULT  BWre = Bre*Wre - Bim*Wim, BWim = Bre*Wim + Bim*Wre
//   ADD/SUB XY     X = A + BW, Y = A - BW, each halved with rounding and
//                  saturated back to the 20-bit cache format, registered
// A, B and W are sampled when in_valid is high; X and Y appear 5 cycles later
// with out_valid. A is delayed through the multiply stages in registers.
// The operation counts and stage order follow the processor's description;
// the halving in every stage (so a 1024-point transform returns DFT/1024
// without overflow for inputs of magnitude below 1) is this design's choice.
module bfly_datapath
  import spiffee_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  cache_word_t a,
  input  cache_word_t b,
  input  tw_word_t    w,
  output logic        out_valid,
  output cache_word_t x,
  output cache_word_t y
);

  typedef logic signed [DP_W-1:0] dp_t;

  // ---------------- MULT1..MULT3
  dp_t  p_rr, p_ii, p_ri, p_ir;
  logic v_rr, v_ii, v_ri, v_ir;

  mult20x20 u_mul_rr (.clk, .rst_n, .in_valid, .a(b.re), .b(w.re), .out_valid(v_rr), .p(p_rr));
  mult20x20 u_mul_ii (.clk, .rst_n, .in_valid, .a(b.im), .b(w.im), .out_valid(v_ii), .p(p_ii));
  mult20x20 u_mul_ri (.clk, .rst_n, .in_valid, .a(b.re), .b(w.im), .out_valid(v_ri), .p(p_ri));
  mult20x20 u_mul_ir (.clk, .rst_n, .in_valid, .a(b.im), .b(w.re), .out_valid(v_ir), .p(p_ir));

  // A travels alongside the multipliers (3 stages) and the CMULT stage
  cache_word_t a_d [4];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 4; i++) a_d[i] <= '0;
    end else begin
      a_d[0] <= a;
      for (int i = 1; i < 4; i++) a_d[i] <= a_d[i-1];
    end
  end

  // ---------------- ADD/SUB CMULT
  dp_t  bw_re_c, bw_im_c, bw_re_q, bw_im_q;
  logic v_cm;

  addsub24 u_add_cre (.a(p_rr), .b(p_ii), .sub(1'b1), .sum(bw_re_c), .cout());
  addsub24 u_add_cim (.a(p_ri), .b(p_ir), .sub(1'b0), .sum(bw_im_c), .cout());

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bw_re_q <= '0;
      bw_im_q <= '0;
      v_cm    <= 1'b0;
    end else begin
      bw_re_q <= bw_re_c;
      bw_im_q <= bw_im_c;
      v_cm    <= v_rr & v_ii & v_ri & v_ir;
    end
  end

  // ---------------- ADD/SUB XY
  dp_t a_re_x, a_im_x;           // A in Q3.21
  dp_t x_re_c, x_im_c, y_re_c, y_im_c;

  assign a_re_x = {{(DP_W-CACHE_W-2){a_d[3].re[CACHE_W-1]}}, a_d[3].re, 2'b00};
  assign a_im_x = {{(DP_W-CACHE_W-2){a_d[3].im[CACHE_W-1]}}, a_d[3].im, 2'b00};

  addsub24 u_add_xre (.a(a_re_x), .b(bw_re_q), .sub(1'b0), .sum(x_re_c), .cout());
  addsub24 u_add_xim (.a(a_im_x), .b(bw_im_q), .sub(1'b0), .sum(x_im_c), .cout());
  addsub24 u_add_yre (.a(a_re_x), .b(bw_re_q), .sub(1'b1), .sum(y_re_c), .cout());
  addsub24 u_add_yim (.a(a_im_x), .b(bw_im_q), .sub(1'b1), .sum(y_im_c), .cout());

  // Q3.21 -> halve -> Q1.19: divide by 8 with round to nearest, saturate
  function automatic logic signed [CACHE_W-1:0] halve_sat(dp_t v);
    logic signed [DP_W:0] r;
    r = (DP_W+1)'(v) + (DP_W+1)'(4);
    r = r >>> 3;
    if (r > (DP_W+1)'(2**(CACHE_W-1) - 1))   return CACHE_W'(2**(CACHE_W-1) - 1);
    else if (r < -(DP_W+1)'(2**(CACHE_W-1))) return CACHE_W'(-(2**(CACHE_W-1)));
    else                                     return r[CACHE_W-1:0];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x         <= '0;
      y         <= '0;
      out_valid <= 1'b0;
    end else begin
      x.re      <= halve_sat(x_re_c);
      x.im      <= halve_sat(x_im_c);
      y.re      <= halve_sat(y_re_c);
      y.im      <= halve_sat(y_im_c);
      out_valid <= v_cm;
    end
  end

endmodule

// bp_cu: radix-2 belief-propagation computational unit (CU) for one vector.
//
// A CU of the polar factor graph has four terminals: two on its left side
// (upper a, lower b) and two on its right side (upper c, lower d).  The upper
// node is the XOR (check) node, the lower one the equality (variable) node.
// Messages travelling right are R, messages travelling left are L.  With
// f(x,y) = 0.9 * sign(x) * sign(y) * min(|x|,|y|) (scaled min-sum) the
// outputs are
//     L_a = f(L_c, L_d + R_b)          R_c = f(R_a, L_d + R_b)
//     L_b = f(R_a, L_c) + L_d          R_d = f(R_a, L_c) + R_b
// Because the decoder is vectorized with radix 2, one memory word holds the
// two left terminals (R vector) or the two right terminals (L vector) of a
// single CU, so the CU consumes one R vector and one L vector and produces
// one output vector: the right-side R pair when dir = OP_RIGHT, otherwise the
// left-side L pair (OP_LEFT and OP_FINAL).
//
// Arithmetic: Q-bit two's complement, sums saturate to +-(2**(Q-1)-1), the
// 0.9 factor is 29/32 applied to the magnitude and rounded down.  The word
// length, the saturation and the 29/32 approximation are this design's
// choices.  Purely combinational.
module bp_cu
  import bp_pkg::*;
#(
  parameter int unsigned Q = 8
) (
  input  logic [1:0][Q-1:0] r_in,   // [0] = R_a (upper), [1] = R_b (lower)
  input  logic [1:0][Q-1:0] l_in,   // [0] = L_c (upper), [1] = L_d (lower)
  input  bp_op_e            op,
  output logic [1:0][Q-1:0] out_vec
);

  localparam logic signed [Q:0]   MAXV  = (Q+1)'(2**(Q-1) - 1);
  localparam logic signed [Q-1:0] MAXQ  = Q'(2**(Q-1) - 1);

  function automatic logic signed [Q-1:0] sat_add(input logic signed [Q-1:0] x,
                                                   input logic signed [Q-1:0] y);
    logic signed [Q:0] s;
    s = (Q+1)'(x) + (Q+1)'(y);
    if (s > MAXV)       return MAXQ;
    else if (s < -MAXV) return -MAXQ;
    else                return s[Q-1:0];
  endfunction

  function automatic logic [Q-1:0] mag(input logic signed [Q-1:0] x);
    logic signed [Q:0] w;
    w = (Q+1)'(x);
    if (w < 0) w = -w;
    if (w > MAXV) w = MAXV;
    return w[Q-1:0];
  endfunction

  function automatic logic signed [Q-1:0] fmin(input logic signed [Q-1:0] x,
                                                input logic signed [Q-1:0] y);
    logic [Q-1:0]      m;
    logic [Q+4:0]      prod;
    logic [Q-1:0]      sc;
    logic              neg;
    m    = (mag(x) < mag(y)) ? mag(x) : mag(y);
    prod = (Q+5)'(m) * (Q+5)'(SCALE_NUM);
    sc   = Q'(prod >> SCALE_SHIFT);
    neg  = x[Q-1] ^ y[Q-1];
    return neg ? -$signed(sc) : $signed(sc);
  endfunction

  logic signed [Q-1:0] ra, rb, lc, ld;
  logic signed [Q-1:0] sum_db, f_ac;

  always_comb begin
    ra = $signed(r_in[0]);
    rb = $signed(r_in[1]);
    lc = $signed(l_in[0]);
    ld = $signed(l_in[1]);
    sum_db = sat_add(ld, rb);
    f_ac   = fmin(ra, lc);
    if (op == OP_RIGHT) begin
      out_vec[0] = fmin(ra, sum_db);
      out_vec[1] = sat_add(f_ac, rb);
    end else begin
      out_vec[0] = fmin(lc, sum_db);
      out_vec[1] = sat_add(f_ac, ld);
    end
  end

endmodule

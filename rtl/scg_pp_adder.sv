// Final-addition network of the 4 x 4 reversible multiplier.
//
// Adds the 16 partial products pp[4*i + j] = x[i].y[j], each of weight
// 2^(i+j), with 13 SCG gates used as full adders, in three rows:
//
//   top row, right half  (ripple, carry in 0), columns 1..4:
//     x0y1+x1y0 -> p1,  x0y2+x2y0,  x0y3+x3y0,  x3y1 (+ carry)
//   top row, left half   (ripple, carry in 0), columns 2..5:
//     x1y1,  x1y2+x2y1,  x1y3+x2y2,  x2y3+x3y2
//   middle row (ripple, carry in 0): adds the two halves' column-2..5 sums
//     and the right half's carry into column 5 -> p2..p5
//   bottom gate: x3y3 + middle-row carry + left-half carry -> p6, p7
//
// p0 is x0y0 itself. Each adder is exact and the largest possible total
// (225) fits in 8 bits, so p equals the weighted sum of any pp pattern.
// The 8/4/1 gate rows, the outputs each row produces and several operand
// pairs follow the published architecture; where that drawing leaves the
// operand placement open, the grouping above is this design's choice.
// Combinational; the longest path runs through 7 gates.
module scg_pp_adder
  import rev_pkg::*;
(
  input  logic [MUL_W*MUL_W-1:0] pp,
  output mul_product_t           p
);

  // x_i.y_j
  function automatic logic xy(input logic [MUL_W*MUL_W-1:0] v, input int i, input int j);
    return v[MUL_W*i + j];
  endfunction

  logic r_c1, r_c2, r_c3, r_c4, r_s2, r_s3, r_s4;
  logic l_c2, l_c3, l_c4, l_c5, l_s2, l_s3, l_s4, l_s5;
  logic m_c2, m_c3, m_c4, m_c5;
  logic [12:0] g_p, g_s;  // garbage outputs of the 13 gates

  // top row, right half
  scg_full_adder u_r1 (.a(xy(pp,0,1)), .b(xy(pp,1,0)), .cin(1'b0),
                       .cout(r_c1), .sum(p[1]), .g1(g_p[0]), .g2(g_s[0]));
  scg_full_adder u_r2 (.a(xy(pp,0,2)), .b(xy(pp,2,0)), .cin(r_c1),
                       .cout(r_c2), .sum(r_s2), .g1(g_p[1]), .g2(g_s[1]));
  scg_full_adder u_r3 (.a(xy(pp,0,3)), .b(xy(pp,3,0)), .cin(r_c2),
                       .cout(r_c3), .sum(r_s3), .g1(g_p[2]), .g2(g_s[2]));
  scg_full_adder u_r4 (.a(xy(pp,3,1)), .b(1'b0), .cin(r_c3),
                       .cout(r_c4), .sum(r_s4), .g1(g_p[3]), .g2(g_s[3]));

  // top row, left half
  scg_full_adder u_l1 (.a(xy(pp,1,1)), .b(1'b0), .cin(1'b0),
                       .cout(l_c2), .sum(l_s2), .g1(g_p[4]), .g2(g_s[4]));
  scg_full_adder u_l2 (.a(xy(pp,1,2)), .b(xy(pp,2,1)), .cin(l_c2),
                       .cout(l_c3), .sum(l_s3), .g1(g_p[5]), .g2(g_s[5]));
  scg_full_adder u_l3 (.a(xy(pp,1,3)), .b(xy(pp,2,2)), .cin(l_c3),
                       .cout(l_c4), .sum(l_s4), .g1(g_p[6]), .g2(g_s[6]));
  scg_full_adder u_l4 (.a(xy(pp,2,3)), .b(xy(pp,3,2)), .cin(l_c4),
                       .cout(l_c5), .sum(l_s5), .g1(g_p[7]), .g2(g_s[7]));

  // middle row
  scg_full_adder u_m1 (.a(r_s2), .b(l_s2), .cin(1'b0),
                       .cout(m_c2), .sum(p[2]), .g1(g_p[8]),  .g2(g_s[8]));
  scg_full_adder u_m2 (.a(r_s3), .b(l_s3), .cin(m_c2),
                       .cout(m_c3), .sum(p[3]), .g1(g_p[9]),  .g2(g_s[9]));
  scg_full_adder u_m3 (.a(r_s4), .b(l_s4), .cin(m_c3),
                       .cout(m_c4), .sum(p[4]), .g1(g_p[10]), .g2(g_s[10]));
  scg_full_adder u_m4 (.a(r_c4), .b(l_s5), .cin(m_c4),
                       .cout(m_c5), .sum(p[5]), .g1(g_p[11]), .g2(g_s[11]));

  // bottom gate
  scg_full_adder u_b1 (.a(xy(pp,3,3)), .b(m_c5), .cin(l_c5),
                       .cout(p[7]), .sum(p[6]), .g1(g_p[12]), .g2(g_s[12]));

  assign p[0] = xy(pp,0,0);

endmodule

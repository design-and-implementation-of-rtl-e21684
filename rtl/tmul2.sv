// Two-trit ternary multiplier: PP3 PP2 PP1 PP0 = (A1 A0) * (B1 B0), radix 3.
//
// Four one-trit multipliers form the partial products AiBj, each a digit
// p_ij (weight 3^(i+j)) and a carry c_ij (weight 3^(i+j+1)). Ten ternary
// half adders then reduce every column to one trit, rippling each column's
// carries into the next:
//   3^1 : p01 + p10, then + c00                    2 adders -> PP1
//   3^2 : c01 + c10, + p11, + both 3^1 carries     4 adders -> PP2
//   3^3 : c11 + each of the four 3^2 carries       4 adders -> PP3
// The largest product, (22)_3 * (22)_3 = 64 = (2101)_3, fits in four trits,
// so the carries out of column 3^3 are always 0 and are left unconnected
// (an assertion checks this). Using four 1-trit multipliers and ten half
// adders is the source paper's structure; the order in which each column's
// adders take their inputs is this design's. Purely combinational.
module tmul2
  import ternary_pkg::*;
(
  input  trit_t [1:0] a,   // a[1] = A1 (weight 3), a[0] = A0
  input  trit_t [1:0] b,
  output trit_t [3:0] pp   // pp[k] has weight 3^k
);
  trit_t p00, c00, p01, c01, p10, c10, p11, c11;

  tmul1 u_m00 (.a(a[0]), .b(b[0]), .pp0(p00), .pp1(c00));
  tmul1 u_m01 (.a(a[0]), .b(b[1]), .pp0(p01), .pp1(c01));
  tmul1 u_m10 (.a(a[1]), .b(b[0]), .pp0(p10), .pp1(c10));
  tmul1 u_m11 (.a(a[1]), .b(b[1]), .pp0(p11), .pp1(c11));

  // Column 3^0
  assign pp[0] = p00;

  // Column 3^1
  trit_t s1a, k1a, k1b;
  tha u_h1a (.a(p01), .b(p10), .sum(s1a),   .cout(k1a));
  tha u_h1b (.a(s1a), .b(c00), .sum(pp[1]), .cout(k1b));

  // Column 3^2
  trit_t s2a, s2b, s2c, k2a, k2b, k2c, k2d;
  tha u_h2a (.a(c01), .b(c10), .sum(s2a),   .cout(k2a));
  tha u_h2b (.a(s2a), .b(p11), .sum(s2b),   .cout(k2b));
  tha u_h2c (.a(s2b), .b(k1a), .sum(s2c),   .cout(k2c));
  tha u_h2d (.a(s2c), .b(k1b), .sum(pp[2]), .cout(k2d));

  // Column 3^3
  trit_t s3a, s3b, s3c, k3a, k3b, k3c, k3d;
  tha u_h3a (.a(c11), .b(k2a), .sum(s3a),   .cout(k3a));
  tha u_h3b (.a(s3a), .b(k2b), .sum(s3b),   .cout(k3b));
  tha u_h3c (.a(s3b), .b(k2c), .sum(s3c),   .cout(k3c));
  tha u_h3d (.a(s3c), .b(k2d), .sum(pp[3]), .cout(k3d));

  always_comb
    assert ({k3a, k3b, k3c, k3d} == '0)
      else $error("tmul2: carry out of the 3^3 column");
endmodule

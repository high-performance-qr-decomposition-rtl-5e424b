// fp_mul_r: registered IEEE754 single-precision multiplier, y = a * b.
//
// One multiplier lane of the vector datapath (the products of a dot
// product) and the r = p * ir multiplier of the math unit. The product is
// formed combinationally by qrd_pkg::fp_mul (round to nearest even,
// subnormals flushed to zero) and registered once, so y is valid one cycle
// after a and b. No reset: the data register needs none.
module fp_mul_r
  import qrd_pkg::*;
(
  input  logic   clk,
  input  float_t a,
  input  float_t b,
  output float_t y
);
  always_ff @(posedge clk) y <= fp_mul(a, b);
endmodule

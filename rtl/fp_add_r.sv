// fp_add_r: registered IEEE754 single-precision adder, y = a + b.
//
// One node of the vector datapath's adder tree. The sum is formed
// combinationally by qrd_pkg::fp_add (round to nearest even, subnormals
// flushed to zero) and registered once: y is valid one cycle after a and b.
module fp_add_r
  import qrd_pkg::*;
(
  input  logic   clk,
  input  float_t a,
  input  float_t b,
  output float_t y
);
  always_ff @(posedge clk) y <= fp_add(a, b);
endmodule

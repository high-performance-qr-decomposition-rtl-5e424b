// fp_rsqrt: pipelined IEEE754 single-precision reciprocal square root,
// y = 1 / sqrt(a).
//
// Produces the normalisation value ir(i,i) = 1/sqrt(p(i,i)) that scales
// column i into q(i) and each p(i,j) into r(i,j). One operation per cycle,
// result LAT = 11 cycles later (the reported latency), in_valid carried to
// out_valid. The value is formed as a correctly rounded square root followed
// by a correctly rounded division of 1.0 by it, so it carries two roundings
// (at most about one unit in the last place of error); a dedicated
// reciprocal square root core is this design's substitute for the vendor
// core.
module fp_rsqrt
  import qrd_pkg::*;
#(
  parameter int unsigned LAT = 11
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  float_t a,
  output logic   out_valid,
  output float_t y
);
  float_t r;
  assign r = fp_div(FP_ONE, fp_sqrt(a));

  pipe_delay #(.W(33), .LAT(LAT)) u_pipe (
    .clk, .rst_n, .d({in_valid, r}), .q({out_valid, y})
  );
endmodule

// fp_sqrt: pipelined IEEE754 single-precision square root, y = sqrt(a).
//
// Gives the diagonal element r(i,i) = sqrt(p(i,i)) of R from the first dot
// product of each pass. One operation per cycle, result LAT cycles later,
// in_valid carried to out_valid. The root is computed by qrd_pkg::fp_sqrt
// (digit-by-digit, correctly rounded) and then delayed. The latency of the
// square root is not reported; 11 cycles, the same as the reciprocal square
// root, is this design's choice.
module fp_sqrt
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
  assign r = fp_sqrt(a);

  pipe_delay #(.W(33), .LAT(LAT)) u_pipe (
    .clk, .rst_n, .d({in_valid, r}), .q({out_valid, y})
  );
endmodule

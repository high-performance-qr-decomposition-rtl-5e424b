// mult_sub: one lane of the scalar datapath, y = c - k * x.
//
// Each matrix row has one such lane. With x the latched column a(i), k the
// coefficient s(i,j) and c the column a(j) it performs the Gram-Schmidt
// update a(j) - s(i,j) a(i); with c forced to zero and k = -ir(i,i) it
// produces q(i) = ir(i,i) a(i); with k = 0 it passes c through unchanged.
// The product is rounded before the subtraction, as in a hard floating-point
// multiply-add block (not fused). Latency LAT = 4 cycles (the reported scalar
// latency), one operation per cycle; the arithmetic is combinational and
// followed by a LAT-stage delay for retiming.
module mult_sub
  import qrd_pkg::*;
#(
  parameter int unsigned LAT = 4
) (
  input  logic   clk,
  input  logic   rst_n,
  input  float_t c,
  input  float_t k,
  input  float_t x,
  output float_t y
);
  float_t r;
  assign r = fp_sub(c, fp_mul(k, x));

  pipe_delay #(.W(32), .LAT(LAT)) u_pipe (
    .clk, .rst_n, .d(r), .q(y)
  );
endmodule

// fp_div: pipelined IEEE754 single-precision divider, y = a / b.
//
// The math unit's divider, which turns each dot product p(i,j) into the
// projection coefficient s(i,j) = p(i,j) / p(i,i). It accepts one division
// per cycle and returns it LAT cycles later, with in_valid carried beside it
// to out_valid. The latency of 17 cycles is the one reported for the
// divider of the 400 MHz single-precision build; the quotient itself is
// computed here by qrd_pkg::fp_div (integer division of the significands,
// correctly rounded, subnormals flushed to zero) and then delayed, so the
// pipeline registers are left for retiming to distribute.
module fp_div
  import qrd_pkg::*;
#(
  parameter int unsigned LAT = 17
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  float_t a,
  input  float_t b,
  output logic   out_valid,
  output float_t y
);
  float_t q;
  assign q = fp_div(a, b);

  pipe_delay #(.W(33), .LAT(LAT)) u_pipe (
    .clk, .rst_n, .d({in_valid, q}), .q({out_valid, y})
  );
endmodule

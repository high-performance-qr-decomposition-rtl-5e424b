// scalar_datapath: N parallel multiply-subtract lanes, one per matrix row.
//
// Every cycle one whole column read from the RAM enters. The first column of
// an iteration, a(i), is latched at the multiplier inputs (latch_ai) and is
// the x operand of every lane until the next iteration; the column that
// carries latch_ai uses itself as x in the same cycle. The other multiplier
// input is the one coefficient common to all lanes, from the coefficient
// FIFO. Three modes cover the whole algorithm:
//   update   (default)  y = a(j) - s(i,j) * a(i)
//   zero_c              subtracter input zeroed and coefficient negated:
//                       y = ir(i,i) * a(i) = q(i)
//   mul_zero            multiplier input forced to zero: y = a(j), the
//                       pass-through used by the pre-loop pass
// Timing: in_valid/col_in/controls at cycle t give out_valid/vec_out/tag_out
// at t + LAT (LAT = 4). The tag (write-back column, forwarding to the vector
// datapath, R indices) is carried beside the data. The mode encoding and the
// negation used for q(i) are this design's choices.
module scalar_datapath
  import qrd_pkg::*;
#(
  parameter int unsigned N   = 256,
  parameter int unsigned LAT = 4
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  float_t [N-1:0]     col_in,
  input  logic               latch_ai,
  input  logic               zero_c,
  input  logic               mul_zero,
  input  float_t             coef,
  input  stag_t              tag_in,
  output logic               out_valid,
  output float_t [N-1:0]     vec_out,
  output stag_t              tag_out
);
  float_t [N-1:0] ai_q;
  float_t [N-1:0] x_sel;
  float_t         k_sel;

  assign x_sel = latch_ai ? col_in : ai_q;

  always_comb begin
    if (mul_zero)    k_sel = FP_ZERO;
    else if (zero_c) k_sel = fp_neg(coef);
    else             k_sel = coef;
  end

  always_ff @(posedge clk) begin
    if (in_valid && latch_ai) ai_q <= col_in;
  end

  for (genvar r = 0; r < N; r++) begin : g_lane
    mult_sub #(.LAT(LAT)) u_ms (
      .clk, .rst_n,
      .c (zero_c ? FP_ZERO : col_in[r]),
      .k (k_sel),
      .x (x_sel[r]),
      .y (vec_out[r])
    );
  end

  pipe_delay #(.W(1 + $bits(stag_t)), .LAT(LAT)) u_tag (
    .clk, .rst_n,
    .d({in_valid, tag_in}),
    .q({out_valid, tag_out})
  );
endmodule

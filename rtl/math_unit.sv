// math_unit: the elementary functions behind the vector datapath.
//
// It receives the stream of dot products p(i,j) = <a(i), a(j)>, one per cycle,
// the first of each pass flagged, and produces two streams:
//   coefficients (to the coefficient FIFO, for the next pass of the scalar
//     datapath): for the first p of a pass, ir(i,i) = 1/sqrt(p(i,i)); for each
//     later one, s(i,j) = p(i,j) / p(i,i);
//   R elements: r(i,i) = sqrt(p(i,i)) for the first p, and
//     r(i,j) = p(i,j) * ir(i,i) for the others.
// p(i,i) is latched at the divider's denominator input when it arrives; ir(i,i)
// is latched at the input of the R multiplier when it leaves the reciprocal
// square root. Latencies: divider DIV_LAT (17), reciprocal square root
// RSQRT_LAT (11), square root SQRT_LAT (11). So that the FIFO receives ir(i,i)
// ahead of s(i,i+1), the reciprocal square root output is delayed to the
// divider latency: every coefficient leaves DIV_LAT cycles after its p. Each
// later p waits RSQRT_LAT cycles for ir(i,i) and then takes one multiplier
// cycle; r(i,i) is delayed to match, so every R element leaves R_LAT =
// max(SQRT_LAT, RSQRT_LAT + 1) cycles after its p, in order. The equalising
// delays are this design's choice.
module math_unit
  import qrd_pkg::*;
#(
  parameter int unsigned DIV_LAT   = 17,
  parameter int unsigned RSQRT_LAT = 11,
  parameter int unsigned SQRT_LAT  = 11
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   p_valid,
  input  float_t p,
  input  vtag_t  p_tag,
  output logic   coef_valid,
  output float_t coef,
  output logic   r_valid,
  output idx_t   r_row,
  output idx_t   r_col,
  output float_t r_data
);
  localparam int unsigned R_LAT = (SQRT_LAT > RSQRT_LAT + 1) ? SQRT_LAT : RSQRT_LAT + 1;

  logic   first_v, later_v;
  float_t den_q, ir_q;

  assign first_v = p_valid &  p_tag.first;
  assign later_v = p_valid & ~p_tag.first;

  always_ff @(posedge clk) begin
    if (first_v) den_q <= p;
  end

  // ---- coefficient stream ------------------------------------------------
  logic   div_v, rs_v, rs_d_v;
  float_t div_y, rs_y, rs_d_y;

  fp_div #(.LAT(DIV_LAT)) u_div (
    .clk, .rst_n, .in_valid(later_v), .a(p), .b(den_q),
    .out_valid(div_v), .y(div_y)
  );

  fp_rsqrt #(.LAT(RSQRT_LAT)) u_rsqrt (
    .clk, .rst_n, .in_valid(first_v), .a(p),
    .out_valid(rs_v), .y(rs_y)
  );

  always_ff @(posedge clk) begin
    if (rs_v) ir_q <= rs_y;
  end

  pipe_delay #(.W(33), .LAT(DIV_LAT - RSQRT_LAT)) u_ir_align (
    .clk, .rst_n, .d({rs_v, rs_y}), .q({rs_d_v, rs_d_y})
  );

  assign coef_valid = div_v | rs_d_v;
  assign coef       = rs_d_v ? rs_d_y : div_y;

  // ---- R stream ----------------------------------------------------------
  logic   sq_v, pd_v, mul_v, rd_v, rm_v;
  float_t sq_y, pd_y, mul_y, rd_y, rm_y;
  vtag_t  pd_tag, mul_tag, rd_tag, rm_tag, sq_tag;

  fp_sqrt #(.LAT(SQRT_LAT)) u_sqrt (
    .clk, .rst_n, .in_valid(first_v), .a(p),
    .out_valid(sq_v), .y(sq_y)
  );
  pipe_delay #(.W($bits(vtag_t)), .LAT(SQRT_LAT)) u_sq_tag (
    .clk, .rst_n, .d(p_tag), .q(sq_tag)
  );
  pipe_delay #(.W(33 + $bits(vtag_t)), .LAT(R_LAT - SQRT_LAT)) u_sq_align (
    .clk, .rst_n, .d({sq_v, sq_y, sq_tag}), .q({rd_v, rd_y, rd_tag})
  );

  // later p: wait for ir(i,i), then multiply
  pipe_delay #(.W(33 + $bits(vtag_t)), .LAT(RSQRT_LAT)) u_p_wait (
    .clk, .rst_n, .d({later_v, p, p_tag}), .q({pd_v, pd_y, pd_tag})
  );
  fp_mul_r u_rmul (.clk, .a(pd_y), .b(ir_q), .y(mul_y));
  pipe_delay #(.W(1 + $bits(vtag_t)), .LAT(1)) u_mul_tag (
    .clk, .rst_n, .d({pd_v, pd_tag}), .q({mul_v, mul_tag})
  );
  pipe_delay #(.W(33 + $bits(vtag_t)), .LAT(R_LAT - RSQRT_LAT - 1)) u_mul_align (
    .clk, .rst_n, .d({mul_v, mul_y, mul_tag}), .q({rm_v, rm_y, rm_tag})
  );

  assign r_valid = rd_v | rm_v;
  assign r_data  = rd_v ? rd_y : rm_y;
  assign r_row   = rd_v ? rd_tag.row : rm_tag.row;
  assign r_col   = rd_v ? rd_tag.col : rm_tag.col;

  initial begin
    assert (DIV_LAT >= RSQRT_LAT)
      else $error("math_unit: DIV_LAT must not be below RSQRT_LAT");
  end

  // the two merged streams must never collide
  always_ff @(posedge clk) begin
    if (rst_n) begin
      assert (!(div_v && rs_d_v)) else $error("math_unit: coefficient collision");
      assert (!(rd_v && rm_v))    else $error("math_unit: R stream collision");
    end
  end
endmodule

// vector_datapath: the dot-product unit.
//
// It latches the first vector of each pass (in_first), then forms the inner
// product of that latched vector with every vector it receives, the first
// one included: p = <a(i), a(j)>. N multipliers feed a balanced binary tree
// of adders (N is padded with zero leaves to a power of two); each
// multiplier and each tree level is one register stage, and a delay line
// brings the total to LAT cycles. The default LAT = 2 + 4*ceil(log2 N)
// reproduces the reported vector latencies (26, 30, 34, 38 cycles for N = 64,
// 128, 256, 512); how those cycles are split between operators is this
// design's choice. One vector per cycle; in_valid/tag_in at cycle t give
// out_valid/p/tag_out at t + LAT. The summation order of the tree fixes the
// rounding of p.
module vector_datapath
  import qrd_pkg::*;
#(
  parameter int unsigned N   = 256,
  parameter int unsigned LAT = 2 + 4 * $clog2(N)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  input  logic           in_first,
  input  float_t [N-1:0] vec_in,
  input  vtag_t          tag_in,
  output logic           out_valid,
  output float_t         p,
  output vtag_t          tag_out
);
  localparam int unsigned L  = (N > 1) ? $clog2(N) : 1;
  localparam int unsigned NP = 1 << L;
  localparam int unsigned TREE_LAT = 1 + L;

  float_t [N-1:0] xl_q;
  float_t [N-1:0] x_sel;
  float_t         lvl [L+1][NP];

  assign x_sel = in_first ? vec_in : xl_q;

  always_ff @(posedge clk) begin
    if (in_valid && in_first) xl_q <= vec_in;
  end

  // level 0: products, zero leaves beyond N
  for (genvar k = 0; k < NP; k++) begin : g_prod
    if (k < N) begin : g_mul
      fp_mul_r u_mul (.clk, .a(x_sel[k]), .b(vec_in[k]), .y(lvl[0][k]));
    end else begin : g_pad
      assign lvl[0][k] = FP_ZERO;
    end
  end

  for (genvar l = 1; l <= L; l++) begin : g_lvl
    for (genvar k = 0; k < (NP >> l); k++) begin : g_node
      fp_add_r u_add (.clk, .a(lvl[l-1][2*k]), .b(lvl[l-1][2*k+1]), .y(lvl[l][k]));
    end
    for (genvar k = (NP >> l); k < NP; k++) begin : g_unused
      assign lvl[l][k] = FP_ZERO;
    end
  end

  pipe_delay #(.W(32), .LAT(LAT - TREE_LAT)) u_pad (
    .clk, .rst_n, .d(lvl[L][0]), .q(p)
  );

  pipe_delay #(.W(1 + $bits(vtag_t)), .LAT(LAT)) u_tag (
    .clk, .rst_n,
    .d({in_valid, tag_in}),
    .q({out_valid, tag_out})
  );

  initial begin
    assert (LAT >= TREE_LAT)
      else $error("vector_datapath: LAT %0d below tree depth %0d", LAT, TREE_LAT);
  end
endmodule

// qrd_top: QR decomposition core for an N x N real single-precision matrix,
// built on a reordered Modified Gram-Schmidt loop in which the scalar
// (multiply-subtract) datapath feeds the vector (dot-product) datapath.
//
// Data flow, one full column per clock:
//   column_ram --> scalar_datapath --+--> column_ram (write-back)
//                     ^              +--> vector_datapath --> math_unit --> R out
//                     |                                          |
//                     +------------- coef_fifo <-----------------+
// qrd_ctrl sequences the passes (see qrd_ctrl). While the scalar datapath
// applies the projections of pass i, the vector datapath and math unit
// already compute ir(i+1,i+1) and s(i+1,j) for pass i+1 from the columns just
// updated, so both datapaths are busy at once.
//
// Use: with busy low, load A column by column (ext_we, ext_col, ext_wdata;
// element r of the column on ext_wdata[r]); pulse start; R leaves on the
// r_valid stream (one element per cycle, row-major within each row, rows in
// order, with r_row/r_col zero-based); done pulses when Q has been written
// over A in the RAM; read Q back with ext_re/ext_col, the column appearing on
// ext_rdata two cycles later. The external port is ignored while busy.
//
// Cycle count: a pass of c columns takes max(c, D) cycles, D being the loop
// latency RD_LAT + SCALAR_LAT + VEC_LAT + DIV_LAT + 3 (2 + 4 + 34 + 17 + 3 =
// 60 at N = 256), so a whole run is close to N + sum_{c=1..N} max(c, D).
// Defaults follow the reported 256 x 256 build and its operator latencies;
// the 2-cycle RAM read, the R output stream and the external port protocol
// are this design's choices.
module qrd_top
  import qrd_pkg::*;
#(
  parameter int unsigned N          = 256,
  parameter int unsigned SCALAR_LAT = 4,
  parameter int unsigned VEC_LAT    = 2 + 4 * $clog2(N),
  parameter int unsigned DIV_LAT    = 17,
  parameter int unsigned RSQRT_LAT  = 11,
  parameter int unsigned SQRT_LAT   = 11
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  output logic           busy,
  output logic           done,
  input  logic           ext_we,
  input  logic           ext_re,
  input  idx_t           ext_col,
  input  float_t [N-1:0] ext_wdata,
  output float_t [N-1:0] ext_rdata,
  output logic           r_valid,
  output idx_t           r_row,
  output idx_t           r_col,
  output float_t         r_data
);
  localparam int unsigned RD_LAT = 2;
  localparam int unsigned CW     = $clog2(N+1);

  // controller
  logic          rd_en, latch_ai, zero_c, mul_zero, pop, lat_wait, stall;
  idx_t          rd_col;
  stag_t         iss_tag;
  logic [CW-1:0] fifo_count;
  float_t        fifo_dout;

  qrd_ctrl #(.N(N), .DRAIN(RD_LAT + SCALAR_LAT + 2)) u_ctrl (
    .clk, .rst_n, .start, .fifo_count, .busy, .done,
    .rd_en, .rd_col, .latch_ai, .zero_c, .mul_zero, .pop, .tag(iss_tag),
    .lat_wait, .stall
  );

  // controls travel beside the RAM read
  logic   s_valid, s_latch_ai, s_zero_c, s_mul_zero;
  float_t s_coef;
  stag_t  s_tag;

  pipe_delay #(.W(4 + 32 + $bits(stag_t)), .LAT(RD_LAT)) u_iss_pipe (
    .clk, .rst_n,
    .d({rd_en, latch_ai, zero_c, mul_zero, fifo_dout, iss_tag}),
    .q({s_valid, s_latch_ai, s_zero_c, s_mul_zero, s_coef, s_tag})
  );

  // RAM
  float_t [N-1:0] rd_data, sc_out;
  logic           sc_valid;
  stag_t          sc_tag;

  column_ram #(.N(N)) u_ram (
    .clk, .rst_n, .sel_core(busy),
    .core_re(rd_en), .core_raddr(rd_col),
    .core_we(sc_valid && sc_tag.wr), .core_waddr(sc_tag.wr_col), .core_wdata(sc_out),
    .ext_re, .ext_we, .ext_addr(ext_col), .ext_wdata,
    .rd_data
  );
  assign ext_rdata = rd_data;

  // scalar datapath
  scalar_datapath #(.N(N), .LAT(SCALAR_LAT)) u_scalar (
    .clk, .rst_n, .in_valid(s_valid), .col_in(rd_data),
    .latch_ai(s_latch_ai), .zero_c(s_zero_c), .mul_zero(s_mul_zero),
    .coef(s_coef), .tag_in(s_tag),
    .out_valid(sc_valid), .vec_out(sc_out), .tag_out(sc_tag)
  );

  // vector datapath
  logic   p_valid;
  float_t p;
  vtag_t  p_tag;

  vector_datapath #(.N(N), .LAT(VEC_LAT)) u_vector (
    .clk, .rst_n,
    .in_valid(sc_valid && sc_tag.to_vec), .in_first(sc_tag.first),
    .vec_in(sc_out), .tag_in('{first: sc_tag.first, row: sc_tag.row, col: sc_tag.col}),
    .out_valid(p_valid), .p, .tag_out(p_tag)
  );

  // math functions
  logic   coef_valid;
  float_t coef;

  math_unit #(.DIV_LAT(DIV_LAT), .RSQRT_LAT(RSQRT_LAT), .SQRT_LAT(SQRT_LAT)) u_math (
    .clk, .rst_n, .p_valid, .p, .p_tag,
    .coef_valid, .coef,
    .r_valid, .r_row, .r_col, .r_data
  );

  coef_fifo #(.DEPTH(N)) u_fifo (
    .clk, .rst_n, .push(coef_valid), .din(coef), .pop, .dout(fifo_dout),
    .count(fifo_count)
  );
endmodule

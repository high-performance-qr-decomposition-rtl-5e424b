// column_ram: the matrix store, one memory per row of the matrix.
//
// Bank r holds element r of every column, so a whole column (N words) is
// read or written in one cycle at the same address in all banks. The
// matrix A is loaded through the external port, the core overwrites it
// column by column, and when the decomposition ends the RAM holds Q, which
// is read out through the same external port.
//
// The inputs of the memories pass a registered multiplexer: while sel_core is
// high the core's read and write ports drive the banks, otherwise the
// external port does. Timing: a read request at cycle t (address registered
// by the multiplexer at t, memory output registered at t+1) gives rd_data at
// t + 2; a write request at t is written at the end of cycle t + 1. rd_data
// serves both the core and the external port. A read and a write of the same
// column in the same cycle return the old contents. Two-cycle read latency
// and the shared read bus are this design's choices.
module column_ram
  import qrd_pkg::*;
#(
  parameter int unsigned N = 256
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           sel_core,
  // core port
  input  logic           core_re,
  input  idx_t           core_raddr,
  input  logic           core_we,
  input  idx_t           core_waddr,
  input  float_t [N-1:0] core_wdata,
  // external port
  input  logic           ext_re,
  input  logic           ext_we,
  input  idx_t           ext_addr,
  input  float_t [N-1:0] ext_wdata,
  // read data (core and external), two cycles after the request
  output float_t [N-1:0] rd_data
);
  localparam int unsigned AW = (N > 1) ? $clog2(N) : 1;

  logic           re_q, we_q;
  logic [AW-1:0]  raddr_q, waddr_q;
  float_t [N-1:0] wdata_q;

  // registered input multiplexer
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      re_q <= 1'b0;
      we_q <= 1'b0;
    end else begin
      re_q <= sel_core ? core_re : ext_re;
      we_q <= sel_core ? core_we : ext_we;
    end
    raddr_q <= AW'(sel_core ? core_raddr : ext_addr);
    waddr_q <= AW'(sel_core ? core_waddr : ext_addr);
    wdata_q <= sel_core ? core_wdata : ext_wdata;
  end

  for (genvar r = 0; r < N; r++) begin : g_bank
    float_t mem [N];
    always_ff @(posedge clk) begin
      if (we_q) mem[waddr_q] <= wdata_q[r];
      if (re_q) rd_data[r] <= mem[raddr_q];
    end
  end
endmodule

// coef_fifo: the alignment FIFO between the math unit and the scalar
// datapath.
//
// The math unit produces the coefficients of pass i+1 (ir(i+1,i+1), then the
// s(i+1,j)) while pass i is still running; this FIFO holds them until the
// scalar datapath reaches the matching column. It is a first-word-fall-
// through queue of DEPTH 32-bit words: dout shows the head whenever count is
// non-zero, pop removes it at the clock edge, push appends din. Push and pop
// may happen in the same cycle. One pass needs at most N entries, so DEPTH = N.
// Overflow and underflow are errors, checked by assertions.
module coef_fifo
  import qrd_pkg::*;
#(
  parameter int unsigned DEPTH = 256
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       push,
  input  float_t                     din,
  input  logic                       pop,
  output float_t                     dout,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH+1);

  float_t          mem [DEPTH];
  logic   [AW-1:0] wp, rp;

  function automatic logic [AW-1:0] inc(logic [AW-1:0] v);
    return (v == AW'(DEPTH - 1)) ? '0 : v + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (push) mem[wp] <= din;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (push) wp <= inc(wp);
      if (pop)  rp <= inc(rp);
      count <= count + CW'(push) - CW'(pop);
    end
  end

  assign dout = mem[rp];

  always_ff @(posedge clk) begin
    if (rst_n) begin
      assert (!(pop && count == '0)) else $error("coef_fifo: pop when empty");
      assert (!(push && !pop && count == ($clog2(DEPTH+1))'(DEPTH)))
        else $error("coef_fifo: push when full");
    end
  end
endmodule

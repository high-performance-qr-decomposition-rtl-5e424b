// tb_vector_datapath: self-checking testbench of the dot-product unit.
//
// With N = 8 it sends passes of random vectors; the first vector of each
// pass is flagged and must be latched. For every vector the expected dot
// product with the latched vector is formed in the same balanced-tree order
// as the hardware, each product and partial sum rounded to single
// precision, and compared bit-exactly. The result and its tag must appear
// exactly LAT = 2 + 4*log2(N) cycles after the vector.
module tb_vector_datapath;
  import qrd_pkg::*;
  import tb_fp_pkg::*;

  localparam int N    = 8;
  localparam int LAT  = 2 + 4 * $clog2(N);
  localparam int NMAX = 100;

  logic           clk = 0, rst_n = 0;
  logic           in_valid = 0, in_first = 0, out_valid;
  float_t [N-1:0] vec_in = '0;
  vtag_t          tag_in = '0, tag_out;
  float_t         p;

  float_t expv [NMAX];
  vtag_t  expt [NMAX];
  int     icyc [NMAX];
  int     checks = 0, failures = 0, cyc = 0, nexp = 0, ngot = 0;

  vector_datapath #(.N(N)) dut (
    .clk, .rst_n, .in_valid, .in_first, .vec_in, .tag_in, .out_valid, .p, .tag_out
  );

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cyc <= cyc + 1;

  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      checks++;
      if (ngot >= nexp || cyc - icyc[ngot] != LAT || tag_out !== expt[ngot] || p !== expv[ngot]) begin
        failures++;
        if (failures < 10)
          $display("result %0d: cycle %0d (sent %0d) p %h expected %h", ngot, cyc, icyc[ngot], p, expv[ngot]);
      end
      ngot++;
    end
  end

  float_t [N-1:0] lat_ref;

  function automatic float_t tree_dot(float_t [N-1:0] x, float_t [N-1:0] y);
    float_t s [N];
    for (int k = 0; k < N; k++) s[k] = r2f(f2r(x[k]) * f2r(y[k]));
    for (int w = N / 2; w >= 1; w = w / 2)
      for (int k = 0; k < w; k++) s[k] = r2f(f2r(s[2*k]) + f2r(s[2*k+1]));
    return s[0];
  endfunction

  task automatic send(input float_t [N-1:0] v, input logic first);
    vtag_t t;
    if (first) lat_ref = v;
    t = '{first: first, row: idx_t'($urandom), col: idx_t'($urandom)};
    expv[nexp] = tree_dot(lat_ref, v);
    expt[nexp] = t;
    icyc[nexp] = cyc;
    nexp++;
    vec_in   = v;
    in_first = first;
    tag_in   = t;
    in_valid = 1;
    @(negedge clk);
    in_valid = 0;
    in_first = 0;
    vec_in   = '0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    for (int ps = 0; ps < 6; ps++) begin
      for (int j = 0; j < 8 - ps; j++) begin
        float_t [N-1:0] v;
        for (int r = 0; r < N; r++) v[r] = rand_f(115, 135);
        send(v, j == 0);
      end
      repeat (ps) @(negedge clk);
    end
    repeat (LAT + 3) @(negedge clk);
    checks++;
    if (ngot != nexp) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

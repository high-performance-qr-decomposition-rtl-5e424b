// tb_scalar_datapath: self-checking testbench of the scalar datapath.
//
// With N = 8 lanes it plays the column sequences of the algorithm: a
// pre-loop pass (multiplier input forced to zero: columns pass unchanged),
// then iterations that latch a(i) while producing q(i) = ir * a(i) with the
// subtracter zeroed, followed by updates a(j) - s * a(i) against the latched
// column. Each output column is checked bit-exactly against a lane-by-lane
// reference, its tag and valid bit must arrive exactly LAT cycles after the
// inputs, and idle cycles between passes check that a(i) stays latched.
module tb_scalar_datapath;
  import qrd_pkg::*;
  import tb_fp_pkg::*;

  localparam int N    = 8;
  localparam int LAT  = 4;
  localparam int NOPS = 60;

  logic           clk = 0, rst_n = 0;
  logic           in_valid = 0, latch_ai = 0, zero_c = 0, mul_zero = 0;
  float_t [N-1:0] col_in = '0, vec_out;
  float_t         coef = 0;
  stag_t          tag_in = '0, tag_out;
  logic           out_valid;

  float_t [N-1:0] expv [NOPS];
  stag_t          expt [NOPS];
  int             issue_cyc [NOPS];
  int             checks = 0, failures = 0, cyc = 0, nexp = 0, ngot = 0;

  scalar_datapath #(.N(N), .LAT(LAT)) dut (
    .clk, .rst_n, .in_valid, .col_in, .latch_ai, .zero_c, .mul_zero, .coef,
    .tag_in, .out_valid, .vec_out, .tag_out
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
      if (ngot >= nexp || cyc - issue_cyc[ngot] != LAT || tag_out !== expt[ngot] ||
          vec_out !== expv[ngot]) begin
        failures++;
        if (failures < 10) $display("output %0d wrong at cycle %0d (issued %0d, nexp %0d) tag %h/%h data %h/%h", ngot, cyc, issue_cyc[ngot], nexp, tag_out, expt[ngot], vec_out, expv[ngot]);
      end
      ngot++;
    end
  end

  float_t [N-1:0] ai_ref;

  task automatic issue(input float_t [N-1:0] col, input logic la, zc, mz, input float_t k);
    float_t [N-1:0] e;
    stag_t t;
    if (la) ai_ref = col;
    for (int r = 0; r < N; r++) begin
      if (mz)      e[r] = col[r];
      else if (zc) e[r] = r2f(f2r(k) * f2r(ai_ref[r]));
      else         e[r] = r2f(f2r(col[r]) - f2r(r2f(f2r(k) * f2r(ai_ref[r]))));
    end
    t = '{wr: 1'($urandom), wr_col: idx_t'($urandom), to_vec: 1'($urandom),
          first: 1'($urandom), row: idx_t'($urandom), col: idx_t'($urandom)};
    expv[nexp] = e;
    expt[nexp] = t;
    issue_cyc[nexp] = cyc;
    nexp++;
    col_in   = col;
    latch_ai = la;
    zero_c   = zc;
    mul_zero = mz;
    coef     = k;
    tag_in   = t;
    in_valid = 1;
    @(negedge clk);
    in_valid = 0;
    latch_ai = 0;
    col_in   = '0;
  endtask

  function automatic float_t [N-1:0] rand_col();
    float_t [N-1:0] v;
    for (int r = 0; r < N; r++) v[r] = rand_f(115, 135);
    return v;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    // pre-loop pass: pass-through, first column latched
    for (int j = 0; j < 6; j++) issue(rand_col(), j == 0, 0, 1, rand_f(120, 130));
    for (int it = 0; it < 5; it++) begin
      repeat (it) @(negedge clk);           // idle gap: latch must hold
      issue(rand_col(), 1, 1, 0, rand_f(120, 130));   // q(i)
      for (int j = 0; j < 7 - it; j++) issue(rand_col(), 0, 0, 0, rand_f(120, 130));
    end
    repeat (LAT + 3) @(posedge clk);
    checks++;
    if (ngot != nexp) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

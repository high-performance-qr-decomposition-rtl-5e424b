// tb_math_unit: self-checking testbench of the elementary-function unit.
//
// Feeds passes of dot products (the first of each pass flagged, as p(i,i))
// and checks both output streams bit-exactly against double-precision
// references rounded to single precision:
//   coefficients: ir = 1/sqrt(p(i,i)) (rounded root, then rounded
//     reciprocal), then s(i,j) = p(i,j)/p(i,i), each DIV_LAT cycles after its p;
//   R: sqrt(p(i,i)), then p(i,j) * ir, each R_LAT = 12 cycles after its p,
//   with the row and column of the tag.
module tb_math_unit;
  import qrd_pkg::*;
  import tb_fp_pkg::*;

  localparam int DIV_LAT = 17, RSQRT_LAT = 11, SQRT_LAT = 11, R_LAT = 12;
  localparam int NMAX = 200;

  logic   clk = 0, rst_n = 0, p_valid = 0;
  float_t p = 0;
  vtag_t  p_tag = '0;
  logic   coef_valid, r_valid;
  float_t coef, r_data;
  idx_t   r_row, r_col;

  float_t ec [NMAX], er [NMAX];
  idx_t   erow [NMAX], ecol [NMAX];
  int     ccyc [NMAX], rcyc [NMAX];
  int     checks = 0, failures = 0, cyc = 0, nexp = 0, ncg = 0, nrg = 0;

  math_unit dut (
    .clk, .rst_n, .p_valid, .p, .p_tag, .coef_valid, .coef,
    .r_valid, .r_row, .r_col, .r_data
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
    if (rst_n && coef_valid) begin
      checks++;
      if (ncg >= nexp || cyc - ccyc[ncg] != DIV_LAT || coef !== ec[ncg]) begin
        failures++;
        if (failures < 10) $display("coef %0d: %h expected %h at %0d/%0d", ncg, coef, ec[ncg], cyc, ccyc[ncg]);
      end
      ncg++;
    end
    if (rst_n && r_valid) begin
      checks++;
      if (nrg >= nexp || cyc - rcyc[nrg] != R_LAT || r_data !== er[nrg] ||
          r_row !== erow[nrg] || r_col !== ecol[nrg]) begin
        failures++;
        if (failures < 10) $display("r %0d: %h expected %h at %0d/%0d", nrg, r_data, er[nrg], cyc, rcyc[nrg]);
      end
      nrg++;
    end
  end

  float_t den, ir;

  task automatic send(input float_t v, input logic first, input int row, input int col);
    if (first) begin
      den = v;
      ir  = r2f(1.0 / f2r(r2f($sqrt(f2r(v)))));
      ec[nexp] = ir;
      er[nexp] = r2f($sqrt(f2r(v)));
    end else begin
      ec[nexp] = r2f(f2r(v) / f2r(den));
      er[nexp] = r2f(f2r(v) * f2r(ir));
    end
    erow[nexp] = idx_t'(row);
    ecol[nexp] = idx_t'(col);
    ccyc[nexp] = cyc;
    rcyc[nexp] = cyc;
    nexp++;
    p       = v;
    p_tag   = '{first: first, row: idx_t'(row), col: idx_t'(col)};
    p_valid = 1;
    @(negedge clk);
    p_valid = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    for (int i = 0; i < 10; i++) begin
      for (int j = i; j < 10; j++) begin
        automatic float_t v = rand_f(110, 150);
        if (j == i) v[31] = 1'b0;
        send(v, j == i, i, j);
      end
      repeat (i % 3) @(negedge clk);
    end
    repeat (DIV_LAT + 3) @(negedge clk);
    checks++;
    if (ncg != nexp || nrg != nexp) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

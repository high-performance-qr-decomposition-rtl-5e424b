// tb_qrd_full: one complete 256 x 256 decomposition with every parameter of
// the core at its default.
//
// Loads a random, diagonally weighted N x N matrix A through the external
// port, starts the core, collects the R stream, waits for done and reads Q
// back from the RAM. Checks:
//   - Q and R against a double-precision Modified Gram-Schmidt reference
//     (absolute error below TOL on Q, below TOL * max|R| on R);
//   - Q^T Q = I within TOL, and every upper-triangular R element delivered
//     exactly once, nothing below the diagonal;
//   - the run length, start to done, against an independent cycle model of
//     the schedule (each pass starts when the previous pass has issued all
//     its columns and the first two coefficients it needs are back, which
//     takes the loop latency L after the pass's first forwarded column);
//   - that every mechanism happened: the pre-loop pass-through, the q(i)
//     passes with the subtracter zeroed, waits on the loop latency, passes
//     overlapped with the coefficient computation of the next one (FIFO push
//     and pop in the same cycle), and the external load and read-back.
// The checks are those of tb_qrd_top; the local copies of the latencies
// below only feed the cycle model and must equal the core's defaults
// (vector latency 2 + 4*log2(256) = 34, divider 17, scalar 4).
module tb_qrd_full;
  import qrd_pkg::*;
  import tb_fp_pkg::*;

  localparam int N = 256, SCALAR_LAT = 4, VEC_LAT = 34, DIV_LAT = 17;
  localparam int RD_LAT = 2;
  localparam real TOL = 1.0e-3;
  localparam int WATCHDOG = 100000;

  logic           clk = 0, rst_n = 0, start = 0, ext_we = 0, ext_re = 0;
  idx_t           ext_col = 0;
  float_t [N-1:0] ext_wdata = '0, ext_rdata;
  logic           busy, done, r_valid;
  idx_t           r_row, r_col;
  float_t         r_data;

  qrd_top dut (
    .clk, .rst_n, .start, .busy, .done, .ext_we, .ext_re, .ext_col, .ext_wdata, .ext_rdata,
    .r_valid, .r_row, .r_col, .r_data
  );

  always #5 clk = ~clk;

  int  checks = 0, failures = 0;
  int  cyc = 0, start_cyc = 0, done_cyc = 0, ndone = 0;
  int  n_bypass = 0, n_qpass = 0, n_wait = 0, n_stall = 0, n_overlap = 0, n_load = 0, n_read = 0;

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real    a_in [N][N];       // [row][col]
  real    q_ref [N][N], r_ref [N][N], q_hw [N][N], r_hw [N][N];
  int     r_seen [N][N];

  always @(posedge clk) cyc <= cyc + 1;

  always @(negedge clk) begin
    if (rst_n) begin
      if (dut.u_ctrl.rd_en && dut.u_ctrl.mul_zero) n_bypass++;
      if (dut.u_ctrl.rd_en && dut.u_ctrl.zero_c)   n_qpass++;
      if (dut.u_ctrl.lat_wait) n_wait++;
      if (dut.u_ctrl.stall) n_stall++;
      if (dut.u_fifo.push && dut.u_fifo.pop) n_overlap++;
      if (done) begin
        ndone++;
        done_cyc = cyc;
      end
      if (r_valid) begin
        if (int'(r_row) < N && int'(r_col) < N) begin
          r_hw[r_row][r_col] = f2r(r_data);
          r_seen[r_row][r_col]++;
        end else begin
          failures++;
        end
      end
    end
  end

  // independent model of the run length (start sampled -> done visible)
  function automatic int model_cycles();
    int L = RD_LAT + SCALAR_LAT + VEC_LAT + DIV_LAT;
    int t, tf, ps;
    t  = 1;                        // first pre-loop issue
    tf = t;                        // its first forwarded column
    t  = t + N;                    // pre-loop issues end
    for (int i = 0; i < N; i++) begin
      automatic int need = (i == N - 1) ? 1 : 2;
      ps = (t > tf + L + need) ? t : tf + L + need;   // pass start
      tf = ps + 1;
      t  = ps + (N - i);
    end
    return (t - 1) + (RD_LAT + SCALAR_LAT + 2) + 2;
  endfunction

  initial begin
    real maxr, e, emax;
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        a_in[r][c] = f2r(r2f((real'($urandom_range(2000000)) / 1000000.0) - 1.0 + ((r == c) ? 4.0 : 0.0)));
        r_hw[r][c] = 0.0;
        r_seen[r][c] = 0;
      end
    // reference MGS in double precision
    begin
      real v [N][N];
      for (int r = 0; r < N; r++) for (int c = 0; c < N; c++) begin v[r][c] = a_in[r][c]; r_ref[r][c] = 0.0; end
      for (int i = 0; i < N; i++) begin
        automatic real nrm = 0.0;
        for (int r = 0; r < N; r++) nrm += v[r][i] * v[r][i];
        r_ref[i][i] = $sqrt(nrm);
        for (int r = 0; r < N; r++) q_ref[r][i] = v[r][i] / r_ref[i][i];
        for (int j = i + 1; j < N; j++) begin
          automatic real d = 0.0;
          for (int r = 0; r < N; r++) d += q_ref[r][i] * v[r][j];
          r_ref[i][j] = d;
          for (int r = 0; r < N; r++) v[r][j] -= d * q_ref[r][i];
        end
      end
    end

    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    // load A column by column
    for (int c = 0; c < N; c++) begin
      ext_we = 1;
      ext_col = idx_t'(c);
      for (int r = 0; r < N; r++) ext_wdata[r] = r2f(a_in[r][c]);
      n_load++;
      @(negedge clk);
    end
    ext_we = 0;
    @(negedge clk);
    start = 1;
    start_cyc = cyc;
    @(negedge clk);
    start = 0;
    wait (ndone > 0);
    @(negedge clk);
    // read Q back
    for (int c = 0; c < N + 2; c++) begin
      ext_re = (c < N);
      ext_col = idx_t'(c);
      if (c >= 2) begin
        for (int r = 0; r < N; r++) q_hw[r][c-2] = f2r(ext_rdata[r]);
        n_read++;
      end
      @(negedge clk);
    end
    ext_re = 0;

    // Q against reference
    emax = 0.0;
    for (int r = 0; r < N; r++) for (int c = 0; c < N; c++) begin
      e = q_hw[r][c] - q_ref[r][c];
      if (e < 0) e = -e;
      if (e > emax) emax = e;
    end
    checks++;
    if (emax > TOL) begin failures++; $display("Q error %g", emax); end
    $display("max |Q - Q_ref| = %g", emax);
    // R against reference, coverage of the triangle
    maxr = 0.0;
    for (int r = 0; r < N; r++) for (int c = r; c < N; c++) if (r_ref[r][c] > maxr || -r_ref[r][c] > maxr) maxr = (r_ref[r][c] > 0) ? r_ref[r][c] : -r_ref[r][c];
    emax = 0.0;
    for (int r = 0; r < N; r++) for (int c = 0; c < N; c++) begin
      checks++;
      if (r_seen[r][c] != ((c >= r) ? 1 : 0)) begin
        failures++;
        if (failures < 10) $display("R(%0d,%0d) delivered %0d times", r, c, r_seen[r][c]);
      end
      e = r_hw[r][c] - r_ref[r][c];
      if (e < 0) e = -e;
      if (e > emax) emax = e;
    end
    checks++;
    if (emax > TOL * maxr) begin failures++; $display("R error %g (max |R| %g)", emax, maxr); end
    $display("max |R - R_ref| = %g, max |R| = %g", emax, maxr);
    // orthogonality of the hardware Q
    emax = 0.0;
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) begin
      automatic real d = 0.0;
      for (int r = 0; r < N; r++) d += q_hw[r][i] * q_hw[r][j];
      if (i == j) d -= 1.0;
      if (d < 0) d = -d;
      if (d > emax) emax = d;
    end
    checks++;
    if (emax > TOL) begin failures++; $display("orthogonality error %g", emax); end
    $display("max |Q^T Q - I| = %g", emax);
    // run length
    checks++;
    $display("run length %0d cycles, model %0d, n(n+1)/2 = %0d", done_cyc - start_cyc, model_cycles(), N * (N + 1) / 2);
    if (done_cyc - start_cyc != model_cycles()) failures++;
    checks++;
    if (ndone != 1) failures++;
    // mechanisms
    $display("pre-loop pass-through %0d, q passes %0d, latency waits %0d, in-pass stalls %0d, overlapped cycles %0d, loads %0d, reads %0d",
             n_bypass, n_qpass, n_wait, n_stall, n_overlap, n_load, n_read);
    checks += 6;
    if (n_bypass != N) failures++;
    if (n_qpass != N) failures++;
    if (n_wait == 0) failures++;
    if (n_overlap == 0 && N > RD_LAT + SCALAR_LAT + VEC_LAT + DIV_LAT + 2) failures++;
    if (n_load != N) failures++;
    if (n_read != N) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

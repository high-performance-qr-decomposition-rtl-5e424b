// tb_qrd_ctrl: self-checking testbench of the sequencer.
//
// With N = 5 the testbench stands in for the rest of the loop: every column
// the controller forwards to the vector datapath comes back as one
// coefficient in a modelled FIFO D = 12 cycles later, and every pop removes
// one. The issued column sequence and its controls are compared with the
// schedule written out independently below (pre-loop pass, then for each
// iteration i: q(i), then the updates of columns i+1..N-1). Also checked:
// no pass starts before its first two coefficients (one for the last pass)
// are present, the controller waits for them (lat_wait) and never stalls
// inside a pass, and done pulses once, DRAIN + 2 cycles after the last issue.
module tb_qrd_ctrl;
  import qrd_pkg::*;

  localparam int N = 5, D = 12, DRAIN = 8;

  logic       clk = 0, rst_n = 0, start = 0;
  logic [2:0] fifo_count;
  logic       busy, done, rd_en, latch_ai, zero_c, mul_zero, pop, lat_wait, stall;
  idx_t       rd_col;
  stag_t      tag;

  typedef struct {
    int col; bit la, zc, mz, pop, wr, tv, first; int row;
  } iss_t;
  iss_t sched [$];

  int   checks = 0, failures = 0, cyc = 0, cnt = 0, nwait = 0, nstall = 0, ndone = 0;
  int   last_issue = 0, done_cyc = 0;
  bit   push_at [int];

  qrd_ctrl #(.N(N), .DRAIN(DRAIN)) dut (
    .clk, .rst_n, .start, .fifo_count, .busy, .done, .rd_en, .rd_col, .latch_ai,
    .zero_c, .mul_zero, .pop, .tag, .lat_wait, .stall
  );

  assign fifo_count = 3'(cnt);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    if (rst_n) begin
      if (lat_wait) nwait++;
      if (stall) nstall++;
      if (done) begin
        ndone++;
        done_cyc = cyc;
      end
      if (rd_en) begin
        iss_t e;
        checks++;
        last_issue = cyc;
        if (sched.size() == 0) begin
          failures++;
          $display("unexpected issue of column %0d", rd_col);
        end else begin
          e = sched.pop_front();
          if (int'(rd_col) != e.col || latch_ai != e.la || zero_c != e.zc || mul_zero != e.mz ||
              pop != e.pop || tag.wr != e.wr || tag.to_vec != e.tv || tag.first != e.first ||
              (e.wr && int'(tag.wr_col) != e.col) || (e.tv && (int'(tag.row) != e.row ||
              int'(tag.col) != e.col))) begin
            failures++;
            $display("cycle %0d: column %0d, expected column %0d", cyc, rd_col, e.col);
          end
          // a pass may start only with its first coefficients present
          if (e.la && !e.mz) begin
            checks++;
            if (cnt < ((e.col == N - 1) ? 1 : 2)) failures++;
          end
        end
        if (tag.to_vec) push_at[cyc + D] = 1;
      end
    end
  end

  // modelled coefficient FIFO occupancy
  always @(posedge clk) begin
    cyc <= cyc + 1;
    cnt <= cnt + (push_at.exists(cyc) ? 1 : 0) - (pop ? 1 : 0);
  end

  initial begin
    // independent schedule
    for (int j = 0; j < N; j++)
      sched.push_back('{col: j, la: j == 0, zc: 0, mz: 1, pop: 0, wr: 0, tv: 1, first: j == 0, row: 0});
    for (int i = 0; i < N; i++) begin
      sched.push_back('{col: i, la: 1, zc: 1, mz: 0, pop: 1, wr: 1, tv: 0, first: 0, row: i + 1});
      for (int j = i + 1; j < N; j++)
        sched.push_back('{col: j, la: 0, zc: 0, mz: 0, pop: 1, wr: 1, tv: 1, first: j == i + 1, row: i + 1});
    end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    checks++;
    if (!busy) failures++;
    wait (ndone > 0);
    repeat (5) @(negedge clk);
    checks += 5;
    if (sched.size() != 0) failures++;
    if (ndone != 1) failures++;
    if (done_cyc - last_issue != DRAIN + 2) begin
      failures++;
      $display("done %0d cycles after last issue", done_cyc - last_issue);
    end
    if (nwait == 0) failures++;
    if (nstall != 0) failures++;
    $display("latency waits %0d, in-pass stalls %0d", nwait, nstall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

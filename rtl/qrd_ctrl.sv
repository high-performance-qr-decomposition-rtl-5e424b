// qrd_ctrl: sequencer of the QR decomposition.
//
// It issues one RAM column read per cycle and, with each, the controls the
// column needs in the scalar datapath and the tag that tells where the
// result goes. Indices are zero-based; n = N.
//   PRE   pre-loop pass: columns 0..n-1 with the multiplier input forced to
//         zero, so each column passes the scalar datapath unchanged into the
//         vector datapath (column 0 flagged first); nothing is written back.
//         This yields ir(0,0), r(0,j) and s(0,j).
//   RUN   iteration i = 0..n-1: column i first (latched as a(i), subtracter
//         input zeroed, coefficient ir(i,i)) giving q(i), written back over
//         a(i); then columns j = i+1..n-1 with coefficient s(i,j), each update
//         written back and forwarded to the vector datapath, column i+1
//         flagged first. Every issue pops one coefficient from the FIFO.
//         Iteration n-1 is only q(n-1).
//   DRAIN wait for the last write-back; done pulses DRAIN + 2 cycles after
//         the last column was issued.
// An iteration starts only when its first two coefficients (one, for the
// last iteration) are in the FIFO: this is where the latency of the scalar,
// vector and divider path shows when a pass is shorter than that path
// (lat_wait high). Inside a pass a column waits if the FIFO is empty
// (stall high); with coefficients arriving one per cycle that does not
// happen. start is sampled in IDLE; busy is high from the cycle after start
// until done. The state encoding and the FIFO-occupancy start rule are this
// design's choices.
module qrd_ctrl
  import qrd_pkg::*;
#(
  parameter int unsigned N     = 256,
  parameter int unsigned DRAIN = 8
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic [$clog2(N+1)-1:0] fifo_count,
  output logic                   busy,
  output logic                   done,
  output logic                   rd_en,
  output idx_t                   rd_col,
  output logic                   latch_ai,
  output logic                   zero_c,
  output logic                   mul_zero,
  output logic                   pop,
  output stag_t                  tag,
  output logic                   lat_wait,
  output logic                   stall
);
  typedef enum logic [1:0] {S_IDLE, S_PRE, S_RUN, S_DRAIN} state_t;

  localparam int unsigned CW = $clog2(N+1);

  state_t state;
  idx_t   i_q, j_q;
  idx_t   dcnt;
  logic   head, ready;

  assign head  = (j_q == i_q);
  assign ready = head ? (fifo_count >= ((i_q == idx_t'(N - 1)) ? CW'(1) : CW'(2)))
                      : (fifo_count != '0);

  always_comb begin
    rd_en    = 1'b0;
    rd_col   = j_q;
    latch_ai = 1'b0;
    zero_c   = 1'b0;
    mul_zero = 1'b0;
    pop      = 1'b0;
    tag      = '0;
    lat_wait = 1'b0;
    stall    = 1'b0;
    tag.col  = j_q;
    tag.wr_col = j_q;
    unique case (state)
      S_PRE: begin
        rd_en      = 1'b1;
        latch_ai   = (j_q == '0);
        mul_zero   = 1'b1;
        tag.to_vec = 1'b1;
        tag.first  = (j_q == '0);
        tag.row    = '0;
      end
      S_RUN: begin
        if (ready) begin
          rd_en      = 1'b1;
          pop        = 1'b1;
          latch_ai   = head;
          zero_c     = head;
          tag.wr     = 1'b1;
          tag.to_vec = !head;
          tag.first  = (j_q == i_q + 1'b1);
          tag.row    = i_q + 1'b1;
        end else begin
          lat_wait = head;
          stall    = !head;
        end
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE;
      i_q   <= '0;
      j_q   <= '0;
      dcnt  <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (start) begin
            state <= S_PRE;
            i_q   <= '0;
            j_q   <= '0;
          end
        end
        S_PRE: begin
          if (j_q == idx_t'(N - 1)) begin
            state <= S_RUN;
            j_q   <= '0;
          end else begin
            j_q <= j_q + 1'b1;
          end
        end
        S_RUN: begin
          if (ready) begin
            if (j_q == idx_t'(N - 1)) begin
              if (i_q == idx_t'(N - 1)) begin
                state <= S_DRAIN;
                dcnt  <= '0;
              end else begin
                i_q <= i_q + 1'b1;
                j_q <= i_q + 1'b1;
              end
            end else begin
              j_q <= j_q + 1'b1;
            end
          end
        end
        S_DRAIN: begin
          if (dcnt == idx_t'(DRAIN)) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else begin
            dcnt <= dcnt + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);
endmodule

// me_ctrl: control logic of the two-array (error-corrected) motion estimator.
//
// For each macro-block the search area of (2p+1) x (2p+1) candidates is split
// into region 1, the (2r+1) x (2r+1) candidates around displacement (0,0),
// and region 2, all the others. The error-free array SA1 (port 0) scans
// region 1 while the voltage-scaled array SA2 (port 1) scans region 2, both
// in raster order and at the same time, one column per cycle. SA2's scanner
// jumps over the region-1 columns of a row without spending a cycle.
// When both arrays have drained, the candidate SA2 found best is fed once
// more through SA1, so its SAD is recomputed without errors. SA1's comparator
// still holds the region-1 minimum, so it ends up selecting the smaller of
// the two exact SADs; on equal SADs the region-1 winner stays. The result is
// SA1's minimum: motion vector mv and its SAD.
//
// r is sampled at start and limited to R1; R1 must be below P so that region
// 2 is never empty. Addresses go to a memory with registered reads, so all
// framing sent to the arrays is delayed by one cycle to meet the data.
// Cycles from start to done: N*max(C1, C2) + 3N + 10, where C1
// = (2r+1)^2 and C2 = (2p+1)^2 - C1; cand1/cand2 count C1 and C2 (plus the
// re-evaluation on SA1), the quantities that weigh the two arrays' power in
// the energy estimate. Sequencing details and the handshake (start pulse,
// done pulse, busy) are this design's choice.
module me_ctrl
  import me_pkg::*;
#(
  parameter int N  = N_DEF,
  parameter int P  = P_DEF,
  parameter int R1 = 4,
  localparam int W  = 2*P + N,
  localparam int AW = $clog2(W),
  localparam int CW = $clog2(N),
  localparam int RW = $clog2(P + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,        // pulse: search the loaded block
  input  logic [RW-1:0]    r,            // range parameter for region 1
  output logic             busy,
  output logic             done,         // pulse: mv / mv_sad valid
  output mv_t              mv,
  output logic [15:0]      mv_sad,
  output logic [RW-1:0]    r_used,
  output logic [15:0]      cand1,        // candidates evaluated by SA1
  output logic [15:0]      cand2,        // candidates evaluated by SA2
  // memory read ports (0 = SA1, 1 = SA2)
  output logic [AW-1:0]    rd_x  [2],
  output logic [AW-1:0]    rd_y  [2],
  output logic [CW-1:0]    cb_rx [2],
  // framing to the arrays, aligned with the memory read data
  output logic             sa_valid [2],
  output logic             sa_first [2],
  output logic             sa_last  [2],
  output mv_t              sa_tag   [2],
  output logic             sa_clear [2],
  // results from the arrays
  input  logic             sa_busy  [2],
  input  logic [15:0]      sa1_min_sad,
  input  mv_t              sa1_min_tag,
  input  mv_t              sa2_min_tag
);

  typedef enum logic [2:0] {S_IDLE, S_SCAN, S_DRAIN1, S_RECHECK, S_DRAIN2} state_t;
  state_t state;

  // scanner state; coordinates are window positions 0..2P (displacement + P)
  typedef struct packed {
    logic       act;
    logic [7:0] x;
    logic [7:0] y;
    logic [7:0] col;
  } scan_t;

  scan_t        sc [2];
  logic [7:0]   lo, hi;          // region 1 bounds: P-r .. P+r
  logic         issue [2];
  logic         col_end [2];
  logic         r1_end;
  logic [7:0]   r1_nx, r1_ny;
  logic         r2_end;
  logic [7:0]   r2_nx, r2_ny;
  logic         pend;            // framing in the memory stage
  logic [RW-1:0] r_clip;

  assign r_clip = (int'(r) > R1) ? RW'(R1) : r;

  initial begin
    assert (R1 < P) else $fatal(1, "R1 must be smaller than P");
    assert (P <= 63) else $fatal(1, "P too large for mv_t");
  end

  // next candidate of each scanner
  always_comb begin
    r1_nx  = sc[0].x + 8'd1;
    r1_ny  = sc[0].y;
    r1_end = 1'b0;
    if (r1_nx > hi) begin
      r1_nx = lo;
      r1_ny = sc[0].y + 8'd1;
      if (r1_ny > hi) r1_end = 1'b1;
    end

    r2_nx  = sc[1].x + 8'd1;
    r2_ny  = sc[1].y;
    r2_end = 1'b0;
    if (sc[1].y >= lo && sc[1].y <= hi && r2_nx == lo) r2_nx = hi + 8'd1;
    if (r2_nx > 8'(2*P)) begin
      r2_nx = '0;
      r2_ny = sc[1].y + 8'd1;
      if (r2_ny > 8'(2*P)) r2_end = 1'b1;
    end
  end

  always_comb begin
    for (int k = 0; k < 2; k++) begin
      issue[k]   = sc[k].act;
      col_end[k] = (sc[k].col == 8'(N - 1));
      rd_x[k]    = AW'(sc[k].x + sc[k].col);
      rd_y[k]    = AW'(sc[k].y);
      cb_rx[k]   = CW'(sc[k].col);
    end
  end

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      lo     <= '0;
      hi     <= '0;
      r_used <= '0;
      done   <= 1'b0;
      mv     <= '0;
      mv_sad <= '0;
      cand1  <= '0;
      cand2  <= '0;
      pend   <= 1'b0;
      for (int k = 0; k < 2; k++) begin
        sc[k]       <= '0;
        sa_valid[k] <= 1'b0;
        sa_first[k] <= 1'b0;
        sa_last[k]  <= 1'b0;
        sa_tag[k]   <= '0;
        sa_clear[k] <= 1'b0;
      end
    end else begin
      done <= 1'b0;

      // framing follows the address by one cycle (registered memory read)
      for (int k = 0; k < 2; k++) begin
        sa_valid[k] <= issue[k];
        sa_first[k] <= issue[k] && sc[k].col == '0;
        sa_last[k]  <= issue[k] && col_end[k];
        sa_tag[k]   <= '{dx: 8'(sc[k].x) - 8'(P), dy: 8'(sc[k].y) - 8'(P)};
        sa_clear[k] <= 1'b0;
      end
      pend <= issue[0] || issue[1];

      // column counters and candidate stepping
      for (int k = 0; k < 2; k++)
        if (sc[k].act) sc[k].col <= col_end[k] ? '0 : sc[k].col + 8'd1;

      if (sc[0].act && col_end[0]) begin
        cand1 <= cand1 + 16'd1;
        if (state == S_RECHECK || r1_end) sc[0].act <= 1'b0;
        else begin
          sc[0].x <= r1_nx;
          sc[0].y <= r1_ny;
        end
      end
      if (sc[1].act && col_end[1]) begin
        cand2 <= cand2 + 16'd1;
        if (r2_end) sc[1].act <= 1'b0;
        else begin
          sc[1].x <= r2_nx;
          sc[1].y <= r2_ny;
        end
      end

      unique case (state)
        S_IDLE: if (start) begin
          r_used  <= r_clip;
          lo      <= 8'(P) - 8'(r_clip);
          hi      <= 8'(P) + 8'(r_clip);
          cand1   <= '0;
          cand2   <= '0;
          sc[0]   <= '{act: 1'b1, x: 8'(P) - 8'(r_clip), y: 8'(P) - 8'(r_clip), col: '0};
          sc[1]   <= '{act: 1'b1, x: '0, y: '0, col: '0};
          sa_clear[0] <= 1'b1;
          sa_clear[1] <= 1'b1;
          state   <= S_SCAN;
        end
        S_SCAN:
          if (!sc[0].act && !sc[1].act) state <= S_DRAIN1;
        S_DRAIN1:
          if (!pend && !sa_valid[0] && !sa_valid[1] && !sa_busy[0] && !sa_busy[1]) begin
            // step 2.3: re-evaluate SA2's winner on the error-free array
            sc[0] <= '{act: 1'b1,
                       x: 8'(sa2_min_tag.dx + 8'(P)),
                       y: 8'(sa2_min_tag.dy + 8'(P)),
                       col: '0};
            state <= S_RECHECK;
          end
        S_RECHECK:
          if (!sc[0].act) state <= S_DRAIN2;
        S_DRAIN2:
          if (!pend && !sa_valid[0] && !sa_busy[0]) begin
            // step 2.4: SA1's comparator now holds the smaller exact SAD
            mv     <= sa1_min_tag;
            mv_sad <= sa1_min_sad;
            done   <= 1'b1;
            state  <= S_IDLE;
          end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule

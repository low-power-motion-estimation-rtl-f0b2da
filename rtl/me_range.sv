// me_range: range-parameter controller of the error correction scheme.
//
// r sets the size of region 1, the (2r+1) x (2r+1) centre of the search
// area that the error-free array evaluates. r starts at R_INIT. At the end
// of every UPDATE_FRAMES-th frame (frame_done pulses) the controller compares
// qp, the frame's average quantisation parameter times the number of
// macro-blocks, with the threshold qp_th (the same quantity measured with an
// error-free datapath):
//   qp > eta1 * qp_th and r < R1  ->  r = r + 1
//   qp < eta2 * qp_th and r > 0   ->  r = r - 1
// eta1 and eta2 are given in units of 1/10000 (10200 = 1.0200), so both
// sides are compared exactly as integers: qp*10000 against eta*qp_th.
// r changes one cycle after the frame_done that completes a group of
// frames; inc/dec pulse in that cycle. Reset value and the integer form of
// the thresholds are this design's choice.
module me_range #(
  parameter int R1            = 4,
  parameter int R_INIT        = 2,
  parameter int ETA1_X10K     = 10200,
  parameter int ETA2_X10K     = 10065,
  parameter int UPDATE_FRAMES = 5,
  parameter int QP_W          = 16,
  localparam int RW = $clog2(R1 + 1),
  localparam int FW = $clog2(UPDATE_FRAMES + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            frame_done,   // pulse at the end of each frame
  input  logic [QP_W-1:0] qp,           // average QP x macro-blocks per frame
  input  logic [QP_W-1:0] qp_th,        // threshold QP_TH, same scaling
  output logic [RW-1:0]   r,
  output logic            inc,
  output logic            dec
);

  localparam int PW = QP_W + 15;        // products up to 2^QP_W * 2^15

  logic [FW-1:0] fcnt;
  logic [PW-1:0] lhs, rhs1, rhs2;
  logic          up, down;

  always_comb begin
    lhs  = PW'(qp) * PW'(10000);
    rhs1 = PW'(qp_th) * PW'(ETA1_X10K);
    rhs2 = PW'(qp_th) * PW'(ETA2_X10K);
    up   = (lhs > rhs1) && (int'(r) < R1);
    down = !up && (lhs < rhs2) && (r != '0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r    <= RW'(R_INIT);
      fcnt <= '0;
      inc  <= 1'b0;
      dec  <= 1'b0;
    end else begin
      inc <= 1'b0;
      dec <= 1'b0;
      if (frame_done) begin
        if (int'(fcnt) == UPDATE_FRAMES - 1) begin
          fcnt <= '0;
          if (up) begin
            r   <= r + RW'(1);
            inc <= 1'b1;
          end else if (down) begin
            r   <= r - RW'(1);
            dec <= 1'b1;
          end
        end else begin
          fcnt <= fcnt + FW'(1);
        end
      end
    end
  end

endmodule

// me_mem: pixel memory of the motion estimation engine.
//
// Holds the search area of the previous frame, a (2p+N) x (2p+N) pixel
// window centred on the current macro-block, and the N x N current block.
// Two read ports, one per systolic array, each return a whole column of N
// pixels per cycle: port k reads search-area column rd_x[k], rows
// rd_y[k] .. rd_y[k]+N-1, and current-block column cb_rx[k]. Reads are
// registered (data one cycle after the address). Writes are one pixel per
// cycle from the frame store; loading must not overlap a search of the same
// block; addresses must stay inside the window. The organisation (one window per macro-block, column-wide reads,
// two ports) is this design's choice: the architecture only names a memory
// shared by the two arrays.
module me_mem
  import me_pkg::*;
#(
  parameter int N = N_DEF,
  parameter int P = P_DEF,
  localparam int W  = 2*P + N,            // search window side
  localparam int AW = $clog2(W),
  localparam int CW = $clog2(N)
) (
  input  logic            clk,
  // search-area write port
  input  logic            sw_we,
  input  logic [AW-1:0]   sw_wx,
  input  logic [AW-1:0]   sw_wy,
  input  pixel_t          sw_wd,
  // current-block write port
  input  logic            cb_we,
  input  logic [CW-1:0]   cb_wx,
  input  logic [CW-1:0]   cb_wy,
  input  pixel_t          cb_wd,
  // two column read ports
  input  logic [AW-1:0]   rd_x  [2],
  input  logic [AW-1:0]   rd_y  [2],
  input  logic [CW-1:0]   cb_rx [2],
  output pixel_t          cand_col [2][N],
  output pixel_t          cur_col  [2][N]
);

  pixel_t sw [W][W];   // sw[x][y]
  pixel_t cb [N][N];   // cb[x][y]

  always_ff @(posedge clk) begin
    if (sw_we) sw[sw_wx][sw_wy] <= sw_wd;
    if (cb_we) cb[cb_wx][cb_wy] <= cb_wd;
  end

  always_ff @(posedge clk) begin
    for (int k = 0; k < 2; k++)
      for (int j = 0; j < N; j++) begin
        cand_col[k][j] <= sw[rd_x[k]][rd_y[k] + AW'(j)];
        cur_col[k][j]  <= cb[cb_rx[k]][j];
      end
  end

endmodule

// me_top: low-power full-search motion estimation with two systolic arrays.
//
// The search area of each macro-block is split in two. Candidates close to
// displacement (0,0), region 1 of size (2r+1)^2, are evaluated by SA1, an
// array meant to run at the nominal supply and therefore error free. All
// other candidates, region 2, are evaluated by SA2, an identical array meant
// to run at a scaled supply (probabilistic CMOS) where its adders and
// flip-flops may flip bits. SA2's winner is then re-evaluated on SA1 and the
// smaller of the two exact SADs gives the motion vector. Every
// UPDATE_FRAMES frames the range parameter r grows or shrinks by one
// according to the quantisation parameter reported by the encoder.
//
// Blocks: me_mem (search window + current block, two column read ports),
// me_ctrl (region split, scheduling, re-evaluation), two me_sa systolic
// arrays (N AD cells, A, M each), me_range (r update).
//
// Interface: load the (2P+N)^2 search window (sw_*) and the N x N current
// block (cb_*) one pixel per cycle, pulse mb_start, wait for mb_done; mv is
// the displacement (dx, dy) in [-P, P] and mv_sad its SAD. Pulse frame_done
// at the end of every frame with qp = average QP times macro-blocks per
// frame; qp_th is the same measure taken with an error-free datapath.
// sa2_flip_ad / sa2_flip_acc are the bit-flip masks of SA2's AD and A
// registers: the supply voltage and noise that cause them are physical, so
// they come in from outside (all zero means SA2 is error free). SA1's masks
// are tied to zero. The level shifters between SA2's A and M in a
// multi-supply implementation are wires at the logic level and are not
// modelled. A macro-block search takes N*((2P+1)^2 - (2r+1)^2) + 3N + 10 cycles
// after mb_start (8506 at r = 0 with the default sizes).
module me_top
  import me_pkg::*;
#(
  parameter int N             = N_DEF,
  parameter int P             = P_DEF,
  parameter int R1            = 4,
  parameter int R_INIT        = 2,
  parameter int ETA1_X10K     = 10200,
  parameter int ETA2_X10K     = 10065,
  parameter int UPDATE_FRAMES = 5,
  parameter int QP_W          = 16,
  localparam int W   = 2*P + N,
  localparam int AW  = $clog2(W),
  localparam int CW  = $clog2(N),
  localparam int RWC = $clog2(P + 1),
  localparam int RWR = $clog2(R1 + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  // pixel loading
  input  logic             sw_we,
  input  logic [AW-1:0]    sw_wx,
  input  logic [AW-1:0]    sw_wy,
  input  pixel_t           sw_wd,
  input  logic             cb_we,
  input  logic [CW-1:0]    cb_wx,
  input  logic [CW-1:0]    cb_wy,
  input  pixel_t           cb_wd,
  // macro-block search
  input  logic             mb_start,
  output logic             mb_busy,
  output logic             mb_done,
  output mv_t              mv,
  output logic [15:0]      mv_sad,
  output logic [15:0]      cand1,
  output logic [15:0]      cand2,
  // range parameter update
  input  logic             frame_done,
  input  logic [QP_W-1:0]  qp,
  input  logic [QP_W-1:0]  qp_th,
  output logic [RWR-1:0]   r,
  output logic [RWC-1:0]   r_used,       // r in force for the current block
  output logic             r_inc,        // pulse: r was increased
  output logic             r_dec,        // pulse: r was decreased
  // errors of the voltage-scaled array SA2
  input  logic [COL_W_DEF-1:0] sa2_flip_ad [N],
  input  logic [SAD_W_DEF-1:0] sa2_flip_acc
);

  logic [AW-1:0] rd_x [2], rd_y [2];
  logic [CW-1:0] cb_rx [2];
  pixel_t        cand_col [2][N];
  pixel_t        cur_col  [2][N];
  logic          sa_valid [2], sa_first [2], sa_last [2], sa_clear [2];
  mv_t           sa_tag   [2];
  logic          sa_busy  [2];
  logic [SAD_W_DEF-1:0] min_sad [2];
  mv_t           min_tag  [2];
  logic [COL_W_DEF-1:0] zero_ad [N];

  always_comb
    for (int j = 0; j < N; j++) zero_ad[j] = '0;

  me_mem #(.N(N), .P(P)) u_mem (
    .clk,
    .sw_we, .sw_wx, .sw_wy, .sw_wd,
    .cb_we, .cb_wx, .cb_wy, .cb_wd,
    .rd_x, .rd_y, .cb_rx,
    .cand_col, .cur_col
  );

  me_range #(
    .R1(R1), .R_INIT(R_INIT), .ETA1_X10K(ETA1_X10K), .ETA2_X10K(ETA2_X10K),
    .UPDATE_FRAMES(UPDATE_FRAMES), .QP_W(QP_W)
  ) u_range (
    .clk, .rst_n, .frame_done, .qp, .qp_th, .r, .inc(r_inc), .dec(r_dec)
  );

  me_ctrl #(.N(N), .P(P), .R1(R1)) u_ctrl (
    .clk, .rst_n,
    .start(mb_start), .r(RWC'(r)),
    .busy(mb_busy), .done(mb_done), .mv, .mv_sad, .r_used, .cand1, .cand2,
    .rd_x, .rd_y, .cb_rx,
    .sa_valid, .sa_first, .sa_last, .sa_tag, .sa_clear,
    .sa_busy,
    .sa1_min_sad(min_sad[0]), .sa1_min_tag(min_tag[0]), .sa2_min_tag(min_tag[1])
  );

  // SA1: nominal supply, error free
  me_sa #(.N(N)) u_sa1 (
    .clk, .rst_n,
    .in_valid(sa_valid[0]), .in_first(sa_first[0]), .in_last(sa_last[0]),
    .in_tag(sa_tag[0]), .cur_col(cur_col[0]), .cand_col(cand_col[0]),
    .flip_ad(zero_ad), .flip_acc('0), .clear(sa_clear[0]),
    .sad(), .sad_valid(), .sad_tag(),
    .min_sad(min_sad[0]), .min_tag(min_tag[0]), .min_valid(),
    .busy(sa_busy[0])
  );

  // SA2: scaled supply, may flip bits in AD and A
  me_sa #(.N(N)) u_sa2 (
    .clk, .rst_n,
    .in_valid(sa_valid[1]), .in_first(sa_first[1]), .in_last(sa_last[1]),
    .in_tag(sa_tag[1]), .cur_col(cur_col[1]), .cand_col(cand_col[1]),
    .flip_ad(sa2_flip_ad), .flip_acc(sa2_flip_acc), .clear(sa_clear[1]),
    .sad(), .sad_valid(), .sad_tag(),
    .min_sad(min_sad[1]), .min_tag(min_tag[1]), .min_valid(),
    .busy(sa_busy[1])
  );

endmodule

// me_sa: systolic array for full search block matching (one array of Fig. 3).
//
// N AD cells are chained top to bottom, one per row of the N x N macro-block.
// Every cycle the array accepts one column of the current block (cur_col) and
// the matching column of the candidate block (cand_col). Row j of both
// columns is delayed j cycles by skew registers, so that the partial sum of
// a column meets its row-j pixels in AD cell j: the column's sum of absolute
// differences leaves the bottom cell N cycles after the column entered. A
// adds the N column sums of a candidate into its SAD and M keeps the
// smallest SAD seen since clear together with the candidate's displacement.
//
// A new candidate can start every N cycles (one column per cycle), so a full
// search over C candidates takes N*C cycles plus the pipeline latency.
// Timing, counted from the cycle a candidate's last column is presented:
// sad/sad_valid/sad_tag appear N+1 cycles later and min_sad/min_tag are
// updated N+2 cycles later. busy is high while any column is still in flight.
//
// flip_ad / flip_acc are bit-flip masks for the AD registers and A. They
// model the errors of the probabilistic (voltage-scaled) array; the
// error-free array ties them to zero. M has no such input because it always
// runs at the nominal supply. The in_first/in_last/in_tag framing is this
// design's choice.
module me_sa
  import me_pkg::*;
#(
  parameter int N     = N_DEF,
  parameter int COL_W = COL_W_DEF,
  parameter int SAD_W = SAD_W_DEF
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic             in_first,
  input  logic             in_last,
  input  mv_t              in_tag,
  input  pixel_t           cur_col  [N],
  input  pixel_t           cand_col [N],
  input  logic [COL_W-1:0] flip_ad  [N],
  input  logic [SAD_W-1:0] flip_acc,
  input  logic             clear,
  output logic [SAD_W-1:0] sad,
  output logic             sad_valid,
  output mv_t              sad_tag,
  output logic [SAD_W-1:0] min_sad,
  output mv_t              min_tag,
  output logic             min_valid,
  output logic             busy
);

  // ---------------------------------------------------------------- skew
  // skew_x[j][k] is row j delayed k+1 cycles; row j needs j cycles.
  pixel_t skew_x [N][N];
  pixel_t skew_y [N][N];
  pixel_t ad_x   [N];
  pixel_t ad_y   [N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < N; j++)
        for (int k = 0; k < N; k++) begin
          skew_x[j][k] <= '0;
          skew_y[j][k] <= '0;
        end
    end else begin
      for (int j = 1; j < N; j++) begin
        skew_x[j][0] <= cur_col[j];
        skew_y[j][0] <= cand_col[j];
        for (int k = 1; k < j; k++) begin
          skew_x[j][k] <= skew_x[j][k-1];
          skew_y[j][k] <= skew_y[j][k-1];
        end
      end
    end
  end

  always_comb begin
    ad_x[0] = cur_col[0];
    ad_y[0] = cand_col[0];
    for (int j = 1; j < N; j++) begin
      ad_x[j] = skew_x[j][j-1];
      ad_y[j] = skew_y[j][j-1];
    end
  end

  // ------------------------------------------------------------ AD chain
  logic [COL_W-1:0] psum [N+1];
  assign psum[0] = '0;

  for (genvar j = 0; j < N; j++) begin : g_ad
    me_ad #(.SUM_W(COL_W)) u_ad (
      .clk, .rst_n,
      .x(ad_x[j]), .y(ad_y[j]),
      .a_in(psum[j]), .flip(flip_ad[j]),
      .sum_out(psum[j+1])
    );
  end

  // ------------------------------------- framing delayed to the bottom AD
  typedef struct packed {
    logic valid;
    logic first;
    logic last;
    mv_t  tag;
  } frame_t;

  frame_t fr_pipe [N];
  logic   any_in_flight;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < N; k++) fr_pipe[k] <= '0;
    end else begin
      fr_pipe[0] <= '{valid: in_valid, first: in_first, last: in_last, tag: in_tag};
      for (int k = 1; k < N; k++) fr_pipe[k] <= fr_pipe[k-1];
    end
  end

  always_comb begin
    any_in_flight = 1'b0;
    for (int k = 0; k < N; k++) any_in_flight |= fr_pipe[k].valid;
  end

  // ------------------------------------------------------------- A and M
  me_acc #(.COL_W(COL_W), .SAD_W(SAD_W)) u_acc (
    .clk, .rst_n,
    .in_valid(fr_pipe[N-1].valid),
    .in_first(fr_pipe[N-1].first),
    .in_last (fr_pipe[N-1].last),
    .in_tag  (fr_pipe[N-1].tag),
    .col_sum (psum[N]),
    .flip    (flip_acc),
    .sad, .sad_valid, .sad_tag
  );

  me_min #(.SAD_W(SAD_W)) u_min (
    .clk, .rst_n,
    .clear,
    .in_valid(sad_valid),
    .in_sad  (sad),
    .in_tag  (sad_tag),
    .min_sad, .min_tag, .min_valid
  );

  assign busy = any_in_flight || sad_valid;

endmodule

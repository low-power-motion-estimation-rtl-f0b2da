// me_acc: block A of the systolic array, the SAD accumulator.
//
// The bottom AD cell delivers one complete column sum per cycle. A adds it to
// its own registered output (the feedback path b), so after N columns the
// register holds the candidate's SAD. The first column of a candidate
// restarts the sum (b taken as zero); on the last column the finished SAD is
// presented on sad with sad_valid high for one cycle, together with the
// candidate's tag. flip models bit flips in the voltage-scaled version of
// the block and is zero in the error-free array. Latency: one cycle from the
// last column to sad_valid. The first/last framing signals are this design's
// choice; the figure only shows the a + b feedback.
module me_acc
  import me_pkg::*;
#(
  parameter int COL_W = COL_W_DEF,
  parameter int SAD_W = SAD_W_DEF
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic             in_first,   // first column of a candidate
  input  logic             in_last,    // last column of a candidate
  input  mv_t              in_tag,     // candidate displacement
  input  logic [COL_W-1:0] col_sum,
  input  logic [SAD_W-1:0] flip,
  output logic [SAD_W-1:0] sad,
  output logic             sad_valid,
  output mv_t              sad_tag
);

  logic [SAD_W-1:0] b;

  assign b = in_first ? '0 : sad;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sad       <= '0;
      sad_valid <= 1'b0;
      sad_tag   <= '0;
    end else begin
      sad_valid <= in_valid && in_last;
      if (in_valid) begin
        sad     <= (b + SAD_W'(col_sum)) ^ flip;
        sad_tag <= in_tag;
      end
    end
  end

endmodule

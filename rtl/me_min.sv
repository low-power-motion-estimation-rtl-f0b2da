// me_min: block M of the systolic array, the minimum-SAD comparator.
//
// Compares each finished candidate SAD a with the best SAD b held in its own
// register (the feedback path) and keeps the smaller one together with its
// displacement. The comparison is a subtraction b - a whose borrow decides.
// clear starts a new search: the next valid SAD is taken unconditionally.
// On a tie the earlier candidate is kept (strict less-than), which is this
// design's choice. M always runs at the nominal supply and gets no bit-flip
// input. Latency: one cycle from in_valid to the updated min_sad.
module me_min
  import me_pkg::*;
#(
  parameter int SAD_W = SAD_W_DEF
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,      // forget the current minimum
  input  logic             in_valid,
  input  logic [SAD_W-1:0] in_sad,
  input  mv_t              in_tag,
  output logic [SAD_W-1:0] min_sad,
  output mv_t              min_tag,
  output logic             min_valid   // at least one SAD taken since clear
);

  logic [SAD_W:0] delta;   // min_sad - in_sad, MSB = borrow
  logic           take;

  always_comb begin
    delta = {1'b0, min_sad} + {1'b1, ~in_sad} + {{SAD_W{1'b0}}, 1'b1};
    // no borrow and non-zero difference: in_sad < min_sad
    take  = in_valid && (clear || !min_valid || (!delta[SAD_W] && delta[SAD_W-1:0] != '0));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      min_sad   <= '1;
      min_tag   <= '0;
      min_valid <= 1'b0;
    end else begin
      if (take) begin
        min_sad   <= in_sad;
        min_tag   <= in_tag;
        min_valid <= 1'b1;
      end else if (clear) begin
        min_sad   <= '1;
        min_valid <= 1'b0;
      end
    end
  end

endmodule

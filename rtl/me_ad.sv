// me_ad: block AD of the systolic array, one per row of the macro-block.
//
// Each cycle it takes one current-block pixel X, one candidate pixel Y and the
// partial column sum a from the AD cell above, and registers a + |X - Y|.
// As in the gate-level description of the array, the subtraction is done with
// an inverted operand (X + ~Y + 1) and the absolute value with XOR gates: the
// 9-bit difference is XORed with its sign and the sign is added back as a
// carry into the accumulation adder, so |X-Y| never exists as a separate sum.
//
// flip is XORed into the result register. It models the bit flips a
// voltage-scaled (probabilistic CMOS) adder/flip-flop suffers; in the
// error-free array it is tied to zero. Latency: one cycle. Reset clears the
// register (asynchronous, active low); the reset is this design's choice.
module me_ad
  import me_pkg::*;
#(
  parameter int SUM_W = COL_W_DEF
) (
  input  logic             clk,
  input  logic             rst_n,
  input  pixel_t           x,        // current block pixel
  input  pixel_t           y,        // candidate block pixel
  input  logic [SUM_W-1:0] a_in,     // partial sum from the cell above
  input  logic [SUM_W-1:0] flip,     // bit-flip mask (0 = error free)
  output logic [SUM_W-1:0] sum_out   // registered a_in + |x - y|
);

  logic [PIX_W:0]   diff;      // x - y, 9 bits, MSB is the sign
  logic             neg;
  logic [PIX_W-1:0] mag_pre;   // diff XOR sign: |x-y| - neg
  logic [SUM_W-1:0] sum_d;

  always_comb begin
    diff    = {1'b0, x} + {1'b1, ~y} + {{PIX_W{1'b0}}, 1'b1};
    neg     = diff[PIX_W];
    mag_pre = diff[PIX_W-1:0] ^ {PIX_W{neg}};
    sum_d   = a_in + SUM_W'(mag_pre) + SUM_W'(neg);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sum_out <= '0;
    else        sum_out <= sum_d ^ flip;
  end

endmodule

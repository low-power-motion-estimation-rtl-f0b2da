// tb_me_range: self-checking test of the range-parameter controller with
// its default settings (r1 = 4, r starting at 2, eta1 = 1.0200,
// eta2 = 1.0065, update every 5th frame). A reference written here with
// real-number thresholds follows each frame; the test checks r after every
// frame, that r changes only on every 5th frame, and that increase,
// decrease, saturation at r1 and at 0, and the dead band between the two
// thresholds all occur. qp values right at the thresholds are included.
module tb_me_range;
  logic clk = 0, rst_n = 0;
  logic frame_done, inc, dec;
  logic [15:0] qp, qp_th;
  logic [2:0] r;
  int checks = 0, failures = 0;
  int n_inc = 0, n_dec = 0, n_sat_hi = 0, n_sat_lo = 0, n_hold = 0;

  me_range dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int rr = 2, frame = 0;
    real th;
    frame_done = 0; qp = 0; qp_th = 0;
    repeat (2) @(posedge clk);
    #1 checks++;
    if (r != 3'd2) failures++;
    rst_n = 1;
    qp_th = 16'd3960;                   // e.g. mean QP 10 x 396 macro-blocks
    th = 3960.0;
    for (int f = 0; f < 400; f++) begin
      int mode, v;
      mode = (f / 40) % 4;              // phases: high, low, mixed, edges
      case (mode)
        0: v = 4200 + $urandom_range(0, 500);
        1: v = 3000 + $urandom_range(0, 900);
        2: v = 3800 + $urandom_range(0, 400);
        default: begin
          int pick;
          pick = $urandom_range(0, 3);
          v = (pick == 0) ? 4039 : (pick == 1) ? 4040 : (pick == 2) ? 3985 : 3986;
        end
      endcase
      qp = 16'(v);
      frame_done = 1;
      @(posedge clk); #1;
      frame_done = 0;
      frame++;
      if (frame % 5 == 0) begin
        if (v > 1.02 * th && rr < 4) begin rr++; n_inc++; end
        else if (v < 1.0065 * th && rr > 0) begin rr--; n_dec++; end
        else if (v > 1.02 * th) n_sat_hi++;
        else if (v < 1.0065 * th) n_sat_lo++;
        else n_hold++;
      end
      checks++;
      if (int'(r) != rr) begin
        failures++;
        if (failures < 10) $display("FAIL frame %0d qp %0d r %0d exp %0d", frame, v, r, rr);
      end
      repeat ($urandom_range(0, 3)) @(posedge clk);
      #1;
    end
    $display("inc %0d dec %0d sat_hi %0d sat_lo %0d hold %0d", n_inc, n_dec, n_sat_hi, n_sat_lo, n_hold);
    checks++;
    if (n_inc == 0 || n_dec == 0 || n_sat_hi == 0 || n_sat_lo == 0 || n_hold == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

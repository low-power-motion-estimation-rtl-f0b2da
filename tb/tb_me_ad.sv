// tb_me_ad: self-checking test of the AD cell.
// Drives random pixels, partial sums and (in part of the run) bit-flip masks,
// and checks that the registered output equals (a + |x - y|) XOR flip one
// cycle later, computed here with plain integer arithmetic. Exhaustive
// corner pairs (0/255) are included.
module tb_me_ad;
  import me_pkg::*;
  localparam int SUM_W = 12;

  logic clk = 0, rst_n = 0;
  pixel_t x, y;
  logic [SUM_W-1:0] a_in, flip, sum_out;
  int checks = 0, failures = 0;

  me_ad #(.SUM_W(SUM_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input int xv, input int yv, input int av, input int fv);
    int d, exp;
    x = pixel_t'(xv); y = pixel_t'(yv); a_in = SUM_W'(av); flip = SUM_W'(fv);
    @(posedge clk); #1;
    d   = xv > yv ? xv - yv : yv - xv;
    exp = ((av + d) % (1 << SUM_W)) ^ fv;
    checks++;
    if (int'(sum_out) != exp) begin
      failures++;
      if (failures < 10) $display("FAIL x=%0d y=%0d a=%0d f=%0h got %0d exp %0d", xv, yv, av, fv, sum_out, exp);
    end
  endtask

  initial begin
    x = 0; y = 0; a_in = 0; flip = 0;
    repeat (2) @(posedge clk);
    #1 checks++;
    if (sum_out != 0) failures++;      // reset value
    rst_n = 1;
    apply(0, 255, 0, 0);
    apply(255, 0, 0, 0);
    apply(255, 255, 100, 0);
    apply(0, 0, 4095, 0);
    apply(17, 200, 3000, 0);
    for (int i = 0; i < 3000; i++)
      apply($urandom_range(0, 255), $urandom_range(0, 255), $urandom_range(0, 3800), 0);
    for (int i = 0; i < 500; i++)
      apply($urandom_range(0, 255), $urandom_range(0, 255), $urandom_range(0, 3800),
            (1 << $urandom_range(0, SUM_W - 1)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

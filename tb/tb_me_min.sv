// tb_me_min: self-checking test of the M block (minimum comparator).
// Runs searches of random length separated by clear pulses and, after each
// SAD, compares min_sad / min_tag with a minimum kept here (strict
// less-than, so the first of equal SADs stays). SAD values are drawn from a
// small range in part of the run so that ties occur.
module tb_me_min;
  import me_pkg::*;

  logic clk = 0, rst_n = 0;
  logic clear, in_valid, min_valid;
  logic [15:0] in_sad, min_sad;
  mv_t in_tag, min_tag;
  int checks = 0, failures = 0;

  me_min dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int best, ties;
    mv_t best_tag;
    clear = 0; in_valid = 0; in_sad = 0; in_tag = '0;
    ties = 0;
    repeat (2) @(posedge clk);
    #1 checks++;
    if (min_valid) failures++;
    rst_n = 1;
    for (int s = 0; s < 300; s++) begin
      int len, range;
      len = $urandom_range(1, 60);
      range = (s % 2) ? 65535 : 20;
      best = -1;
      for (int i = 0; i < len; i++) begin
        int v;
        mv_t t;
        v = $urandom_range(0, range);
        t = '{dx: 8'(i), dy: 8'(s)};
        clear = (i == 0);
        in_valid = ($urandom_range(0, 4) != 0) || (i == 0);
        in_sad = 16'(v); in_tag = t;
        if (in_valid) begin
          if (best < 0 || v < best) begin best = v; best_tag = t; end
          else if (v == best) ties++;
        end
        @(posedge clk); #1;
        checks++;
        if (!min_valid || int'(min_sad) != best || min_tag != best_tag) begin
          failures++;
          if (failures < 10) $display("FAIL search %0d step %0d: %0d/%0d exp %0d", s, i, min_sad, min_tag.dx, best);
        end
      end
      clear = 0; in_valid = 0;
    end
    checks++;
    if (ties == 0) failures++;
    $display("ties seen: %0d", ties);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_me_acc: self-checking test of the A block (SAD accumulator).
// Feeds candidates of 16 random column sums back to back, sometimes with
// idle cycles in between, and checks that sad_valid rises exactly one cycle
// after each last column with the candidate's tag and the sum of its
// columns, computed here independently. One phase adds a bit-flip mask on
// the last column and checks it appears XORed into the SAD.
module tb_me_acc;
  import me_pkg::*;
  localparam int NC = 16;

  logic clk = 0, rst_n = 0;
  logic in_valid, in_first, in_last;
  mv_t in_tag, sad_tag;
  logic [11:0] col_sum;
  logic [15:0] flip, sad;
  logic sad_valid;
  int checks = 0, failures = 0;

  me_acc dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic candidate(input int k, input bit with_flip);
    int total = 0;
    int fl = with_flip ? (1 << $urandom_range(0, 15)) : 0;
    mv_t tag = '{dx: 8'($urandom_range(0, 22) - 11), dy: 8'($urandom_range(0, 22) - 11)};
    for (int c = 0; c < NC; c++) begin
      int v = (k == 0) ? 4080 : $urandom_range(0, 4080);
      total += v;
      in_valid = 1; in_first = (c == 0); in_last = (c == NC - 1);
      in_tag = tag; col_sum = 12'(v); flip = (c == NC - 1) ? 16'(fl) : '0;
      @(posedge clk); #1;
      checks++;
      if (sad_valid != (c == NC - 1)) begin
        failures++;
        $display("FAIL sad_valid=%0b at column %0d", sad_valid, c);
      end
    end
    in_valid = 0; in_first = 0; in_last = 0; flip = '0;
    checks++;
    if (int'(sad) != ((total % 65536) ^ fl) || sad_tag != tag) begin
      failures++;
      if (failures < 10) $display("FAIL sad=%0d exp %0d", sad, (total % 65536) ^ fl);
    end
    if ($urandom_range(0, 3) == 0) begin
      @(posedge clk); #1;
      checks++;
      if (sad_valid) failures++;
    end
  endtask

  initial begin
    in_valid = 0; in_first = 0; in_last = 0; in_tag = '0; col_sum = 0; flip = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    candidate(0, 0);                    // all columns at maximum
    for (int k = 1; k < 200; k++) candidate(k, 0);
    for (int k = 0; k < 50; k++) candidate(k + 1, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

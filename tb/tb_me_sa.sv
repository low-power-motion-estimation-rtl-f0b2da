// tb_me_sa: self-checking test of one systolic array at N = 16.
// A random current block is matched against a stream of random candidate
// blocks, one column per cycle with no gaps, then with random gaps. For each
// candidate the SAD is computed here directly from the pixels; the test
// checks sad/sad_tag, that sad_valid comes exactly N+1 cycles after the
// candidate's last column (one candidate per N cycles), the final minimum,
// and that busy drops once the pipeline is empty. A last batch holds bit 0
// of AD cell 0's flip mask high and expects each row-0 difference to be
// XORed with 1, as a flipped register bit would do.
module tb_me_sa;
  import me_pkg::*;
  localparam int N = 16;

  logic clk = 0, rst_n = 0;
  logic in_valid, in_first, in_last, clear;
  mv_t in_tag, sad_tag, min_tag;
  pixel_t cur_col [N], cand_col [N];
  logic [11:0] flip_ad [N];
  logic [15:0] flip_acc, sad, min_sad;
  logic sad_valid, min_valid, busy;
  int checks = 0, failures = 0;
  int cycle = 0;

  me_sa #(.N(N)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  pixel_t cb [N][N];
  int exp_sad [$], exp_cyc [$];
  mv_t exp_tag [$];
  int best; mv_t best_tag;
  bit flip0;

  // checker on the SAD stream
  always @(posedge clk) begin
    #2;
    if (rst_n && sad_valid) begin
      checks++;
      if (exp_sad.size() == 0) begin
        failures++;
        $display("FAIL unexpected sad_valid");
      end else begin
        int es, ec;
        mv_t et;
        es = exp_sad.pop_front();
        ec = exp_cyc.pop_front();
        et = exp_tag.pop_front();
        if (int'(sad) != es || sad_tag != et || cycle != ec) begin
          failures++;
          if (failures < 10) $display("FAIL sad %0d exp %0d cycle %0d exp %0d", sad, es, cycle, ec);
        end
      end
    end
  end

  task automatic candidate(input int k, input bit gaps);
    pixel_t cand [N][N];
    int total = 0;
    mv_t tag = '{dx: 8'(k), dy: 8'(-k)};
    for (int c = 0; c < N; c++)
      for (int j = 0; j < N; j++) begin
        int d;
        cand[c][j] = pixel_t'($urandom_range(0, 255));
        d = int'(cur_col_v(c, j)) - int'(cand[c][j]);
        d = d < 0 ? -d : d;
        if (flip0 && j == 0) d = d ^ 1;
        total += d;
      end
    for (int c = 0; c < N; c++) begin
      while (gaps && $urandom_range(0, 3) == 0) begin
        in_valid = 0; in_first = 0; in_last = 0;
        @(posedge clk); #1;
      end
      in_valid = 1; in_first = (c == 0); in_last = (c == N - 1); in_tag = tag;
      for (int j = 0; j < N; j++) begin
        cur_col[j] = cb[c][j];
        cand_col[j] = cand[c][j];
      end
      if (c == N - 1) begin
        exp_sad.push_back(total);
        exp_cyc.push_back(cycle + N + 1);
        exp_tag.push_back(tag);
        if (best < 0 || total < best) begin best = total; best_tag = tag; end
      end
      @(posedge clk); #1;
      clear = 0;
    end
    in_valid = 0; in_first = 0; in_last = 0;
  endtask

  function automatic pixel_t cur_col_v(int c, int j);
    return cb[c][j];
  endfunction

  task automatic drain_and_check_min();
    repeat (N + 4) @(posedge clk);
    #1 checks++;
    if (busy || !min_valid || int'(min_sad) != best || min_tag != best_tag || exp_sad.size() != 0) begin
      failures++;
      $display("FAIL min %0d exp %0d busy %0b pending %0d", min_sad, best, busy, exp_sad.size());
    end
  endtask

  initial begin
    in_valid = 0; in_first = 0; in_last = 0; in_tag = '0; clear = 0; flip_acc = '0;
    flip0 = 0;
    for (int j = 0; j < N; j++) begin cur_col[j] = 0; cand_col[j] = 0; flip_ad[j] = '0; end
    for (int c = 0; c < N; c++) for (int j = 0; j < N; j++) cb[c][j] = pixel_t'($urandom_range(0, 255));
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
    // batch 1: back to back
    best = -1; clear = 1;
    for (int k = 0; k < 40; k++) candidate(k, 0);
    drain_and_check_min();
    // batch 2: with gaps
    best = -1; clear = 1;
    for (int k = 0; k < 40; k++) candidate(k + 50, 1);
    drain_and_check_min();
    // batch 3: row-0 register bit 0 flipped throughout
    flip0 = 1; flip_ad[0] = 12'h001;
    best = -1; clear = 1;
    for (int k = 0; k < 20; k++) candidate(k + 100, 0);
    drain_and_check_min();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

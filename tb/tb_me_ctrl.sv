// tb_me_ctrl: self-checking test of the control logic at N = 16, p = 11,
// r1 = 4. The arrays are replaced by a model of their busy signal (high
// while a column is less than N+2 cycles old). For r = 0..4 and for an
// out-of-range r that must be limited to 4, the test checks:
//  - every issued column: address = candidate position + column, framing
//    flags first/last, tag, and columns in order on each port;
//  - SA1 (port 0) gets exactly region 1, |dx|,|dy| <= r, SA2 (port 1)
//    exactly region 2, each candidate once, together all (2p+1)^2;
//  - SA2 is fed one column every cycle with no gaps;
//  - after both drain, SA1 gets SA2's winner once more (re-evaluation);
//  - done returns SA1's minimum, cand1/cand2 count the candidates, and the
//    search takes N*max(C1, C2) + N + a small fixed overhead cycles.
module tb_me_ctrl;
  import me_pkg::*;
  localparam int N = 16, P = 11, R1 = 4, W = 2*P + N;
  localparam int AW = $clog2(W), CW = $clog2(N), RW = $clog2(P + 1);

  logic clk = 0, rst_n = 0;
  logic start, busy, done;
  logic [RW-1:0] r, r_used;
  mv_t mv, sa1_min_tag, sa2_min_tag;
  logic [15:0] mv_sad, cand1, cand2, sa1_min_sad;
  logic [AW-1:0] rd_x [2], rd_y [2];
  logic [CW-1:0] cb_rx [2];
  logic sa_valid [2], sa_first [2], sa_last [2], sa_clear [2], sa_busy [2];
  mv_t sa_tag [2];
  int checks = 0, failures = 0;
  int cycle = 0;

  me_ctrl #(.N(N), .P(P), .R1(R1)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // busy model of the arrays
  int age [2] = '{1000, 1000};
  always @(posedge clk) for (int k = 0; k < 2; k++) age[k] <= sa_valid[k] ? 0 : age[k] + 1;
  always_comb for (int k = 0; k < 2; k++) sa_busy[k] = (age[k] < N + 2);

  // per-port monitor
  int seen [2][int];          // candidate key -> count
  int next_col [2] = '{0, 0};
  int last_x [2], last_y [2], last_c [2];
  int gaps2 = 0, in_run2 = 0, recheck_key = -1, rechecks = 0;
  bit scanning = 0;
  int cur_r;

  function automatic int key(int dx, int dy); return (dx + 100) * 1000 + (dy + 100); endfunction

  always @(posedge clk) begin
    #2;
    for (int k = 0; k < 2; k++) begin
      if (sa_valid[k]) begin
        int col, dx, dy;
        col = last_c[k];
        dx = sa_tag[k].dx; dy = sa_tag[k].dy;
        checks++;
        if (col != next_col[k] || last_x[k] != dx + P + col || last_y[k] != dy + P ||
            sa_first[k] != (col == 0) || sa_last[k] != (col == N - 1)) begin
          failures++;
          if (failures < 10) $display("FAIL port %0d col %0d exp %0d addr %0d,%0d tag %0d,%0d", k, col, next_col[k], last_x[k], last_y[k], dx, dy);
        end
        next_col[k] = (col + 1) % N;
        if (sa_last[k]) begin
          if (scanning) seen[k][key(dx, dy)]++;
          else if (k == 0) begin
            rechecks++;
            checks++;
            if (key(dx, dy) != recheck_key) begin
              failures++;
              $display("FAIL recheck candidate %0d,%0d", dx, dy);
            end
          end
        end
      end
    end
    for (int k = 0; k < 2; k++) begin
      last_x[k] = rd_x[k]; last_y[k] = rd_y[k]; last_c[k] = cb_rx[k];
    end
  end

  task automatic run_search(input int rin);
    int rr, c1, c2, t0, t1, bound;
    rr = rin > R1 ? R1 : rin;
    c1 = (2*rr + 1) * (2*rr + 1);
    c2 = (2*P + 1) * (2*P + 1) - c1;
    for (int k = 0; k < 2; k++) seen[k].delete();
    rechecks = 0;
    // SA2's "winner": a random region-2 candidate; SA1's final choice
    do begin
      sa2_min_tag.dx = 8'($urandom_range(0, 2*P) - P);
      sa2_min_tag.dy = 8'($urandom_range(0, 2*P) - P);
    end while ($signed(sa2_min_tag.dx) <= rr && $signed(sa2_min_tag.dx) >= -rr &&
               $signed(sa2_min_tag.dy) <= rr && $signed(sa2_min_tag.dy) >= -rr);
    recheck_key = key($signed(sa2_min_tag.dx), $signed(sa2_min_tag.dy));
    sa1_min_tag.dx = 8'($urandom_range(0, 2*P) - P);
    sa1_min_tag.dy = 8'($urandom_range(0, 2*P) - P);
    sa1_min_sad = 16'($urandom);
    r = RW'(rin);
    start = 1; scanning = 1;
    t0 = cycle;
    @(posedge clk); #1;
    start = 0;
    checks++;
    if (!sa_clear[0] || !sa_clear[1]) begin failures++; $display("FAIL no clear"); end
    while (busy && (int'(dut.state) == 1 || int'(dut.state) == 2)) @(posedge clk);
    #3 scanning = 0;
    while (!done) @(posedge clk);
    #1 t1 = cycle;
    // regions
    for (int dx = -P; dx <= P; dx++)
      for (int dy = -P; dy <= P; dy++) begin
        bit in1 = (dx <= rr && dx >= -rr && dy <= rr && dy >= -rr);
        int n0 = seen[0].exists(key(dx, dy)) ? seen[0][key(dx, dy)] : 0;
        int n1 = seen[1].exists(key(dx, dy)) ? seen[1][key(dx, dy)] : 0;
        checks++;
        if (n0 != (in1 ? 1 : 0) || n1 != (in1 ? 0 : 1)) begin
          failures++;
          if (failures < 10) $display("FAIL r=%0d cand %0d,%0d sa1 %0d sa2 %0d", rr, dx, dy, n0, n1);
        end
      end
    checks++;
    if (rechecks != 1 || mv != sa1_min_tag || mv_sad != sa1_min_sad || int'(r_used) != rr ||
        int'(cand1) != c1 + 1 || int'(cand2) != c2) begin
      failures++;
      $display("FAIL result r=%0d rechecks %0d cand %0d/%0d", rr, rechecks, cand1, cand2);
    end
    bound = N * (c1 > c2 ? c1 : c2) + N + 2 * (N + 4) + 6;
    checks++;
    if (t1 - t0 > bound || t1 - t0 < N * c2) begin
      failures++;
      $display("FAIL r=%0d took %0d cycles, bound %0d", rr, t1 - t0, bound);
    end
    $display("r=%0d: C1=%0d C2=%0d, %0d cycles, SA2 gaps %0d", rr, c1, c2, t1 - t0, gaps2);
    repeat (3) @(posedge clk);
    #1;
  endtask

  // SA2 must see one column per cycle from its first to its last
  always @(posedge clk) begin
    #2;
    if (sa_valid[1]) in_run2 = 1;
    else if (in_run2 && scanning && int'(dut.state) == 1 && dut.sc[1].act) gaps2++;
    if (!busy) in_run2 = 0;
  end

  initial begin
    start = 0; r = 0; sa1_min_tag = '0; sa2_min_tag = '0; sa1_min_sad = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
    for (int rin = 0; rin <= 4; rin++) run_search(rin);
    run_search(9);
    checks++;
    if (gaps2 != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

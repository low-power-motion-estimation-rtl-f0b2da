// tb_me_top: end-to-end test of the two-array motion estimator at its
// default size (N = 16, p = 11, r1 = 4, update every 5 frames).
//
// Each "frame" here is one macro-block: a random, smooth 38 x 38 search
// window is loaded together with a current block cut from it at a chosen
// displacement plus a little noise, then the search runs. The displacement
// is sometimes inside region 1, sometimes far outside. SA2's register bits
// are flipped at random with a per-bit, per-cycle probability that changes
// from frame to frame (0, 1/10000, 1/1000, 1/100), the way a voltage-scaled
// array would err; SA1 stays exact.
//
// The reference computes all (2p+1)^2 SADs here. Without errors the motion
// vector must be exactly what the two-region scheme selects (raster-order
// minimum of each region, region 1 kept on a tie). With errors the reported
// SAD must still be the exact SAD of the reported vector, never worse than
// the region-1 minimum, and a region-2 vector must be SA2's winner. The
// test counts: region-1 wins, region-2 wins, SA2 winners whose SAD was
// corrupted, corrupted winners rejected by the re-evaluation, increases and
// decreases of r driven by qp, and blocks searched at each r. Each must
// happen at least once. The cycles per block, loading included, must stay
// within the 125 MHz budget for CIF at 20 frames/s: 125e6/(20*396) = 15782.
module tb_me_top;
  import me_pkg::*;
  localparam int N = N_DEF, P = P_DEF, W = 2*P + N;
  localparam int AW = $clog2(W), CW = $clog2(N);
  localparam int BUDGET = 125000000 / (20 * 396);
  localparam int FRAMES = 40;

  logic clk = 0, rst_n = 0;
  logic sw_we, cb_we, mb_start, mb_busy, mb_done, frame_done, r_inc, r_dec;
  logic [AW-1:0] sw_wx, sw_wy;
  logic [CW-1:0] cb_wx, cb_wy;
  pixel_t sw_wd, cb_wd;
  mv_t mv;
  logic [15:0] mv_sad, cand1, cand2, qp, qp_th;
  logic [2:0] r;
  logic [3:0] r_used;
  logic [11:0] sa2_flip_ad [N];
  logic [15:0] sa2_flip_acc;
  int checks = 0, failures = 0;
  int cycle = 0;

  me_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (FRAMES * 20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // bit-flip source for SA2: probability ppm per bit and cycle
  int ppm = 0;
  always @(negedge clk) begin
    for (int j = 0; j < N; j++)
      for (int b = 0; b < 12; b++)
        sa2_flip_ad[j][b] <= (ppm > 0) && ($urandom_range(0, 999999) < ppm);
    for (int b = 0; b < 16; b++)
      sa2_flip_acc[b] <= (ppm > 0) && ($urandom_range(0, 999999) < ppm);
  end

  pixel_t win [W][W];
  pixel_t cur [N][N];
  int sad_ref [2*P+1][2*P+1];

  int n_win1 = 0, n_win2 = 0, n_corrupt = 0, n_rejected = 0, n_inc = 0, n_dec = 0;
  int n_at_r [5] = '{0, 0, 0, 0, 0};

  always @(posedge clk) begin
    if (rst_n && r_inc) n_inc++;
    if (rst_n && r_dec) n_dec++;
  end

  function automatic int clip(int v);
    return v < 0 ? 0 : v > 255 ? 255 : v;
  endfunction

  task automatic load_block(input int mdx, input int mdy);
    int base = $urandom_range(40, 200);
    for (int x = 0; x < W; x++)
      for (int y = 0; y < W; y++)
        win[x][y] = pixel_t'(clip(base + ((x * 7 + y * 3) % 23) + $urandom_range(0, 60) - 30));
    for (int x = 0; x < N; x++)
      for (int y = 0; y < N; y++)
        cur[x][y] = pixel_t'(clip(int'(win[x + P + mdx][y + P + mdy]) + $urandom_range(0, 6) - 3));
    for (int x = 0; x < W; x++)
      for (int y = 0; y < W; y++) begin
        sw_we = 1; sw_wx = AW'(x); sw_wy = AW'(y); sw_wd = win[x][y];
        cb_we = (x < N && y < N);
        cb_wx = CW'(x % N); cb_wy = CW'(y % N); cb_wd = cur[x % N][y % N];
        @(posedge clk); #1;
      end
    sw_we = 0; cb_we = 0;
  endtask

  function automatic int sad_at(int dx, int dy);
    int s = 0;
    for (int x = 0; x < N; x++)
      for (int y = 0; y < N; y++) begin
        int d = int'(cur[x][y]) - int'(win[x + P + dx][y + P + dy]);
        s += d < 0 ? -d : d;
      end
    return s;
  endfunction

  task automatic search_block(input int f);
    int rr, t0, t1, b1, b2, b1x, b1y, b2x, b2y;
    int edx, edy, esad, gdx, gdy, wdx, wdy, wexact;
    bit in1;
    rr = int'(r);
    for (int dy = -P; dy <= P; dy++)
      for (int dx = -P; dx <= P; dx++) sad_ref[dx + P][dy + P] = sad_at(dx, dy);
    b1 = -1; b2 = -1;
    for (int dy = -P; dy <= P; dy++)
      for (int dx = -P; dx <= P; dx++) begin
        in1 = (dx >= -rr && dx <= rr && dy >= -rr && dy <= rr);
        if (in1 && (b1 < 0 || sad_ref[dx+P][dy+P] < b1)) begin b1 = sad_ref[dx+P][dy+P]; b1x = dx; b1y = dy; end
        if (!in1 && (b2 < 0 || sad_ref[dx+P][dy+P] < b2)) begin b2 = sad_ref[dx+P][dy+P]; b2x = dx; b2y = dy; end
      end
    t0 = cycle;
    mb_start = 1;
    @(posedge clk); #1;
    mb_start = 0;
    while (!mb_done) @(posedge clk);
    #1 t1 = cycle;
    n_at_r[int'(r_used)]++;
    gdx = int'($signed(mv.dx)); gdy = int'($signed(mv.dy));
    // SA2's winner and what its SAD really is
    wdx = int'($signed(dut.u_sa2.min_tag.dx)); wdy = int'($signed(dut.u_sa2.min_tag.dy));
    wexact = sad_ref[wdx + P][wdy + P];
    if (int'(dut.u_sa2.min_sad) != wexact) begin
      n_corrupt++;
      if (int'(dut.u_sa2.min_sad) < b1 && wexact >= b1) n_rejected++;
    end
    checks++;
    if (int'(r_used) != rr) begin failures++; $display("FAIL frame %0d r_used %0d exp %0d", f, r_used, rr); end
    if (ppm == 0) begin
      if (b2 < b1) begin edx = b2x; edy = b2y; esad = b2; end
      else begin edx = b1x; edy = b1y; esad = b1; end
      checks++;
      if (gdx != edx || gdy != edy || int'(mv_sad) != esad) begin
        failures++;
        $display("FAIL frame %0d mv (%0d,%0d) sad %0d exp (%0d,%0d) %0d", f, gdx, gdy, mv_sad, edx, edy, esad);
      end
    end else begin
      checks++;
      if (int'(mv_sad) != sad_ref[gdx + P][gdy + P] || int'(mv_sad) > b1 ||
          (!(gdx >= -rr && gdx <= rr && gdy >= -rr && gdy <= rr) && (gdx != wdx || gdy != wdy))) begin
        failures++;
        $display("FAIL frame %0d (noisy) mv (%0d,%0d) sad %0d exact %0d region-1 best %0d", f, gdx, gdy, mv_sad, sad_ref[gdx+P][gdy+P], b1);
      end
    end
    if (gdx >= -rr && gdx <= rr && gdy >= -rr && gdy <= rr) n_win1++; else n_win2++;
    checks++;
    if (t1 - t0 + W * W > BUDGET) begin
      failures++;
      $display("FAIL frame %0d: %0d cycles over budget %0d", f, t1 - t0 + W * W, BUDGET);
    end
    $display("frame %2d r=%0d noise=%0dppm mv=(%0d,%0d) sad=%0d ref1=%0d ref2=%0d sa2 sad %0d/%0d cycles %0d",
             f, rr, ppm, gdx, gdy, mv_sad, b1, b2, dut.u_sa2.min_sad, wexact, t1 - t0);
  endtask

  initial begin
    sw_we = 0; cb_we = 0; sw_wx = 0; sw_wy = 0; sw_wd = 0; cb_wx = 0; cb_wy = 0; cb_wd = 0;
    mb_start = 0; frame_done = 0; qp = 0; qp_th = 16'd3960;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int f = 0; f < FRAMES; f++) begin
      int mdx, mdy;
      // qp high in frames 0-9 (r grows), low in 10-34 (r shrinks), then in the dead band
      ppm = (f % 4 == 0) ? 0 : (f % 4 == 1) ? 100 : (f % 4 == 2) ? 1000 : 10000;
      if (f % 3 == 0) begin mdx = $urandom_range(0, 2) - 1; mdy = $urandom_range(0, 2) - 1; end
      else begin mdx = $urandom_range(0, 2*P) - P; mdy = $urandom_range(0, 2*P) - P; end
      load_block(mdx, mdy);
      search_block(f);
      qp = (f < 10) ? 16'd4300 : (f < 35) ? 16'd3500 : 16'd3990;
      frame_done = 1;
      @(posedge clk); #1;
      frame_done = 0;
      @(posedge clk); #1;
    end
    $display("region-1 wins %0d, region-2 wins %0d, corrupted SA2 winners %0d, rejected by re-evaluation %0d",
             n_win1, n_win2, n_corrupt, n_rejected);
    $display("r increases %0d, decreases %0d, blocks at r=0..4: %0d %0d %0d %0d %0d",
             n_inc, n_dec, n_at_r[0], n_at_r[1], n_at_r[2], n_at_r[3], n_at_r[4]);
    checks++;
    if (n_win1 == 0 || n_win2 == 0 || n_corrupt == 0 || n_rejected == 0 || n_inc == 0 || n_dec == 0)
      failures++;
    for (int k = 0; k <= 4; k++) begin
      checks++;
      if (n_at_r[k] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

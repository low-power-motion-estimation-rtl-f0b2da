// tb_me_cif: workload test, one CIF frame (352 x 288, 396 macro-blocks of
// 16 x 16) through the motion estimator at its default size (p = 11).
//
// The frames are synthetic: a textured previous frame, and a current frame
// in which the background is still, one object moves by (3, -2), another by
// (-9, 6), and every pixel carries a little noise. The frame store around
// the estimator is modelled here: for each macro-block it loads the
// 38 x 38 search window, with pixels outside the frame taken from the
// nearest edge pixel, and the current block.
//
// The same frame pair is searched twice:
//  1. SA2 error free: every motion vector and SAD must equal the two-region
//     selection computed here from all 529 exact SADs.
//  2. SA2 with random bit flips (1/10000, then 1/1000 per register bit and
//     cycle): each
//     reported SAD must be the exact SAD of its vector and no worse than
//     the region-1 minimum.
// For both runs the PSNR of the motion-compensated frame is printed, and the
// cycles per frame, window loading included, must stay within the budget of
// a 125 MHz clock at 20 frames/s (6.25 million cycles).
module tb_me_cif;
  import me_pkg::*;
  localparam int N = N_DEF, P = P_DEF, W = 2*P + N;
  localparam int AW = $clog2(W), CW = $clog2(N);
  localparam int FW = 352, FH = 288, MBX = FW / N, MBY = FH / N;
  localparam int FRAME_BUDGET = 125000000 / 20;

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
    repeat (3 * FRAME_BUDGET) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int ppm = 0;
  always @(negedge clk) begin
    for (int j = 0; j < N; j++)
      for (int b = 0; b < 12; b++)
        sa2_flip_ad[j][b] <= (ppm > 0) && ($urandom_range(0, 999999) < ppm);
    for (int b = 0; b < 16; b++)
      sa2_flip_acc[b] <= (ppm > 0) && ($urandom_range(0, 999999) < ppm);
  end

  pixel_t prev [FW][FH];
  pixel_t curf [FW][FH];
  pixel_t win [W][W];
  pixel_t cur [N][N];
  int mvx [MBX][MBY], mvy [MBX][MBY];

  function automatic int clip(int v, int lo, int hi);
    return v < lo ? lo : v > hi ? hi : v;
  endfunction

  function automatic int texture(int x, int y);
    // smooth gradients plus a fixed pseudo-random pattern
    int h = ((x * 73856093) ^ (y * 19349663)) & 32'h7fffffff;
    return clip(60 + (x % 64) + ((y * 3) % 50) + ((x / 16 + y / 16) % 3) * 20 + (h % 40), 0, 255);
  endfunction

  task automatic make_frames();
    for (int x = 0; x < FW; x++)
      for (int y = 0; y < FH; y++) prev[x][y] = pixel_t'(texture(x, y));
    for (int x = 0; x < FW; x++)
      for (int y = 0; y < FH; y++) begin
        int sx = x, sy = y;
        if (x >= 64 && x < 160 && y >= 48 && y < 144) begin sx = x - 3; sy = y + 2; end
        else if (x >= 208 && x < 320 && y >= 160 && y < 256) begin sx = x + 9; sy = y - 6; end
        curf[x][y] = pixel_t'(clip(int'(prev[clip(sx, 0, FW-1)][clip(sy, 0, FH-1)]) +
                                   $urandom_range(0, 4) - 2, 0, 255));
      end
  endtask

  task automatic load_mb(input int bx, input int by);
    for (int x = 0; x < W; x++)
      for (int y = 0; y < W; y++) begin
        win[x][y] = prev[clip(bx*N - P + x, 0, FW-1)][clip(by*N - P + y, 0, FH-1)];
        if (x < N && y < N) cur[x][y] = curf[bx*N + x][by*N + y];
        sw_we = 1; sw_wx = AW'(x); sw_wy = AW'(y); sw_wd = win[x][y];
        cb_we = (x < N && y < N);
        cb_wx = CW'(x % N); cb_wy = CW'(y % N); cb_wd = curf[bx*N + (x % N)][by*N + (y % N)];
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

  task automatic run_frame(input int noise, output real psnr, output int cycles);
    int t0, rr, n_r2;
    real se;
    ppm = noise;
    t0 = cycle;
    n_r2 = 0;
    for (int by = 0; by < MBY; by++)
      for (int bx = 0; bx < MBX; bx++) begin
        int b1, b2, b1x, b1y, b2x, b2y, gdx, gdy, s;
        load_mb(bx, by);
        rr = int'(r);
        b1 = -1; b2 = -1;
        for (int dy = -P; dy <= P; dy++)
          for (int dx = -P; dx <= P; dx++) begin
            bit in1;
            in1 = (dx >= -rr && dx <= rr && dy >= -rr && dy <= rr);
            s = sad_at(dx, dy);
            if (in1 && (b1 < 0 || s < b1)) begin b1 = s; b1x = dx; b1y = dy; end
            if (!in1 && (b2 < 0 || s < b2)) begin b2 = s; b2x = dx; b2y = dy; end
          end
        mb_start = 1;
        @(posedge clk); #1;
        mb_start = 0;
        while (!mb_done) @(posedge clk);
        #1;
        gdx = int'($signed(mv.dx)); gdy = int'($signed(mv.dy));
        mvx[bx][by] = gdx; mvy[bx][by] = gdy;
        if (!(gdx >= -rr && gdx <= rr && gdy >= -rr && gdy <= rr)) n_r2++;
        checks++;
        if (noise == 0) begin
          int ex, ey, es;
          if (b2 < b1) begin ex = b2x; ey = b2y; es = b2; end
          else begin ex = b1x; ey = b1y; es = b1; end
          if (gdx != ex || gdy != ey || int'(mv_sad) != es) begin
            failures++;
            if (failures < 10) $display("FAIL mb (%0d,%0d) mv (%0d,%0d) %0d exp (%0d,%0d) %0d", bx, by, gdx, gdy, mv_sad, ex, ey, es);
          end
        end else begin
          if (int'(mv_sad) != sad_at(gdx, gdy) || int'(mv_sad) > b1) begin
            failures++;
            if (failures < 10) $display("FAIL mb (%0d,%0d) noisy: sad %0d exact %0d region-1 %0d", bx, by, mv_sad, sad_at(gdx, gdy), b1);
          end
        end
      end
    cycles = cycle - t0;
    // PSNR of the motion-compensated frame
    se = 0.0;
    for (int x = 0; x < FW; x++)
      for (int y = 0; y < FH; y++) begin
        int bx = x / N, by = y / N, d;
        d = int'(curf[x][y]) - int'(prev[clip(x + mvx[bx][by], 0, FW-1)][clip(y + mvy[bx][by], 0, FH-1)]);
        se += real'(d * d);
      end
    psnr = 10.0 * $log10(255.0 * 255.0 / (se / real'(FW * FH)));
    $display("noise %0d ppm: %0d cycles for the frame, %0d vectors from region 2, PSNR %0.2f dB",
             noise, cycles, n_r2, psnr);
  endtask

  initial begin
    real p0, p1, p2;
    int c0, c1, c2;
    sw_we = 0; cb_we = 0; sw_wx = 0; sw_wy = 0; sw_wd = 0; cb_wx = 0; cb_wy = 0; cb_wd = 0;
    mb_start = 0; frame_done = 0; qp = 0; qp_th = 0;
    make_frames();
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    run_frame(0, p0, c0);
    run_frame(100, p1, c1);
    run_frame(1000, p2, c2);
    checks += 3;
    if (c0 > FRAME_BUDGET) failures++;
    if (c1 > FRAME_BUDGET) failures++;
    if (c2 > FRAME_BUDGET) failures++;
    $display("PSNR loss with errors in SA2: %0.3f dB (1e-4), %0.3f dB (1e-3)", p0 - p1, p0 - p2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

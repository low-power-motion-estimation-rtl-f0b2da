// tb_me_mem: self-checking test of the pixel memory at N = 16, p = 11.
// Fills the 38 x 38 search window and the 16 x 16 current block with random
// pixels (kept in a copy here), then issues random column reads on both
// ports every cycle and checks, one cycle later, the 16 candidate pixels
// rows y..y+15 of column x and the 16 pixels of current-block column cx.
module tb_me_mem;
  import me_pkg::*;
  localparam int N = 16, P = 11, W = 2*P + N, AW = $clog2(W), CW = $clog2(N);

  logic clk = 0;
  logic sw_we, cb_we;
  logic [AW-1:0] sw_wx, sw_wy;
  logic [CW-1:0] cb_wx, cb_wy;
  pixel_t sw_wd, cb_wd;
  logic [AW-1:0] rd_x [2], rd_y [2];
  logic [CW-1:0] cb_rx [2];
  pixel_t cand_col [2][N], cur_col [2][N];
  int checks = 0, failures = 0;
  pixel_t sw [W][W], cb [N][N];

  me_mem #(.N(N), .P(P)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ex [2], ey [2], ec [2];
    sw_we = 0; cb_we = 0; sw_wx = 0; sw_wy = 0; cb_wx = 0; cb_wy = 0; sw_wd = 0; cb_wd = 0;
    for (int k = 0; k < 2; k++) begin rd_x[k] = 0; rd_y[k] = 0; cb_rx[k] = 0; end
    @(posedge clk); #1;
    for (int x = 0; x < W; x++)
      for (int y = 0; y < W; y++) begin
        sw[x][y] = pixel_t'($urandom);
        sw_we = 1; sw_wx = AW'(x); sw_wy = AW'(y); sw_wd = sw[x][y];
        cb_we = (x < N && y < N);
        if (x < N && y < N) begin
          cb[x][y] = pixel_t'($urandom);
          cb_wx = CW'(x); cb_wy = CW'(y); cb_wd = cb[x][y];
        end
        @(posedge clk); #1;
      end
    sw_we = 0; cb_we = 0;
    for (int i = 0; i < 2000; i++) begin
      for (int k = 0; k < 2; k++) begin
        ex[k] = $urandom_range(0, W - 1);
        ey[k] = $urandom_range(0, 2*P);
        ec[k] = $urandom_range(0, N - 1);
        if (i == 0) begin ex[k] = W - 1; ey[k] = 2*P; ec[k] = N - 1; end
        rd_x[k] = AW'(ex[k]); rd_y[k] = AW'(ey[k]); cb_rx[k] = CW'(ec[k]);
      end
      @(posedge clk); #1;
      for (int k = 0; k < 2; k++)
        for (int j = 0; j < N; j++) begin
          checks++;
          if (cand_col[k][j] != sw[ex[k]][ey[k] + j] || cur_col[k][j] != cb[ec[k]][j]) begin
            failures++;
            if (failures < 10) $display("FAIL port %0d x %0d y %0d row %0d", k, ex[k], ey[k], j);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

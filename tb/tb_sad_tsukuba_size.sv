// tb_sad_tsukuba_size: the disparity unit at the size of the standard
// Tsukuba stereo test pair: 384x288 pixels, 7x7 windows, a search width of
// 20 disparities, thresholds 128/750 and second-best distance 2.
//
// The real image pair is not used; a synthetic scene of the same size takes
// its place: random texture in which the true disparity changes from 0 to
// 15 (the largest disparity of the real pair) across vertical bands, with
// +-3 grey levels of noise on the right image and a flat band where no good
// match exists. Every result, minimum SAD and both flags, is compared with
// a direct search computed here, and the frame clock count with
// H*W + (H+3)*NDISP*(W+6) + 2. Also counted: results at the true disparity.
module tb_sad_tsukuba_size;
  import m6_pkg::*;
  localparam int IW = 384, IH = 288, WIN = 7, ND = 20, M = 3;
  localparam int SAD_W = 14, DW = 5;

  logic clk = 0, rst_n = 1;
  always #10 clk = ~clk;

  logic in_req, in_ack, out_req, out_ack, out_thr_ok, out_sbd_ok, frame_done;
  pair_t in_data;
  logic [SAD_W-1:0] thr_low, thr_high, out_sad;
  logic [DW-1:0] sbd_thr, out_disp;

  sad_disparity #(.IMG_W(IW), .IMG_H(IH), .WIN(WIN), .NDISP(ND)) dut (.*);

  int checks = 0, failures = 0, nfail = 0;
  int L [IH][IW];
  int R [IH][IW];
  int truth [IW];
  typedef struct {int d; int s; bit thr; bit sbd;} res_t;
  res_t exp_q [$];
  int nres = 0, n_true = 0, thr_set = 0, sbd_set = 0;
  int cyc = 0, t_start = 0, t_done = 0;

  function automatic int img(bit right, int x, int y);
    if (x < 0 || x >= IW || y < 0 || y >= IH) return 0;
    return right ? R[y][x] : L[y][x];
  endfunction

  task automatic make_scene();
    int rows [IH][ND][IW];
    for (int x = 0; x < IW; x++) truth[x] = (x / 24) % 16;
    for (int y = 0; y < IH; y++)
      for (int x = 0; x < IW; x++)
        L[y][x] = (x >= 200 && x < 224) ? 120 : int'($urandom % 256);
    // right image: R(x + d) = L(x) + noise, so L(x) matches R(x + d)
    for (int y = 0; y < IH; y++)
      for (int x = 0; x < IW; x++) R[y][x] = int'($urandom % 256);
    for (int y = 0; y < IH; y++)
      for (int x = 0; x < IW; x++) begin
        int v, xr;
        xr = x + truth[x];
        if (xr < IW) begin
          v = L[y][x] + int'($urandom % 7) - 3;
          R[y][xr] = (v < 0) ? 0 : (v > 255 ? 255 : v);
        end
      end
    for (int y = 0; y < IH; y++)
      for (int v = 0; v < ND; v++)
        for (int x = 0; x < IW; x++) begin
          int t;
          t = 0;
          for (int i = -M; i <= M; i++) begin
            int a;
            a = img(0, x + i, y) - img(1, x + v + i, y);
            t += (a < 0) ? -a : a;
          end
          rows[y][v][x] = t;
        end
    for (int y = 0; y < IH; y++)
      for (int x = 0; x < IW; x++) begin
        int best, bd, sec, sd;
        res_t r;
        best = 0; bd = 0; sec = 0; sd = 0;
        for (int v = 0; v < ND; v++) begin
          int t;
          t = 0;
          for (int j = -M; j <= M; j++)
            if (y + j >= 0 && y + j < IH) t += rows[y + j][v][x];
          if (v == 0) begin best = t; bd = 0; sec = (1 << SAD_W) - 1; sd = 0; end
          else if (t < best) begin sec = best; sd = bd; best = t; bd = v; end
          else if (t < sec) begin sec = t; sd = v; end
        end
        r.d = bd; r.s = best;
        r.thr = best >= 128 && best <= 750;
        r.sbd = ((bd > sd) ? bd - sd : sd - bd) <= 2;
        exp_q.push_back(r);
      end
  endtask

  always @(posedge clk) begin
    cyc++;
    if (rst_n && frame_done) t_done = cyc;
    if (rst_n && out_req && out_ack) begin
      res_t e;
      e = exp_q.pop_front();
      checks++;
      if (int'(out_disp) != e.d || int'(out_sad) != e.s || out_thr_ok != e.thr || out_sbd_ok != e.sbd) begin
        failures++;
        nfail++;
        if (nfail < 10)
          $display("FAIL result (x %0d y %0d): d %0d sad %0d thr %b sbd %b expected d %0d sad %0d thr %b sbd %b",
                   nres % IW, nres / IW, out_disp, out_sad, out_thr_ok, out_sbd_ok, e.d, e.s, e.thr, e.sbd);
      end
      if (int'(out_disp) == truth[nres % IW]) n_true++;
      if (out_thr_ok) thr_set++;
      if (out_sbd_ok) sbd_set++;
      nres++;
    end
  end

  initial begin
    #200ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int expect_cyc;
    #1 rst_n = 0;
    in_req = 0; in_data = '0; out_ack = 1;
    thr_low = 14'd128; thr_high = 14'd750; sbd_thr = 5'd2;
    make_scene();
    #34 rst_n = 1;
    @(posedge clk); #1;
    for (int y = 0; y < IH; y++)
      for (int x = 0; x < IW; x++) begin
        in_data.sof = (x == 0 && y == 0);
        in_data.left = 8'(L[y][x]);
        in_data.right = 8'(R[y][x]);
        in_req = 1;
        @(posedge clk);
        while (!in_ack) @(posedge clk);
        if (x == 0 && y == 0) t_start = cyc;
        #1;
      end
    in_req = 0;
    wait (exp_q.size() == 0);
    wait (t_done != 0);
    expect_cyc = IH * IW + (IH + M) * ND * (IW + 2 * M) + 2;
    checks++;
    if (t_done - t_start + 1 != expect_cyc) begin
      failures++;
      $display("FAIL frame took %0d cycles, expected %0d", t_done - t_start + 1, expect_cyc);
    end
    $display("frame: %0d cycles = %0.1f ms at 50 MHz; %0d of %0d results at the true disparity; thr_ok %0d, sbd_ok %0d",
             expect_cyc, expect_cyc * 20.0e-6, n_true, nres, thr_set, sbd_set);
    checks++;
    if (nres != IW * IH || n_true < IW * IH * 8 / 10) begin
      failures++;
      $display("FAIL %0d results, %0d at the true disparity", nres, n_true);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

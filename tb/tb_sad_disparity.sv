// tb_sad_disparity: self-checking test of the SAD disparity unit.
//
// A 24x10 stereo pair is built from random texture: the right image is the
// left one shifted by a disparity that differs between the left and right
// halves of the image, plus small noise. For every pixel and disparity the
// expected 7x7 window SAD is computed here directly (zero outside the
// image), and from it the best and second-best disparity by the unit's
// rule (ties to the smaller disparity), the minimum SAD and both
// confidence flags. Frame 1 runs with input always available and the sink
// always ready and checks the clock count of a frame: H*W clocks to load
// lines plus (H+3) passes of NDISP*(W+6) clocks. Frame 2 stalls the result
// sink at random and changes thresholds. Also counted: how many results
// have each confidence flag set and cleared (all four must occur).
module tb_sad_disparity;
  import m6_pkg::*;
  localparam int IW = 24, IH = 10, WIN = 7, ND = 8, M = 3;
  localparam int SAD_W = 14, DW = 3;

  logic clk = 0, rst_n = 0;
  always #10 clk = ~clk;

  logic in_req, in_ack, out_req, out_ack, out_thr_ok, out_sbd_ok, frame_done;
  pair_t in_data;
  logic [SAD_W-1:0] thr_low, thr_high, out_sad;
  logic [DW-1:0] sbd_thr, out_disp;

  sad_disparity #(.IMG_W(IW), .IMG_H(IH), .WIN(WIN), .NDISP(ND)) dut (.*);

  int checks = 0, failures = 0;
  logic [7:0] L [IH][IW];
  logic [7:0] R [IH][IW];
  typedef struct {int d; int s; bit thr; bit sbd;} res_t;
  res_t exp_q [$];
  bit stalls = 0;
  int nres = 0, thr_set = 0, thr_clr = 0, sbd_set = 0, sbd_clr = 0;
  int cyc = 0, t_start = 0, t_done = 0;

  function automatic int px(bit right, int x, int y);
    if (x < 0 || x >= IW || y < 0 || y >= IH) return 0;
    return right ? int'(R[y][x]) : int'(L[y][x]);
  endfunction

  task automatic make_frame(input int seed_shift);
    for (int y = 0; y < IH; y++)
      for (int x = 0; x < IW; x++) L[y][x] = 8'($urandom);
    for (int y = 0; y < IH; y++)
      for (int x = 0; x < IW; x++) begin
        int d, v;
        d = (x < IW / 2) ? 2 + seed_shift : 5;
        v = (x - d >= 0) ? int'(L[y][x-d]) : int'($urandom % 256);
        v = v + int'($urandom % 9) - 4;
        R[y][x] = 8'((v < 0) ? 0 : (v > 255 ? 255 : v));
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
            for (int i = -M; i <= M; i++) begin
              int a;
              a = px(0, x + i, y + j) - px(1, x + v + i, y + j);
              t += (a < 0) ? -a : a;
            end
          if (v == 0) begin best = t; bd = 0; sec = (1 << SAD_W) - 1; sd = 0; end
          else if (t < best) begin sec = best; sd = bd; best = t; bd = v; end
          else if (t < sec) begin sec = t; sd = v; end
        end
        r.d = bd; r.s = best;
        r.thr = (best >= int'(thr_low)) && (best <= int'(thr_high));
        r.sbd = ((bd > sd) ? bd - sd : sd - bd) <= int'(sbd_thr);
        exp_q.push_back(r);
      end
  endtask

  always @(posedge clk) begin
    cyc++;
    out_ack <= stalls ? 1'($urandom % 4 == 0) : 1'b1;
    if (rst_n && frame_done) t_done = cyc;
    if (rst_n && out_req && out_ack) begin
      res_t e;
      e = exp_q.pop_front();
      checks++;
      if (int'(out_disp) != e.d || int'(out_sad) != e.s || out_thr_ok != e.thr || out_sbd_ok != e.sbd) begin
        failures++;
        $display("FAIL result %0d (x %0d y %0d): d %0d sad %0d thr %b sbd %b expected d %0d sad %0d thr %b sbd %b",
                 nres, nres % IW, nres / IW, out_disp, out_sad, out_thr_ok, out_sbd_ok, e.d, e.s, e.thr, e.sbd);
      end
      if (out_thr_ok) thr_set++; else thr_clr++;
      if (out_sbd_ok) sbd_set++; else sbd_clr++;
      nres++;
    end
  end

  task automatic send_frame();
    for (int y = 0; y < IH; y++)
      for (int x = 0; x < IW; x++) begin
        in_data.sof = (x == 0 && y == 0);
        in_data.left = L[y][x];
        in_data.right = R[y][x];
        in_req = 1;
        @(posedge clk);
        while (!in_ack) @(posedge clk);
        if (x == 0 && y == 0) t_start = cyc;
        #1;
      end
    in_req = 0;
  endtask

  initial begin
    #20000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int expect_cyc;
    in_req = 0; in_data = '0;
    thr_low = 14'd120; thr_high = 14'd260; sbd_thr = 3'd1;
    #35 rst_n = 1;
    @(posedge clk); #1;
    // frame 1: full speed, clock count
    make_frame(0);
    send_frame();
    wait (exp_q.size() == 0);
    wait (t_done != 0);
    // two extra clocks: the state change after the last step and the
    // registered frame_done pulse
    expect_cyc = IH * IW + (IH + M) * ND * (IW + 2 * M) + 2;
    checks++;
    if (t_done - t_start + 1 != expect_cyc) begin
      failures++;
      $display("FAIL frame took %0d cycles, expected %0d", t_done - t_start + 1, expect_cyc);
    end else $display("frame of %0dx%0d, %0d disparities: %0d cycles", IW, IH, ND, expect_cyc);
    // frame 2: sink stalls, other thresholds and disparities
    stalls = 1;
    thr_low = 14'd60; thr_high = 14'd200; sbd_thr = 3'd2;
    make_frame(1);
    send_frame();
    wait (exp_q.size() == 0);
    repeat (10) @(posedge clk);
    checks++;
    if (nres != 2 * IW * IH || thr_set == 0 || thr_clr == 0 || sbd_set == 0 || sbd_clr == 0) begin
      failures++;
      $display("FAIL results %0d, thr %0d/%0d sbd %0d/%0d", nres, thr_set, thr_clr, sbd_set, sbd_clr);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

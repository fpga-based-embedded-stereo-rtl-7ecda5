// tb_m6_fpga_top_full: the stereo vision FPGA at its full size.
//
// The top level runs with all parameters at their defaults: 352x288
// images, 4x4 convolution, 7x7 SAD windows, 32 disparities, SRAM batches
// of 12. Two camera models send a textured scene, the right camera
// displaced by 5 pixels; the SRAM model has the full 512K-word address
// space; system clock 50 MHz, memory clock 100 MHz. After both cameras have
// written a frame, one convolution frame and one disparity frame are
// started together by a CPU register write. Every convolution result and
// every disparity result (disparity, minimum SAD and both confidence flags
// at the reset thresholds) is compared with values computed here from the
// camera images. The disparity frame time is measured from the start
// write to the frame-completed count and must reach at least 14 frames/s,
// the rate the unit is built for (about 15 frames/s at this size). The
// convolution sink stalls at random; the disparity sink is always ready.
module tb_m6_fpga_top_full;
  import m6_pkg::*;
  localparam int IW = 352, IH = 288, CW = 4, SW = 7, ND = 32, M = SW / 2;
  localparam int SAD_W = 14, DW = 5, DISP = 5;

  logic clk = 0, memclk = 0, rst_n = 1;
  always #10 clk = ~clk;
  always #5 memclk = ~memclk;

  logic [1:0] cam_pclk, cam_hsync, cam_vsync;
  logic [1:0][7:0] cam_y;
  logic [CPU_AW-1:0] cpu_addr;
  logic cpu_cs_n, cpu_oe_n, cpu_we_n, cpu_rdata_oe;
  logic [CPU_DW-1:0] cpu_wdata, cpu_rdata;
  logic [SRAM_AW-1:0] sram_addr;
  logic sram_ce_n, sram_we_n, sram_dq_oe, sram_drive;
  logic [SRAM_DW-1:0] sram_dq_o, sram_dq_i;
  logic conv_req, conv_ack, sad_req, sad_ack, sad_thr_ok, sad_sbd_ok;
  logic signed [31:0] conv_data;
  logic [DW-1:0] sad_disp;
  logic [SAD_W-1:0] sad_sad;
  int frames_sent [2];

  m6_fpga_top dut (.*);

  camera_model #(.IMG_W(IW), .IMG_H(IH), .HALF_NS(27.0), .SHIFT(0)) u_cam0 (
    .run(1'b1), .pclk(cam_pclk[0]), .hsync(cam_hsync[0]), .vsync(cam_vsync[0]), .y(cam_y[0]),
    .frames_sent(frames_sent[0]));
  camera_model #(.IMG_W(IW), .IMG_H(IH), .HALF_NS(29.0), .SHIFT(-DISP)) u_cam1 (
    .run(1'b1), .pclk(cam_pclk[1]), .hsync(cam_hsync[1]), .vsync(cam_vsync[1]), .y(cam_y[1]),
    .frames_sent(frames_sent[1]));

  sram_model #(.AW(SRAM_AW), .DW(SRAM_DW)) u_mem (
    .clk(memclk), .addr(sram_addr), .ce_n(sram_ce_n), .we_n(sram_we_n),
    .dq_i(sram_dq_o), .dq_i_en(sram_dq_oe), .dq_o(sram_dq_i), .dq_drive(sram_drive));

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // same hash as the camera model (SEED 1)
  function automatic int campix(int shift, int px, int py);
    int h;
    h = (px + shift) * 73 + py * 151 + 17;
    h = (h ^ (h >> 3)) * 2654435 + (px + shift) * py;
    return (h >> 5) & 255;
  endfunction

  int L [IH][IW];
  int R [IH][IW];
  int coefs [CW*CW];
  int conv_exp [$];
  typedef struct {int d; int s; bit thr; bit sbd;} res_t;
  res_t sad_exp [$];

  function automatic int img(bit right, int x, int y);
    if (x < 0 || x >= IW || y < 0 || y >= IH) return 0;
    return right ? R[y][x] : L[y][x];
  endfunction

  task automatic make_expected();
    int rows [IH][ND][IW];   // row SADs: sum over i of |L(x+i,y) - R(x+v+i,y)|
    for (int y = 0; y < IH; y++)
      for (int x = 0; x < IW; x++) begin
        L[y][x] = campix(0, x, y);
        R[y][x] = campix(-DISP, x, y);
      end
    for (int y = 0; y + CW <= IH; y++)
      for (int x = 0; x + CW <= IW; x++) begin
        int s;
        s = 0;
        for (int j = 0; j < CW; j++)
          for (int i = 0; i < CW; i++) s += coefs[j * CW + i] * L[y + j][x + i];
        conv_exp.push_back(s);
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
        sad_exp.push_back(r);
      end
  endtask

  int n_conv = 0, n_sad = 0, n_disp_ok = 0, conv_fail = 0, sad_fail = 0;

  always @(posedge clk) begin
    conv_ack <= 1'($urandom % 4 != 0);
    sad_ack  <= 1'b1;
    if (rst_n && conv_req && conv_ack) begin
      int e;
      e = (conv_exp.size() > 0) ? conv_exp.pop_front() : 32'h7fffffff;
      checks++;
      if (conv_data !== e) begin
        failures++; conv_fail++;
        if (conv_fail < 10) $display("FAIL convolution result %0d: %0d expected %0d", n_conv, conv_data, e);
      end
      n_conv++;
    end
    if (rst_n && sad_req && sad_ack) begin
      res_t e;
      checks++;
      if (sad_exp.size() == 0) begin failures++; $display("FAIL unexpected disparity result"); end
      else begin
        e = sad_exp.pop_front();
        if (int'(sad_disp) != e.d || int'(sad_sad) != e.s || sad_thr_ok != e.thr || sad_sbd_ok != e.sbd) begin
          failures++; sad_fail++;
          if (sad_fail < 10)
            $display("FAIL disparity result %0d: d %0d sad %0d thr %b sbd %b expected d %0d sad %0d thr %b sbd %b",
                     n_sad, sad_disp, sad_sad, sad_thr_ok, sad_sbd_ok, e.d, e.s, e.thr, e.sbd);
        end
      end
      if (int'(sad_disp) == DISP) n_disp_ok++;
      n_sad++;
    end
  end

  task automatic cpu_write(input int id, input int off, input logic [15:0] d);
    cpu_addr = {DEV_ID_W'(id), DEV_OFF_W'(off)};
    cpu_wdata = d;
    cpu_cs_n = 0; cpu_we_n = 0;
    #45;
    cpu_cs_n = 1; cpu_we_n = 1;
    #25;
  endtask

  task automatic cpu_read(input int id, input int off, output logic [15:0] d);
    cpu_addr = {DEV_ID_W'(id), DEV_OFF_W'(off)};
    cpu_cs_n = 0; cpu_oe_n = 0;
    #57;
    d = cpu_rdata;
    cpu_cs_n = 1; cpu_oe_n = 1;
    #23;
  endtask

  initial begin
    #400ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] d, d1;
    realtime t0, t1;
    // reset edge at 1 ns so that every register is reset before the first clock
    #1 rst_n = 0;
    cpu_addr = '0; cpu_cs_n = 1; cpu_oe_n = 1; cpu_we_n = 1; cpu_wdata = '0;
    #95 rst_n = 1;
    #200;
    for (int k = 0; k < CW * CW; k++) begin
      coefs[k] = (k % 5) - 2;
      cpu_write(1, k, 16'(coefs[k]));
    end
    make_expected();
    cpu_write(0, 1, 16'h3);
    do begin
      #100us;
      cpu_read(0, 5, d);
      cpu_read(0, 6, d1);
      if (d1 < d) d = d1;
    end while (d < 1);
    cpu_write(0, 0, 16'h3);
    t0 = $realtime;
    do begin
      #20us;
      cpu_read(0, 7, d);
    end while (d != 1);
    t1 = $realtime;
    do begin
      #20us;
      cpu_read(0, 0, d);
    end while (d[1:0] != 2'b00);
    #10us;
    cpu_read(0, 0, d);
    check(d[3:2] == 2'b00, "no camera overflow");
    check(conv_exp.size() == 0 && n_conv == (IW - CW + 1) * (IH - CW + 1),
          $sformatf("%0d convolution results", n_conv));
    check(sad_exp.size() == 0 && n_sad == IW * IH, $sformatf("%0d disparity results", n_sad));
    check(n_disp_ok > IW * IH * 9 / 10, $sformatf("%0d results at the true disparity", n_disp_ok));
    $display("disparity frame %0.2f ms (%0.1f frames/s), %0d of %0d pixels at disparity %0d",
             (t1 - t0) / 1ms, 1s / (t1 - t0), n_disp_ok, n_sad, DISP);
    $display("%0d convolution results, memory %0d reads %0d writes", n_conv, u_mem.reads, u_mem.writes);
    check((t1 - t0) <= 1s / 14.0, "at least 14 disparity frames per second");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_m6_fpga_top: end-to-end test of the stereo vision FPGA at a small
// image size (16x10, 8 disparities).
//
// Two camera models send the same textured scene, the right one displaced
// by 3 pixels; an SRAM model sits on the memory pins; the CPU bus is driven
// with read and write cycles of the board's static-memory timing. The test
//   1. reads the reset values of the control registers, writes thresholds
//      and the 16 convolution coefficients and reads them back,
//   2. enables both cameras and waits until each has written two frames,
//   3. starts a convolution and a disparity frame together and checks every
//      result against values computed here from the camera images,
//   4. runs a second disparity frame with other thresholds,
//   5. slows the memory clock until the camera receivers overflow, and
//      checks that the overflow shows in the status register.
// Result sinks stall at random. The memory clock runs at twice the system
// clock (until step 5), so read returns arrive faster than they drain.
// Each mechanism below is counted and must have happened at least once:
// write-arbiter alternation, read-arbiter priority and service of the low
// priority reader, SRAM read-to-write turnaround, full read and write
// batches, camera overflow, both values of both confidence flags, stalled
// result outputs, CPU register writes and reads. Reads held back for lack
// of return-queue room cannot occur here: the two readers' credits bound
// the reads in flight to 16, the depth of the return queue, so that
// mechanism is exercised by the memory controller's own tests; the count
// is printed for information.
module tb_m6_fpga_top;
  import m6_pkg::*;
  localparam int IW = 16, IH = 10, CW = 4, SW = 7, ND = 8, NB = 12, M = SW / 2;
  localparam int SAD_W = 14, DW = 3, DISP = 3;

  logic clk = 0, memclk = 0, rst_n = 1;
  real  mhalf = 5.0;
  always #10 clk = ~clk;
  always #(mhalf) memclk = ~memclk;

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

  m6_fpga_top #(.IMG_W(IW), .IMG_H(IH), .CONV_WIN(CW), .SAD_WIN(SW), .NDISP(ND), .NBATCH(NB)) dut (.*);

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

  // ---------------- reference images and results ----------------
  // same hash as the camera model (SEED 1)
  function automatic int campix(int shift, int px, int py);
    int h;
    h = (px + shift) * 73 + py * 151 + 17;
    h = (h ^ (h >> 3)) * 2654435 + (px + shift) * py;
    return (h >> 5) & 255;
  endfunction

  function automatic int imgpx(bit right, int x, int y);
    if (x < 0 || x >= IW || y < 0 || y >= IH) return 0;
    return campix(right ? -DISP : 0, x, y);
  endfunction

  int coefs [CW*CW];
  int conv_exp [$];
  typedef struct {int d; int s; bit thr; bit sbd;} res_t;
  res_t sad_exp [$];

  task automatic make_conv_exp();
    for (int y = 0; y + CW <= IH; y++)
      for (int x = 0; x + CW <= IW; x++) begin
        int s;
        s = 0;
        for (int j = 0; j < CW; j++)
          for (int i = 0; i < CW; i++) s += coefs[j * CW + i] * imgpx(0, x + i, y + j);
        conv_exp.push_back(s);
      end
  endtask

  task automatic make_sad_exp(input int lo, input int hi, input int sbd);
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
              a = imgpx(0, x + i, y + j) - imgpx(1, x + v + i, y + j);
              t += (a < 0) ? -a : a;
            end
          if (v == 0) begin best = t; bd = 0; sec = (1 << SAD_W) - 1; sd = 0; end
          else if (t < best) begin sec = best; sd = bd; best = t; bd = v; end
          else if (t < sec) begin sec = t; sd = v; end
        end
        r.d = bd; r.s = best;
        r.thr = best >= lo && best <= hi;
        r.sbd = ((bd > sd) ? bd - sd : sd - bd) <= sbd;
        sad_exp.push_back(r);
      end
  endtask

  // ---------------- result sinks ----------------
  int n_conv = 0, n_sad = 0, n_disp_ok = 0;
  int thr_set = 0, thr_clr = 0, sbd_set = 0, sbd_clr = 0, out_stalls = 0;

  always @(posedge clk) begin
    conv_ack <= 1'($urandom % 3 != 0);
    sad_ack  <= 1'($urandom % 3 != 0);
    if (rst_n && ((conv_req && !conv_ack) || (sad_req && !sad_ack))) out_stalls++;
    if (rst_n && conv_req && conv_ack) begin
      int e;
      checks++;
      if (conv_exp.size() == 0) begin failures++; $display("FAIL unexpected convolution result"); end
      else begin
        e = conv_exp.pop_front();
        if (conv_data !== e) begin
          failures++;
          $display("FAIL convolution result %0d: %0d expected %0d", n_conv, conv_data, e);
        end
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
          failures++;
          $display("FAIL disparity result %0d: d %0d sad %0d thr %b sbd %b expected d %0d sad %0d thr %b sbd %b",
                   n_sad, sad_disp, sad_sad, sad_thr_ok, sad_sbd_ok, e.d, e.s, e.thr, e.sbd);
        end
      end
      if (int'(sad_disp) == DISP) n_disp_ok++;
      if (sad_thr_ok) thr_set++; else thr_clr++;
      if (sad_sbd_ok) sbd_set++; else sbd_clr++;
      n_sad++;
    end
  end

  // ---------------- mechanism monitors ----------------
  int wr_alt = 0, wr_xfer = 0, rd_prio = 0, rd_low = 0, rd_xfer = 0;
  logic wr_last_grant = 1'b0;
  bit   wr_started = 0;

  always @(posedge clk) if (rst_n) begin
    // write arbiter: with both camera paths waiting the grant must alternate
    // (unless a grant made earlier is being held for a pending transfer)
    if (dut.wr_req && dut.wr_ack) begin
      if (dut.wa_req == 2'b11 && wr_started && !dut.u_write_arb.held) begin
        checks++;
        if (dut.wr_grant_unused == wr_last_grant) begin
          failures++;
          $display("FAIL write arbiter granted input %0d twice in a row", wr_last_grant);
        end else wr_alt++;
      end
      wr_last_grant = dut.wr_grant_unused;
      wr_started = 1;
      wr_xfer++;
    end
    // read arbiter: disparity reader (0) has priority, convolution (1) gets gaps
    if (dut.rd_req && dut.rd_ack) begin
      rd_xfer++;
      if (dut.rq_req == 2'b11 && dut.rd_grant == 1'b0) rd_prio++;
      if (dut.rd_grant == 1'b1) rd_low++;
    end
  end

  int turnarounds = 0, full_batches = 0, room_stalls = 0, run_len = 0, bus_errors = 0;
  bit last_was_rd = 0, prev_rd = 0;

  always @(posedge memclk) if (rst_n) begin
    if (dut.u_sram.u_interleave.bubble) turnarounds++;
    if (dut.u_sram.u_interleave.rq_req && !dut.u_sram.u_interleave.rd_room) room_stalls++;
    if (!sram_ce_n) begin
      bit is_rd;
      is_rd = sram_we_n;
      if (run_len > 0 && is_rd != last_was_rd) begin
        if (run_len == NB) full_batches++;
        run_len = 0;
      end
      run_len++;
      last_was_rd = is_rd;
      if (!is_rd && prev_rd) begin
        bus_errors++;
        $display("FAIL write on the memory pins right after a read");
      end
    end
    prev_rd = !sram_ce_n && sram_we_n;
  end

  // ---------------- CPU bus cycles ----------------
  int cpu_writes = 0, cpu_reads = 0;

  task automatic cpu_write(input int id, input int off, input logic [15:0] d);
    cpu_addr = {DEV_ID_W'(id), DEV_OFF_W'(off)};
    cpu_wdata = d;
    cpu_cs_n = 0; cpu_we_n = 0;
    #45;
    cpu_cs_n = 1; cpu_we_n = 1;
    #25;
    cpu_writes++;
  endtask

  task automatic cpu_read(input int id, input int off, output logic [15:0] d);
    cpu_addr = {DEV_ID_W'(id), DEV_OFF_W'(off)};
    cpu_cs_n = 0; cpu_oe_n = 0;
    #57;
    checks++;
    if (!cpu_rdata_oe) begin failures++; $display("FAIL CPU read %0d/%0d not driven", id, off); end
    d = cpu_rdata;
    cpu_cs_n = 1; cpu_oe_n = 1;
    #23;
    cpu_reads++;
  endtask

  task automatic cpu_expect(input int id, input int off, input logic [15:0] e);
    logic [15:0] d;
    cpu_read(id, off, d);
    check(d === e, $sformatf("register %0d/%0d read %h expected %h", id, off, d, e));
  endtask

  task automatic wait_idle();
    logic [15:0] d;
    do begin
      #2000;
      cpu_read(0, 0, d);
    end while (d[1:0] != 2'b00);
  endtask

  initial begin
    #20000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] d;
    // reset edge at 1 ns so that every register is reset before the first clock
    #1 rst_n = 0;
    cpu_addr = '0; cpu_cs_n = 1; cpu_oe_n = 1; cpu_we_n = 1; cpu_wdata = '0;
    #95 rst_n = 1;
    #200;
    // 1. registers
    cpu_expect(0, 2, 16'd128);
    cpu_expect(0, 3, 16'd750);
    cpu_expect(0, 4, 16'd2);
    cpu_expect(0, 0, 16'd0);
    cpu_expect(5, 9, 16'd0);
    for (int k = 0; k < CW * CW; k++) begin
      coefs[k] = int'((k * 37) % 19) - 9;
      cpu_write(1, k, 16'(coefs[k]));
    end
    for (int k = 0; k < CW * CW; k++) cpu_expect(1, k, 16'(coefs[k]));
    // 2. cameras
    cpu_write(0, 1, 16'h3);
    cpu_expect(0, 1, 16'h3);
    do begin
      logic [15:0] d1;
      #5000;
      cpu_read(0, 5, d);
      cpu_read(0, 6, d1);
      if (d1 < d) d = d1;
    end while (d < 2);
    // 3. convolution and disparity frame together, default thresholds
    make_conv_exp();
    make_sad_exp(128, 750, 2);
    cpu_write(0, 0, 16'h3);
    cpu_read(0, 0, d);
    check(d[1:0] == 2'b11, "both readers busy after start");
    wait_idle();
    wait (conv_exp.size() == 0 && sad_exp.size() == 0);
    check(n_conv == (IW - CW + 1) * (IH - CW + 1), $sformatf("%0d convolution results", n_conv));
    check(n_sad == IW * IH, $sformatf("%0d disparity results", n_sad));
    #1000;
    cpu_expect(0, 7, 16'd1);
    // 4. second disparity frame, other thresholds
    cpu_write(0, 2, 16'd0);
    cpu_write(0, 3, 16'd300);
    cpu_write(0, 4, 16'd1);
    make_sad_exp(0, 300, 1);
    cpu_write(0, 0, 16'h2);
    wait_idle();
    wait (sad_exp.size() == 0);
    #1000;
    cpu_expect(0, 7, 16'd2);
    cpu_read(0, 0, d);
    check(d[3:2] == 2'b00, "no camera overflow at full memory speed");
    // 5. memory clock far too slow for two cameras
    mhalf = 200.0;
    #60000;
    cpu_read(0, 0, d);
    check(d[3:2] == 2'b11, $sformatf("camera overflow flags %b", d[3:2]));
    mhalf = 5.0;
    #2000;

    $display("results: %0d convolution, %0d disparity (%0d at the true disparity %0d)", n_conv, n_sad, n_disp_ok, DISP);
    $display("write arbiter: %0d transfers, %0d alternations under contention", wr_xfer, wr_alt);
    $display("read arbiter: %0d transfers, %0d priority wins, %0d low-priority grants", rd_xfer, rd_prio, rd_low);
    $display("memory: %0d turnarounds, %0d full batches, %0d cycles without return room, %0d reads %0d writes",
             turnarounds, full_batches, room_stalls, u_mem.reads, u_mem.writes);
    $display("flags: thr %0d/%0d sbd %0d/%0d, output stalls %0d, CPU %0d writes %0d reads",
             thr_set, thr_clr, sbd_set, sbd_clr, out_stalls, cpu_writes, cpu_reads);
    check(wr_alt > 0, "write arbiter alternation");
    check(rd_prio > 0, "read arbiter priority");
    check(rd_low > 0, "low-priority reader served");
    check(turnarounds > 0, "read-to-write turnaround");
    check(full_batches > 0, "full batches");
    check(thr_set > 0 && thr_clr > 0, "threshold flag both ways");
    check(sbd_set > 0 && sbd_clr > 0, "second-best flag both ways");
    check(out_stalls > 0, "output stalls");
    check(n_disp_ok > IW * IH / 2, "most pixels at the true disparity");
    check(bus_errors == 0, "memory bus order");
    check(u_mem.conflicts == 0, "memory data line conflicts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

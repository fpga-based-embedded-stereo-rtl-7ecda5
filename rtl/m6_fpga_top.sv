// m6_fpga_top: stereo camera image processing system on the robot board's FPGA.
//
// Two cameras feed a shared external SRAM; processing units read their
// frames back out of it; the board CPU configures and monitors everything
// through a memory-mapped bus.
//
//   camera 0 -> camera_if -> mem_write_adapter --\
//                                               alt_arbiter -> write bus --\
//   camera 1 -> camera_if -> mem_write_adapter --/                          sram_ctrl -> SRAM
//   sad reader  (frames 0+1) --\                                            /
//                               prio_arbiter -> read bus ------------------/
//   conv reader (frame 0)    --/
//   sad reader -> sad_disparity -> disparity results (out)
//   conv reader -> conv2d -> convolution results (out)
//   CPU bus -> cpu_bus_if -> control registers (device 0), coefficients (device 1)
//
// Camera 0 is written to the frame buffer at FRAME0_BASE and camera 1 to
// FRAME1_BASE, one 8-bit pixel per 18-bit word. The disparity reader has
// priority on the read bus; the convolution reader, which needs one pixel per
// 16 clocks, takes the gaps. Read returns carry the arbiter's grant as a tag
// so they reach the reader that asked. Everything except the SRAM queues'
// far side runs on clk (M6CLK, 50 MHz); the SRAM runs on memclk (MEMCLK,
// 50-100 MHz, generated outside this module). Result streams leave on
// request/acknowledge ports.
//
// CPU register map (16-bit words; device ID = address bits 19:15,
// offset = bits 14:0):
//   device 0, offset 0  write: bit 0 starts a convolution frame, bit 1 a
//                       disparity frame; read: bit 0 convolution reader
//                       busy, bit 1 disparity reader busy, bit 2 camera 0
//                       overflow, bit 3 camera 1 overflow, bit 4
//                       convolution window sum in progress
//   device 0, offset 1  camera capture enable, bits 1:0
//   device 0, offset 2  disparity low threshold  (reset 128)
//   device 0, offset 3  disparity high threshold (reset 750)
//   device 0, offset 4  second-best distance threshold (reset 2)
//   device 0, offset 5  frames written from camera 0 (read only)
//   device 0, offset 6  frames written from camera 1 (read only)
//   device 0, offset 7  disparity frames completed (read only)
//   device 1, offset 0-15  convolution coefficients, row-major, two's
//                       complement, sign-extended to 18 bits
// Other devices read as zero. The map, the frame layout and the reset values
// of the thresholds are this design's; the thresholds are the values quoted
// as best for the Tsukuba test pair.
module m6_fpga_top
  import m6_pkg::*;
#(
  parameter int IMG_W  = 352,
  parameter int IMG_H  = 288,
  parameter int CONV_WIN = 4,
  parameter int SAD_WIN  = 7,
  parameter int NDISP    = 32,
  parameter int NBATCH   = 12,
  parameter int QDEPTH   = 16,
  parameter int SAD_W    = $clog2(SAD_WIN * SAD_WIN * 255 + 1),
  parameter int DW       = $clog2(NDISP)
) (
  input  logic                 clk,
  input  logic                 memclk,
  input  logic                 rst_n,
  // cameras
  input  logic [1:0]           cam_pclk,
  input  logic [1:0]           cam_hsync,
  input  logic [1:0]           cam_vsync,
  input  logic [1:0][PIX_W-1:0] cam_y,
  // CPU bus
  input  logic [CPU_AW-1:0]    cpu_addr,
  input  logic                 cpu_cs_n,
  input  logic                 cpu_oe_n,
  input  logic                 cpu_we_n,
  input  logic [CPU_DW-1:0]    cpu_wdata,
  output logic [CPU_DW-1:0]    cpu_rdata,
  output logic                 cpu_rdata_oe,
  // SRAM pins
  output logic [SRAM_AW-1:0]   sram_addr,
  output logic                 sram_ce_n,
  output logic                 sram_we_n,
  output logic [SRAM_DW-1:0]   sram_dq_o,
  output logic                 sram_dq_oe,
  input  logic [SRAM_DW-1:0]   sram_dq_i,
  // convolution results
  output logic                 conv_req,
  output logic signed [31:0]   conv_data,
  input  logic                 conv_ack,
  // disparity results
  output logic                 sad_req,
  input  logic                 sad_ack,
  output logic [DW-1:0]        sad_disp,
  output logic [SAD_W-1:0]     sad_sad,
  output logic                 sad_thr_ok,
  output logic                 sad_sbd_ok
);

  localparam int FRAME_WORDS = IMG_W * IMG_H;
  localparam logic [SRAM_AW-1:0] FRAME0_BASE = '0;
  localparam logic [SRAM_AW-1:0] FRAME1_BASE = SRAM_AW'(FRAME_WORDS);

  // ---------------- resets ----------------
  logic [1:0] rst_s, mrst_s;
  logic       srst_n, mrst_n;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) rst_s <= '0; else rst_s <= {rst_s[0], 1'b1};
  always_ff @(posedge memclk or negedge rst_n)
    if (!rst_n) mrst_s <= '0; else mrst_s <= {mrst_s[0], 1'b1};
  assign srst_n = rst_s[1];
  assign mrst_n = mrst_s[1];

  // ---------------- CPU interface and registers ----------------
  logic [DEV_ID_W-1:0]               dev_rd_id, dev_wr_id;
  logic [DEV_OFF_W-1:0]              dev_addr, dev_wr_addr;
  logic [NUM_DEV-1:0][CPU_DW-1:0]    dev_rdata;
  logic                              dev_wr;
  logic [CPU_DW-1:0]                 dev_wdata;

  cpu_bus_if #(.DW(CPU_DW)) u_cpu (
    .clk(clk), .rst_n(srst_n),
    .cpu_addr(cpu_addr), .cpu_cs_n(cpu_cs_n), .cpu_oe_n(cpu_oe_n), .cpu_we_n(cpu_we_n),
    .cpu_wdata(cpu_wdata), .cpu_rdata(cpu_rdata), .cpu_rdata_oe(cpu_rdata_oe),
    .dev_rd_id(dev_rd_id), .dev_addr(dev_addr), .dev_rdata(dev_rdata),
    .dev_wr(dev_wr), .dev_wr_id(dev_wr_id), .dev_wr_addr(dev_wr_addr), .dev_wdata(dev_wdata));

  logic [1:0]                         cam_en;
  logic [SAD_W-1:0]                   thr_low, thr_high;
  logic [DW-1:0]                      sbd_thr;
  logic [CONV_WIN*CONV_WIN-1:0][17:0] coef;
  logic                               start_conv, start_sad;
  logic [1:0]                         cam_ovf;
  logic [1:0][15:0]                   cam_frames_unused;
  logic [1:0][15:0]                   frames_written;
  logic [15:0]                        sad_frames;
  logic                               sad_frame_done;
  logic                               conv_busy, sad_busy, conv_mac_busy;

  always_ff @(posedge clk or negedge srst_n) begin
    if (!srst_n) begin
      cam_en     <= '0;
      thr_low    <= SAD_W'(128);
      thr_high   <= SAD_W'(750);
      sbd_thr    <= DW'(2);
      coef       <= '0;
      start_conv <= 1'b0;
      start_sad  <= 1'b0;
      sad_frames <= '0;
    end else begin
      start_conv <= 1'b0;
      start_sad  <= 1'b0;
      if (sad_frame_done) sad_frames <= sad_frames + 1'b1;
      if (dev_wr && dev_wr_id == DEV_ID_W'(0)) begin
        unique case (dev_wr_addr)
          DEV_OFF_W'(0): begin
            start_conv <= dev_wdata[0];
            start_sad  <= dev_wdata[1];
          end
          DEV_OFF_W'(1): cam_en   <= dev_wdata[1:0];
          DEV_OFF_W'(2): thr_low  <= SAD_W'(dev_wdata);
          DEV_OFF_W'(3): thr_high <= SAD_W'(dev_wdata);
          DEV_OFF_W'(4): sbd_thr  <= DW'(dev_wdata);
          default: ;
        endcase
      end
      if (dev_wr && dev_wr_id == DEV_ID_W'(1) && 32'(dev_wr_addr) < CONV_WIN * CONV_WIN)
        coef[dev_wr_addr[$clog2(CONV_WIN*CONV_WIN)-1:0]] <= {{2{dev_wdata[15]}}, dev_wdata};
    end
  end

  always_comb begin
    dev_rdata = '0;
    unique case (dev_addr)
      DEV_OFF_W'(0): dev_rdata[0] = {11'b0, conv_mac_busy, cam_ovf, sad_busy, conv_busy};
      DEV_OFF_W'(1): dev_rdata[0] = {14'b0, cam_en};
      DEV_OFF_W'(2): dev_rdata[0] = CPU_DW'(thr_low);
      DEV_OFF_W'(3): dev_rdata[0] = CPU_DW'(thr_high);
      DEV_OFF_W'(4): dev_rdata[0] = CPU_DW'(sbd_thr);
      DEV_OFF_W'(5): dev_rdata[0] = frames_written[0];
      DEV_OFF_W'(6): dev_rdata[0] = frames_written[1];
      DEV_OFF_W'(7): dev_rdata[0] = sad_frames;
      default: ;
    endcase
    if (32'(dev_addr) < CONV_WIN * CONV_WIN)
      dev_rdata[1] = coef[dev_addr[$clog2(CONV_WIN*CONV_WIN)-1:0]][15:0];
  end

  // ---------------- cameras to SRAM ----------------
  logic [1:0]                 px_req, px_ack;
  pix_t [1:0]                 px_data;
  logic [1:0]                 wa_req, wa_ack;
  sram_wr_t [1:0]             wa_data;
  logic [1:0][SRAM_DW-1:0]    wa_wdata;
  logic [1:0][SRAM_AW-1:0]    wa_addr;
  logic                       wr_req, wr_ack, wr_grant_unused;
  sram_wr_t                   wr_data;

  for (genvar c = 0; c < 2; c++) begin : g_cam
    camera_if u_cam (
      .clk(clk), .rst_n(srst_n), .enable(cam_en[c]),
      .cam_pclk(cam_pclk[c]), .cam_hsync(cam_hsync[c]), .cam_vsync(cam_vsync[c]), .cam_y(cam_y[c]),
      .out_req(px_req[c]), .out_data(px_data[c]), .out_ack(px_ack[c]),
      .overflow(cam_ovf[c]), .frame_count(cam_frames_unused[c]));

    mem_write_adapter u_wadapt (
      .clk(clk), .rst_n(srst_n),
      .base_addr(c == 0 ? FRAME0_BASE : FRAME1_BASE), .frame_words(SRAM_AW'(FRAME_WORDS)),
      .in_data(px_data[c]), .in_control_src(px_req[c]), .in_control_dest(px_ack[c]),
      .out_data(wa_wdata[c]), .out_address(wa_addr[c]),
      .out_control_src(wa_req[c]), .out_control_dest(wa_ack[c]),
      .frames_done(frames_written[c]));

    assign wa_data[c].addr = wa_addr[c];
    assign wa_data[c].data = wa_wdata[c];
  end

  alt_arbiter #(.W($bits(sram_wr_t))) u_write_arb (
    .clk(clk), .rst_n(srst_n),
    .in_req(wa_req), .in_data(wa_data), .in_ack(wa_ack),
    .out_req(wr_req), .out_data(wr_data), .out_ack(wr_ack), .grant(wr_grant_unused));

  // ---------------- SRAM readers ----------------
  logic [1:0]               rq_req, rq_ack;
  logic [1:0][SRAM_AW-1:0]  rq_addr;
  logic                     rd_req, rd_ack, rd_grant;
  logic [SRAM_AW-1:0]       rd_addr;
  logic                     ret_valid;
  logic [SRAM_DW-1:0]       ret_data;
  logic                     ret_tag;
  pair_t                    sad_in, conv_pair;
  logic                     sad_in_req, sad_in_ack, conv_in_req, conv_in_ack;
  pix_t                     conv_in;

  // read bus input 0: disparity reader (priority), input 1: convolution reader
  mem_read_adapter #(.PAIR(1'b1)) u_sad_reader (
    .clk(clk), .rst_n(srst_n), .start(start_sad),
    .base0(FRAME0_BASE), .base1(FRAME1_BASE), .nwords(SRAM_AW'(FRAME_WORDS)),
    .rd_req(rq_req[0]), .rd_addr(rq_addr[0]), .rd_ack(rq_ack[0]),
    .ret_valid(ret_valid && ret_tag == 1'b0), .ret_data(ret_data),
    .out_req(sad_in_req), .out_data(sad_in), .out_ack(sad_in_ack), .busy(sad_busy));

  mem_read_adapter #(.PAIR(1'b0)) u_conv_reader (
    .clk(clk), .rst_n(srst_n), .start(start_conv),
    .base0(FRAME0_BASE), .base1(FRAME0_BASE), .nwords(SRAM_AW'(FRAME_WORDS)),
    .rd_req(rq_req[1]), .rd_addr(rq_addr[1]), .rd_ack(rq_ack[1]),
    .ret_valid(ret_valid && ret_tag == 1'b1), .ret_data(ret_data),
    .out_req(conv_in_req), .out_data(conv_pair), .out_ack(conv_in_ack), .busy(conv_busy));

  prio_arbiter #(.W(SRAM_AW)) u_read_arb (
    .clk(clk), .rst_n(srst_n),
    .in_req(rq_req), .in_data(rq_addr), .in_ack(rq_ack),
    .out_req(rd_req), .out_data(rd_addr), .out_ack(rd_ack), .grant(rd_grant));

  // ---------------- SRAM controller ----------------
  logic      mem_turn_unused;
  sram_dir_e mem_dir_unused;

  sram_ctrl #(.NBATCH(NBATCH), .QDEPTH(QDEPTH), .TAG_W(1)) u_sram (
    .clk(clk), .rst_n(srst_n), .memclk(memclk), .mrst_n(mrst_n),
    .rd_req(rd_req), .rd_addr(rd_addr), .rd_tag(rd_grant), .rd_ack(rd_ack),
    .ret_valid(ret_valid), .ret_data(ret_data), .ret_tag(ret_tag),
    .wr_req(wr_req), .wr_data(wr_data), .wr_ack(wr_ack),
    .sram_addr(sram_addr), .sram_ce_n(sram_ce_n), .sram_we_n(sram_we_n),
    .sram_dq_o(sram_dq_o), .sram_dq_oe(sram_dq_oe), .sram_dq_i(sram_dq_i),
    .turn(mem_turn_unused), .dir(mem_dir_unused));

  // ---------------- processing units ----------------
  assign conv_in.sof = conv_pair.sof;
  assign conv_in.pix = conv_pair.left;

  conv2d #(.IMG_W(IMG_W), .WIN(CONV_WIN), .COEF_W(18), .OUT_W(32)) u_conv (
    .clk(clk), .rst_n(srst_n), .coef(coef),
    .in_req(conv_in_req), .in_data(conv_in), .in_ack(conv_in_ack),
    .out_req(conv_req), .out_data(conv_data), .out_ack(conv_ack), .mac_busy(conv_mac_busy));

  sad_disparity #(.IMG_W(IMG_W), .IMG_H(IMG_H), .WIN(SAD_WIN), .NDISP(NDISP)) u_sad (
    .clk(clk), .rst_n(srst_n),
    .in_req(sad_in_req), .in_data(sad_in), .in_ack(sad_in_ack),
    .thr_low(thr_low), .thr_high(thr_high), .sbd_thr(sbd_thr),
    .out_req(sad_req), .out_ack(sad_ack), .out_disp(sad_disp), .out_sad(sad_sad),
    .out_thr_ok(sad_thr_ok), .out_sbd_ok(sad_sbd_ok), .frame_done(sad_frame_done));

endmodule

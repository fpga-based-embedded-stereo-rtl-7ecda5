// tb_camera_if: self-checking test of the camera receiver.
//
// A camera model runs its pixel clock at about 18.5 MHz (27 ns half period)
// against the 50 MHz system clock, sending 16x6 frames. The test checks
// every received pixel against the model's pattern, that sof marks exactly
// the first pixel of each frame, the frame counter, and, with the output
// held off for a long time, that the overflow flag is raised. The sink
// acknowledges at random, three clocks in four on average, during the
// normal frames.
module tb_camera_if;
  import m6_pkg::*;
  localparam int IW = 16, IH = 6;

  logic clk = 0, rst_n = 0;
  always #10 clk = ~clk;

  logic run, pclk, hsync, vsync, enable, out_req, out_ack, overflow;
  logic [7:0] y;
  pix_t out_data;
  logic [15:0] frame_count;
  int frames_sent;

  camera_model #(.IMG_W(IW), .IMG_H(IH), .HALF_NS(27.0), .SEED(3)) u_cam (
    .run(run), .pclk(pclk), .hsync(hsync), .vsync(vsync), .y(y), .frames_sent(frames_sent));

  camera_if dut (.clk(clk), .rst_n(rst_n), .enable(enable),
    .cam_pclk(pclk), .cam_hsync(hsync), .cam_vsync(vsync), .cam_y(y),
    .out_req(out_req), .out_data(out_data), .out_ack(out_ack),
    .overflow(overflow), .frame_count(frame_count));

  int checks = 0, failures = 0;
  int idx = -1, frame = -1;
  bit hold_off = 0;
  int sofs = 0;

  always @(posedge clk) begin
    out_ack <= hold_off ? 1'b0 : 1'($urandom % 4 != 0);
    if (rst_n && out_req && out_ack) begin
      if (out_data.sof) begin
        if (frame >= 0) begin
          checks++;
          if (idx != IW * IH) begin failures++; $display("FAIL frame %0d had %0d pixels", frame, idx); end
        end
        frame++;
        sofs++;
        idx = 0;
      end
      if (idx >= 0) begin
        checks++;
        if (out_data.pix != u_cam.pix(0, idx % IW, idx / IW)) begin
          failures++;
          $display("FAIL pixel %0d of frame %0d: %h expected %h", idx, frame, out_data.pix, u_cam.pix(0, idx % IW, idx / IW));
        end
        idx++;
      end
    end
  end

  initial begin
    #2000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    run = 0; enable = 0;
    #50 rst_n = 1;
    enable = 1;
    run = 1;
    wait (frames_sent == 3);
    #500;
    checks++;
    if (idx != IW * IH || sofs != 3 || (frame_count != 16'd3 && frame_count != 16'd4) || overflow) begin
      failures++;
      $display("FAIL end: idx %0d sofs %0d frame_count %0d overflow %b", idx, sofs, frame_count, overflow);
    end
    hold_off = 1;
    wait (frames_sent == 4);
    checks++;
    if (!overflow) begin failures++; $display("FAIL overflow not flagged"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

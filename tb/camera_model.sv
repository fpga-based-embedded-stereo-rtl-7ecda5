// camera_model: behavioural model of a camera's 8-bit video output.
//
// Not part of the design: it produces the pixel clock, HSYNC, VSYNC and Y
// signals of a camera in 8-bit mode for the testbenches. Each frame starts
// with a VSYNC pulse of VS_LEN pixel clocks, then H_BLANK clocks later the
// lines follow, HSYNC high for exactly IMG_W pixels and low for H_BLANK
// clocks between lines. Y changes on the falling edge of PCLK, so it is
// stable at the rising edge, where the receiver samples it. Pixel values
// are pix(frame, x, y) below; SHIFT displaces the image to the left, which
// makes the model usable as the right camera of a stereo pair.
module camera_model #(
  parameter int  IMG_W   = 16,
  parameter int  IMG_H   = 8,
  parameter int  H_BLANK = 6,
  parameter int  VS_LEN  = 3,
  parameter real HALF_NS = 27.0,
  parameter int  SHIFT   = 0,
  parameter int  SEED    = 1
) (
  input  logic       run,
  output logic       pclk,
  output logic       hsync,
  output logic       vsync,
  output logic [7:0] y,
  output int         frames_sent
);

  // textured test image: a hash of the position, constant over frames
  function automatic logic [7:0] pix(int frame, int px, int py);
    int h;
    h = (px + SHIFT) * 73 + py * 151 + SEED * 17 + frame * 0;
    h = (h ^ (h >> 3)) * 2654435 + (px + SHIFT) * py;
    return 8'(h >> 5);
  endfunction

  initial begin
    pclk = 0; hsync = 0; vsync = 0; y = 0; frames_sent = 0;
    forever begin
      #(HALF_NS) pclk = 1;
      #(HALF_NS) pclk = 0;
    end
  end

  initial begin
    @(negedge pclk);
    forever begin
      wait (run);
      @(negedge pclk);
      vsync = 1;
      repeat (VS_LEN) @(negedge pclk);
      vsync = 0;
      repeat (H_BLANK) @(negedge pclk);
      for (int ly = 0; ly < IMG_H; ly++) begin
        for (int lx = 0; lx < IMG_W; lx++) begin
          hsync = 1;
          y = pix(frames_sent, lx, ly);
          @(negedge pclk);
        end
        hsync = 0;
        y = 8'h00;
        repeat (H_BLANK) @(negedge pclk);
      end
      frames_sent++;
    end
  end
endmodule

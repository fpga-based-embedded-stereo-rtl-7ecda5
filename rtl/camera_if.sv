// camera_if: receives 8-bit pixels from one camera into the M6CLK domain.
//
// The camera is the clock master: it sends PCLK (up to about 18 MHz in 8-bit
// mode), HSYNC (high for exactly the pixels of a line), VSYNC (a pulse
// before each frame) and the luminance byte Y. PCLK is too fast to be
// sampled reliably by the 50 MHz M6CLK, so it is used as a clock: on each
// rising PCLK edge with HSYNC high the byte is stored and a toggle flag
// flips. The flag crosses into M6CLK through two flip-flops; each change
// of it means one new pixel. Bytes go alternately into two holding
// registers, so a byte stays unchanged for two PCLK periods (at least
// 110 ns), longer than the three M6CLK edges (60 ns) the toggle needs to be
// seen. VSYNC is slow and is sampled directly with two flip-flops; its
// rising edge marks the next pixel as start of frame. HSYNC is sampled
// with PCLK together with Y so the two stay aligned.
//
// Interface: cam_* pins; capture enable; pixel stream out_req/out_data/
// out_ack (pix_t, sof on the first pixel of each frame). The camera cannot
// be held, so a 4-deep FIFO absorbs short stalls; a pixel that finds it
// full is dropped and sets the sticky overflow flag. frame_count counts the
// frame starts seen while enabled. The ping-pong holding registers and the
// FIFO are this design's choices.
module camera_if
  import m6_pkg::*;
#(
  parameter int FIFO_DEPTH = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             enable,
  input  logic             cam_pclk,
  input  logic             cam_hsync,
  input  logic             cam_vsync,
  input  logic [PIX_W-1:0] cam_y,
  output logic             out_req,
  output pix_t             out_data,
  input  logic             out_ack,
  output logic             overflow,
  output logic [15:0]      frame_count
);

  // ---------------- PCLK domain ----------------
  logic [PIX_W-1:0] hold [2];
  logic             wsel;   // next holding register, also the toggle flag

  always_ff @(posedge cam_pclk or negedge rst_n) begin
    if (!rst_n) begin
      wsel    <= 1'b0;
      hold[0] <= '0;
      hold[1] <= '0;
    end else if (cam_hsync) begin
      hold[wsel] <= cam_y;
      wsel       <= ~wsel;
    end
  end

  // ---------------- M6CLK domain ----------------
  logic [2:0] tog_s;
  logic [2:0] vs_s;
  logic       rsel;
  logic       sof_pend;
  logic       new_pix;
  logic       f_wreq, f_wack;
  pix_t       f_wdata;
  logic [$clog2(FIFO_DEPTH):0] f_count_unused;

  assign new_pix = tog_s[2] ^ tog_s[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tog_s       <= '0;
      vs_s        <= '0;
      rsel        <= 1'b0;
      sof_pend    <= 1'b0;
      overflow    <= 1'b0;
      frame_count <= '0;
    end else begin
      tog_s <= {tog_s[1:0], wsel};
      vs_s  <= {vs_s[1:0], cam_vsync};
      if (new_pix) rsel <= ~rsel;
      if (vs_s[1] && !vs_s[2] && enable) begin
        sof_pend    <= 1'b1;
        frame_count <= frame_count + 1'b1;
      end else if (new_pix && f_wack) begin
        sof_pend <= 1'b0;
      end
      if (f_wreq && !f_wack) overflow <= 1'b1;
    end
  end

  assign f_wreq       = new_pix && enable;
  assign f_wdata.sof  = sof_pend;
  assign f_wdata.pix  = hold[rsel];

  sync_fifo #(.W($bits(pix_t)), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk(clk), .rst_n(rst_n),
    .w_req(f_wreq), .w_data(f_wdata), .w_ack(f_wack),
    .r_req(out_req), .r_data(out_data), .r_ack(out_ack),
    .count(f_count_unused));

endmodule

// conv2d: windowed 2D convolution with a single multiplier.
//
// For every image position whose WIN x WIN window (4x4 by default) lies
// inside the frame, the unit computes
//   out(x0, y0) = sum over i, j = 0..WIN-1 of coef[j*WIN + i] * p(x0+i, y0+j)
// where p is the input pixel (unsigned 8 bit), coef a signed coefficient,
// i the column and j the row inside the window. Multipliers are scarce on
// the target FPGA, so one multiply-accumulate is done per clock and an
// output pixel takes WIN*WIN = 16 cycles; several units could work side by
// side on different image areas.
//
// Pixels arrive in raster order, IMG_W per line, with sof on the first
// pixel of a frame. WIN-1 line buffers (one RAM per line, one entry per
// column) hold the lines above the current one; when a pixel arrives, its
// column of the window is read from them, the window registers shift left
// by one column, and the new column enters at the right. A pixel at
// (x, y) with x, y >= WIN-1 completes the window whose top-left corner is
// (x-WIN+1, y-WIN+1) and starts the 16 multiply-accumulate cycles; the
// next pixel is taken in the last of those cycles, so the steady rate is
// one pixel per 16 clocks. Pixels that complete no window pass at one per
// clock. Results leave in raster order, (IMG_W-WIN+1) per line.
//
// Interface: coef (WIN*WIN signed words, row-major, held stable during a
// frame); in_req/in_data/in_ack (pix_t); out_req/out_data/out_ack (signed
// OUT_W-bit sums); mac_busy is high while a window is being summed.
// Following the described unit: 4x4 window, one 18x18 multiplier, 16
// cycles per output. This design's own choices: coefficients are 18-bit
// two's complement, the window is not flipped (correlation order, as in the
// sum above), border positions produce no output, and the line buffers are
// read asynchronously.
module conv2d
  import m6_pkg::*;
#(
  parameter int IMG_W  = 352,
  parameter int WIN    = 4,
  parameter int COEF_W = 18,
  parameter int OUT_W  = 32
) (
  input  logic                                clk,
  input  logic                                rst_n,
  input  logic [WIN*WIN-1:0][COEF_W-1:0]      coef,
  input  logic                                in_req,
  input  pix_t                                in_data,
  output logic                                in_ack,
  output logic                                out_req,
  output logic signed [OUT_W-1:0]             out_data,
  input  logic                                out_ack,
  output logic                                mac_busy
);

  localparam int XW   = $clog2(IMG_W);
  localparam int KW   = $clog2(WIN * WIN);
  localparam int LAST = WIN * WIN - 1;

  logic [PIX_W-1:0] lb  [WIN-1][IMG_W];   // lb[k] holds line y-1-k
  logic [PIX_W-1:0] win [WIN][WIN];       // win[row][col], row 0 is the oldest line
  logic [PIX_W-1:0] col [WIN];

  logic [XW-1:0]     x, cur_x;
  logic [15:0]       y, cur_y;
  logic [KW-1:0]     k;
  logic              out_free, accept, step, start_mac;
  logic signed [OUT_W-1:0] acc, prod, sum;

  assign out_free = !out_req || out_ack;
  assign in_ack   = !mac_busy || ((k == KW'(LAST)) && out_free);
  assign accept   = in_req && in_ack;
  assign step     = mac_busy && ((k != KW'(LAST)) || out_free);
  assign cur_x    = in_data.sof ? '0 : x;
  assign cur_y    = in_data.sof ? '0 : y;
  assign start_mac = (32'(cur_x) >= WIN - 1) && (32'(cur_y) >= WIN - 1);

  always_comb begin
    for (int r = 0; r < WIN - 1; r++) col[r] = lb[WIN-2-r][cur_x];
    col[WIN-1] = in_data.pix;
  end

  // one multiplier: coefficient k times the matching window pixel
  assign prod = OUT_W'($signed(coef[k]) * $signed({1'b0, win[32'(k) / WIN][32'(k) % WIN]}));
  assign sum  = (k == '0) ? prod : acc + prod;

  always_ff @(posedge clk) begin
    if (accept) begin
      lb[0][cur_x] <= in_data.pix;
      for (int r = 1; r < WIN - 1; r++) lb[r][cur_x] <= lb[r-1][cur_x];
      for (int r = 0; r < WIN; r++) begin
        for (int c = 0; c < WIN - 1; c++) win[r][c] <= win[r][c+1];
        win[r][WIN-1] <= col[r];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x        <= '0;
      y        <= '0;
      k        <= '0;
      acc      <= '0;
      mac_busy <= 1'b0;
      out_req  <= 1'b0;
      out_data <= '0;
    end else begin
      if (out_req && out_ack) out_req <= 1'b0;
      if (step) begin
        acc <= sum;
        k   <= (k == KW'(LAST)) ? '0 : k + 1'b1;
        if (k == KW'(LAST)) begin
          out_req  <= 1'b1;
          out_data <= sum;
          mac_busy <= 1'b0;
        end
      end
      if (accept) begin
        if (32'(cur_x) == IMG_W - 1) begin
          x <= '0;
          y <= cur_y + 1'b1;
        end else begin
          x <= cur_x + 1'b1;
          y <= cur_y;
        end
        if (start_mac) begin
          mac_busy <= 1'b1;
          k        <= '0;
        end
      end
    end
  end

endmodule

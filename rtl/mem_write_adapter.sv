// mem_write_adapter: turns a pixel stream into SRAM write requests.
//
// Each pixel is written as one 18-bit SRAM word (pixel in the low 8 bits)
// at base_addr plus its index in the frame. A pixel marked start of frame
// restarts the index at zero, so a frame always lands at the same place
// and a dropped pixel cannot shift the next frame. frame_words bounds the
// buffer: pixels past it are consumed but not written. frames_done counts
// frames whose last word has been taken in.
//
// Interface (port names as in the block's schematic): in_data with
// in_control_src (request) and in_control_dest (acknowledge); out_data and
// out_address with out_control_src (request) and out_control_dest
// (acknowledge). One register stage: a pixel accepted in one cycle is
// requested on the write bus from the next cycle. The one-pixel-per-word
// packing and the address rule are this design's choices.
module mem_write_adapter
  import m6_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic [SRAM_AW-1:0]  base_addr,
  input  logic [SRAM_AW-1:0]  frame_words,
  input  pix_t                in_data,
  input  logic                in_control_src,
  output logic                in_control_dest,
  output logic [SRAM_DW-1:0]  out_data,
  output logic [SRAM_AW-1:0]  out_address,
  output logic                out_control_src,
  input  logic                out_control_dest,
  output logic [15:0]         frames_done
);

  logic [SRAM_AW-1:0] index;   // index of the next pixel in the frame
  logic [SRAM_AW-1:0] cur;
  logic               take;

  assign in_control_dest = !out_control_src || out_control_dest;
  assign take            = in_control_src && in_control_dest;
  assign cur             = in_data.sof ? '0 : index;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      index           <= '0;
      out_control_src <= 1'b0;
      out_data        <= '0;
      out_address     <= '0;
      frames_done     <= '0;
    end else begin
      if (out_control_src && out_control_dest) out_control_src <= 1'b0;
      if (take) begin
        index <= (cur < frame_words) ? cur + 1'b1 : cur;
        if (cur < frame_words) begin
          out_control_src <= 1'b1;
          out_data        <= SRAM_DW'(in_data.pix);
          out_address     <= base_addr + cur;
          if (cur == frame_words - 1'b1) frames_done <= frames_done + 1'b1;
        end
      end
    end
  end

  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    out_control_src && !out_control_dest |=> out_control_src && $stable(out_address));

endmodule

// mem_read_adapter: streams a frame buffer out of the external SRAM.
//
// After a start pulse it reads nwords consecutive SRAM words from base0
// and presents their low 8 bits as a pixel stream. With PAIR=1 it reads
// two frame buffers in step, base0+i then base1+i, and presents each pair
// of words as one stereo pixel pair (left from base0, right from base1).
// The first item of a run carries sof.
//
// Reads return in request order on ret_valid/ret_data and cannot be held
// back, so requests are covered by credits: an item is only requested when
// its place in the DEPTH-entry output FIFO is already reserved.
//
// Interface: start/base0/base1/nwords (held while busy); read request bus
// rd_req/rd_addr/rd_ack; returns ret_valid/ret_data; output stream
// out_req/out_data/out_ack (pair_t; right is zero when PAIR=0); busy is
// high from start until the last item has been taken. The credit scheme and
// the pairing are this design's own.
module mem_read_adapter
  import m6_pkg::*;
#(
  parameter bit PAIR  = 1'b0,
  parameter int DEPTH = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic [SRAM_AW-1:0]  base0,
  input  logic [SRAM_AW-1:0]  base1,
  input  logic [SRAM_AW-1:0]  nwords,
  output logic                rd_req,
  output logic [SRAM_AW-1:0]  rd_addr,
  input  logic                rd_ack,
  input  logic                ret_valid,
  input  logic [SRAM_DW-1:0]  ret_data,
  output logic                out_req,
  output pair_t               out_data,
  input  logic                out_ack,
  output logic                busy
);

  localparam int CW = $clog2(DEPTH) + 1;

  logic [SRAM_AW-1:0] idx, out_cnt;
  logic               half, rhalf, first;
  logic [CW-1:0]      credits;
  logic [PIX_W-1:0]   held;
  logic               issuing;
  logic               take_credit, give_credit;
  logic               f_wreq, f_wack_unused;
  pair_t              f_wdata;
  logic [CW-1:0]      f_count_unused;

  assign issuing     = busy && (idx < nwords);
  assign rd_req      = issuing && (half || credits != '0);
  assign rd_addr     = (half ? base1 : base0) + idx;
  assign take_credit = rd_req && rd_ack && !half;
  assign give_credit = out_req && out_ack;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx     <= '0;
      out_cnt <= '0;
      half    <= 1'b0;
      rhalf   <= 1'b0;
      first   <= 1'b0;
      credits <= CW'(DEPTH);
      held    <= '0;
      busy    <= 1'b0;
    end else begin
      if (start && !busy) begin
        busy    <= (nwords != '0);
        idx     <= '0;
        out_cnt <= '0;
        half    <= 1'b0;
        rhalf   <= 1'b0;
        first   <= 1'b1;
      end else begin
        if (rd_req && rd_ack) begin
          if (PAIR && !half) half <= 1'b1;
          else begin
            half <= 1'b0;
            idx  <= idx + 1'b1;
          end
        end
        if (ret_valid) begin
          if (PAIR && !rhalf) begin
            rhalf <= 1'b1;
            held  <= ret_data[PIX_W-1:0];
          end else begin
            rhalf <= 1'b0;
          end
        end
        if (f_wreq) first <= 1'b0;
        if (give_credit) begin
          out_cnt <= out_cnt + 1'b1;
          if (out_cnt + 1'b1 == nwords) busy <= 1'b0;
        end
      end
      credits <= credits - CW'(take_credit) + CW'(give_credit);
    end
  end

  always_comb begin
    f_wreq  = ret_valid && (!PAIR || rhalf);
    f_wdata.sof = first;
    if (PAIR) begin
      f_wdata.left  = held;
      f_wdata.right = ret_data[PIX_W-1:0];
    end else begin
      f_wdata.left  = ret_data[PIX_W-1:0];
      f_wdata.right = '0;
    end
  end

  sync_fifo #(.W($bits(pair_t)), .DEPTH(DEPTH)) u_fifo (
    .clk(clk), .rst_n(rst_n),
    .w_req(f_wreq), .w_data(f_wdata), .w_ack(f_wack_unused),
    .r_req(out_req), .r_data(out_data), .r_ack(out_ack),
    .count(f_count_unused));

  a_room: assert property (@(posedge clk) disable iff (!rst_n) f_wreq |-> f_wack_unused);

endmodule

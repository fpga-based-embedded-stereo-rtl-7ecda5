// sram_ctrl: pseudo dual-port controller for the single-port external SRAM.
//
// Processing units on the 50 MHz M6CLK see two independent buses, one for
// reads and one for writes, each able to move a word per cycle. Behind them
// three dual-clock queues (read request, read return, write) cross into the
// faster MEMCLK domain (50-100 MHz, 80 MHz on the measured board), where
// sram_interleave serves the single-port chip in batches. With MEMCLK well
// above M6CLK one direction alone runs at the full 50 MHz word rate, and
// mixed traffic loses one MEMCLK cycle per change of direction.
//
// Interface (M6CLK side): read requests rd_req/rd_addr/rd_tag/rd_ack; read
// returns ret_valid/ret_data/ret_tag, delivered in request order and never
// held back (a reader must only request what it can take); writes
// wr_req/wr_data/wr_ack. The SRAM pins are on the MEMCLK side. Each domain
// has its own active-low reset. Queue depth 16 and batch size 12 follow
// the described controller.
module sram_ctrl
  import m6_pkg::*;
#(
  parameter int NBATCH = 12,
  parameter int QDEPTH = 16,
  parameter int TAG_W  = 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  memclk,
  input  logic                  mrst_n,
  // read bus
  input  logic                  rd_req,
  input  logic [SRAM_AW-1:0]    rd_addr,
  input  logic [TAG_W-1:0]      rd_tag,
  output logic                  rd_ack,
  output logic                  ret_valid,
  output logic [SRAM_DW-1:0]    ret_data,
  output logic [TAG_W-1:0]      ret_tag,
  // write bus
  input  logic                  wr_req,
  input  sram_wr_t              wr_data,
  output logic                  wr_ack,
  // SRAM pins
  output logic [SRAM_AW-1:0]    sram_addr,
  output logic                  sram_ce_n,
  output logic                  sram_we_n,
  output logic [SRAM_DW-1:0]    sram_dq_o,
  output logic                  sram_dq_oe,
  input  logic [SRAM_DW-1:0]    sram_dq_i,
  // monitoring (MEMCLK domain)
  output logic                  turn,
  output sram_dir_e             dir
);

  localparam int LW = $clog2(QDEPTH) + 1;

  logic                       rq_req, rq_ack;
  logic [TAG_W+SRAM_AW-1:0]   rq_data;
  logic                       wq_req, wq_ack;
  sram_wr_t                   wq_data;
  logic                       rt_req, rt_wack;
  logic [TAG_W+SRAM_DW-1:0]   rt_wdata, rt_rdata;
  logic [LW-1:0]              rt_level, rq_level_unused, wq_level_unused;

  async_fifo #(.W(TAG_W + SRAM_AW), .DEPTH(QDEPTH)) u_read_req_q (
    .w_clk(clk), .w_rst_n(rst_n), .w_req(rd_req), .w_data({rd_tag, rd_addr}),
    .w_ack(rd_ack), .w_level(rq_level_unused),
    .r_clk(memclk), .r_rst_n(mrst_n), .r_req(rq_req), .r_data(rq_data), .r_ack(rq_ack));

  async_fifo #(.W($bits(sram_wr_t)), .DEPTH(QDEPTH)) u_write_q (
    .w_clk(clk), .w_rst_n(rst_n), .w_req(wr_req), .w_data(wr_data),
    .w_ack(wr_ack), .w_level(wq_level_unused),
    .r_clk(memclk), .r_rst_n(mrst_n), .r_req(wq_req), .r_data(wq_data), .r_ack(wq_ack));

  async_fifo #(.W(TAG_W + SRAM_DW), .DEPTH(QDEPTH)) u_read_ret_q (
    .w_clk(memclk), .w_rst_n(mrst_n), .w_req(rt_req), .w_data(rt_wdata),
    .w_ack(rt_wack), .w_level(rt_level),
    .r_clk(clk), .r_rst_n(rst_n), .r_req(ret_valid), .r_data(rt_rdata), .r_ack(1'b1));

  assign {ret_tag, ret_data} = rt_rdata;

  sram_interleave #(.NBATCH(NBATCH), .TAG_W(TAG_W), .RET_DEPTH(QDEPTH)) u_interleave (
    .clk(memclk), .rst_n(mrst_n),
    .rq_req(rq_req), .rq_data(rq_data), .rq_ack(rq_ack),
    .wq_req(wq_req), .wq_data(wq_data), .wq_ack(wq_ack),
    .ret_req(rt_req), .ret_data(rt_wdata), .ret_level(rt_level),
    .sram_addr(sram_addr), .sram_ce_n(sram_ce_n), .sram_we_n(sram_we_n),
    .sram_dq_o(sram_dq_o), .sram_dq_oe(sram_dq_oe), .sram_dq_i(sram_dq_i),
    .turn(turn), .dir(dir));

  // The interleave logic only issues reads the return queue can hold.
  a_ret_room: assert property (@(posedge memclk) disable iff (!mrst_n)
    rt_req |-> rt_wack);

endmodule

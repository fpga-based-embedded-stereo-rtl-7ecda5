// sram_interleave: batches reads and writes onto a single-port SRAM.
//
// The external SRAM runs back-to-back ("no burst") cycles: every cycle may
// carry a new read or a new write to any address. A read puts its address
// on the bus in one cycle and the SRAM returns the data in the next, while a
// write needs address and data together. So a write may not follow a read
// immediately: the cycle after a read, the data lines belong to the SRAM.
// One idle cycle is therefore inserted on every switch from reads to writes;
// a switch from writes to reads costs nothing. Alternating single accesses
// would give 2 accesses per 3 cycles, so requests are taken from their
// queues in batches of up to NBATCH of one kind before turning round, which
// under full load gives 2*NBATCH accesses per 2*NBATCH+1 cycles.
//
// Policy (this design's own): stay in the current direction while it has
// work and its batch count is below NBATCH, or while the other queue is
// empty; otherwise switch. A read is issued only when the return queue is
// certain to have room for it and for every read still in flight, counted
// from ret_level, the return queue's write-side fill level.
//
// Timing, on clk (MEMCLK): an access chosen in cycle t drives the SRAM pins
// from registers during t+1; the SRAM samples them at the end of t+1; read
// data is on sram_dq_i during t+2 and is written into the return queue at
// the end of t+2. The data bits of ret_data are the SRAM data pins
// themselves, unregistered; the return queue registers them. Outputs turn
// (the idle cycle) and dir are for monitoring.
module sram_interleave
  import m6_pkg::*;
#(
  parameter int NBATCH    = 12,
  parameter int TAG_W     = 1,
  parameter int RET_DEPTH = 16
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // read request queue (source side of a FIFO)
  input  logic                         rq_req,
  input  logic [TAG_W+SRAM_AW-1:0]     rq_data,   // {tag, addr}
  output logic                         rq_ack,
  // write queue
  input  logic                         wq_req,
  input  sram_wr_t                     wq_data,
  output logic                         wq_ack,
  // read return queue (sink side of a FIFO)
  output logic                         ret_req,
  output logic [TAG_W+SRAM_DW-1:0]     ret_data,  // {tag, data}
  input  logic [$clog2(RET_DEPTH):0]   ret_level,
  // SRAM pins
  output logic [SRAM_AW-1:0]           sram_addr,
  output logic                         sram_ce_n,
  output logic                         sram_we_n,
  output logic [SRAM_DW-1:0]           sram_dq_o,
  output logic                         sram_dq_oe,
  input  logic [SRAM_DW-1:0]           sram_dq_i,
  // monitoring
  output logic                         turn,
  output sram_dir_e                    dir
);

  localparam int CW = $clog2(NBATCH + 1);

  sram_dir_e         mode;
  logic [CW-1:0]     cnt;
  logic              rd_p0, rd_p1;          // reads on the pins / data on the bus
  logic [TAG_W-1:0]  tag_p0, tag_p1;
  logic              rd_room, rd_ok;
  logic              do_rd, do_wr, bubble;
  sram_dir_e         next_dir;

  // room for this read plus the ones in flight
  assign rd_room = (32'(ret_level) + 32'(rd_p0) + 32'(rd_p1) + 1) <= RET_DEPTH;
  assign rd_ok   = rq_req && rd_room;

  always_comb begin
    if (mode == DIR_READ)
      next_dir = (rd_ok && (cnt < CW'(NBATCH) || !wq_req)) ? DIR_READ
               : (wq_req ? DIR_WRITE : DIR_READ);
    else
      next_dir = (wq_req && (cnt < CW'(NBATCH) || !rd_ok)) ? DIR_WRITE
               : (rd_ok ? DIR_READ : DIR_WRITE);
  end

  // the cycle after a read was issued the bus turns round before a write
  assign bubble = (next_dir == DIR_WRITE) && wq_req && rd_p0;
  assign do_rd  = (next_dir == DIR_READ) && rd_ok;
  assign do_wr  = (next_dir == DIR_WRITE) && wq_req && !rd_p0;

  assign rq_ack = do_rd;
  assign wq_ack = do_wr;
  assign turn   = bubble;
  assign dir    = mode;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode       <= DIR_READ;
      cnt        <= '0;
      rd_p0      <= 1'b0;
      rd_p1      <= 1'b0;
      tag_p0     <= '0;
      tag_p1     <= '0;
      sram_addr  <= '0;
      sram_ce_n  <= 1'b1;
      sram_we_n  <= 1'b1;
      sram_dq_o  <= '0;
      sram_dq_oe <= 1'b0;
    end else begin
      if (do_rd || do_wr) begin
        cnt <= (mode == next_dir) ? ((cnt == CW'(NBATCH)) ? cnt : cnt + 1'b1) : CW'(1);
      end else if (mode != next_dir) begin
        cnt <= '0;
      end
      mode <= next_dir;

      rd_p0  <= do_rd;
      tag_p0 <= rq_data[SRAM_AW +: TAG_W];
      rd_p1  <= rd_p0;
      tag_p1 <= tag_p0;

      sram_ce_n  <= !(do_rd || do_wr);
      sram_we_n  <= !do_wr;
      sram_dq_oe <= do_wr;
      if (do_rd) sram_addr <= rq_data[SRAM_AW-1:0];
      if (do_wr) begin
        sram_addr <= wq_data.addr;
        sram_dq_o <= wq_data.data;
      end
    end
  end

  assign ret_req  = rd_p1;
  assign ret_data = {tag_p1, sram_dq_i};

  // The FPGA never drives the data lines in the cycle the SRAM returns data.
  a_no_contention: assert property (@(posedge clk) disable iff (!rst_n)
    !(sram_dq_oe && rd_p1));

endmodule

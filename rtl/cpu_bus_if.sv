// cpu_bus_if: FPGA slave on the PXA255 CPU's VLIO memory bus.
//
// The CPU is the bus master and drives 20 address lines into the FPGA. The
// upper 5 bits select one of 32 device IDs and the lower 15 bits are a word
// offset inside that device (16-bit words, 64 KB per device).
//
// Reads: the bus is sampled on every M6CLK edge. The registered device ID
// and offset go out to the devices (dev_rd_id/dev_addr), which must answer
// combinationally on their dev_rdata lane; this unit then drives that word
// on cpu_rdata with cpu_rdata_oe high for as long as the sampled chip
// select and output enable are low. The CPU's minimum VLIO read, four
// 108 MHz bus clocks (37 ns), leaves room for one 20 ns M6CLK sample plus
// the output path. cpu_rdata_oe is the tri-state enable of the data pads,
// which are outside this module; the data lines are released whenever the
// FPGA is not being read.
//
// Writes: the CPU drives address and data together. A write is taken once
// its strobe has been seen low on two consecutive M6CLK samples, using the
// address and data of the earlier sample, and is passed on as a single-cycle
// dev_wr pulse. A device must accept it in that cycle. Write strobes must
// therefore last at least two M6CLK periods, which matches the at most one
// write per two FPGA cycles the bus can deliver. The two-sample filter and
// the pulse are this design's own.
module cpu_bus_if
  import m6_pkg::*;
#(
  parameter int DW = 16
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // CPU bus pins
  input  logic [CPU_AW-1:0]             cpu_addr,
  input  logic                          cpu_cs_n,
  input  logic                          cpu_oe_n,
  input  logic                          cpu_we_n,
  input  logic [DW-1:0]                 cpu_wdata,
  output logic [DW-1:0]                 cpu_rdata,
  output logic                          cpu_rdata_oe,
  // device side
  output logic [DEV_ID_W-1:0]           dev_rd_id,
  output logic [DEV_OFF_W-1:0]          dev_addr,
  input  logic [NUM_DEV-1:0][DW-1:0]    dev_rdata,
  output logic                          dev_wr,
  output logic [DEV_ID_W-1:0]           dev_wr_id,
  output logic [DEV_OFF_W-1:0]          dev_wr_addr,
  output logic [DW-1:0]                 dev_wdata
);

  typedef struct packed {
    logic [CPU_AW-1:0] addr;
    logic [DW-1:0]     data;
    logic              rd;
    logic              wr;
  } bus_sample_t;

  bus_sample_t s1, s2;
  logic        wr_done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1      <= '0;
      s2      <= '0;
      wr_done <= 1'b0;
      dev_wr  <= 1'b0;
      dev_wr_id   <= '0;
      dev_wr_addr <= '0;
      dev_wdata   <= '0;
    end else begin
      s1.addr <= cpu_addr;
      s1.data <= cpu_wdata;
      s1.rd   <= !cpu_cs_n && !cpu_oe_n;
      s1.wr   <= !cpu_cs_n && !cpu_we_n;
      s2      <= s1;
      dev_wr  <= 1'b0;
      if (s1.wr && s2.wr && !wr_done) begin
        dev_wr      <= 1'b1;
        dev_wr_id   <= s2.addr[CPU_AW-1 -: DEV_ID_W];
        dev_wr_addr <= s2.addr[DEV_OFF_W-1:0];
        dev_wdata   <= s2.data;
        wr_done     <= 1'b1;
      end
      if (!s1.wr) wr_done <= 1'b0;
    end
  end

  assign dev_rd_id    = s1.addr[CPU_AW-1 -: DEV_ID_W];
  assign dev_addr     = s1.addr[DEV_OFF_W-1:0];
  assign cpu_rdata    = dev_rdata[dev_rd_id];
  assign cpu_rdata_oe = s1.rd && !cpu_cs_n && !cpu_oe_n;

endmodule

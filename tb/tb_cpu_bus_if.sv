// tb_cpu_bus_if: self-checking test of the CPU bus slave.
//
// A CPU model issues VLIO-style reads and writes at random phases relative
// to the 50 MHz clock. Devices answer reads with a pattern computed from
// their ID and offset. Checks: read data is valid on the pins 37 ns after
// the read strobe begins (four 108 MHz CPU bus clocks); the data pins are
// released when the FPGA is not read; each write strobe of 45 ns produces
// exactly one dev_wr pulse with the right device ID, offset and data;
// back-to-back writes one per 70 ns are all taken.
module tb_cpu_bus_if;
  import m6_pkg::*;

  logic clk = 0, rst_n = 0;
  always #10 clk = ~clk;

  logic [CPU_AW-1:0] cpu_addr;
  logic cpu_cs_n, cpu_oe_n, cpu_we_n, cpu_rdata_oe, dev_wr;
  logic [15:0] cpu_wdata, cpu_rdata, dev_wdata;
  logic [DEV_ID_W-1:0] dev_rd_id, dev_wr_id;
  logic [DEV_OFF_W-1:0] dev_addr, dev_wr_addr;
  logic [NUM_DEV-1:0][15:0] dev_rdata;

  cpu_bus_if #(.DW(16)) dut (.*);

  function automatic logic [15:0] pattern(int id, int off);
    return 16'(id * 4099 + off * 7 + 1);
  endfunction

  always_comb
    for (int i = 0; i < NUM_DEV; i++) dev_rdata[i] = pattern(i, int'(dev_addr));

  int checks = 0, failures = 0;
  typedef struct {int id; int off; logic [15:0] d;} wr_t;
  wr_t wq [$];
  int pulses = 0;

  always @(posedge clk) begin
    if (rst_n && dev_wr) begin
      wr_t e;
      pulses++;
      checks++;
      if (wq.size() == 0) begin
        failures++; $display("FAIL spurious write pulse at %0t id %0d off %0d", $time, dev_wr_id, dev_wr_addr);
      end else begin
        e = wq.pop_front();
        if (int'(dev_wr_id) != e.id || int'(dev_wr_addr) != e.off || dev_wdata != e.d) begin
          failures++;
          $display("FAIL write %0d/%0d/%h expected %0d/%0d/%h", dev_wr_id, dev_wr_addr, dev_wdata, e.id, e.off, e.d);
        end
      end
    end
  end

  task automatic cpu_read(input int id, input int off);
    cpu_addr = {DEV_ID_W'(id), DEV_OFF_W'(off)};
    cpu_cs_n = 0; cpu_oe_n = 0;
    #37;
    checks++;
    if (!cpu_rdata_oe || cpu_rdata !== pattern(id, off)) begin
      failures++;
      $display("FAIL read %0d/%0d: oe %b data %h expected %h", id, off, cpu_rdata_oe, cpu_rdata, pattern(id, off));
    end
    cpu_cs_n = 1; cpu_oe_n = 1;
    #1;
    checks++;
    if (cpu_rdata_oe) begin failures++; $display("FAIL data pins not released"); end
    #($urandom % 23 + 8);
  endtask

  task automatic cpu_write(input int id, input int off, input logic [15:0] d, input int len);
    cpu_addr = {DEV_ID_W'(id), DEV_OFF_W'(off)};
    cpu_wdata = d;
    wq.push_back('{id, off, d});
    cpu_cs_n = 0; cpu_we_n = 0;
    #(len);
    cpu_cs_n = 1; cpu_we_n = 1;
    #(70 - len);
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nw;
    cpu_addr = '0; cpu_cs_n = 1; cpu_oe_n = 1; cpu_we_n = 1; cpu_wdata = '0;
    #35 rst_n = 1;
    #($urandom % 20);
    nw = 0;
    for (int n = 0; n < 200; n++) begin
      #($urandom % 20);
      if ($urandom % 2) cpu_read($urandom % 32, $urandom % 32768);
      else begin cpu_write($urandom % 32, $urandom % 32768, 16'($urandom), 45); nw++; end
    end
    // a burst of back-to-back writes
    for (int n = 0; n < 20; n++) begin cpu_write(3, n, 16'(n * 3), 45); nw++; end
    #200;
    checks++;
    if (pulses != nw || wq.size() != 0) begin
      failures++;
      $display("FAIL %0d write pulses for %0d writes", pulses, nw);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

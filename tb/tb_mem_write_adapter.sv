// tb_mem_write_adapter: self-checking test of the pixel-to-SRAM-write adapter.
//
// Sends three frames of FW = 20 pixels with random gaps while the write bus
// acknowledges at random. The second frame carries 3 extra pixels past the
// frame size, which must be dropped; the third frame is cut short by an
// early sof, which must restart the addresses at the base. Checks every
// write's address and data, that no write is lost or duplicated, and the
// count of completed frames.
module tb_mem_write_adapter;
  import m6_pkg::*;
  localparam int FW = 20;
  localparam logic [SRAM_AW-1:0] BASE = 19'h1200;

  logic clk = 0, rst_n = 0;
  always #10 clk = ~clk;

  pix_t in_data;
  logic in_req, in_ack, out_req, out_ack;
  logic [SRAM_DW-1:0] out_data;
  logic [SRAM_AW-1:0] out_addr;
  logic [15:0] frames_done;

  mem_write_adapter dut (.clk(clk), .rst_n(rst_n), .base_addr(BASE), .frame_words(SRAM_AW'(FW)),
    .in_data(in_data), .in_control_src(in_req), .in_control_dest(in_ack),
    .out_data(out_data), .out_address(out_addr), .out_control_src(out_req), .out_control_dest(out_ack),
    .frames_done(frames_done));

  int checks = 0, failures = 0;
  typedef struct {logic [SRAM_AW-1:0] a; logic [SRAM_DW-1:0] d;} w_t;
  w_t exp_q [$];

  always @(posedge clk) begin
    out_ack <= 1'($urandom % 3 != 0);
    if (rst_n && out_req && out_ack) begin
      w_t e;
      checks++;
      if (exp_q.size() == 0) begin failures++; $display("FAIL unexpected write %h", out_addr); end
      else begin
        e = exp_q.pop_front();
        if (out_addr != e.a || out_data != e.d) begin
          failures++;
          $display("FAIL write %h=%h expected %h=%h", out_addr, out_data, e.a, e.d);
        end
      end
    end
  end

  task automatic send(input logic sof, input logic [7:0] p, input int index);
    in_data.sof = sof; in_data.pix = p;
    in_req = 1;
    if (index < FW) exp_q.push_back('{BASE + SRAM_AW'(index), SRAM_DW'(p)});
    @(posedge clk);
    while (!in_ack) @(posedge clk);
    #1;
    in_req = 0;
    repeat ($urandom % 3) @(posedge clk);
    #1;
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_req = 0; in_data = '0;
    #35 rst_n = 1;
    @(posedge clk); #1;
    for (int i = 0; i < FW; i++) send(i == 0, 8'(i * 5 + 1), i);
    for (int i = 0; i < FW + 3; i++) send(i == 0, 8'(i * 7 + 2), i);
    for (int i = 0; i < 7; i++) send(i == 0, 8'(i + 100), i);
    for (int i = 0; i < FW; i++) send(i == 0, 8'(i * 3), i);
    repeat (10) @(posedge clk);
    checks++;
    if (exp_q.size() != 0 || frames_done != 16'd3) begin
      failures++;
      $display("FAIL %0d writes missing, frames_done %0d", exp_q.size(), frames_done);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_mem_read_adapter: self-checking test of the SRAM-to-stream reader.
//
// Two readers, one single (PAIR=0) and one stereo (PAIR=1), are served by a
// memory responder that acknowledges requests at random and returns each
// word, in order, after a random delay; word data is a function of the
// address. The output sinks acknowledge at random. Checks: the sequence of
// items (and pairs) matches the frame buffers, sof is on the first item
// only, busy ends after the last item, the readers never have more words
// in flight than their output FIFO can take (assertion in the reader), and
// a second run after the first restarts cleanly.
module tb_mem_read_adapter;
  import m6_pkg::*;
  localparam int N = 60;
  localparam logic [SRAM_AW-1:0] B0 = 19'h0400, B1 = 19'h2000;

  logic clk = 0, rst_n = 0;
  always #10 clk = ~clk;

  function automatic logic [SRAM_DW-1:0] mem_word(logic [SRAM_AW-1:0] a);
    return SRAM_DW'((a * 37 + 11) ^ (a >> 4));
  endfunction

  logic [1:0] start, rd_req, rd_ack, ret_valid, out_req, out_ack, busy;
  logic [1:0][SRAM_AW-1:0] rd_addr;
  logic [1:0][SRAM_DW-1:0] ret_data;
  pair_t [1:0] out_data;

  mem_read_adapter #(.PAIR(1'b0)) u_single (.clk(clk), .rst_n(rst_n), .start(start[0]),
    .base0(B0), .base1(B1), .nwords(SRAM_AW'(N)),
    .rd_req(rd_req[0]), .rd_addr(rd_addr[0]), .rd_ack(rd_ack[0]),
    .ret_valid(ret_valid[0]), .ret_data(ret_data[0]),
    .out_req(out_req[0]), .out_data(out_data[0]), .out_ack(out_ack[0]), .busy(busy[0]));

  mem_read_adapter #(.PAIR(1'b1)) u_pair (.clk(clk), .rst_n(rst_n), .start(start[1]),
    .base0(B0), .base1(B1), .nwords(SRAM_AW'(N)),
    .rd_req(rd_req[1]), .rd_addr(rd_addr[1]), .rd_ack(rd_ack[1]),
    .ret_valid(ret_valid[1]), .ret_data(ret_data[1]),
    .out_req(out_req[1]), .out_data(out_data[1]), .out_ack(out_ack[1]), .busy(busy[1]));

  int checks = 0, failures = 0;
  int got [2];
  typedef struct {logic [SRAM_AW-1:0] a; int due;} pend_t;
  pend_t pq [2][$];
  int cyc = 0;

  always @(posedge clk) begin
    cyc++;
    for (int r = 0; r < 2; r++) begin
      rd_ack[r]  <= 1'($urandom % 2);
      out_ack[r] <= 1'($urandom % 4 != 0);
      ret_valid[r] <= 1'b0;
      if (rst_n && rd_req[r] && rd_ack[r]) pq[r].push_back('{rd_addr[r], cyc + 3 + $urandom % 6});
      if (pq[r].size() > 0 && pq[r][0].due <= cyc) begin
        pend_t p;
        p = pq[r].pop_front();
        ret_valid[r] <= 1'b1;
        ret_data[r]  <= mem_word(p.a);
        if (pq[r].size() > 0 && pq[r][0].due <= cyc + 1) pq[r][0].due = cyc + 1;
      end
      if (rst_n && out_req[r] && out_ack[r]) begin
        logic [7:0] el, er;
        el = mem_word(B0 + SRAM_AW'(got[r]))[7:0];
        er = (r == 1) ? mem_word(B1 + SRAM_AW'(got[r]))[7:0] : 8'h00;
        checks++;
        if (out_data[r].left != el || out_data[r].right != er || out_data[r].sof != (got[r] == 0)) begin
          failures++;
          $display("FAIL reader %0d item %0d: %h %h sof %b expected %h %h", r, got[r],
                   out_data[r].left, out_data[r].right, out_data[r].sof, el, er);
        end
        got[r]++;
      end
    end
  end

  initial begin
    #500000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; ret_valid = 0; ret_data = '0;
    got[0] = 0; got[1] = 0;
    #35 rst_n = 1;
    repeat (2) begin
      @(posedge clk); #1;
      got[0] = 0; got[1] = 0;
      start = 2'b11;
      @(posedge clk); #1;
      start = 2'b00;
      wait (busy == 2'b00);
      repeat (3) @(posedge clk);
      checks++;
      if (got[0] != N || got[1] != N || out_req != 2'b00) begin
        failures++;
        $display("FAIL counts %0d %0d", got[0], got[1]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

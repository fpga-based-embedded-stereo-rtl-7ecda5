// tb_sram_ctrl: self-checking test of the pseudo dual-port SRAM controller.
//
// clk runs at 50 MHz and memclk at 80 MHz (the 8/5 setting). The test
// checks: a stream of writes alone is accepted at one word per clk cycle
// (after the queue's start-up), and so is a stream of reads alone; reads
// return the right data, in order, with the tag they were issued with;
// mixed random reads and writes to separate areas all complete correctly;
// and the words written read back correctly afterwards.
module tb_sram_ctrl;
  import m6_pkg::*;

  logic clk = 0, memclk = 0, rst_n = 0, mrst_n = 0;
  always #10 clk = ~clk;
  always #6.25 memclk = ~memclk;

  logic rd_req, rd_ack, ret_valid, wr_req, wr_ack, turn;
  logic [SRAM_AW-1:0] rd_addr, sram_addr;
  logic rd_tag, ret_tag;
  logic [SRAM_DW-1:0] ret_data, sram_dq_o, sram_dq_i;
  sram_wr_t wr_data;
  logic sram_ce_n, sram_we_n, sram_dq_oe, drive;
  sram_dir_e dir;

  sram_ctrl #(.NBATCH(12), .QDEPTH(16), .TAG_W(1)) dut (.*);

  sram_model #(.AW(SRAM_AW), .DW(SRAM_DW)) u_mem (
    .clk(memclk), .addr(sram_addr), .ce_n(sram_ce_n), .we_n(sram_we_n),
    .dq_i(sram_dq_o), .dq_i_en(sram_dq_oe), .dq_o(sram_dq_i), .dq_drive(drive));

  int checks = 0, failures = 0;
  int nrd = 0, nwr = 0, nret = 0;
  int rd_target = 0, wr_target = 0;
  bit rd_rand = 0, wr_rand = 0, rd_back = 0;
  logic rd_go, wr_go;
  typedef struct {logic [SRAM_AW-1:0] a; logic t;} exp_t;
  exp_t exp_q [$];
  logic [SRAM_DW-1:0] ref_mem [logic [SRAM_AW-1:0]];

  always_comb begin
    rd_req  = rd_go && (nrd < rd_target);
    rd_addr = rd_back ? SRAM_AW'(32'h20000 + nrd % 300) : SRAM_AW'(32'h50000 + nrd * 5);
    rd_tag  = nrd[0];
    wr_req  = wr_go && (nwr < wr_target);
    wr_data.addr = SRAM_AW'(32'h20000 + nwr % 300);
    wr_data.data = SRAM_DW'(nwr * 13 + 1);
  end

  always @(posedge clk) begin
    rd_go <= rd_rand ? ($urandom % 3 == 0) : 1'b1;
    wr_go <= wr_rand ? ($urandom % 3 == 0) : 1'b1;
    if (rst_n) begin
      if (rd_req && rd_ack) begin
        exp_q.push_back('{rd_addr, rd_tag});
        nrd <= nrd + 1;
      end
      if (wr_req && wr_ack) begin
        ref_mem[wr_data.addr] = wr_data.data;
        nwr <= nwr + 1;
      end
      if (ret_valid) begin
        exp_t e;
        logic [SRAM_DW-1:0] d;
        checks++;
        if (exp_q.size() == 0) begin
          failures++; $display("FAIL unexpected return");
        end else begin
          e = exp_q.pop_front();
          d = ref_mem.exists(e.a) ? ref_mem[e.a] : SRAM_DW'(e.a);
          if (ret_data !== d || ret_tag !== e.t) begin
            failures++;
            $display("FAIL read %h: %h/%0d expected %h/%0d", e.a, ret_data, ret_tag, d, e.t);
          end
        end
        nret <= nret + 1;
      end
    end
  end

  initial begin
    #3000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic measure(input bit is_rd, input int n);
    int c, start;
    c = 0;
    start = is_rd ? nrd : nwr;
    if (is_rd) rd_target = nrd + n; else wr_target = nwr + n;
    while ((is_rd ? nrd : nwr) < start + n) begin @(posedge clk); c++; end
    checks++;
    if (c > n + 8) begin
      failures++;
      $display("FAIL %s only: %0d words took %0d cycles", is_rd ? "read" : "write", n, c);
    end else $display("%s only: %0d words in %0d cycles", is_rd ? "read" : "write", n, c);
  endtask

  initial begin
    #45 rst_n = 1; mrst_n = 1;
    repeat (4) @(posedge clk);
    measure(1'b0, 300);             // unidirectional writes at full rate
    measure(1'b1, 300);             // unidirectional reads at full rate
    wait (exp_q.size() == 0);
    rd_rand = 1; wr_rand = 1;       // mixed traffic
    rd_target = nrd + 400;
    wr_target = nwr + 400;
    wait (nrd == rd_target && nwr == wr_target);
    wait (exp_q.size() == 0);
    repeat (20) @(posedge clk);
    rd_rand = 0; rd_back = 1;       // read back everything written
    nrd = 0;
    rd_target = 300;
    wait (nrd == rd_target);
    wait (exp_q.size() == 0);
    repeat (5) @(posedge clk);
    checks++;
    if (nret != 300 + 400 + 300 || u_mem.conflicts != 0) begin
      failures++;
      $display("FAIL returns %0d conflicts %0d", nret, u_mem.conflicts);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

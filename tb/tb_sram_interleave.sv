// tb_sram_interleave: self-checking test of the SRAM read/write batching.
//
// The unit drives a behavioural SRAM. Phase 1 keeps both the read and the
// write queue full: the test checks that reads and writes come in batches
// of exactly NBATCH, that each change from reads to writes costs one idle
// cycle and none the other way, and that the access rate is
// 2*NBATCH/(2*NBATCH+1) (24 accesses per 25 cycles for NBATCH = 12).
// Reads there go to words never written, so their expected data is the
// model's start pattern. Phase 2 reads back every written word while the
// return queue is drained slowly, so the return-room check is exercised;
// the return queue must never exceed its depth. Phase 3 checks that one
// direction alone runs at one access per cycle.
module tb_sram_interleave;
  import m6_pkg::*;
  localparam int NBATCH = 12, TAG_W = 1, RET_DEPTH = 16;

  logic clk = 0, rst_n = 0;
  always #6.25 clk = ~clk;

  logic rq_req, rq_ack, wq_req, wq_ack, ret_req, turn;
  logic [TAG_W+SRAM_AW-1:0] rq_data;
  sram_wr_t wq_data;
  logic [TAG_W+SRAM_DW-1:0] ret_data;
  logic [$clog2(RET_DEPTH):0] ret_level;
  logic [SRAM_AW-1:0] sram_addr;
  logic sram_ce_n, sram_we_n, sram_dq_oe, drive;
  logic [SRAM_DW-1:0] sram_dq_o, sram_dq_i;
  sram_dir_e dir;

  sram_interleave #(.NBATCH(NBATCH), .TAG_W(TAG_W), .RET_DEPTH(RET_DEPTH)) dut (.*);

  sram_model #(.AW(SRAM_AW), .DW(SRAM_DW)) u_mem (
    .clk(clk), .addr(sram_addr), .ce_n(sram_ce_n), .we_n(sram_we_n),
    .dq_i(sram_dq_o), .dq_i_en(sram_dq_oe), .dq_o(sram_dq_i), .dq_drive(drive));

  int checks = 0, failures = 0;
  int phase = 0;
  int nrd = 0, nwr = 0, nret = 0, npop = 0;
  int NW = 240;
  logic [SRAM_AW-1:0] exp_q [$];
  logic [SRAM_DW-1:0] ret_q [$];
  logic [SRAM_DW-1:0] ref_mem [logic [SRAM_AW-1:0]];
  int turns = 0, acc_cnt = 0, cyc_cnt = 0;
  int run_len = 0;
  sram_dir_e last_dir;
  int batches_checked = 0;
  bit pop_slow = 0;

  function automatic logic [SRAM_AW-1:0] rd_addr_of(int n);
    if (phase <= 1) return SRAM_AW'(32'h4000 + n);
    return SRAM_AW'(32'h100 + (n % NW) * 3);
  endfunction

  // sources
  always_comb begin
    rq_req  = (phase == 1) || (phase == 2 && nrd < NW) || (phase == 3 && nrd < 200);
    rq_data = {1'b0, rd_addr_of(nrd)};
    wq_req  = (phase == 1 && nwr < NW) || (phase == 4 && nwr < NW + 200);
    wq_data.addr = SRAM_AW'(32'h100 + nwr * 3);
    wq_data.data = SRAM_DW'(nwr * 11 + 5);
  end

  assign ret_level = $bits(ret_level)'(ret_q.size());

  always @(posedge clk) begin
    if (rst_n) begin
      if (rq_req && rq_ack) begin
        exp_q.push_back(rd_addr_of(nrd));
        nrd <= nrd + 1;
      end
      if (wq_req && wq_ack) begin
        ref_mem[wq_data.addr] = wq_data.data;
        nwr <= nwr + 1;
      end
      if (ret_req) ret_q.push_back(ret_data[SRAM_DW-1:0]);
      checks++;
      if (ret_q.size() > RET_DEPTH) begin
        failures++;
        $display("FAIL return queue overflow %0d", ret_q.size());
      end
      if (ret_q.size() > 0 && (!pop_slow || $urandom % 10 == 0)) begin
        logic [SRAM_DW-1:0] d, e;
        logic [SRAM_AW-1:0] a;
        d = ret_q.pop_front();
        a = exp_q.pop_front();
        e = ref_mem.exists(a) ? ref_mem[a] : SRAM_DW'(a);
        checks++;
        if (d !== e) begin
          failures++;
          $display("FAIL read %h got %h expected %h", a, d, e);
        end
        npop++;
      end
      // batch and turnaround checks on the pins
      if (!sram_ce_n) begin
        sram_dir_e d;
        d = sram_we_n ? DIR_READ : DIR_WRITE;
        if (phase == 1) acc_cnt++;
        if (run_len > 0 && d != last_dir) begin
          if (phase == 1 && nrd > 30 && nwr < NW - 30) begin
            checks++;
            batches_checked++;
            if (run_len != NBATCH) begin
              failures++;
              $display("FAIL batch of %0d", run_len);
            end
          end
          run_len = 0;
        end
        run_len++;
        last_dir = d;
      end
      if (phase == 1) cyc_cnt++;
      if (turn) turns++;
    end
  end

  // a write must never be on the pins in the cycle after a read
  logic prev_rd;
  always @(posedge clk) begin
    if (rst_n && !sram_ce_n && !sram_we_n && prev_rd) begin
      failures++;
      $display("FAIL write right after read");
    end
    prev_rd <= rst_n && !sram_ce_n && sram_we_n;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c0;
    #40 rst_n = 1;
    // phase 1: both queues saturated
    phase = 1;
    wait (nwr >= NW);
    @(posedge clk);
    phase = 0;
    checks++;
    // expected rate: 2N accesses per 2N+1 cycles
    if (acc_cnt * (2 * NBATCH + 1) < (cyc_cnt - 4) * 2 * NBATCH || acc_cnt > cyc_cnt) begin
      failures++;
      $display("FAIL rate %0d accesses in %0d cycles", acc_cnt, cyc_cnt);
    end
    $display("phase 1: %0d accesses in %0d cycles, %0d turnarounds, %0d batches checked", acc_cnt, cyc_cnt, turns, batches_checked);
    checks++;
    if (turns < 5 || batches_checked < 10) begin failures++; $display("FAIL too few batches"); end
    wait (exp_q.size() == 0);
    // phase 2: read back what was written, slow return drain
    nrd = 0;
    pop_slow = 1;
    phase = 2;
    wait (nrd >= NW);
    wait (exp_q.size() == 0);
    pop_slow = 0;
    // phase 3: reads only, one per cycle
    nrd = 0;
    phase = 3;
    @(posedge clk);
    c0 = 0;
    while (nrd < 200) begin @(posedge clk); c0++; end
    checks++;
    if (c0 > 205) begin failures++; $display("FAIL read-only rate: 200 reads in %0d cycles", c0); end
    wait (exp_q.size() == 0);
    // phase 4: writes only
    phase = 4;
    c0 = 0;
    while (nwr < NW + 200) begin @(posedge clk); c0++; end
    checks++;
    if (c0 > 205) begin failures++; $display("FAIL write-only rate: 200 writes in %0d cycles", c0); end
    repeat (5) @(posedge clk);
    checks++;
    if (u_mem.conflicts != 0) begin failures++; $display("FAIL bus conflicts %0d", u_mem.conflicts); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_prio_arbiter: self-checking test of prio_arbiter.
//
// Two sources send numbered words (source i sends i*1000+n) and hold each
// until acknowledged; the sink acknowledges at random in phase 1 and always
// in phase 2. The test checks that every word arrives once and in order per
// source, that out_req/out_data match the granted source, and the
// arbitration rule: with both inputs requesting and the sink ready,
// input 0 always wins, and input 1 gets through only while input 0 is idle.
module tb_prio_arbiter;
  localparam bit PRIO = 1'b1;
  localparam int W = 16;
  localparam int N = 200;

  logic clk = 0, rst_n = 0;
  logic [1:0] in_req, in_ack;
  logic [1:0][W-1:0] in_data;
  logic out_req, out_ack, grant;
  logic [W-1:0] out_data;
  int checks = 0, failures = 0;
  int sent [2], rcvd [2];
  int phase;
  int last_grant;
  int both_cnt;

  always #5 clk = ~clk;

  prio_arbiter #(.W(W)) dut (.*);

  // sources: hold the word until it is acknowledged
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sent[0] <= 0; sent[1] <= 0;
    end else begin
      for (int i = 0; i < 2; i++) begin
        if (in_req[i] && in_ack[i]) sent[i] <= sent[i] + 1;
      end
    end
  end

  logic [1:0] want;
  always_comb begin
    for (int i = 0; i < 2; i++) begin
      in_req[i]  = rst_n && want[i] && (sent[i] < N);
      in_data[i] = W'(i * 1000 + sent[i]);
    end
  end

  always_ff @(posedge clk) begin
    if (phase == 1) want <= 2'($urandom);
    else if (phase >= 2) want <= 2'b11;
    else want <= 2'b00;
    if (phase == 1) out_ack <= 1'($urandom);
    else out_ack <= 1'b1;
  end

  // sink checks
  always @(posedge clk) begin
    if (rst_n && out_req && out_ack) begin
      int src;
      src = int'(out_data) / 1000;
      checks++;
      if (src != int'(grant) || !in_req[src] || !in_ack[src] || in_ack[1-src]) begin
        failures++;
        $display("FAIL handshake: data %0d grant %0d ack %b", out_data, grant, in_ack);
      end
      if (src < 2) begin
        checks++;
        if (int'(out_data) % 1000 != rcvd[src]) begin
          failures++;
          $display("FAIL order: source %0d got %0d expected %0d", src, int'(out_data) % 1000, rcvd[src]);
        end
        rcvd[src]++;
      end
      // arbitration rule in phase 2 (both requesting, sink ready)
      if (phase == 2 && in_req == 2'b11) begin
        both_cnt++;
        checks++;
        if (PRIO ? (src != 0) : (last_grant >= 0 && src == last_grant)) begin
          failures++;
          $display("FAIL rule: grant %0d after %0d", src, last_grant);
        end
      end
      last_grant = src;
    end
  end

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rcvd[0] = 0; rcvd[1] = 0; last_grant = -1; both_cnt = 0; phase = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    phase = 1;
    while (sent[0] < N/2 && sent[1] < N/2) @(posedge clk);
    phase = 2;
    last_grant = -1;
    while (sent[0] < N && sent[1] < N) @(posedge clk);
    phase = 3;
    // let the remaining words of the other source through
    while (sent[0] < N || sent[1] < N) begin
      @(posedge clk);
    end
    repeat (3) @(posedge clk);
    checks++;
    if (rcvd[0] != N || rcvd[1] != N || both_cnt < 20) begin
      failures++;
      $display("FAIL counts: %0d %0d both=%0d", rcvd[0], rcvd[1], both_cnt);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_async_fifo: self-checking test of the dual-clock gray-code FIFO.
//
// A 50 MHz writer and an 80 MHz reader (then the clocks swapped in speed by
// a slow reader) move 2000 counted words with random stalls on both sides.
// Checks: every word arrives once and in order; the FIFO reports full
// (seen at least once) and never accepts a 17th word; w_level never
// understates the words held.
module tb_async_fifo;
  localparam int W = 18, DEPTH = 16, N = 2000;

  logic w_clk = 0, r_clk = 0, w_rst_n = 0, r_rst_n = 0;
  logic w_req, w_ack, r_req, r_ack;
  logic [W-1:0] w_data, r_data;
  logic [$clog2(DEPTH):0] w_level;
  int checks = 0, failures = 0;
  int nw = 0, nr = 0, full_seen = 0, slow_reader = 0;

  always #10 w_clk = ~w_clk;
  always #6.25 r_clk = ~r_clk;

  async_fifo #(.W(W), .DEPTH(DEPTH)) dut (.*);

  logic w_go;
  assign w_data = W'(nw * 7 + 3);
  assign w_req  = w_go && (nw < N);

  always @(posedge w_clk) begin
    if (w_rst_n) begin
      if (w_req && w_ack) nw <= nw + 1;
      if (!w_ack) full_seen++;
      checks++;
      if (int'(w_level) < nw - nr - 1 || w_level > DEPTH) begin
        failures++;
        $display("FAIL level %0d with %0d written %0d read", w_level, nw, nr);
      end
      w_go <= ($urandom % 4 != 0);
    end else w_go <= 1'b0;
  end

  always @(posedge r_clk) begin
    if (r_rst_n) begin
      if (r_req && r_ack) begin
        checks++;
        if (r_data != W'(nr * 7 + 3)) begin
          failures++;
          $display("FAIL data %0d expected %0d", r_data, nr * 7 + 3);
        end
        nr <= nr + 1;
      end
      r_ack <= slow_reader ? ($urandom % 8 == 0) : ($urandom % 3 != 0);
    end else r_ack <= 1'b0;
  end

  initial begin
    #2000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100 w_rst_n = 1; r_rst_n = 1;
    wait (nr >= N / 2);
    slow_reader = 1;
    wait (nr >= N);
    #200;
    checks++;
    if (full_seen == 0 || nw != N) begin
      failures++;
      $display("FAIL full never seen (%0d) or count %0d", full_seen, nw);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

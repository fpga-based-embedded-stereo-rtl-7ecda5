// tb_conv2d: self-checking test of the single-multiplier 4x4 convolution.
//
// Frames of 12x8 random pixels are convolved with random signed
// coefficients; the expected sums are computed here directly from the
// definition out(x0,y0) = sum coef[j*4+i] * p(x0+i, y0+j). Frame 1 runs
// with the input always available and the sink always ready and checks
// the rate: consecutive results inside a line are exactly 16 clocks apart
// (one multiply-accumulate per clock). Frame 2 adds random input gaps and
// sink stalls. Frame 3 uses a Sobel-type kernel padded into the 4x4 window.
module tb_conv2d;
  import m6_pkg::*;
  localparam int IW = 12, IH = 8, WIN = 4;
  localparam int NOUT = (IW - WIN + 1) * (IH - WIN + 1);

  logic clk = 0, rst_n = 0;
  always #10 clk = ~clk;

  logic [WIN*WIN-1:0][17:0] coef;
  logic in_req, in_ack, out_req, out_ack, mac_busy;
  pix_t in_data;
  logic signed [31:0] out_data;

  conv2d #(.IMG_W(IW), .WIN(WIN)) dut (.*);

  int checks = 0, failures = 0;
  logic [7:0] img [IH][IW];
  int exp_q [$];
  int last_out_cyc, cyc = 0, out_idx;
  bit stalls = 0;
  int rate_checked = 0;

  always @(posedge clk) begin
    cyc++;
    out_ack <= stalls ? 1'($urandom % 3 == 0) : 1'b1;
    if (rst_n && out_req && out_ack) begin
      int e;
      checks++;
      e = exp_q.pop_front();
      if (out_data != e) begin
        failures++;
        $display("FAIL output %0d: %0d expected %0d", out_idx, out_data, e);
      end
      if (!stalls && out_idx % (IW - WIN + 1) != 0) begin
        checks++;
        rate_checked++;
        if (cyc - last_out_cyc != WIN * WIN) begin
          failures++;
          $display("FAIL output spacing %0d cycles", cyc - last_out_cyc);
        end
      end
      last_out_cyc = cyc;
      out_idx++;
    end
  end

  task automatic run_frame(input int kind);
    for (int y = 0; y < IH; y++)
      for (int x = 0; x < IW; x++) img[y][x] = 8'($urandom);
    for (int k = 0; k < WIN * WIN; k++) begin
      if (kind == 3) begin
        int sob [9] = '{-1, 0, 1, -2, 0, 2, -1, 0, 1};
        coef[k] = (k % WIN < 3 && k / WIN < 3) ? 18'(sob[(k / WIN) * 3 + k % WIN]) : 18'(0);
      end else coef[k] = 18'($urandom % 2001) - 18'(1000);
    end
    for (int y0 = 0; y0 + WIN <= IH; y0++)
      for (int x0 = 0; x0 + WIN <= IW; x0++) begin
        int s;
        s = 0;
        for (int j = 0; j < WIN; j++)
          for (int i = 0; i < WIN; i++)
            s += $signed(coef[j*WIN+i]) * int'(img[y0+j][x0+i]);
        exp_q.push_back(s);
      end
    out_idx = 0;
    stalls = (kind == 2);
    for (int y = 0; y < IH; y++)
      for (int x = 0; x < IW; x++) begin
        in_data.sof = (x == 0 && y == 0);
        in_data.pix = img[y][x];
        in_req = 1;
        @(posedge clk);
        while (!in_ack) @(posedge clk);
        #1;
        if (stalls && $urandom % 3 == 0) begin
          in_req = 0;
          repeat ($urandom % 20) @(posedge clk);
          #1;
        end
      end
    in_req = 0;
    wait (exp_q.size() == 0);
    repeat (20) @(posedge clk);
    #1;
    checks++;
    if (out_idx != NOUT) begin failures++; $display("FAIL frame %0d: %0d outputs", kind, out_idx); end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_req = 0; in_data = '0; coef = '0;
    #35 rst_n = 1;
    @(posedge clk); #1;
    run_frame(1);
    run_frame(2);
    run_frame(3);
    checks++;
    if (rate_checked < 20) begin failures++; $display("FAIL rate not checked"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

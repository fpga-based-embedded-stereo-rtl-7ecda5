// async_fifo: dual-clock FIFO with gray-coded pointers.
//
// Carries words between two clock domains, here between the 50 MHz
// processing clock (M6CLK) and the SRAM clock (MEMCLK). Each side keeps a
// binary pointer and its gray-coded copy; only the gray copy crosses to the
// other side, through two flip-flops, so a pointer that is sampled while it
// changes is off by at most one position and full/empty stay conservative.
// The storage is a plain register array; the read side shows the oldest word
// on r_data whenever r_req is high (first-word fall-through).
//
// Interface: the write side is a request/acknowledge sink (w_ack is high
// when not full), the read side a request/acknowledge source (r_req is high
// when not empty). w_level is the occupancy seen from the write side, which
// may overstate, never understate, the true fill level. Latency from a write
// to r_req is three r_clk edges.
//
// A 16-entry, independently clocked, gray-code-counter FIFO is what the
// design calls for between its two clock regions; this implementation of it
// is this design's own.
module async_fifo #(
  parameter int W     = 18,
  parameter int DEPTH = 16
) (
  input  logic                     w_clk,
  input  logic                     w_rst_n,
  input  logic                     w_req,
  input  logic [W-1:0]             w_data,
  output logic                     w_ack,
  output logic [$clog2(DEPTH):0]   w_level,
  input  logic                     r_clk,
  input  logic                     r_rst_n,
  output logic                     r_req,
  output logic [W-1:0]             r_data,
  input  logic                     r_ack
);

  localparam int AW = $clog2(DEPTH);

  logic [W-1:0] mem [DEPTH];

  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w1, rgray_w2;  // read pointer synchronised to w_clk
  logic [AW:0] wgray_r1, wgray_r2;  // write pointer synchronised to r_clk

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [AW:0] gray2bin(input logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = AW - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // ---------------- write side ----------------
  logic        wfull;
  logic [AW:0] rbin_w;
  logic        wpush;

  assign rbin_w  = gray2bin(rgray_w2);
  assign w_level = wbin - rbin_w;
  assign wfull   = (w_level == (AW+1)'(DEPTH));
  assign w_ack   = !wfull;
  assign wpush   = w_req && !wfull;

  always_ff @(posedge w_clk) begin
    if (wpush) mem[wbin[AW-1:0]] <= w_data;
  end

  always_ff @(posedge w_clk or negedge w_rst_n) begin
    if (!w_rst_n) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
    end else begin
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      if (wpush) begin
        wbin  <= wbin + 1'b1;
        wgray <= bin2gray(wbin + 1'b1);
      end
    end
  end

  // ---------------- read side ----------------
  logic rpop;

  assign r_req  = (rgray != wgray_r2);
  assign r_data = mem[rbin[AW-1:0]];
  assign rpop   = r_req && r_ack;

  always_ff @(posedge r_clk or negedge r_rst_n) begin
    if (!r_rst_n) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
      if (rpop) begin
        rbin  <= rbin + 1'b1;
        rgray <= bin2gray(rbin + 1'b1);
      end
    end
  end

  // A power-of-two depth is needed for the gray code to wrap correctly.
  initial assert (DEPTH >= 2 && (DEPTH & (DEPTH - 1)) == 0)
    else $error("async_fifo: DEPTH must be a power of two");

endmodule

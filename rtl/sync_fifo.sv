// sync_fifo: small single-clock FIFO with request/acknowledge ports.
//
// A helper for the stream units: it decouples a producer that cannot wait
// (a camera) or a bursty return path from the consumer. Register array
// storage, first-word fall-through on the read side.
//
// Interface: w_req/w_data/w_ack in, r_req/r_data/r_ack out, count is the
// current fill level. A written word is visible on r_req one cycle later.
module sync_fifo #(
  parameter int W     = 8,
  parameter int DEPTH = 4
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   w_req,
  input  logic [W-1:0]           w_data,
  output logic                   w_ack,
  output logic                   r_req,
  output logic [W-1:0]           r_data,
  input  logic                   r_ack,
  output logic [$clog2(DEPTH):0] count
);

  localparam int AW = $clog2(DEPTH);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic          push, pop;

  assign w_ack  = (count != (AW+1)'(DEPTH));
  assign r_req  = (count != '0);
  assign r_data = mem[rp];
  assign push   = w_req && w_ack;
  assign pop    = r_req && r_ack;

  always_ff @(posedge clk) begin
    if (push) mem[wp] <= w_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (push) wp <= (wp == AW'(DEPTH - 1)) ? '0 : wp + 1'b1;
      if (pop)  rp <= (rp == AW'(DEPTH - 1)) ? '0 : rp + 1'b1;
      count <= count + (AW+1)'(push) - (AW+1)'(pop);
    end
  end

endmodule

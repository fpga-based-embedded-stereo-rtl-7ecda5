// alt_arbiter: two-input request/acknowledge arbiter that alternates.
//
// Every time the arbiter wins a transfer on its output it hands the next
// turn to the other input, so two inputs that both request all the time
// share the bus word by word. An input that requests alone gets every cycle.
// Arbiters of this kind and prio_arbiter are stacked into binary trees to
// share one memory bus among several devices.
//
// Interface: in_req/in_data/in_ack per input, out_req/out_data/out_ack
// toward the bus, and grant (index of the input currently connected).
// A word moves on a rising edge with request and acknowledge both high.
// The path from out_ack to in_ack is combinational, so a tree adds no
// latency. Once out_req is raised without out_ack the grant is held, so the
// output word stays stable until it is taken (this design's choice). The
// data lines of the unselected input are ignored instead of being left
// floating as a tri-state bus would be.
module alt_arbiter #(
  parameter int W = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [1:0]         in_req,
  input  logic [1:0][W-1:0]  in_data,
  output logic [1:0]         in_ack,
  output logic               out_req,
  output logic [W-1:0]       out_data,
  input  logic               out_ack,
  output logic               grant
);

  logic last;     // input that had the most recent transfer
  logic held;     // output request pending without acknowledge
  logic held_sel;
  logic sel;

  always_comb begin
    if (held)                   sel = held_sel;
    else if (&in_req)           sel = ~last;
    else                        sel = in_req[1];
  end

  assign out_req  = in_req[sel];
  assign out_data = in_data[sel];
  assign in_ack   = out_ack ? (sel ? 2'b10 : 2'b01) : 2'b00;
  assign grant    = sel;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last     <= 1'b1;
      held     <= 1'b0;
      held_sel <= 1'b0;
    end else begin
      if (out_req && out_ack) last <= sel;
      held     <= out_req && !out_ack;
      held_sel <= sel;
    end
  end

endmodule

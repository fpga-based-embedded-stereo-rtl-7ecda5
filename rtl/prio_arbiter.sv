// prio_arbiter: two-input request/acknowledge arbiter with fixed priority.
//
// Input 0 always wins; input 1 is passed through only while input 0 is not
// requesting. Used with alt_arbiter to build binary arbitration trees.
//
// Interface and timing are those of alt_arbiter: out_ack reaches the
// selected in_ack combinationally, and once out_req waits without out_ack
// the grant is held until the word is taken (this design's choice, it keeps
// the output word stable).
module prio_arbiter #(
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

  logic held;
  logic held_sel;
  logic sel;

  always_comb begin
    if (held) sel = held_sel;
    else      sel = !in_req[0];
  end

  assign out_req  = in_req[sel];
  assign out_data = in_data[sel];
  assign in_ack   = out_ack ? (sel ? 2'b10 : 2'b01) : 2'b00;
  assign grant    = sel;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      held     <= 1'b0;
      held_sel <= 1'b0;
    end else begin
      held     <= out_req && !out_ack;
      held_sel <= sel;
    end
  end

endmodule

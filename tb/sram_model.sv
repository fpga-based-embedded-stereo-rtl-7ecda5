// sram_model: behavioural model of the external synchronous SRAM chip.
//
// Not synthesizable logic of the design: it stands in for the single-port
// "no bus turnaround" SRAM on the FPGA memory bus. At a rising clock edge
// with ce_n low it samples the address; with we_n low it also samples the
// data lines and writes. For a read the addressed word is driven on dq_o
// (dq_drive high) during the following clock cycle. Contents start as a
// known pattern (word index) so reads of unwritten words are predictable.
module sram_model #(
  parameter int AW = 19,
  parameter int DW = 18
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic          ce_n,
  input  logic          we_n,
  input  logic [DW-1:0] dq_i,
  input  logic          dq_i_en,
  output logic [DW-1:0] dq_o,
  output logic          dq_drive
);
  logic [DW-1:0] mem [1 << AW];
  logic [AW-1:0] raddr;
  logic          rd;
  int            writes, reads, conflicts;

  initial begin
    for (int i = 0; i < (1 << AW); i++) mem[i] = DW'(i);
    rd = 1'b0; raddr = '0; writes = 0; reads = 0; conflicts = 0;
  end

  always_ff @(posedge clk) begin
    rd <= !ce_n && we_n;
    if (!ce_n && we_n) begin
      raddr <= addr;
      reads <= reads + 1;
    end
    if (!ce_n && !we_n) begin
      mem[addr] <= dq_i;
      writes <= writes + 1;
    end
    if (dq_i_en && rd) conflicts <= conflicts + 1;
  end

  assign dq_o     = rd ? mem[raddr] : '0;
  assign dq_drive = rd;
endmodule

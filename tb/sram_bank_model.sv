// sram_bank_model -- behavioural model of one on-board SRAM bank
// (testbench only). 2^AW words of 32 bits, one port: a write when we is
// high stores wdata at addr on the clock edge; a read when re is high
// returns mem[addr] on rdata after the same edge, i.e. one cycle later.
// The array is public so a testbench can load and inspect it directly.
module sram_bank_model #(
  parameter int unsigned AW = 19
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic          re,
  input  logic          we,
  input  logic [31:0]   wdata,
  output logic [31:0]   rdata
);
  logic [31:0] mem [2**AW];

  initial rdata = '0;

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
    if (re) rdata <= mem[addr];
  end
endmodule

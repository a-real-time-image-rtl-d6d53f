// sram_model -- behavioural model of one asynchronous 32-bit SRAM bank
// (512K words on the prototyping board) for simulation only.
//
// Read: while ce_n and oe_n are low, rdata shows the addressed word
// (combinational, standing in for the chip's 17 ns access time within a
// 50 ns memory cycle). Write: while ce_n and we_n are low the word on
// wdata is stored; the model stores it at the rising clock edge that ends
// the write cycle. Outside a read, rdata is zero (two-state simulation has
// no high impedance). The content starts at zero. It also counts reads
// and writes for the testbenches.
module sram_model #(
  parameter int unsigned ADDR_W = 19
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] addr,
  input  logic [31:0]       wdata,
  output logic [31:0]       rdata,
  input  logic              ce_n,
  input  logic              oe_n,
  input  logic              we_n
);

  logic [31:0] mem [2**ADDR_W];
  int unsigned n_reads  = 0;
  int unsigned n_writes = 0;

  initial foreach (mem[i]) mem[i] = '0;

  assign rdata = (!ce_n && !oe_n) ? mem[addr] : '0;

  always @(posedge clk) begin
    if (!ce_n && !we_n) begin
      mem[addr] <= wdata;
      n_writes  <= n_writes + 1;
    end
    if (!ce_n && !oe_n) n_reads <= n_reads + 1;
  end

endmodule

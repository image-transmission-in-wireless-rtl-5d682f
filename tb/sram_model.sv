// sram_model: behavioural model of the external asynchronous SRAM (not
// synthesizable logic of the design; used by testbenches only).
//
// Reads are combinational: rdata shows mem[addr] whenever the chip and its
// output are enabled. A write stores wdata at addr on the rising clock edge
// that ends a cycle in which ce_n and we_n are both low, which is how the
// interface drives the strobes (one cycle per access).
module sram_model #(
  parameter int unsigned ADDR_W = 20,
  parameter int unsigned DATA_W = 8
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] addr,
  input  logic [DATA_W-1:0] wdata,
  output logic [DATA_W-1:0] rdata,
  input  logic              ce_n,
  input  logic              oe_n,
  input  logic              we_n
);
  logic [DATA_W-1:0] mem [1 << ADDR_W];
  int unsigned writes = 0, reads = 0;

  assign rdata = (!ce_n && !oe_n) ? mem[addr] : '0;

  always @(posedge clk) begin
    if (!ce_n && !we_n) begin
      mem[addr] <= wdata;
      writes++;
    end
    if (!ce_n && !oe_n) reads++;
  end
endmodule

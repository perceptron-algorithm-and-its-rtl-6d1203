// mem_unit: the accelerator's simple single-port memory (one per data stream).
//
// DEPTH words of DATA_W bits. When ena is high the unit either writes din at
// addr (w = 1) or reads addr (w = 0); a read shows on dout on the next clock
// edge and dout holds its value until the next read. When ena is low nothing
// happens. rst clears dout only; the array itself is not cleared and must be
// written before it is read.
//
// The pin list (ena, w, din, dout, clk, rst, addr) and the 16-bit data /
// 8-bit address widths follow the document's memory-unit table. The one-cycle
// registered read, a write that does not update dout, and a reset that leaves
// the array alone are this design's choices.
module mem_unit
  import perceptron_pkg::*;
#(
  parameter int unsigned DEPTH = 2**ADDR_W
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  ena,
  input  logic  w,
  input  addr_t addr,
  input  word_t din,
  output word_t dout
);

  word_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (ena && w) mem[addr] <= din;
  end

  always_ff @(posedge clk) begin
    if (rst)            dout <= '0;
    else if (ena && !w) dout <= mem[addr];
  end

endmodule

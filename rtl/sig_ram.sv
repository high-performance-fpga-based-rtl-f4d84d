// sig_ram: the signature memory. Each row holds a 48-bit partial signature
// and, as its leftmost bit, a finish bit that marks the last signature of a
// key group.
//
// Row addresses are {CAM address (16 bits), slot (3 bits)}: the signatures
// whose first two bytes are equal share one CAM address and sit in slots
// 000, 001, ... of it, the last one with its finish bit set. That layout,
// the 19-bit address and the 1+48-bit row follow the published design. The
// memory itself is a plain single-port-read, single-port-write array; its
// synchronous read (data one cycle after the address) matches FPGA block RAM
// and is this design's choice.
//
// Interface and timing:
//   wr_en/wr_addr/wr_data  load a row at the clock edge
//   rd_en/rd_addr          read request in cycle t ...
//   rd_data                ... is valid after the edge ending t and holds
//                          until the next read.
// The memory is not reset; only rows that were loaded are ever read.
module sig_ram
  import ids_pkg::*;
#(
  parameter int unsigned AW = 19
) (
  input  logic       clk,
  input  logic       wr_en,
  input  logic [AW-1:0] wr_addr,
  input  sig_entry_t wr_data,
  input  logic       rd_en,
  input  logic [AW-1:0] rd_addr,
  output sig_entry_t rd_data
);

  sig_entry_t mem [2 ** AW];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule

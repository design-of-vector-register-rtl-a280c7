// Data memory with two read ports and one write port.
//
// DEPTH words of 32 bits (one register's worth: four 8-bit pixels), matching
// the 32-bit system data bus. Both read ports are synchronous: the word at
// raddr appears on rdata one clock after the address, as in a synchronous
// SRAM. The single write port commits at the rising edge; a read of the word
// being written in the same cycle returns the old contents (read-first).
// The port count follows the document; depth, read latency and read-first
// behaviour are this design's choices. Contents are not reset.
module data_sram
  import vreg_pkg::*;
#(
  parameter int unsigned DEPTH = 2**MEM_AW
) (
  input  logic                     clk,
  input  logic [$clog2(DEPTH)-1:0] raddr0,
  output vword_t                   rdata0,
  input  logic [$clog2(DEPTH)-1:0] raddr1,
  output vword_t                   rdata1,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  vword_t                   wdata
);

  vword_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata0 <= mem[raddr0];
    rdata1 <= mem[raddr1];
  end

endmodule

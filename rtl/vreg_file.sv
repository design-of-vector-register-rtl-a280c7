// 2-D vector register file.
//
// Eight 32-bit data registers are split into thirty-two independently
// addressable 8-bit elements, arranged as two 4x4 banks (R0..R3 with columns
// C0..C3, R4..R7 with columns C4..C7). Each port is addressed by a 3-bit
// register number and a mode bit: in row mode a port reads or writes the four
// elements of a row register, in column mode the four elements of a column of
// a bank. A matrix held in a bank can therefore be processed along its rows
// and then along its columns without going through memory to transpose it.
//
// Ports: two combinational read ports (A, B) and one write port, as in the
// scalar register file this replaces; the read multiplexers and the write
// demultiplexer each gain the mode bit. Writes take effect at the rising
// clock edge; a read in the same cycle returns the old value (no internal
// write-through; the pipeline forwards pending writes with vreg_bypass).
// An asynchronous active-low reset clears
// every element; the reset behaviour is this design's choice.
module vreg_file
  import vreg_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  vreg_addr_t ra,
  input  vreg_addr_t rb,
  output vword_t     rdata_a,
  output vword_t     rdata_b,
  input  logic       we,
  input  vreg_addr_t wa,
  input  vword_t     wdata
);

  elem_t elems      [NUM_REGS][LANES];
  logic  elem_we    [NUM_REGS][LANES];
  elem_t elem_wdata [NUM_REGS][LANES];

  vreg_write_demux u_demux (
    .we        (we),
    .addr      (wa),
    .wdata     (wdata),
    .elem_we   (elem_we),
    .elem_wdata(elem_wdata)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < NUM_REGS; r++)
        for (int c = 0; c < LANES; c++)
          elems[r][c] <= '0;
    end else begin
      for (int r = 0; r < NUM_REGS; r++)
        for (int c = 0; c < LANES; c++)
          if (elem_we[r][c]) elems[r][c] <= elem_wdata[r][c];
    end
  end

  vreg_read_mux u_mux_a (.elems(elems), .addr(ra), .data(rdata_a));
  vreg_read_mux u_mux_b (.elems(elems), .addr(rb), .data(rdata_b));

endmodule

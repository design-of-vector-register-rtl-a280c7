// Write-port demultiplexer of the 2-D vector register file.
//
// Decodes the write select (mode bit plus register number) into one write
// enable per 8-bit element and routes the data bytes: in row mode byte k goes
// to element k of row register n; in column mode byte k goes to the k-th row
// register of the bank that holds column n, in column n % LANES. Exactly LANES enables are raised when we = 1,
// none otherwise. Purely combinational.
module vreg_write_demux
  import vreg_pkg::*;
(
  input  logic       we,
  input  vreg_addr_t addr,
  input  vword_t     wdata,
  output logic       elem_we    [NUM_REGS][LANES],
  output elem_t      elem_wdata [NUM_REGS][LANES]
);

  localparam int unsigned LW = $clog2(LANES);

  logic [LW-1:0] col;

  assign col = addr.num[LW-1:0];

  always_comb begin
    for (int r = 0; r < NUM_REGS; r++) begin
      for (int c = 0; c < LANES; c++) begin
        // Row mode: element c of the addressed row register.
        // Column mode: row register r of the addressed bank, lane r % LANES.
        if (addr.mode == MODE_ROW) begin
          elem_we[r][c]    = we && (REG_AW'(r) == addr.num);
          elem_wdata[r][c] = wdata[c];
        end else begin
          elem_we[r][c]    = we && (REG_AW'(r) >> LW == addr.num >> LW) && (LW'(c) == col);
          elem_wdata[r][c] = wdata[r % LANES];
        end
      end
    end
  end

endmodule

// Read-port multiplexer of the 2-D vector register file.
//
// The element array is stored as NUM_REGS row registers of LANES elements;
// LANES consecutive row registers form one square bank. The select is the
// mode bit plus the register number, i.e. the 3-bit multiplexer of a plain
// scalar register file widened by one bit:
//   row mode,    number n: the LANES elements of row register n;
//   column mode, number n: bank b = n / LANES, column c = n % LANES, element k
//                          taken from row register b*LANES + k, column c.
// So C0..C3 are the columns of the bank holding R0..R3, C4..C7 those of the
// bank holding R4..R7. Purely combinational.
module vreg_read_mux
  import vreg_pkg::*;
(
  input  elem_t      elems [NUM_REGS][LANES],
  input  vreg_addr_t addr,
  output vword_t     data
);

  localparam int unsigned LW = $clog2(LANES);

  logic [REG_AW-1:0] bank_base;
  logic [LW-1:0]     col;

  assign bank_base = {addr.num[REG_AW-1:LW], LW'(0)};
  assign col       = addr.num[LW-1:0];

  always_comb begin
    for (int k = 0; k < LANES; k++) begin
      if (addr.mode == MODE_ROW) data[k] = elems[addr.num][k];
      else                       data[k] = elems[bank_base + REG_AW'(k)][col];
    end
  end

endmodule

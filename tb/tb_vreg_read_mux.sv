// Self-checking testbench for vreg_read_mux: random element arrays, every
// row and column address, output compared with the matrix reference model.
module tb_vreg_read_mux;
  import vreg_pkg::*;
  import tb_ref_pkg::*;

  elem_t      elems [NUM_REGS][LANES];
  vreg_addr_t addr;
  vword_t     data;
  mat_t       m;
  int checks = 0, failures = 0;

  vreg_read_mux dut (.elems(elems), .addr(addr), .data(data));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 50; it++) begin
      for (int r = 0; r < NUM_REGS; r++)
        for (int c = 0; c < LANES; c++) begin
          m[r][c]     = byte'($urandom);
          elems[r][c] = m[r][c];
        end
      for (int md = 0; md < 2; md++)
        for (int n = 0; n < NUM_REGS; n++) begin
          addr = mk_addr(md[0], n);
          #1;
          checks++;
          if (data !== ref_read(m, addr)) begin
            failures++;
            if (failures < 5) $display("mismatch mode=%0d n=%0d got %h exp %h", md, n, data, ref_read(m, addr));
          end
        end
    end
    // C1 of the first bank is element 1 of R0..R3 (Fig. 2(c) layout)
    for (int r = 0; r < NUM_REGS; r++) for (int c = 0; c < LANES; c++) elems[r][c] = elem_t'(16 * r + c);
    addr = mk_addr(1'b1, 1);
    #1 checks++;
    if (data !== {8'h01, 8'h11, 8'h21, 8'h31}) failures++;
    addr = mk_addr(1'b1, 6);
    #1 checks++;
    if (data !== {8'h42, 8'h52, 8'h62, 8'h72}) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

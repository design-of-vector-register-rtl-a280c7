// Self-checking testbench for vreg_write_demux: for random selects and data,
// applies the enables to a matrix and compares with the reference write;
// also checks that exactly four (or, with we = 0, no) enables are raised.
module tb_vreg_write_demux;
  import vreg_pkg::*;
  import tb_ref_pkg::*;

  logic       we;
  vreg_addr_t addr;
  vword_t     wdata;
  logic       elem_we    [NUM_REGS][LANES];
  elem_t      elem_wdata [NUM_REGS][LANES];
  mat_t       m, e;
  int checks = 0, failures = 0;

  vreg_write_demux dut (.we(we), .addr(addr), .wdata(wdata), .elem_we(elem_we), .elem_wdata(elem_wdata));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 400; it++) begin
      automatic int cnt = 0;
      we    = (it % 8) != 7;
      addr  = mk_addr($urandom_range(0, 1) == 1, $urandom_range(0, NUM_REGS - 1));
      wdata = $urandom;
      for (int r = 0; r < NUM_REGS; r++) for (int c = 0; c < LANES; c++) m[r][c] = byte'($urandom);
      e = m;
      if (we) ref_write(e, addr, wdata);
      #1;
      for (int r = 0; r < NUM_REGS; r++)
        for (int c = 0; c < LANES; c++) begin
          if (elem_we[r][c]) begin
            m[r][c] = elem_wdata[r][c];
            cnt++;
          end
        end
      checks++;
      if (m != e) begin
        failures++;
        if (failures < 5) $display("routing mismatch mode=%0d n=%0d", addr.mode, addr.num);
      end
      checks++;
      if (cnt != (we ? LANES : 0)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

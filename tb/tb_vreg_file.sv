// Self-checking testbench for vreg_file.
// 1. After reset every row and column reads zero.
// 2. Rows R0..R3 and R4..R7 are written with a known block; columns
//    C0..C3 / C4..C7 must read its transpose (in-register transposition).
// 3. Random mixed row/column writes and reads on both ports against the
//    matrix reference, including a read of the word being written in the
//    same cycle (the old value must be returned).
module tb_vreg_file;
  import vreg_pkg::*;
  import tb_ref_pkg::*;

  logic       clk = 0, rst_n = 0;
  vreg_addr_t ra, rb, wa;
  vword_t     rdata_a, rdata_b, wdata;
  logic       we;
  mat_t       m;
  int checks = 0, failures = 0;

  vreg_file dut (.clk(clk), .rst_n(rst_n), .ra(ra), .rb(rb), .rdata_a(rdata_a), .rdata_b(rdata_b),
                 .we(we), .wa(wa), .wdata(wdata));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input vword_t got, input vword_t exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 8) $display("%s: got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    we = 0; ra = '0; rb = '0; wa = '0; wdata = '0;
    for (int r = 0; r < NUM_REGS; r++) for (int c = 0; c < LANES; c++) m[r][c] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < NUM_REGS; n++) begin
      ra = mk_addr(0, n); rb = mk_addr(1, n);
      #1 check(rdata_a, '0, "reset row"); check(rdata_b, '0, "reset col");
    end
    // rows hold 16*r + c
    for (int n = 0; n < NUM_REGS; n++) begin
      @(negedge clk);
      we = 1; wa = mk_addr(0, n);
      for (int k = 0; k < LANES; k++) wdata[k] = elem_t'(16 * n + k);
      ref_write(m, wa, wdata);
    end
    @(negedge clk) we = 0;
    for (int n = 0; n < NUM_REGS; n++) begin
      vword_t exp;
      for (int k = 0; k < LANES; k++) exp[k] = elem_t'(16 * ((n / 4) * 4 + k) + (n % 4));
      ra = mk_addr(1, n); rb = mk_addr(1, n);
      #1 check(rdata_a, exp, "transpose A"); check(rdata_b, exp, "transpose B");
    end
    // random traffic
    for (int it = 0; it < 600; it++) begin
      @(negedge clk);
      we    = $urandom_range(0, 2) != 0;
      wa    = mk_addr($urandom_range(0, 1) == 1, $urandom_range(0, NUM_REGS - 1));
      wdata = $urandom;
      ra    = (it % 5 == 0) ? wa : mk_addr($urandom_range(0, 1) == 1, $urandom_range(0, NUM_REGS - 1));
      rb    = mk_addr($urandom_range(0, 1) == 1, $urandom_range(0, NUM_REGS - 1));
      #1 check(rdata_a, ref_read(m, ra), "rand A"); check(rdata_b, ref_read(m, rb), "rand B");
      @(posedge clk);
      if (we) ref_write(m, wa, wdata);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Self-checking testbench for vreg_bypass: a random register matrix, a random
// pending write and a random read. The expected value is the read of the
// matrix after the write is applied; the expected hit mask marks the lanes
// that changed owner. Directed cases: row write R4 then column read C5
// (one shared byte), same-register row read, disjoint bank, invalid write.
module tb_vreg_bypass;
  import vreg_pkg::*;
  import tb_ref_pkg::*;

  vreg_addr_t       raddr;
  vword_t           rdata, data;
  vreg_wr_t         wr;
  logic [0:LANES-1] hit;
  logic             xmode;
  mat_t             m, mw;
  int checks = 0, failures = 0, nx = 0, npart = 0;

  vreg_bypass dut (.raddr(raddr), .rdata(rdata), .wr(wr), .data(data), .hit(hit), .xmode(xmode));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_one();
    logic [0:LANES-1] exp_hit;
    mat_t tag;
    // tag each element with a unique id to find which lanes the write covers
    for (int r = 0; r < NUM_REGS; r++) for (int c = 0; c < LANES; c++) tag[r][c] = 0;
    if (wr.valid) ref_write(tag, wr.addr, {LANES{8'hFF}});
    mw = m;
    if (wr.valid) ref_write(mw, wr.addr, wr.data);
    begin
      vword_t t = ref_read(tag, raddr);
      for (int k = 0; k < LANES; k++) exp_hit[k] = (t[k] == 8'hFF);
    end
    rdata = ref_read(m, raddr);
    #1;
    checks++;
    if (data !== ref_read(mw, raddr)) begin
      failures++;
      if (failures < 8) $display("data: r=%0d/%0d w=%0d/%0d got %h exp %h", raddr.mode, raddr.num,
                                 wr.addr.mode, wr.addr.num, data, ref_read(mw, raddr));
    end
    checks++;
    if (hit !== exp_hit) failures++;
    checks++;
    if (xmode !== ((|exp_hit) && raddr.mode != wr.addr.mode)) failures++;
    if (xmode) nx++;
    if (|exp_hit && !(&exp_hit)) npart++;
  endtask

  initial begin
    for (int r = 0; r < NUM_REGS; r++) for (int c = 0; c < LANES; c++) m[r][c] = byte'($urandom);
    // directed: row R4 written, column C5 read -> only lane 0 (element R4,col1)
    wr.valid = 1; wr.addr = mk_addr(0, 4); wr.data = 32'hA1A2A3A4;
    raddr = mk_addr(1, 5);
    run_one();
    checks++;
    if (hit !== 4'b1000 || data[0] !== 8'hA2) failures++;
    // same register, same mode: all lanes
    raddr = mk_addr(0, 4);
    run_one();
    checks++;
    if (data !== 32'hA1A2A3A4) failures++;
    // other bank: nothing
    raddr = mk_addr(1, 1);
    run_one();
    checks++;
    if (hit !== '0) failures++;
    // invalid write forwards nothing
    wr.valid = 0; raddr = mk_addr(0, 4);
    run_one();
    for (int it = 0; it < 2000; it++) begin
      for (int r = 0; r < NUM_REGS; r++) for (int c = 0; c < LANES; c++) m[r][c] = byte'($urandom);
      wr.valid = $urandom_range(0, 7) != 0;
      wr.addr  = mk_addr($urandom_range(0, 1) == 1, $urandom_range(0, NUM_REGS - 1));
      wr.data  = $urandom;
      raddr    = mk_addr($urandom_range(0, 1) == 1, $urandom_range(0, NUM_REGS - 1));
      run_one();
    end
    checks++;
    if (nx == 0 || npart == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Stimulus and checking harness for vreg_dsp_top, shared by the end-to-end
// testbenches (the testbench module instantiates the datapath and this
// harness side by side, so the datapath keeps its own parameters). It raises
// done with its check and failure counts; the testbench prints the result.
//
// Workload: in-loop deblocking of one macroblock, luma (4x4 sub-blocks) and
// both chroma components (2x2 sub-blocks), together with the left and upper
// neighbour sub-blocks it shares edges with. A picture is generated (ramps,
// per-block offsets, noise), written to the SRAM word by word (one word = one
// row of a sub-block), and a program is built that walks the sub-blocks in
// raster order. The current sub-block stays in one bank of the register file;
// for it the program filters the left vertical edge (first block of a row
// only), the upper horizontal edge and the right vertical edge, loading each
// neighbour into the other bank and storing it back afterwards. Vertical
// edges read rows, horizontal edges read columns of the same registers: no
// transpose through memory. After the right edge the neighbour becomes the
// current block, so the banks alternate.
//
// Checks: the instruction mix (224 loads, 224 stores, 96 + 96 line filters);
// every SRAM word of the three planes against a reference that
// applies the same line filters in the same order to an integer picture;
// the cycle count (one instruction per cycle plus one held cycle per FILT
// when forwarding is on); and that each mechanism occurred: forwarding
// (and forwarding across row/column mode), write-port stalls behind FILT,
// mode switches, hazard stalls when forwarding is off, and each filter path.
module tb_dsp_harness
  import vreg_pkg::*;
  import tb_ref_pkg::*;
#(
  parameter bit EXPECT_BYPASS = 1'b1
) (
  output logic              clk,
  output logic              rst_n,
  output logic              instr_valid,
  input  logic              instr_ready,
  output vinstr_t           instr,
  output logic              host_we,
  output logic [MEM_AW-1:0] host_waddr,
  output vword_t            host_wdata,
  output logic [MEM_AW-1:0] host_raddr,
  input  vword_t            host_rdata,
  input  logic              busy,
  input  vreg_events_t      ev,
  output logic              done,      // checking finished (or watchdog expired)
  output int                checks,
  output int                failures
);

  localparam int NPLANES = 3;               // Y, Cb, Cr
  localparam int NB [NPLANES] = '{4, 2, 2}; // macroblock size in sub-blocks
  localparam int MAXW = 5;                  // widest plane incl. neighbours, in sub-blocks

  int pic  [NPLANES][MAXW*4][MAXW*4];       // reference picture
  int base [NPLANES];                       // SRAM word address of each plane

  vinstr_t prog [$];
  int n_filt = 0, n_load = 0, n_store = 0, n_fv = 0, n_fh = 0;

  // mechanism counters
  int c_bypass = 0, c_cross = 0, c_wstall = 0, c_hstall = 0, c_mswitch = 0;
  int c_norm = 0, c_strong = 0, c_skip = 0, c_issue = 0;
  longint cyc = 0, first_acc = -1, last_acc = -1;
  int filt_before_last = 0;

  initial begin
    clk = 1'b0;
    done = 1'b0;
    checks = 0;
    failures = 0;
  end
  always #5 clk = ~clk;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      c_issue   += int'(ev.issue);
      c_bypass  += int'(ev.bypass);
      c_cross   += int'(ev.bypass_cross);
      c_wstall  += int'(ev.wport_stall);
      c_hstall  += int'(ev.hazard_stall);
      c_mswitch += int'(ev.mode_switch);
      c_norm    += int'(ev.filt_normal);
      c_strong  += int'(ev.filt_strong);
      c_skip    += int'(ev.filt_skip);
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    done = 1'b1;
  end

  function automatic int wpl(input int pl);  // plane width in sub-blocks
    return NB[pl] + 1;
  endfunction

  function automatic int blk_addr(input int pl, input int by, input int bx);
    return base[pl] + 4 * (by * wpl(pl) + bx);
  endfunction

  function automatic vinstr_t i_load(input int bank, input int i, input int addr);
    vinstr_t t = '0;
    t.op = OP_LOAD; t.ra = mk_addr(0, bank * 4 + i); t.addr = MEM_AW'(addr);
    return t;
  endfunction

  function automatic vinstr_t i_store(input int bank, input int i, input int addr);
    vinstr_t t = '0;
    t.op = OP_STORE; t.ra = mk_addr(0, bank * 4 + i); t.addr = MEM_AW'(addr);
    return t;
  endfunction

  task automatic load_blk(input int pl, input int by, input int bx, input int bank);
    for (int i = 0; i < 4; i++) prog.push_back(i_load(bank, i, blk_addr(pl, by, bx) + i));
  endtask

  task automatic store_blk(input int pl, input int by, input int bx, input int bank);
    for (int i = 0; i < 4; i++) prog.push_back(i_store(bank, i, blk_addr(pl, by, bx) + i));
  endtask

  // Filter the edge between two sub-blocks: vertical (p block left of q)
  // in row mode, horizontal (p block above q) in column mode. The reference
  // picture is filtered line by line in program order.
  task automatic filt_edge(input int pl, input bit horiz, input int pby, input int pbx,
                      input int pbank, input int qbank, input dbf_ctrl_t c);
    for (int i = 0; i < 4; i++) begin
      vinstr_t t = '0;
      int px[8];
      t.op = OP_FILT;
      t.ra = mk_addr(horiz, pbank * 4 + i);
      t.rb = mk_addr(horiz, qbank * 4 + i);
      t.ctrl = c;
      prog.push_back(t);
      n_filt++;
      for (int j = 0; j < 8; j++)
        px[j] = horiz ? pic[pl][pby * 4 + j][pbx * 4 + i] : pic[pl][pby * 4 + i][pbx * 4 + j];
      ref_filter(px, int'(c.bs), c.chroma, int'(c.alpha), int'(c.beta), int'(c.tc0));
      for (int j = 0; j < 8; j++)
        if (horiz) pic[pl][pby * 4 + j][pbx * 4 + i] = px[j];
        else       pic[pl][pby * 4 + i][pbx * 4 + j] = px[j];
    end
  endtask

  function automatic dbf_ctrl_t mk_ctrl(input int pl, input bit mb_edge);
    dbf_ctrl_t c;
    c.bs     = mb_edge ? 3'd4 : 3'($urandom_range(0, 3));
    c.chroma = pl != 0;
    c.alpha  = 8'($urandom_range(20, 60));
    c.beta   = 8'($urandom_range(6, 16));
    c.tc0    = 5'($urandom_range(0, 6));
    return c;
  endfunction

  task automatic build_plane(input int pl);
    int x = 0;  // bank of the current block
    for (int by = 1; by <= NB[pl]; by++) begin
      x = 0;
      load_blk(pl, by, 1, x);
      load_blk(pl, by, 0, 1 - x);
      filt_edge(pl, 1'b0, by, 0, 1 - x, x, mk_ctrl(pl, 1'b1));
      store_blk(pl, by, 0, 1 - x);
      for (int bx = 1; bx <= NB[pl]; bx++) begin
        load_blk(pl, by - 1, bx, 1 - x);
        filt_edge(pl, 1'b1, by - 1, bx, 1 - x, x, mk_ctrl(pl, by == 1));
        store_blk(pl, by - 1, bx, 1 - x);
        if (bx < NB[pl]) begin
          load_blk(pl, by, bx + 1, 1 - x);
          filt_edge(pl, 1'b0, by, bx, x, 1 - x, mk_ctrl(pl, 1'b0));
          store_blk(pl, by, bx, x);
          x = 1 - x;
        end else begin
          store_blk(pl, by, bx, x);
        end
      end
    end
  endtask

  initial begin
    int a = 0;
    rst_n = 1'b0; instr_valid = 1'b0; instr = '0;
    host_we = 1'b0; host_waddr = '0; host_wdata = '0; host_raddr = '0;
    // picture: ramp + per-block offset + noise
    for (int pl = 0; pl < NPLANES; pl++) begin
      base[pl] = a;
      a += 16 * wpl(pl) * wpl(pl);
      for (int y = 0; y < wpl(pl) * 4; y++)
        for (int x = 0; x < wpl(pl) * 4; x++) begin
          automatic int off = ((y / 4) * 7 + (x / 4) * 5) % 13 - 6;
          pic[pl][y][x] = iclip(0, 255, 60 + 40 * pl + 3 * x + 2 * y + off + int'($urandom_range(0, 4)) - 2);
        end
    end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // fill the SRAM through the host port
    for (int pl = 0; pl < NPLANES; pl++)
      for (int by = 0; by < wpl(pl); by++)
        for (int bx = 0; bx < wpl(pl); bx++)
          for (int i = 0; i < 4; i++) begin
            vword_t w;
            for (int k = 0; k < 4; k++) w[k] = elem_t'(pic[pl][by * 4 + i][bx * 4 + k]);
            @(negedge clk);
            host_we = 1'b1; host_waddr = MEM_AW'(blk_addr(pl, by, bx) + i); host_wdata = w;
          end
    @(negedge clk) host_we = 1'b0;
    // the reference filters the picture while the program is built
    for (int pl = 0; pl < NPLANES; pl++) build_plane(pl);
    // run the program
    foreach (prog[n]) begin
      @(negedge clk);
      instr_valid = 1'b1;
      instr = prog[n];
      @(posedge clk);
      while (!instr_ready) @(posedge clk);
      if (first_acc < 0) first_acc = cyc;
      last_acc = cyc;
      if (n != prog.size() - 1 && prog[n].op == OP_FILT) filt_before_last++;
    end
    @(negedge clk) instr_valid = 1'b0; instr = '0;
    while (busy) @(negedge clk);
    // read back and compare every word
    for (int pl = 0; pl < NPLANES; pl++)
      for (int by = 0; by < wpl(pl); by++)
        for (int bx = 0; bx < wpl(pl); bx++)
          for (int i = 0; i < 4; i++) begin
            vword_t e;
            for (int k = 0; k < 4; k++) e[k] = elem_t'(pic[pl][by * 4 + i][bx * 4 + k]);
            host_raddr = MEM_AW'(blk_addr(pl, by, bx) + i);
            @(negedge clk);
            checks++;
            if (host_rdata !== e) begin
              failures++;
              if (failures < 8) $display("plane %0d block (%0d,%0d) row %0d: got %h exp %h",
                                         pl, by, bx, i, host_rdata, e);
            end
          end
    // cycle count
    checks++;
    if (EXPECT_BYPASS) begin
      if (last_acc - first_acc + 1 != longint'(prog.size() + filt_before_last)) begin
        failures++;
        $display("cycles %0d, expected %0d", last_acc - first_acc + 1, prog.size() + filt_before_last);
      end
    end else if (last_acc - first_acc + 1 <= longint'(prog.size() + filt_before_last)) failures++;
    // instruction mix of one macroblock: 224 loads, 224 stores, 96 vertical-
    // and 96 horizontal-edge line filters (table of the vector-register case)
    foreach (prog[n]) begin
      n_load  += int'(prog[n].op == OP_LOAD);
      n_store += int'(prog[n].op == OP_STORE);
      n_fv    += int'(prog[n].op == OP_FILT && prog[n].ra.mode == MODE_ROW);
      n_fh    += int'(prog[n].op == OP_FILT && prog[n].ra.mode == MODE_COL);
    end
    checks++;
    if (n_load != 224 || n_store != 224 || n_fv != 96 || n_fh != 96) failures++;
    // mechanisms
    checks++;
    if (c_issue != prog.size()) failures++;
    checks++;
    if (c_wstall == 0 || c_mswitch == 0 || c_norm == 0 || c_strong == 0 || c_skip == 0) failures++;
    checks++;
    if (EXPECT_BYPASS ? (c_bypass == 0 || c_cross == 0 || c_hstall != 0)
                      : (c_hstall == 0 || c_bypass != 0)) failures++;
    $display("program: %0d instructions (load %0d, store %0d, filter V %0d, filter H %0d), %0d cycles",
             prog.size(), n_load, n_store, n_fv, n_fh, last_acc - first_acc + 1);
    $display("events: bypass %0d (cross-mode %0d), write-port stalls %0d, hazard stalls %0d, mode switches %0d",
             c_bypass, c_cross, c_wstall, c_hstall, c_mswitch);
    $display("filter lines: normal %0d, strong %0d, unchanged %0d", c_norm, c_strong, c_skip);
    done = 1'b1;
  end

endmodule

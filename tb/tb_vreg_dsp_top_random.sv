// Random-program testbench for vreg_dsp_top, run on two instances: the
// default one (forwarding) and one with BYPASS = 0 (hazard stalls).
//
// A random stream of LOAD, STORE and FILT instructions with random row and
// column addresses is executed by both instances and by a sequential
// reference model (matrix register file, word memory, integer filter). Dense
// back-to-back dependences make every forwarding case occur: from the EX
// write and from the held q word of a FILT, in the same mode and across
// modes, and a LOAD right behind a STORE to the same word. At the end every
// register is stored to memory and the whole memory
// image of each instance is compared with the model. The FILT p and q
// registers never share an element (a requirement of the datapath).
module tb_vreg_dsp_top_random;
  import vreg_pkg::*;
  import tb_ref_pkg::*;

  localparam int NWORDS = 32;
  localparam int NINSTR = 3000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              instr_valid [2];
  logic              instr_ready [2];
  vinstr_t           instr       [2];
  logic              host_we;
  logic [MEM_AW-1:0] host_waddr, host_raddr;
  vword_t            host_wdata;
  vword_t            host_rdata  [2];
  logic              busy        [2];
  vreg_events_t      ev          [2];

  vreg_dsp_top dut_fwd (
    .clk(clk), .rst_n(rst_n), .instr_valid(instr_valid[0]), .instr_ready(instr_ready[0]), .instr(instr[0]),
    .host_we(host_we), .host_waddr(host_waddr), .host_wdata(host_wdata),
    .host_raddr(host_raddr), .host_rdata(host_rdata[0]), .busy(busy[0]), .ev(ev[0])
  );

  vreg_dsp_top #(.BYPASS(1'b0)) dut_stall (
    .clk(clk), .rst_n(rst_n), .instr_valid(instr_valid[1]), .instr_ready(instr_ready[1]), .instr(instr[1]),
    .host_we(host_we), .host_waddr(host_waddr), .host_wdata(host_wdata),
    .host_raddr(host_raddr), .host_rdata(host_rdata[1]), .busy(busy[1]), .ev(ev[1])
  );

  int checks = 0, failures = 0;
  vinstr_t prog [$];
  mat_t    m;
  vword_t  mem [NWORDS];
  int      c_same [2], c_cross [2], c_hstall [2], c_mfwd [2], c_done [2];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      for (int d = 0; d < 2; d++) begin
        c_same[d]   += int'(ev[d].bypass && !ev[d].bypass_cross);
        c_cross[d]  += int'(ev[d].bypass_cross);
        c_hstall[d] += int'(ev[d].hazard_stall);
        c_mfwd[d]   += int'(ev[d].mem_fwd);
      end
    end
  end

  function automatic bit shares(input vreg_addr_t a, input vreg_addr_t b);
    mat_t t;
    vword_t w;
    for (int r = 0; r < NUM_REGS; r++) for (int c = 0; c < LANES; c++) t[r][c] = 0;
    ref_write(t, a, {LANES{8'hFF}});
    w = ref_read(t, b);
    return |w;
  endfunction

  function automatic vreg_addr_t rnd_addr();
    return mk_addr($urandom_range(0, 1) == 1, $urandom_range(0, NUM_REGS - 1));
  endfunction

  // Sequential reference execution of one instruction.
  task automatic ref_exec(input vinstr_t t);
    case (t.op)
      OP_LOAD:  ref_write(m, t.ra, mem[t.addr]);
      OP_STORE: mem[t.addr] = ref_read(m, t.ra);
      OP_FILT: begin
        vword_t p = ref_read(m, t.ra), q = ref_read(m, t.rb);
        int px[8];
        for (int k = 0; k < 4; k++) begin
          px[k] = int'(p[k]);
          px[4 + k] = int'(q[k]);
        end
        ref_filter(px, int'(t.ctrl.bs), t.ctrl.chroma, int'(t.ctrl.alpha), int'(t.ctrl.beta), int'(t.ctrl.tc0));
        for (int k = 0; k < 4; k++) begin
          p[k] = elem_t'(px[k]);
          q[k] = elem_t'(px[4 + k]);
        end
        ref_write(m, t.ra, p);
        ref_write(m, t.rb, q);
      end
      default: ;
    endcase
  endtask

  task automatic drive(input int d);
    foreach (prog[n]) begin
      @(negedge clk);
      instr_valid[d] = 1'b1;
      instr[d] = prog[n];
      @(posedge clk);
      while (!instr_ready[d]) @(posedge clk);
    end
    @(negedge clk);
    instr_valid[d] = 1'b0;
    while (busy[d]) @(negedge clk);
    c_done[d] = 1;
  endtask

  initial begin
    for (int d = 0; d < 2; d++) begin
      instr_valid[d] = 1'b0; instr[d] = '0; c_same[d] = 0; c_cross[d] = 0; c_hstall[d] = 0; c_mfwd[d] = 0; c_done[d] = 0;
    end
    host_we = 1'b0; host_waddr = '0; host_wdata = '0; host_raddr = '0;
    for (int r = 0; r < NUM_REGS; r++) for (int c = 0; c < LANES; c++) m[r][c] = 0;
    // smooth-ish memory contents so that filters fire often
    for (int i = 0; i < NWORDS; i++)
      for (int k = 0; k < 4; k++) mem[i][k] = elem_t'(100 + (i % 8) * 3 + k * 2 + $urandom_range(0, 6));
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int i = 0; i < NWORDS; i++) begin
      @(negedge clk);
      host_we = 1'b1; host_waddr = MEM_AW'(i); host_wdata = mem[i];
    end
    @(negedge clk) host_we = 1'b0;
    // random program
    for (int n = 0; n < NINSTR; n++) begin
      automatic vinstr_t t = '0;
      automatic int r = $urandom_range(0, 9);
      t.addr = MEM_AW'($urandom_range(0, NWORDS - 1));
      t.ra = rnd_addr();
      if (r < 4) t.op = OP_LOAD;
      else if (r < 6) t.op = OP_STORE;
      else begin
        t.op = OP_FILT;
        do t.rb = rnd_addr(); while (shares(t.ra, t.rb));
        t.ctrl.bs = 3'($urandom_range(0, 4));
        t.ctrl.chroma = $urandom_range(0, 3) == 0;
        t.ctrl.alpha = 8'($urandom_range(10, 80));
        t.ctrl.beta = 8'($urandom_range(4, 18));
        t.ctrl.tc0 = 5'($urandom_range(0, 8));
      end
      prog.push_back(t);
      ref_exec(t);
    end
    // final dump of all registers to words NWORDS .. NWORDS+7
    for (int n = 0; n < NUM_REGS; n++) begin
      automatic vinstr_t t = '0;
      t.op = OP_STORE; t.ra = mk_addr(0, n); t.addr = MEM_AW'(NWORDS + n);
      prog.push_back(t);
    end
    fork
      drive(0);
      drive(1);
    join
    for (int i = 0; i < NWORDS + NUM_REGS; i++) begin
      automatic vword_t e = (i < NWORDS) ? mem[i] : ref_read(m, mk_addr(0, i - NWORDS));
      host_raddr = MEM_AW'(i);
      @(negedge clk);
      for (int d = 0; d < 2; d++) begin
        checks++;
        if (host_rdata[d] !== e) begin
          failures++;
          if (failures < 8) $display("instance %0d word %0d: got %h exp %h", d, i, host_rdata[d], e);
        end
      end
    end
    // mechanisms: both kinds of forwarding on the default instance,
    // stalls and no forwarding on the other
    checks++;
    if (c_same[0] == 0 || c_cross[0] == 0 || c_hstall[0] != 0) failures++;
    checks++;
    if (c_hstall[1] == 0 || c_same[1] != 0 || c_cross[1] != 0) failures++;
    checks++;
    if (c_mfwd[0] == 0 || c_mfwd[1] == 0) failures++;
    $display("forwarding instance: same-mode %0d, cross-mode %0d; stalling instance: hazard stalls %0d",
             c_same[0], c_cross[0], c_hstall[1]);
    $display("store-to-load forwarding: %0d / %0d", c_mfwd[0], c_mfwd[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// DSP datapath built around the 2-D vector register file.
//
// The datapath runs the three kinds of operation the deblocking workload
// needs: LOAD a 32-bit word from the data SRAM into a register, STORE a
// register to the SRAM, and FILT, which reads a p register and a q register
// on the two read ports, filters the eight pixels across an edge and writes
// both registers back. Every register address carries the row/column mode
// bit, so the same FILT filters vertical edges (rows) and, right after,
// horizontal edges (columns) of the same sub-blocks without a transpose
// through memory.
//
// Pipeline (this design's own, the document does not describe one):
//   RD  the instruction on the input port reads its operands from the
//       register file through the bypass network; a LOAD sends its address
//       to the SRAM (synchronous read).
//   EX  LOAD writes the SRAM word to its register; STORE writes the SRAM;
//       FILT runs dbf_filter and writes the p word. The q word is held one
//       cycle and written in the next (the file has one write port), so the
//       read stage is held for one cycle behind every FILT.
// A register written in EX (or the held q word) is read by the next
// instruction before it reaches the file. Because a row and a column share an
// element, a row write followed by a column read (or the reverse) overlaps in
// one byte; vreg_bypass forwards exactly the overlapping bytes. With
// BYPASS = 0 the read stage instead waits until the write has landed (the
// insert-delays remedy). The document names both remedies; forwarding is the
// default here. A LOAD issued right behind a STORE to the same word would
// read the SRAM before the store lands, so the stored word is passed to the
// LOAD directly (in both settings of BYPASS).
//
// Interface: instr / instr_valid / instr_ready is a valid-ready handshake,
// one instruction per accepted cycle. The host port writes and reads the
// SRAM (for filling and checking it); a core STORE and a host write must not
// fall in the same cycle. busy is high while an accepted instruction has not
// finished. ev reports one-cycle events for counting; with BYPASS = 1 its
// hazard_stall flag is constant 0.
// FILT requires that its p and q registers share no element.
module vreg_dsp_top
  import vreg_pkg::*;
#(
  parameter bit BYPASS = 1'b1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              instr_valid,
  output logic              instr_ready,
  input  vinstr_t           instr,
  input  logic              host_we,
  input  logic [MEM_AW-1:0] host_waddr,
  input  vword_t            host_wdata,
  input  logic [MEM_AW-1:0] host_raddr,
  output vword_t            host_rdata,
  output logic              busy,
  output vreg_events_t      ev
);

  // ---------------- pipeline registers
  vinstr_t  ex_instr;
  logic     ex_valid;
  vword_t   ex_a, ex_b;
  vreg_wr_t pend;          // FILT q word waiting for the write port
  logic     ex_ld_fwd;     // EX LOAD takes ex_ld_data instead of the SRAM word
  vword_t   ex_ld_data;
  vmode_e   last_mode;     // mode of the last issued register access

  // ---------------- register file
  vword_t   rf_a, rf_b;
  vreg_wr_t ex_wr, rf_wr;

  vreg_file u_rf (
    .clk    (clk),
    .rst_n  (rst_n),
    .ra     (instr.ra),
    .rb     (instr.rb),
    .rdata_a(rf_a),
    .rdata_b(rf_b),
    .we     (rf_wr.valid),
    .wa     (rf_wr.addr),
    .wdata  (rf_wr.data)
  );

  // ---------------- bypass network: held q word (older), then EX write
  vword_t           a_mid, b_mid, op_a, op_b;
  logic [0:LANES-1] hit_a0, hit_a1, hit_b0, hit_b1;
  logic             cr_a0, cr_a1, cr_b0, cr_b1;

  vreg_bypass u_byp_a0 (.raddr(instr.ra), .rdata(rf_a),  .wr(pend),  .data(a_mid), .hit(hit_a0), .xmode(cr_a0));
  vreg_bypass u_byp_a1 (.raddr(instr.ra), .rdata(a_mid), .wr(ex_wr), .data(op_a),  .hit(hit_a1), .xmode(cr_a1));
  vreg_bypass u_byp_b0 (.raddr(instr.rb), .rdata(rf_b),  .wr(pend),  .data(b_mid), .hit(hit_b0), .xmode(cr_b0));
  vreg_bypass u_byp_b1 (.raddr(instr.rb), .rdata(b_mid), .wr(ex_wr), .data(op_b),  .hit(hit_b1), .xmode(cr_b1));

  logic use_a, use_b, hit_used, cross_used;
  assign use_a      = (instr.op == OP_STORE) || (instr.op == OP_FILT);
  assign use_b      = (instr.op == OP_FILT);
  assign hit_used   = (use_a && (|hit_a0 || |hit_a1)) || (use_b && (|hit_b0 || |hit_b1));
  assign cross_used = (use_a && (cr_a0 || cr_a1)) || (use_b && (cr_b0 || cr_b1));

  // ---------------- read stage control
  logic wport_busy, hazard, issue;
  assign wport_busy  = ex_valid && (ex_instr.op == OP_FILT);
  assign hazard      = !BYPASS && hit_used;
  assign instr_ready = !wport_busy && !hazard;
  assign issue       = instr_valid && instr_ready;

  // store-to-load forwarding: STORE in EX, LOAD of the same word in RD
  logic st_ld_hit;
  assign st_ld_hit = (instr.op == OP_LOAD) && ex_valid && (ex_instr.op == OP_STORE) &&
                     (ex_instr.addr == instr.addr);

  // ---------------- data SRAM
  vword_t mem_rdata;
  logic   mem_we;
  logic [MEM_AW-1:0] mem_waddr;
  vword_t mem_wdata;

  data_sram u_sram (
    .clk   (clk),
    .raddr0(instr.addr),
    .rdata0(mem_rdata),
    .raddr1(host_raddr),
    .rdata1(host_rdata),
    .we    (mem_we),
    .waddr (mem_waddr),
    .wdata (mem_wdata)
  );

  // ---------------- execute stage
  vword_t fp, fq;
  logic   f_filtered, f_strong;

  dbf_filter u_filter (
    .p_in    (ex_a),
    .q_in    (ex_b),
    .ctrl    (ex_instr.ctrl),
    .p_out   (fp),
    .q_out   (fq),
    .filtered(f_filtered),
    .strong_used(f_strong)
  );

  always_comb begin
    ex_wr       = '0;
    ex_wr.addr  = ex_instr.ra;
    ex_wr.valid = ex_valid && (ex_instr.op == OP_LOAD || ex_instr.op == OP_FILT);
    ex_wr.data  = (ex_instr.op != OP_LOAD) ? fp : (ex_ld_fwd ? ex_ld_data : mem_rdata);
  end

  assign rf_wr = pend.valid ? pend : ex_wr;

  always_comb begin
    mem_we    = host_we;
    mem_waddr = host_waddr;
    mem_wdata = host_wdata;
    if (ex_valid && ex_instr.op == OP_STORE) begin
      mem_we    = 1'b1;
      mem_waddr = ex_instr.addr;
      mem_wdata = ex_a;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ex_valid  <= 1'b0;
      ex_instr  <= '0;
      ex_a      <= '0;
      ex_b      <= '0;
      pend      <= '0;
      last_mode <= MODE_ROW;
      ex_ld_fwd  <= 1'b0;
      ex_ld_data <= '0;
    end else begin
      ex_valid <= issue;
      if (issue) begin
        ex_instr <= instr;
        ex_a     <= op_a;
        ex_b     <= op_b;
        ex_ld_fwd  <= st_ld_hit;
        ex_ld_data <= ex_a;
        if (instr.op != OP_NOP) last_mode <= instr.ra.mode;
      end
      pend.valid <= ex_valid && (ex_instr.op == OP_FILT);
      pend.addr  <= ex_instr.rb;
      pend.data  <= fq;
    end
  end

  assign busy = ex_valid || pend.valid;

  always_comb begin
    ev              = '0;
    ev.issue        = issue && (instr.op != OP_NOP);
    ev.mode_switch  = ev.issue && (instr.ra.mode != last_mode);
    ev.bypass       = issue && hit_used;
    ev.bypass_cross = issue && cross_used;
    ev.wport_stall  = instr_valid && wport_busy;
    ev.hazard_stall = instr_valid && !wport_busy && hazard;
    ev.mem_fwd      = issue && st_ld_hit;
    if (ex_valid && ex_instr.op == OP_FILT) begin
      ev.filt_normal = f_filtered && (ex_instr.ctrl.bs < 3'd4);
      ev.filt_strong = f_filtered && f_strong;
      ev.filt_skip   = !f_filtered;
    end
  end

  // The held q word and an EX write never compete for the write port.
  a_wport_free: assert property (@(posedge clk) disable iff (!rst_n) !(pend.valid && ex_wr.valid));
  // A core STORE and a host write never share the SRAM write port.
  a_sram_wport: assert property (@(posedge clk) disable iff (!rst_n)
                                 !(host_we && ex_valid && ex_instr.op == OP_STORE));

endmodule

// End-to-end testbench of vreg_dsp_top with operand forwarding switched off
// (BYPASS = 0, hazards stall the read stage): deblocks one macroblock
// (luma and both chroma planes). Stimulus and checks are in
// tb_dsp_harness.
module tb_vreg_dsp_top_stall;
  import vreg_pkg::*;

  logic              clk, rst_n, instr_valid, instr_ready, host_we, busy;
  vinstr_t           instr;
  logic [MEM_AW-1:0] host_waddr, host_raddr;
  vword_t            host_wdata, host_rdata;
  vreg_events_t      ev;
  logic              done;
  int                checks, failures;

  vreg_dsp_top #(.BYPASS(1'b0)) dut (
    .clk(clk), .rst_n(rst_n), .instr_valid(instr_valid), .instr_ready(instr_ready), .instr(instr),
    .host_we(host_we), .host_waddr(host_waddr), .host_wdata(host_wdata),
    .host_raddr(host_raddr), .host_rdata(host_rdata), .busy(busy), .ev(ev)
  );

  tb_dsp_harness #(.EXPECT_BYPASS(1'b0)) harness (
    .clk(clk), .rst_n(rst_n), .instr_valid(instr_valid), .instr_ready(instr_ready), .instr(instr),
    .host_we(host_we), .host_waddr(host_waddr), .host_wdata(host_wdata),
    .host_raddr(host_raddr), .host_rdata(host_rdata), .busy(busy), .ev(ev),
    .done(done), .checks(checks), .failures(failures)
  );

  initial begin
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // backstop in case the harness never finishes
  initial begin
    #5ms;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule

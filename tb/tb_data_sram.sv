// Self-checking testbench for data_sram: fills words through the write port,
// reads them back on both read ports with the one-cycle read latency, and
// checks read-first behaviour when a word is read and written in one cycle.
module tb_data_sram;
  import vreg_pkg::*;

  localparam int unsigned DEPTH = 64;
  localparam int unsigned AW = $clog2(DEPTH);

  logic          clk = 0;
  logic [AW-1:0] raddr0, raddr1, waddr;
  vword_t        rdata0, rdata1, wdata;
  logic          we;
  vword_t        model [DEPTH];
  int checks = 0, failures = 0;

  data_sram #(.DEPTH(DEPTH)) dut (.clk(clk), .raddr0(raddr0), .rdata0(rdata0), .raddr1(raddr1),
                                  .rdata1(rdata1), .we(we), .waddr(waddr), .wdata(wdata));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; raddr0 = 0; raddr1 = 0; waddr = 0; wdata = 0;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      we = 1; waddr = AW'(i); wdata = $urandom; model[i] = wdata;
    end
    @(negedge clk) we = 0;
    for (int it = 0; it < 300; it++) begin
      logic [AW-1:0] a0, a1;
      vword_t old0;
      a0 = AW'($urandom); a1 = AW'($urandom);
      raddr0 = a0; raddr1 = a1;
      we = $urandom_range(0, 1) == 1; waddr = (it % 4 == 0) ? a0 : AW'($urandom); wdata = $urandom;
      old0 = model[a0];
      @(posedge clk);
      if (we) model[waddr] = wdata;
      #1;
      checks++;
      if (rdata0 !== old0) begin
        failures++;
        if (failures < 5) $display("port0 addr %0d got %h exp %h", a0, rdata0, old0);
      end
      @(negedge clk);
      raddr1 = a1;
      we = 0;
      @(posedge clk) #1;
      checks++;
      if (rdata1 !== model[a1]) failures++;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

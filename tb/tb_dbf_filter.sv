// Self-checking testbench for dbf_filter. Lines of eight pixels are drawn as
// a smooth ramp plus a step at the edge plus small noise, so that the edge
// condition is sometimes true and sometimes false; bs runs over 0..4, luma
// and chroma, several alpha/beta/tc0 sets. Every output pixel is compared
// with the integer reference filter; each path (skip, bs<4, bs=4 strong,
// bs=4 weak) must occur.
module tb_dbf_filter;
  import vreg_pkg::*;
  import tb_ref_pkg::*;

  vword_t    p_in, q_in, p_out, q_out;
  dbf_ctrl_t ctrl;
  logic      filtered, strong_used;
  int checks = 0, failures = 0;
  int n_skip = 0, n_norm = 0, n_strong = 0, n_weak4 = 0;

  dbf_filter dut (.p_in(p_in), .q_in(q_in), .ctrl(ctrl), .p_out(p_out), .q_out(q_out),
                  .filtered(filtered), .strong_used(strong_used));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int px[8], ex[8];
    for (int it = 0; it < 5000; it++) begin
      automatic int base  = $urandom_range(0, 255);
      automatic int slope = int'($urandom_range(0, 6)) - 3;
      automatic int step  = int'($urandom_range(0, 40)) - 20;
      for (int i = 0; i < 8; i++) begin
        px[i] = base + slope * i + (i >= 4 ? step : 0) + int'($urandom_range(0, 4)) - 2;
        if (it % 97 == 0) px[i] = $urandom_range(0, 255);
        px[i] = iclip(0, 255, px[i]);
      end
      ctrl.bs     = 3'($urandom_range(0, 4));
      ctrl.chroma = $urandom_range(0, 3) == 0;
      ctrl.alpha  = 8'($urandom_range(4, 80));
      ctrl.beta   = 8'($urandom_range(2, 18));
      ctrl.tc0    = 5'($urandom_range(0, 13));
      for (int i = 0; i < 4; i++) begin
        p_in[i] = elem_t'(px[i]);
        q_in[i] = elem_t'(px[4 + i]);
      end
      ex = px;
      ref_filter(ex, int'(ctrl.bs), ctrl.chroma, int'(ctrl.alpha), int'(ctrl.beta), int'(ctrl.tc0));
      #1;
      for (int i = 0; i < 4; i++) begin
        checks += 2;
        if (int'(p_out[i]) != ex[i] || int'(q_out[i]) != ex[4 + i]) begin
          failures++;
          if (failures < 8)
            $display("it %0d lane %0d bs %0d ch %0d: got p %0d q %0d exp p %0d q %0d", it, i, ctrl.bs,
                     ctrl.chroma, p_out[i], q_out[i], ex[i], ex[4 + i]);
        end
      end
      if (ex == px) n_skip++;
      else if (ctrl.bs < 4) n_norm++;
      else if (strong_used) n_strong++;
      else n_weak4++;
    end
    checks++;
    if (n_skip == 0 || n_norm == 0 || n_strong == 0 || n_weak4 == 0) begin
      failures++;
      $display("path coverage: skip %0d normal %0d strong %0d weak4 %0d", n_skip, n_norm, n_strong, n_weak4);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

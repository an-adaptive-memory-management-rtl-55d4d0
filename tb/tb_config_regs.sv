// tb_config_regs: reset values, then writes of every register and of the
// parameters of every layer, read back through the outputs.
module tb_config_regs;
  import cynapse_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic cfg_we; logic [7:0] cfg_addr; logic [31:0] cfg_wdata;
  rt_mode_e mode; logic dbe, dpe; score_t thr; logic [8:0] la; ts_t nts, bl; logic [9:0] abt;
  logic [15:0] win; logic [N_LAYERS-1:0] sb; logic [LAYER_W:0] nl; nid_t base [N_LAYERS]; neuron_cfg_t lc [N_LAYERS];
  config_regs dut (.clk, .rst_n, .cfg_we, .cfg_addr, .cfg_wdata, .mode, .dyn_bypass_en(dbe), .dyn_protect_en(dpe),
    .reuse_thr(thr), .lookahead(la), .n_timesteps(nts), .abt, .window(win), .batch_len(bl), .static_bypass(sb),
    .n_layers(nl), .layer_base(base), .layer_cfg(lc));
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic wr(int a, int d); @(negedge clk); cfg_we = 1; cfg_addr = 8'(a); cfg_wdata = d; @(negedge clk); cfg_we = 0; endtask
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    cfg_we = 0; cfg_addr = 0; cfg_wdata = 0;
    repeat (2) @(posedge clk); rst_n = 1; @(posedge clk);
    check(mode == RT_INTELLIGENT && thr == 2 && la == 64 && abt == 20 && nl == 1, "reset values");
    wr(0, 32'hD); wr(1, 7); wr(2, 100); wr(3, 500); wr(4, 33); wr(5, 1234); wr(6, 10); wr(7, 8'hA5); wr(8, 6);
    #1;
    check(mode == RT_AGGRESSIVE && dbe && dpe, "ctrl");
    check(thr == 7 && la == 100 && nts == 500 && abt == 33 && win == 1234 && bl == 10 && sb == 8'hA5 && nl == 6, "globals");
    for (int l = 0; l < N_LAYERS; l++)
      for (int k = 0; k < 8; k++) wr(16 + 8 * l + k, 1000 * l + k + 1);
    #1;
    for (int l = 0; l < N_LAYERS; l++) begin
      check(base[l] == nid_t'(1000 * l + 1), $sformatf("base %0d: %0d", l, base[l]));
      check(lc[l].theta == 1000 * l + 2 && lc[l].v_reset == 1000 * l + 3 && lc[l].v_rest == 1000 * l + 4, $sformatf("pot %0d", l));
      check(lc[l].leak_shift == 5'(1000 * l + 5) && lc[l].t_ref == 8'(1000 * l + 6) &&
            lc[l].a_inc == 16'(1000 * l + 7) && lc[l].a_shift == 5'(1000 * l + 8), $sformatf("fields %0d", l));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule

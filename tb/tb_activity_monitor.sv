// tb_activity_monitor: feeds a known number of events per layer, ends a
// batch and checks the bypass flags (share below ABT) and the protection
// scores (largest p with p*total*neurons <= window*count), computed here
// independently, plus the static mask and the enables.
module tb_activity_monitor;
  import cynapse_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic ev_valid, batch_end, dbe, dpe, busy; layer_t ev_layer; nid_t base [N_LAYERS];
  logic [LAYER_W:0] nl; logic [9:0] abt; logic [15:0] win; logic [N_LAYERS-1:0] sb, bypass;
  score_t prot [N_LAYERS]; logic [31:0] lc [N_LAYERS];
  activity_monitor dut (.clk, .rst_n, .ev_valid, .ev_layer, .batch_end, .layer_base(base), .n_layers(nl),
    .abt, .window(win), .dyn_bypass_en(dbe), .dyn_protect_en(dpe), .static_bypass(sb),
    .bypass, .prot_score(prot), .busy, .layer_count(lc));
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  int cnt [4] = '{1000, 300, 15, 0};
  int neur [4];
  initial begin #10000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    ev_valid = 0; batch_end = 0; ev_layer = 0; dbe = 1; dpe = 1; abt = 20; win = 2000; sb = 8'b0000_1000; nl = 4;
    base = '{0, 784, 884, 894, 0, 0, 0, 0};
    neur = '{784, 100, 10, N_NEURONS - 894};
    repeat (2) @(posedge clk); rst_n = 1;
    for (int r = 0; r < 2; r++) begin
      int total;
      total = 0;
      for (int l = 0; l < 4; l++) for (int i = 0; i < cnt[l]; i++) begin
        @(negedge clk); ev_valid = 1; ev_layer = layer_t'(l);
      end
      for (int l = 0; l < 4; l++) total += cnt[l];
      @(negedge clk); ev_valid = 0;
      check(lc[0] == 32'(cnt[0]) && lc[2] == 32'(cnt[2]), "running counts");
      batch_end = 1; @(negedge clk); batch_end = 0;
      while (busy) @(negedge clk);
      for (int l = 0; l < 4; l++) begin
        bit bp;
        int p;
        bp = (cnt[l] * 1024 < 20 * total) || l == 3;
        p = 0;
        for (int q = 1; q <= 15; q++) if (longint'(q) * total * neur[l] <= longint'(2000) * cnt[l]) p = q;
        if (bp) p = 0;
        check(bypass[l] == bp, $sformatf("bypass layer %0d = %0d", l, bypass[l]));
        check(prot[l] == score_t'(p), $sformatf("score layer %0d = %0d exp %0d", l, prot[l], p));
      end
      check(lc[0] == 0, "counters restart");
      cnt = '{800, 400, 40, 5};   // layer 2 at about 3%: above ABT
    end
    dpe = 0; dbe = 0; #1;
    check(bypass == 8'b0000_1000, "dynamic bypass off, static mask stays");
    check(prot[2] == 0, "protection off");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule

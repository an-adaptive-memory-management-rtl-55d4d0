// tb_neuron_array: a reduced array (N=64, X=4) gets synaptic input through
// the dendrite port, sweeps, and its spikes (collected with random stalls on
// spk_ready) are compared with an integrate-and-fire reference over several
// timesteps; input-layer neurons must never fire.
module tb_neuron_array;
  import cynapse_pkg::*;
  localparam int N = 64, X = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, busy, done, den_we, spk_ready, spk_valid; nid_t den_post, spk_base;
  logic signed [31:0] den_w; nid_t base [N_LAYERS]; neuron_cfg_t lc [N_LAYERS]; logic [X-1:0] spk_vec;
  neuron_array #(.N(N), .X(X)) dut (.clk, .rst_n, .start, .busy, .done, .den_we, .den_post, .den_w,
    .layer_base(base), .n_layers(4'd2), .layer_cfg(lc), .spk_ready, .spk_valid, .spk_vec, .spk_base);
  int checks = 0, failures = 0, nspk = 0, stalls = 0;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  longint v [N]; bit got [N]; int inp [N];
  always @(posedge clk) begin
    if (spk_valid)
      for (int u = 0; u < X; u++) if (spk_vec[u]) got[int'(spk_base) + u] = 1;
    if (!spk_ready && busy) stalls++;
  end
  always @(negedge clk) spk_ready = ($urandom_range(3) != 0);
  initial begin #50000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    start = 0; den_we = 0; den_post = '0; den_w = 0;
    base = '{0, 16, 0, 0, 0, 0, 0, 0};
    foreach (lc[l]) lc[l] = '0;
    lc[1].theta = 100; lc[1].v_reset = 0;
    foreach (v[i]) v[i] = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 6; t++) begin
      foreach (inp[i]) begin inp[i] = 0; got[i] = 0; end
      for (int k = 0; k < 150; k++) begin
        int n, w;
        n = $urandom_range(N - 1); w = $urandom_range(30) - 5;
        @(negedge clk); den_we = 1; den_post = nid_t'(n); den_w = w; inp[n] += w;
      end
      @(negedge clk); den_we = 0; start = 1;
      @(negedge clk); start = 0;
      while (!done) @(negedge clk);
      @(negedge clk);
      for (int i = 0; i < N; i++) begin
        bit f;
        f = 0;
        if (i >= 16) begin
          v[i] += inp[i];
          if (v[i] >= 100) begin f = 1; v[i] = 0; end
        end
        nspk += f;
        check(got[i] == f, $sformatf("t%0d neuron %0d spike %0d exp %0d", t, i, got[i], f));
      end
    end
    check(nspk > 20, $sformatf("spikes %0d", nspk));
    check(stalls > 0, "sweep stalled by the spike handler");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule

// tb_cynapse_top: end-to-end run of the full-size core (all parameters at
// their defaults) on the three-layer test network of tb_net_pkg.
// Three runs: the intelligent read-time approach with dynamic bypass and
// protection (8 timesteps of 40 input events, more than the queue holds, so
// the host is held back while the core works; batches of 2), then a conservative and an
// aggressive run (3 timesteps each). For every timestep the internal spikes
// leaving the core are compared with a reference simulation of the network
// written here. At the end every cache mechanism (read-time hit, allocation,
// replacement, declined allocation; route-time hit, miss, bypass;
// protection; warm-up; sweep stall; full input queue; waiting for input)
// must have occurred.
module tb_cynapse_top;
  import cynapse_pkg::*;
  import tb_net_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cfg_we, start, running, done, in_valid, in_ready, in_last;
  logic [7:0] cfg_addr; logic [31:0] cfg_wdata; ts_t t_now; aer_t in_ev;
  logic mem_req, mem_ready, mem_resp; baddr_t mem_addr; logic [BLK_W-1:0] mem_rdata;
  logic spk_out_valid; nid_t spk_out_id; logic [31:0] stats [16];
  int reads;

  cynapse_top dut (.clk, .rst_n, .cfg_we, .cfg_addr, .cfg_wdata, .start, .running, .done, .t_now,
    .in_valid, .in_ready, .in_ev, .in_last, .mem_req, .mem_ready, .mem_addr, .mem_resp, .mem_rdata,
    .spk_out_valid, .spk_out_id, .stats);
  dram_model #(.LAT(8)) mem (.clk, .rst_n, .mem_req, .mem_ready, .mem_addr, .mem_resp, .mem_rdata, .reads);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- reference network state (ids 64..105 are active)
  longint v [L3]; longint a [L3]; int r [L3]; longint inp [L3];
  bit prev_spk [L3];
  int theta [3] = '{0, 40, 70};
  task automatic ref_route(int n);
    for (int m = L1; m < L3; m++) if (connected(n, m)) inp[m] += weight(n, m);
  endtask
  task automatic ref_update(output bit spk [L3]);
    for (int n = 0; n < L3; n++) begin
      longint lk, vs, ad; int l;
      spk[n] = 0;
      if (n < L1) continue;
      l = (n < L2) ? 1 : 2;
      ad = (l == 2) ? a[n] - (a[n] >> 2) : a[n];
      lk = v[n] >>> 3;
      vs = v[n] + inp[n] - lk;
      if (r[n] != 0) begin r[n]--; v[n] = 0; a[n] = ad; end
      else if (vs >= theta[l] + a[n]) begin spk[n] = 1; v[n] = 0; r[n] = 1; a[n] = (l == 2) ? ad + 6 : ad; end
      else begin v[n] = vs; a[n] = ad; end
      inp[n] = 0;
    end
  endtask

  // ---------------- spikes out of the core, per timestep
  bit got [L3]; int stray = 0;
  always @(posedge clk) if (rst_n && spk_out_valid) begin
    if (int'(spk_out_id) < L3) got[spk_out_id] = 1; else stray++;
  end

  // mechanism observation
  int max_prot = 0, max_byp = 0, stall_cycles = 0, backpressure = 0;
  always @(posedge clk) if (rst_n) begin
    if (int'(stats[14]) > max_prot) max_prot = int'(stats[14]);
    if (int'(stats[15]) > max_byp) max_byp = int'(stats[15]);
    if (dut.u_neurons.busy && !dut.spk_ready) stall_cycles++;
    if (in_valid && !in_ready) backpressure++;
  end

  task automatic wr(int ad, int d);
    @(negedge clk); cfg_we = 1; cfg_addr = 8'(ad); cfg_wdata = d; @(negedge clk); cfg_we = 0;
  endtask

  function automatic int ev_id(int run, int t, int j);
    int pool [8] = '{0, 32, 5, 37, 9, 41, 1, 33};
    return (pool[(j + t + run) % 8] + ((j >= 6) ? 3 * t : 0)) % 64;
  endfunction

  task automatic do_run(int run, int mode, int T, int per);
    bit spk [L3];
    wr(0, mode | ((run == 0) ? 12 : 0)); wr(3, T);
    in_last = 0;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    fork
      // producer: stream the run's events, ts ascending; blocks while the
      // input queue is full
      begin
        for (int t = 0; t < T; t++) for (int j = 0; j < per; j++) begin
          // the conservative run gets its later inputs late: the core waits
          if (run == 1 && t >= 2 && j == 0) begin @(negedge clk); in_valid = 0; repeat (100000) @(negedge clk); end
          @(negedge clk); in_valid = 1; in_ev = '{ts: ts_t'(t), id: nid_t'(ev_id(run, t, j))};
          #1; while (!in_ready) begin @(negedge clk); #1; end
        end
        @(negedge clk); in_valid = 0; in_last = 1;
      end
      // checker: one reference timestep at a time
      for (int t = 0; t < T; t++) begin
        // route: the inputs of t, then the spikes of t-1
        for (int j = 0; j < per; j++) ref_route(ev_id(run, t, j));
        for (int n = 0; n < L3; n++) if (prev_spk[n]) ref_route(n);
        ref_update(spk);
        foreach (got[i]) got[i] = 0;
        while (!running) @(negedge clk);
        while (running && t_now == ts_t'(t)) @(negedge clk);
        for (int n = L1; n < L3; n++)
          check(got[n] == spk[n], $sformatf("run %0d t%0d neuron %0d spike %0d exp %0d", run, t, n, got[n], spk[n]));
        prev_spk = spk;
      end
    join
    while (running) @(negedge clk);
  endtask

  initial begin #400000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    cfg_we = 0; cfg_addr = '0; cfg_wdata = '0; start = 0; in_valid = 0; in_ev = '0; in_last = 0;
    foreach (v[i]) begin v[i] = 0; a[i] = 0; r[i] = 0; inp[i] = 0; prev_spk[i] = 0; end
    repeat (3) @(posedge clk); rst_n = 1;
    // network: layer 0 input ids 0..63, layer 1 64..95, layer 2 96..
    wr(8, 3); wr(2, 16); wr(1, 2); wr(4, 20); wr(5, 256); wr(6, 2);
    wr(16 + 8 + 0, L1); wr(16 + 8 + 1, theta[1]); wr(16 + 8 + 4, 3); wr(16 + 8 + 5, 1);
    wr(16 + 16 + 0, L2); wr(16 + 16 + 1, theta[2]); wr(16 + 16 + 4, 3); wr(16 + 16 + 5, 1);
    wr(16 + 16 + 6, 6); wr(16 + 16 + 7, 2);
    do_run(0, 2, 8, 40);     // intelligent, dynamic bypass + protection
    do_run(1, 0, 3, 8);     // conservative
    do_run(2, 1, 3, 8);     // aggressive
    check(stray == 0, "no spikes from unused neurons");
    check(stats[11] > 0, $sformatf("internal spikes %0d", stats[11]));
    check(stats[7] == 32'(reads), "memory reads counted");
    check(stats[0] > 0, $sformatf("read-time hits %0d", stats[0]));
    check(stats[1] > 0, $sformatf("read-time allocations %0d", stats[1]));
    check(stats[2] > 0, $sformatf("read-time replacements %0d", stats[2]));
    check(stats[3] > 0, $sformatf("read-time declined allocations %0d", stats[3]));
    check(stats[4] > 0, $sformatf("route-time hits %0d", stats[4]));
    check(stats[5] > 0, $sformatf("route-time misses %0d", stats[5]));
    check(stats[6] > 0, $sformatf("route-time bypasses %0d", stats[6]));
    check(max_prot > 0, $sformatf("protected layers %0d", max_prot));
    check(max_byp > 0, $sformatf("bypassed layers %0d", max_byp));
    check(stats[13] > 0, $sformatf("batch ends %0d", stats[13]));
    check(stall_cycles > 0, $sformatf("sweep stalls %0d", stall_cycles));
    check(stats[8] > 0, $sformatf("events read ahead %0d", stats[8]));
    check(backpressure > 0, $sformatf("input queue full %0d cycles", backpressure));
    check(stats[12] > 0, $sformatf("cycles waiting for input %0d", stats[12]));
    $display("mechanisms: rt_hit=%0d rt_alloc=%0d rt_replace=%0d rt_noalloc=%0d ro_hit=%0d ro_miss=%0d ro_bypass=%0d mem=%0d read_ahead=%0d skipped=%0d synapses=%0d spikes=%0d batches=%0d prot=%0d byp=%0d stalls=%0d backpressure=%0d",
      stats[0], stats[1], stats[2], stats[3], stats[4], stats[5], stats[6], stats[7], stats[8], stats[9], stats[10], stats[11], stats[13], max_prot, max_byp, stall_cycles, backpressure);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule

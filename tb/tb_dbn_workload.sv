// tb_dbn_workload: the full-size core (all parameters at their defaults)
// running a deep-belief-network-shaped workload: 784 input neurons, two fully
// connected hidden layers of 500 and an output layer of 10 (tb_dbn_pkg,
// 647000 synapses). The host streams 60 input events per timestep for T
// timesteps, concurrently with the core. For every timestep the spikes of all
// 1010 processing neurons are compared with a reference simulation written
// here. Main memory is modelled inline with a fixed latency. The cache runs
// the intelligent read-time approach with dynamic bypass and protection.
// Prints the cache statistics, the spike counts per layer and the memory
// reads per routed event.
module tb_dbn_workload;
  import cynapse_pkg::*;
  import tb_dbn_pkg::*;
  localparam int T = 5, PER = 60, LAT = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cfg_we, start, running, done, in_valid, in_ready, in_last;
  logic [7:0] cfg_addr; logic [31:0] cfg_wdata; ts_t t_now; aer_t in_ev;
  logic mem_req, mem_ready, mem_resp; baddr_t mem_addr; logic [BLK_W-1:0] mem_rdata;
  logic spk_out_valid; nid_t spk_out_id; logic [31:0] stats [16];

  cynapse_top dut (.clk, .rst_n, .cfg_we, .cfg_addr, .cfg_wdata, .start, .running, .done, .t_now,
    .in_valid, .in_ready, .in_ev, .in_last, .mem_req, .mem_ready, .mem_addr, .mem_resp, .mem_rdata,
    .spk_out_valid, .spk_out_id, .stats);

  // main memory: one block request at a time, answered LAT cycles later
  int mcnt = 0, reads = 0; baddr_t ma_q;
  assign mem_ready = mcnt == 0;
  always_ff @(posedge clk) begin
    mem_resp <= 1'b0;
    if (!rst_n) begin mcnt <= 0; mem_rdata <= '0; end
    else if (mcnt == 0 && mem_req) begin mcnt <= LAT; ma_q <= mem_addr; reads <= reads + 1; end
    else if (mcnt == 1) begin
      for (int i = 0; i < BLK_WORDS; i++) mem_rdata[i*DATA_W +: DATA_W] <= net_word({ma_q, 3'(i)});
      mem_resp <= 1'b1; mcnt <= 0;
    end else if (mcnt > 1) mcnt <= mcnt - 1;
  end

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  // ---------------- reference network state
  longint v [NTOT]; int r [NTOT]; longint inp [NTOT];
  bit prev_spk [NTOT];
  int theta [NL] = '{0, 60, 80, 80};
  task automatic ref_route(int n);
    int l = layer_of(n);
    if (l < NL - 1) for (int m = LB[l+1]; m < LB[l+2]; m++) inp[m] += weight(n, m);
  endtask
  task automatic ref_update(output bit spk [NTOT]);
    for (int n = 0; n < NTOT; n++) begin
      longint vs; int l;
      spk[n] = 0;
      l = layer_of(n);
      if (l == 0) continue;
      vs = v[n] + inp[n] - (v[n] >>> 3);
      if (r[n] != 0) begin r[n]--; v[n] = 0; end
      else if (vs >= theta[l]) begin spk[n] = 1; v[n] = 0; r[n] = 1; end
      else v[n] = vs;
      inp[n] = 0;
    end
  endtask

  // ---------------- spikes out of the core, per timestep
  bit got [NTOT]; int stray = 0;
  always @(posedge clk) if (rst_n && spk_out_valid) begin
    if (int'(spk_out_id) < NTOT) got[spk_out_id] = 1; else stray++;
  end

  task automatic wr(int ad, int d);
    @(negedge clk); cfg_we = 1; cfg_addr = 8'(ad); cfg_wdata = d; @(negedge clk); cfg_we = 0;
  endtask

  // input pixel j of timestep t (60 distinct pixels per timestep)
  function automatic int ev_id(int t, int j);
    return (t * 97 + j * 13) % 784;
  endfunction

  int lspk [NL]; int routed = 0;
  initial begin #2000000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    bit spk [NTOT];
    cfg_we = 0; cfg_addr = '0; cfg_wdata = '0; start = 0; in_valid = 0; in_ev = '0; in_last = 0;
    foreach (v[i]) begin v[i] = 0; r[i] = 0; inp[i] = 0; prev_spk[i] = 0; end
    foreach (lspk[i]) lspk[i] = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    // intelligent approach, dynamic bypass and protection; 4 layers
    wr(0, 2 | 12); wr(1, 2); wr(2, 64); wr(3, T); wr(4, 20); wr(5, 256); wr(6, 2); wr(8, NL);
    for (int l = 1; l < NL; l++) begin
      wr(16 + 8 * l + 0, LB[l]); wr(16 + 8 * l + 1, theta[l]); wr(16 + 8 * l + 4, 3); wr(16 + 8 * l + 5, 1);
    end
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    fork
      begin
        for (int t = 0; t < T; t++) for (int j = 0; j < PER; j++) begin
          @(negedge clk); in_valid = 1; in_ev = '{ts: ts_t'(t), id: nid_t'(ev_id(t, j))};
          #1; while (!in_ready) begin @(negedge clk); #1; end
        end
        @(negedge clk); in_valid = 0; in_last = 1;
      end
      for (int t = 0; t < T; t++) begin
        for (int j = 0; j < PER; j++) begin ref_route(ev_id(t, j)); routed++; end
        for (int n = 0; n < NTOT; n++) if (prev_spk[n]) begin ref_route(n); routed++; end
        ref_update(spk);
        foreach (got[i]) got[i] = 0;
        while (!running) @(negedge clk);
        while (running && t_now == ts_t'(t)) @(negedge clk);
        for (int n = LB[1]; n < NTOT; n++) begin
          check(got[n] == spk[n], $sformatf("t%0d neuron %0d spike %0d exp %0d", t, n, got[n], spk[n]));
          if (spk[n]) lspk[layer_of(n)]++;
        end
        prev_spk = spk;
        $display("t%0d done at cycle %0t: spikes so far L1=%0d L2=%0d L3=%0d", t, $time / 10, lspk[1], lspk[2], lspk[3]);
      end
    join
    while (running) @(negedge clk);
    check(stray == 0, "no spikes from unused neurons");
    check(stats[7] == 32'(reads), "memory reads counted");
    check(lspk[1] > 0 && lspk[2] > 0 && lspk[3] > 0, "every processing layer spikes");
    $display("workload: events=%0d synapses=%0d spikes=%0d rt_hit=%0d rt_alloc=%0d rt_replace=%0d ro_hit=%0d ro_miss=%0d ro_bypass=%0d prot=%0d byp=%0d mem_reads=%0d reads/event=%0d",
      routed, stats[10], stats[11], stats[0], stats[1], stats[2], stats[4], stats[5], stats[6], stats[14], stats[15], reads, reads / routed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule

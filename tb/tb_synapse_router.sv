// tb_synapse_router: routes events of the test network through a model of
// the route-time cache port and checks every dendrite update (post id and
// weight, in order) against the connection formula, the request count per
// event (pointer + 256 topology words + one per synapse), the number of
// score decrements (one per distinct block) and the bypass/score passing.
module tb_synapse_router;
  import cynapse_pkg::*;
  import tb_net_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, bypass, busy, done, ro_req, ro_ready, ro_dec, ro_bypass, ro_resp, den_we;
  nid_t pre_id, den_post; score_t ins, ro_ins; waddr_t ro_addr; logic [DATA_W-1:0] ro_rdata;
  logic signed [31:0] den_w; logic [31:0] nsyn;
  synapse_router dut (.clk, .rst_n, .start, .pre_id, .bypass, .ins_score(ins), .busy, .done,
    .ro_req, .ro_ready, .ro_addr, .ro_dec, .ro_bypass, .ro_ins_score(ro_ins), .ro_resp, .ro_rdata,
    .den_we, .den_post, .den_w, .st_synapses(nsyn));
  int nreq = 0, ndec = 0, badflags = 0;
  waddr_t blocks [$];
  assign ro_ready = ro_req;
  always_ff @(posedge clk) begin
    ro_resp <= ro_req;
    if (ro_req) begin
      ro_rdata <= net_word(ro_addr); nreq++;
      if (ro_dec) begin ndec++; blocks.push_back(ro_addr >> 3); end
      if (ro_bypass != bypass || ro_ins != ins) badflags++;
    end
  end
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  int posts [$]; int wts [$];
  always @(posedge clk) if (den_we) begin posts.push_back(int'(den_post)); wts.push_back(int'(den_w)); end
  initial begin #50000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    int ids [6] = '{0, 5, 63, 64, 80, 200};
    start = 0; pre_id = '0; bypass = 0; ins = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    foreach (ids[e]) begin
      int n, k, nb, distinct;
      n = ids[e];
      posts.delete(); wts.delete(); blocks.delete(); nreq = 0; ndec = 0;
      @(negedge clk); start = 1; pre_id = nid_t'(n); bypass = e[0]; ins = score_t'(e);
      @(negedge clk); start = 0;
      while (!done) @(negedge clk);
      @(negedge clk);
      k = 0;
      for (int m = 0; m < N_NEURONS; m++) if (connected(n, m)) begin
        check(k < posts.size() && posts[k] == m && wts[k] == weight(n, m), $sformatf("n%0d synapse %0d -> %0d", n, k, m));
        k++;
      end
      check(posts.size() == k, $sformatf("n%0d synapse count %0d vs %0d", n, posts.size(), k));
      check(nreq == 1 + ROW_WORDS + k, $sformatf("n%0d requests %0d", n, nreq));
      distinct = 0;
      foreach (blocks[i]) begin
        nb = 0;
        foreach (blocks[j]) if (blocks[j] == blocks[i]) nb++;
        if (nb == 1) distinct++;
      end
      check(distinct == ndec, $sformatf("n%0d one decrement per block (%0d of %0d)", n, distinct, ndec));
      check(ndec == 1 + ROW_WORDS / BLK_WORDS + ((k == 0) ? 0 : int'(((WT_BASE + waddr_t'(64 * n + k - 1)) >> 3) - ((WT_BASE + waddr_t'(64 * n)) >> 3)) + 1),
            $sformatf("n%0d decrements %0d", n, ndec));
    end
    check(badflags == 0, "bypass and insertion score passed to the cache");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule

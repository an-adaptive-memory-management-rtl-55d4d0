// tb_event_reader: an input queue feeds the reader; a model cache port
// answers every read-time request with the memory image. Checks the exact
// block address sequence of each read event (page pointer, 32 topology
// blocks, the blocks of the weight page), the lookahead window during
// warm-up, one new read per dequeue afterwards, and skipping of neurons in
// bypassed layers.
module tb_event_reader;
  import cynapse_pkg::*;
  import tb_net_pkg::*;
  localparam int QD = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, in_ready, pop, head_valid, in_last, enable, warm;
  aer_t in_ev, head_ev, peek_ev; logic [4:0] rd_ptr, wr_ptr, peek_ptr, la;
  logic rt_req, rt_ready, rt_resp; waddr_t rt_addr; logic [DATA_W-1:0] rt_rdata;
  logic [N_LAYERS-1:0] byp; nid_t base [N_LAYERS]; logic [31:0] nread, nskip;
  aer_event_queue #(.DEPTH(QD)) q (.clk, .rst_n, .in_valid, .in_ready, .in_ev, .pop, .head_valid, .head_ev,
    .rd_ptr, .wr_ptr, .peek_ptr, .peek_ev);
  event_reader #(.QDEPTH(QD)) dut (.clk, .rst_n, .enable, .lookahead(la), .in_last, .layer_bypass(byp),
    .layer_base(base), .n_layers(4'd3), .q_rd_ptr(rd_ptr), .q_wr_ptr(wr_ptr), .peek_ptr, .peek_ev,
    .rt_req, .rt_ready, .rt_addr, .rt_resp, .rt_rdata, .warm, .st_events_read(nread), .st_events_skipped(nskip));

  // model cache: accept at once, answer one cycle later
  waddr_t got [$];
  assign rt_ready = rt_req;
  always_ff @(posedge clk) begin
    rt_resp <= rst_n && rt_req && rt_ready;
    if (rst_n && rt_req && rt_ready) begin rt_rdata <= net_word(rt_addr); got.push_back(rt_addr); end
  end

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  waddr_t expq [$];
  function automatic void expect_event(int id);
    waddr_t pb; int cnt;
    expq.push_back(ptr_addr(nid_t'(id)));
    for (int k = 0; k < ROW_WORDS / BLK_WORDS; k++) expq.push_back(topo_addr(nid_t'(id), 8'(k * BLK_WORDS)));
    pb = WT_BASE + waddr_t'(64 * id); cnt = fanout(id);
    for (waddr_t b = pb >> 3; cnt > 0 && b <= (pb + waddr_t'(cnt) - 1) >> 3; b++) expq.push_back(b << 3);
  endfunction
  int ids [10] = '{3, 5, 70, 7, 0, 3, 9, 11, 13, 2};  // 70 is in bypassed layer 1

  initial begin #20000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    in_valid = 0; pop = 0; in_ev = '0; in_last = 0; enable = 0; la = 4; byp = 8'b010;
    base = '{0, 64, 96, 0, 0, 0, 0, 0};
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 10; i++) begin @(negedge clk); in_valid = 1; in_ev = '{ts: 0, id: nid_t'(ids[i])}; end
    @(negedge clk); in_valid = 0; in_last = 1; enable = 1;
    // warm-up: four events in the window, one of them skipped
    while (!warm) @(negedge clk);
    check(nread == 3 && nskip == 1, $sformatf("warm-up read %0d skipped %0d", nread, nskip));
    repeat (20) @(negedge clk);
    check(nread == 3, "window holds");
    for (int i = 0; i < 4; i++) if (ids[i] != 70) expect_event(ids[i]);
    // routing: each dequeue admits one more event
    for (int i = 0; i < 6; i++) begin
      pop = 1; @(negedge clk); pop = 0;
      while (!warm) @(negedge clk);
      check(nread + nskip == 32'(5 + i), $sformatf("after %0d pops: %0d", i + 1, nread + nskip));
      expect_event(ids[4 + i]);
    end
    check(got.size() == expq.size(), $sformatf("request count %0d vs %0d", got.size(), expq.size()));
    for (int i = 0; i < got.size() && i < expq.size(); i++)
      check(got[i] == expq[i], $sformatf("request %0d addr %h vs %h", i, got[i], expq[i]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule

// tb_reuse_cache: directed test of the reuse-score policy. Six blocks that
// map to the same 4-way set are driven through read-time and route-time
// requests; outcomes, hit/miss, returned data and hit latency are compared
// with the policy worked out by hand in the comments.
module tb_reuse_cache;
  import cynapse_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  rt_mode_e mode; score_t thr;
  logic rt_req, rt_ready, rt_resp, ro_req, ro_ready, ro_dec, ro_bypass, ro_resp, ro_hit;
  waddr_t rt_addr, ro_addr; score_t ro_ins;
  logic [DATA_W-1:0] rt_rdata, ro_rdata; rt_outcome_e rt_outcome;
  logic mem_req, mem_ready, mem_resp; baddr_t mem_addr; logic [BLK_W-1:0] mem_rdata;
  logic [31:0] st [8]; int reads;

  reuse_cache dut (.clk, .rst_n, .mode, .reuse_thr(thr),
    .rt_req, .rt_ready, .rt_addr, .rt_resp, .rt_rdata, .rt_outcome,
    .ro_req, .ro_ready, .ro_addr, .ro_dec, .ro_bypass, .ro_ins_score(ro_ins), .ro_resp, .ro_rdata, .ro_hit,
    .mem_req, .mem_ready, .mem_addr, .mem_resp, .mem_rdata,
    .st_rt_hit(st[0]), .st_rt_alloc(st[1]), .st_rt_replace(st[2]), .st_rt_noalloc(st[3]),
    .st_ro_hit(st[4]), .st_ro_miss(st[5]), .st_ro_bypass(st[6]), .st_mem_reads(st[7]));
  dram_model #(.LAT(6), .RAW(1'b1)) mem (.clk, .rst_n, .mem_req, .mem_ready, .mem_addr, .mem_resp, .mem_rdata, .reads);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [DATA_W-1:0] pat(waddr_t a);
    return {7'h55, a, 7'h2A, a};
  endfunction

  function automatic waddr_t A(int k, int off = 0);
    return waddr_t'((k << 13) | (1 << 3) | off);   // set 1, tag k
  endfunction

  task automatic rt(waddr_t a, rt_outcome_e exp, string what);
    int c = 0;
    rt_req <= 1; rt_addr <= a;
    do @(posedge clk); while (!rt_ready);
    rt_req <= 0;
    do begin @(posedge clk); c++; end while (!rt_resp);
    check(rt_outcome == exp, $sformatf("%s: outcome %0d expected %0d", what, rt_outcome, exp));
    check(rt_rdata == pat(a), {what, ": data"});
    if (exp == RT_HIT) check(c == 2, $sformatf("%s: hit latency %0d", what, c));
  endtask

  task automatic ro(waddr_t a, bit dec, bit byp, int ins, bit exp_hit, string what);
    int c = 0;
    ro_req <= 1; ro_addr <= a; ro_dec <= dec; ro_bypass <= byp; ro_ins <= score_t'(ins);
    do @(posedge clk); while (!ro_ready);
    ro_req <= 0;
    do begin @(posedge clk); c++; end while (!ro_resp);
    check(ro_hit == exp_hit, $sformatf("%s: hit %0d expected %0d", what, ro_hit, exp_hit));
    check(ro_rdata == pat(a), {what, ": data"});
    if (exp_hit) check(c == 2, $sformatf("%s: hit latency %0d", what, c));
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rt_req = 0; ro_req = 0; rt_addr = '0; ro_addr = '0; ro_dec = 0; ro_bypass = 0; ro_ins = '0;
    mode = RT_INTELLIGENT; thr = 2;
    repeat (3) @(posedge clk); rst_n = 1; @(posedge clk);
    // compulsory misses at read-time fill the set, each with score 1
    rt(A(0), RT_ALLOC, "A0 first");
    rt(A(0, 5), RT_HIT, "A0 again");            // A0 score 2
    rt(A(1), RT_ALLOC, "A1"); rt(A(2), RT_ALLOC, "A2"); rt(A(3), RT_ALLOC, "A3");
    // conservative: a full set is never replaced at read-time
    mode = RT_CONSERVATIVE;
    rt(A(4), RT_NOALLOC, "A4 conservative");
    rt(A(4), RT_NOALLOC, "A4 conservative again");
    // intelligent: minimum score 1 is not below threshold 1 ...
    mode = RT_INTELLIGENT; thr = 1;
    rt(A(4), RT_NOALLOC, "A4 intelligent thr1");
    // ... but is below threshold 2: A1 (lowest way with score 1) is replaced
    thr = 2;
    rt(A(4), RT_ALLOC, "A4 intelligent thr2"); // scores A0 2, A4 1, A2 1, A3 1
    ro(A(1), 1, 0, 0, 0, "A1 evicted");         // route miss: replaces min way
    // min was A4/A2/A3 (score 1) -> lowest way = way1 (A4); A1 now score 0
    ro(A(4), 0, 0, 0, 0, "A4 replaced by route miss");   // now replaces A1 (score 0)
    ro(A(0), 1, 0, 0, 1, "A0 route hit");       // A0 2 -> 1
    ro(A(0), 1, 0, 0, 1, "A0 route hit 2");     // A0 1 -> 0
    ro(A(2), 1, 0, 0, 1, "A2 route hit");       // A2 1 -> 0
    // bypass: a route miss that allocates nothing
    ro(A(5), 0, 1, 0, 0, "A5 bypass");
    ro(A(5), 0, 1, 0, 0, "A5 bypass not allocated");
    // protection: a route miss inserted with score 3 survives ...
    ro(A(6), 0, 0, 3, 0, "A6 protected insert"); // replaces A0 (way0, score 0)
    // set: A6 3, A4 0, A2 0, A3 1 -> aggressive read-time replaces way1 (A4)
    mode = RT_AGGRESSIVE;
    rt(A(7), RT_ALLOC, "A7 aggressive");
    ro(A(6, 2), 0, 0, 0, 1, "A6 still present");
    ro(A(3), 0, 0, 0, 1, "A3 still present");
    ro(A(4), 0, 0, 0, 0, "A4 gone after aggressive");
    // route-time priority when both ports ask in the same cycle
    rt_req <= 1; rt_addr <= A(3); ro_req <= 1; ro_addr <= A(6); ro_dec <= 0; ro_bypass <= 0;
    @(posedge clk);
    check(ro_ready && !rt_ready, "route-time port served first");
    ro_req <= 0;
    do @(posedge clk); while (!rt_ready);
    rt_req <= 0;
    do @(posedge clk); while (!rt_resp);
    check(rt_outcome == RT_HIT, "read-time served after route-time");
    @(posedge clk);
    check(st[7] == 32'(reads), "memory read counter");
    check(st[3] == 3, $sformatf("noalloc count %0d", st[3]));
    check(st[6] == 2, $sformatf("bypass count %0d", st[6]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

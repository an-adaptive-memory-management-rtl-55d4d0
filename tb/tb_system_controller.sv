// tb_system_controller: the controller runs five timesteps against models of
// the queues, router and neuron array. Checks which events are routed in
// which timestep (inputs whose timestep has come, then the internal spikes
// of the previous step), the warm-up wait, batch_end pulses and done.
module tb_system_controller;
  import cynapse_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, running, done, in_last, head_valid, pop_in, pop_aux, warm, route_start, route_done;
  logic nu_start, nu_done, handler_idle, batch_end; ts_t t_now; aer_t head_ev; nid_t aux_head, route_id;
  logic [NID_W:0] aux_count; logic [31:0] stall;
  system_controller dut (.clk, .rst_n, .start, .n_timesteps(16'd5), .batch_len(16'd2), .running, .done, .t_now,
    .in_last, .head_valid, .head_ev, .pop_in, .aux_count, .aux_head, .pop_aux, .warm, .route_start, .route_id,
    .route_done, .nu_start, .nu_done, .handler_idle, .batch_end, .st_stall_cycles(stall));
  aer_t evs [$];
  int log_t [$]; int log_id [$];
  int rcnt = 0, ncnt = 0, cyc = 0, nbatch = 0, ndone = 0, aux_serial = 1000;
  assign head_valid = evs.size() > 0;
  assign head_ev = head_valid ? evs[0] : '0;
  assign aux_head = nid_t'(aux_serial);
  assign warm = cyc > 8;
  assign handler_idle = 1'b1;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    route_done <= 0; nu_done <= 0;
    if (batch_end) nbatch++;
    if (done) ndone++;
    if (route_start) begin log_t.push_back(int'(t_now)); log_id.push_back(int'(route_id)); rcnt = 4; end
    else if (rcnt > 0) begin rcnt--; if (rcnt == 1) route_done <= 1; end
    if (pop_in) void'(evs.pop_front());
    if (pop_aux) begin aux_count <= aux_count - 1; aux_serial++; end
    if (nu_start) ncnt = 10;
    else if (ncnt > 0) begin ncnt--; if (ncnt == 1) begin nu_done <= 1; aux_count <= aux_count + 2; end end
  end
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin #10000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    int ei [15] = '{10, 11, 12, 1000, 1001, 13, 1002, 1003, 14, 15, 1004, 1005, 16, 1006, 1007};
    int tt [15] = '{0, 0, 1, 1, 1, 2, 2, 2, 3, 3, 3, 3, 4, 4, 4};
    start = 0; in_last = 0; aux_count = '0; route_done = 0; nu_done = 0;
    evs.push_back('{ts: 0, id: 10}); evs.push_back('{ts: 0, id: 11}); evs.push_back('{ts: 1, id: 12});
    evs.push_back('{ts: 2, id: 13}); evs.push_back('{ts: 3, id: 14}); evs.push_back('{ts: 3, id: 15});
    evs.push_back('{ts: 4, id: 16});
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    repeat (3) @(negedge clk);
    check(log_id.size() == 0, "no routing before warm-up");
    repeat (300) @(negedge clk);
    check(!done && running, "waits for the host at the last timestep");
    in_last = 1;
    while (running) @(negedge clk);
    repeat (3) @(negedge clk);
    check(log_id.size() == 15, $sformatf("routed %0d events", log_id.size()));
    for (int i = 0; i < 15 && i < log_id.size(); i++)
      check(log_id[i] == ei[i] && log_t[i] == tt[i], $sformatf("route %0d: id %0d at t%0d", i, log_id[i], log_t[i]));
    check(nbatch == 3 && ndone == 1, $sformatf("batch_end %0d done %0d", nbatch, ndone));
    check(t_now == 5, "timer");
    check(stall > 0, "input stall counted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule

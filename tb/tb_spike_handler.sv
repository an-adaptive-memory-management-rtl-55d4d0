// tb_spike_handler: random spike vectors offered whenever the handler is
// ready; every spike must come out once, in order, one per cycle, and the
// ready signal must stall the producer while a vector drains.
module tb_spike_handler;
  import cynapse_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic spk_valid, spk_ready, idle, aux_push; logic [X_UNITS-1:0] spk_vec; nid_t spk_base, aux_id;
  logic [31:0] st_spikes;
  spike_handler dut (.clk, .rst_n, .spk_valid, .spk_vec, .spk_base, .spk_ready, .idle, .aux_push, .aux_id, .st_spikes);
  nid_t expq [$];
  int checks = 0, failures = 0, sent = 0, stalls = 0;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  always @(posedge clk) if (rst_n && aux_push) begin
    check(expq.size() > 0 && expq[0] == aux_id, $sformatf("spike id %0d", aux_id));
    if (expq.size() > 0) void'(expq.pop_front());
  end
  initial begin #10000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    spk_valid = 0; spk_vec = '0; spk_base = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int s = 0; s < 400; s++) begin
      @(negedge clk);
      if (!spk_ready) begin stalls++; spk_valid = 0; continue; end
      spk_valid = 1; spk_base = nid_t'(s * X_UNITS);
      spk_vec = ($urandom_range(3) == 0) ? X_UNITS'($urandom) & X_UNITS'($urandom) : '0;
      for (int u = 0; u < X_UNITS; u++) if (spk_vec[u]) begin expq.push_back(spk_base + nid_t'(u)); sent++; end
    end
    @(negedge clk); spk_valid = 0;
    repeat (40) @(posedge clk);
    check(expq.size() == 0, "all spikes delivered");
    check(st_spikes == 32'(sent), "spike counter");
    check(stalls > 0, "producer was stalled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule

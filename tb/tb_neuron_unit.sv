// tb_neuron_unit: drives random inputs into several logical neurons of one
// unit under LIF, IF and adaptive parameter sets and compares spikes and
// potentials with a reference model of the same equations written here.
module tb_neuron_unit;
  import cynapse_pkg::*;
  localparam int E = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, active, out_valid, spike; logic [2:0] idx;
  neuron_cfg_t cfg; logic signed [31:0] syn_in, v_out;
  neuron_unit #(.ENTRIES(E)) dut (.clk, .rst_n, .in_valid, .idx, .active, .cfg, .syn_in, .out_valid, .spike, .v_out);
  longint rv [E]; longint ra [E]; int rr [E];
  int checks = 0, failures = 0, nspk = 0;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic step(int i, int in);
    longint v = rv[i], a = ra[i], ad, lk, vs; bit f = 0;
    ad = (cfg.a_shift != 0) ? a - (a >> cfg.a_shift) : a;
    lk = (cfg.leak_shift != 0) ? ((v - longint'(cfg.v_rest)) >>> cfg.leak_shift) : 0;
    vs = v + in - lk;
    if (rr[i] != 0) begin rr[i]--; rv[i] = cfg.v_reset; ra[i] = ad; end
    else if (vs >= longint'(cfg.theta) + a) begin
      f = 1; rv[i] = cfg.v_reset; rr[i] = cfg.t_ref; ra[i] = (ad + cfg.a_inc > 65535) ? 65535 : ad + cfg.a_inc;
    end else begin rv[i] = vs; ra[i] = ad; end
    in_valid <= 1; idx <= 3'(i); syn_in <= in; active <= 1;
    @(posedge clk); in_valid <= 0; #1;
    check(out_valid && spike == f, $sformatf("spike n%0d exp %0d", i, f));
    check(longint'(v_out) == rv[i], $sformatf("v n%0d %0d vs %0d", i, v_out, rv[i]));
    nspk += f;
  endtask
  initial begin
    in_valid = 0; idx = 0; active = 0; syn_in = 0; cfg = '0;
    for (int i = 0; i < E; i++) begin rv[i] = 0; ra[i] = 0; rr[i] = 0; end
    repeat (2) @(posedge clk); rst_n = 1; @(posedge clk);
    for (int mset = 0; mset < 3; mset++) begin
      cfg.theta = 1000; cfg.v_reset = -50; cfg.v_rest = 0;
      cfg.leak_shift = (mset == 1) ? 5'd0 : 5'd3;       // set 1: IF
      cfg.t_ref = (mset == 0) ? 8'd2 : 8'd0;
      cfg.a_inc = (mset == 2) ? 16'd300 : 16'd0;
      cfg.a_shift = (mset == 2) ? 5'd4 : 5'd0;
      for (int t = 0; t < 300; t++)
        for (int i = 0; i < E; i++) step(i, int'($urandom_range(400)) - 50);
    end
    // inactive (input-layer) slots keep their state and never fire
    in_valid <= 1; idx <= 0; syn_in <= 100000; active <= 0; @(posedge clk); in_valid <= 0; #1;
    check(!spike, "inactive never fires");
    step(0, 0);
    check(nspk > 50, $sformatf("enough spikes %0d", nspk));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule

// tb_aux_queue: pushes a burst of spike ids, pops them back in order and
// checks the fill count, including a wrap of the pointers.
module tb_aux_queue;
  import cynapse_pkg::*;
  localparam int D = 32;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic push, pop; nid_t push_id, head_id; logic [$clog2(D):0] count;
  aux_queue #(.DEPTH(D)) dut (.clk, .rst_n, .push, .push_id, .pop, .head_id, .count);
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    push = 0; pop = 0; push_id = '0;
    repeat (2) @(posedge clk); rst_n = 1; @(posedge clk);
    for (int r = 0; r < 3; r++) begin
      for (int i = 0; i < D; i++) begin push <= 1; push_id <= nid_t'(i * 11 + r); @(posedge clk); end
      push <= 0; #1;
      check(count == D, "count full");
      for (int i = 0; i < D; i++) begin
        check(head_id == nid_t'(i * 11 + r), $sformatf("order r%0d i%0d", r, i));
        pop <= 1; @(posedge clk); pop <= 0; #1;
      end
      check(count == 0, "count empty");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule

// tb_aer_event_queue: fills the input queue to full, checks back-pressure,
// FIFO order at the head, the lookahead peek port and pointer distances.
module tb_aer_event_queue;
  import cynapse_pkg::*;
  localparam int D = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, in_ready, pop, head_valid;
  aer_t in_ev, head_ev, peek_ev;
  logic [$clog2(D):0] rd_ptr, wr_ptr, peek_ptr;
  aer_event_queue #(.DEPTH(D)) dut (.clk, .rst_n, .in_valid, .in_ready, .in_ev, .pop, .head_valid,
    .head_ev, .rd_ptr, .wr_ptr, .peek_ptr, .peek_ev);
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  function automatic aer_t ev(int i); return '{ts: ts_t'(i / 3), id: nid_t'(i * 37 + 5)}; endfunction
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    in_valid = 0; pop = 0; in_ev = '0; peek_ptr = '0;
    repeat (2) @(posedge clk); rst_n = 1; @(posedge clk);
    check(!head_valid && in_ready, "empty after reset");
    for (int i = 0; i < D; i++) begin
      in_valid <= 1; in_ev <= ev(i); @(posedge clk);
    end
    in_valid <= 1; in_ev <= ev(99); @(posedge clk); // refused: full
    in_valid <= 0; #1;
    check(!in_ready, "full");
    check(wr_ptr - rd_ptr == D, "count at full");
    for (int k = 0; k < D; k++) begin
      peek_ptr = rd_ptr + k; #1;
      check(peek_ev == ev(k), $sformatf("peek %0d", k));
    end
    for (int i = 0; i < D; i++) begin
      check(head_valid && head_ev == ev(i), $sformatf("head %0d", i));
      pop <= 1; @(posedge clk); pop <= 0; #1;
      // one pop makes room for one push
      if (i == 0) check(in_ready, "ready after pop");
    end
    check(!head_valid, "empty again");
    // wrap-around: push and pop together
    for (int i = 0; i < 3 * D; i++) begin
      in_valid <= 1; in_ev <= ev(i + 100); pop <= (i > 0); @(posedge clk); #1;
      check(head_ev == ev(i + 100), $sformatf("stream %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule

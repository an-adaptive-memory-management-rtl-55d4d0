// tb_dendrite_sram: random accumulations against a reference array,
// saturation at the 32-bit limits, and read-and-clear.
module tb_dendrite_sram;
  import cynapse_pkg::*;
  localparam int E = 64;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic acc_we, rd_clr; logic [5:0] acc_addr, rd_addr;
  logic signed [31:0] acc_w, rd_data;
  longint ref_m [E];
  dendrite_sram #(.ENTRIES(E)) dut (.clk, .rst_n, .acc_we, .acc_addr, .acc_w, .rd_addr, .rd_clr, .rd_data);
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    acc_we = 0; rd_clr = 0; acc_addr = 0; rd_addr = 0; acc_w = 0;
    foreach (ref_m[i]) ref_m[i] = 0;
    repeat (2) @(posedge clk); rst_n = 1; @(posedge clk);
    for (int i = 0; i < 2000; i++) begin
      int a, w;
      a = $urandom_range(E - 1);
      w = (i < 1000) ? int'($urandom_range(2000)) - 1000 : int'($urandom);
      acc_we <= 1; acc_addr <= 6'(a); acc_w <= w; @(posedge clk);
      ref_m[a] += w;
      if (ref_m[a] > 64'sh7FFFFFFF) ref_m[a] = 64'sh7FFFFFFF;
      if (ref_m[a] < -64'sh80000000) ref_m[a] = -64'sh80000000;
    end
    acc_we <= 0;
    for (int a = 0; a < E; a++) begin
      rd_addr <= 6'(a); rd_clr <= 1; #1;
      check(longint'(rd_data) == ref_m[a], $sformatf("sum %0d: %0d vs %0d", a, rd_data, ref_m[a]));
      @(posedge clk); #1;
      check(longint'(rd_data) == 0, "cleared");
    end
    rd_clr <= 0;
    // compare via a fresh pass: accumulate known values after clear
    for (int a = 0; a < E; a++) begin acc_we <= 1; acc_addr <= 6'(a); acc_w <= a * 3 - 90; @(posedge clk); end
    acc_we <= 0; @(posedge clk);
    for (int a = 0; a < E; a++) begin rd_addr <= 6'(a); #1; check(rd_data == a * 3 - 90, $sformatf("value %0d", a)); @(posedge clk); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule

// tb_net_pkg: a small three-layer test network defined by formulas, and the
// main-memory image that encodes it in the core's memory map.
//   layer 0 (input, simulated by the host): ids 0..63
//   layer 1: ids 64..95, layer 2: ids 96..16383 (only 96..105 are targets)
//   0 -> 1 connection if (7n + 3m) mod 5 == 0, 1 -> 2 if (n + m) mod 3 != 0
//   weight(n, m) = ((31n + 17m) mod 23) + 1 + WBIAS
// Pages are variable-sized (one word per connection) at WT_BASE + 64*n.
package tb_net_pkg;
  import cynapse_pkg::*;

  localparam waddr_t WT_BASE = PTR_BASE + waddr_t'(N_NEURONS);
  localparam int L1 = 64, L2 = 96, L3 = 106;
  localparam int WBIAS = 0;

  function automatic bit connected(int n, int m);
    if (n < L1)      return (m >= L1 && m < L2) && ((7 * n + 3 * m) % 5 == 0);
    else if (n < L2) return (m >= L2 && m < L3) && ((n + m) % 3 != 0);
    else             return 1'b0;
  endfunction

  function automatic int weight(int n, int m);
    return ((31 * n + 17 * m) % 23) + 1 + WBIAS;
  endfunction

  function automatic int fanout(int n);
    int c = 0;
    for (int m = L1; m < L3; m++) if (connected(n, m)) c++;
    return c;
  endfunction

  function automatic logic [DATA_W-1:0] net_word(waddr_t a);
    logic [DATA_W-1:0] w = '0;
    if (a < PTR_BASE) begin
      int n = int'(a / ROW_WORDS);
      int base = int'(a % ROW_WORDS) * 64;
      if (base + 63 >= L1 && base < L3)
        for (int j = 0; j < 64; j++) w[j] = connected(n, base + j);
    end else if (a < WT_BASE) begin
      int n = int'(a - PTR_BASE);
      w[WADDR_W-1:0] = WT_BASE + waddr_t'(64 * n);
      w[56:32] = 25'(fanout(n));
    end else begin
      int n = int'((a - WT_BASE) / 64);
      int k = int'((a - WT_BASE) % 64);
      int c = 0;
      if (n < N_NEURONS)
        for (int m = L1; m < L3; m++)
          if (connected(n, m)) begin
            if (c == k) w = DATA_W'(weight(n, m));
            c++;
          end
    end
    return w;
  endfunction
endpackage

// tb_dbn_pkg: a deep-belief-network-shaped workload defined by formulas, and
// the main-memory image that encodes it in the core's memory map.
//   layer 0 (input, simulated by the host): ids 0..783 (a 28x28 image)
//   layer 1: ids 784..1283, layer 2: 1284..1783, layer 3: 1784..1793
// Consecutive layers are fully connected (784*500 + 500*500 + 500*10 =
// 647000 synapses, 1794 neurons).
//   weight(n, m) = ((13n + 7m) mod 9) - 3
// Neuron n's page starts at WT_BASE + 512*n; its k-th word is the weight to
// the k-th neuron of the next layer.
package tb_dbn_pkg;
  import cynapse_pkg::*;

  localparam waddr_t WT_BASE = PTR_BASE + waddr_t'(N_NEURONS);
  localparam int NL = 4;
  localparam int LB [NL+1] = '{0, 784, 1284, 1784, 1794};
  localparam int NTOT = 1794;

  function automatic int layer_of(int n);
    for (int l = NL - 1; l >= 0; l--) if (n >= LB[l]) return l;
    return 0;
  endfunction

  function automatic bit connected(int n, int m);
    int l = layer_of(n);
    return (l < NL - 1) && (m >= LB[l+1]) && (m < LB[l+2]);
  endfunction

  function automatic int weight(int n, int m);
    return ((13 * n + 7 * m) % 9) - 3;
  endfunction

  function automatic int fanout(int n);
    int l = layer_of(n);
    return (n < NTOT && l < NL - 1) ? LB[l+2] - LB[l+1] : 0;
  endfunction

  function automatic logic [DATA_W-1:0] net_word(waddr_t a);
    logic [DATA_W-1:0] w = '0;
    if (a < PTR_BASE) begin
      int n = int'(a / ROW_WORDS);
      int base = int'(a % ROW_WORDS) * 64;
      if (n < NTOT)
        for (int j = 0; j < 64; j++) w[j] = connected(n, base + j);
    end else if (a < WT_BASE) begin
      int n = int'(a - PTR_BASE);
      w[WADDR_W-1:0] = WT_BASE + waddr_t'(512 * n);
      w[56:32] = 25'(fanout(n));
    end else begin
      int n = int'((a - WT_BASE) / 512);
      int k = int'((a - WT_BASE) % 512);
      int l = layer_of(n);
      if (n < NTOT && k < fanout(n)) w = DATA_W'(signed'(weight(n, LB[l+1] + k)));
    end
    return w;
  endfunction
endpackage

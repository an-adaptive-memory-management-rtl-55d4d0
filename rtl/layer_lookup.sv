// layer_lookup: maps a logical neuron id to the network layer it belongs to.
//
// The network compiler supplies, per layer, the first neuron id of that
// layer (layer_base, ascending); layer l holds ids base[l] .. base[l+1]-1 and
// the last active layer (n_layers-1) runs to the end of the id space.
// Purely combinational: one comparator per layer.
module layer_lookup
  import cynapse_pkg::*;
(
  input  nid_t                 id,
  input  nid_t                 layer_base [N_LAYERS],
  input  logic [LAYER_W:0]     n_layers,
  output layer_t               layer
);
  always_comb begin
    layer = '0;
    for (int l = 1; l < N_LAYERS; l++) begin
      if ((LAYER_W+1)'(l) < n_layers && id >= layer_base[l]) layer = layer_t'(l);
    end
  end
endmodule

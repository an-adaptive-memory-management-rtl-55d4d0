// tb_layer_lookup: random ids against a linear-search reference for several
// layer tables, including unused layers beyond n_layers.
module tb_layer_lookup;
  import cynapse_pkg::*;
  nid_t id; nid_t base [N_LAYERS]; logic [LAYER_W:0] n_layers; layer_t layer;
  layer_lookup dut (.id, .layer_base(base), .n_layers, .layer);
  int checks = 0, failures = 0;
  initial begin
    for (int tcase = 0; tcase < 20; tcase++) begin
      int nl, b;
      nl = 1 + (tcase % N_LAYERS);
      b = 0;
      for (int l = 0; l < N_LAYERS; l++) begin base[l] = nid_t'(b); b += 1 + int'($urandom_range(1500)); end
      n_layers = (LAYER_W+1)'(nl);
      for (int k = 0; k < 500; k++) begin
        int exp;
        exp = 0;
        // every fourth id sits exactly on a layer boundary
        id = (k % 4 == 0) ? base[k % nl] : nid_t'($urandom);
        for (int l = 0; l < nl; l++) if (id >= base[l]) exp = l;
        #1; checks++;
        if (layer != layer_t'(exp)) begin failures++; $display("FAIL id %0d layer %0d exp %0d", id, layer, exp); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule

// activity_monitor: layer-wise activity statistics and the network-adaptive
// cache settings derived from them.
//
// Every routed event (input or internal) is counted against the layer of its
// neuron. At each batch_end the counts of the finished batch are turned into
// per-layer settings and the counters restart:
//   bypass : a layer whose share of all events is below the activity bypass
//            threshold ABT (units of 1/1024, so 2% is about 20) gets no cache
//            allocation (only if dyn_bypass_en), OR-ed with the static mask
//            given by the compiler (e.g. output layers).
//   protect: a probable reuse score inversely proportional to the layer's
//            mean reuse distance. The mean distance between two events of
//            the same neuron is estimated as total*neurons/count, so the
//            score is the largest p <= 15 with
//              p * total * neurons <= window * count,
//            i.e. the number of reuses expected within `window` events
//            (only if dyn_protect_en and the layer is not bypassed).
// The estimate and the window register are this design's choice; the source
// gives only the proportionality. Computing the scores takes at most
// N_LAYERS*16 cycles after batch_end (busy high); the previous settings stay
// in force until then.
module activity_monitor
  import cynapse_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               ev_valid,
  input  layer_t             ev_layer,
  input  logic               batch_end,
  input  nid_t               layer_base [N_LAYERS],
  input  logic [LAYER_W:0]   n_layers,
  input  logic [9:0]         abt,
  input  logic [15:0]        window,
  input  logic               dyn_bypass_en,
  input  logic               dyn_protect_en,
  input  logic [N_LAYERS-1:0] static_bypass,
  output logic [N_LAYERS-1:0] bypass,
  output score_t             prot_score [N_LAYERS],
  output logic               busy,
  output logic [31:0]        layer_count [N_LAYERS]   // running counts
);
  localparam score_t SMAX = '1;

  logic [31:0] cnt_q [N_LAYERS];
  logic [31:0] snap_q [N_LAYERS];
  logic [31:0] total_q;
  logic [N_LAYERS-1:0] dyn_bp_q;
  score_t      score_q [N_LAYERS];
  logic        run_q;
  layer_t      l_q;
  score_t      p_q;

  // neurons per layer from the id ranges
  logic [NID_W:0] neurons [N_LAYERS];
  always_comb begin
    for (int l = 0; l < N_LAYERS; l++) begin
      if ((LAYER_W+1)'(l) >= n_layers)            neurons[l] = '0;
      else if ((LAYER_W+1)'(l + 1) == n_layers)   neurons[l] = (NID_W+1)'(N_NEURONS) - (NID_W+1)'(layer_base[l]);
      else                                        neurons[l] = (NID_W+1)'(layer_base[(l+1) % N_LAYERS]) - (NID_W+1)'(layer_base[l]);
    end
  end

  logic [31:0] total_now;
  always_comb begin
    total_now = '0;
    for (int l = 0; l < N_LAYERS; l++) total_now += cnt_q[l];
  end

  // one comparison per cycle: does score p_q still fit for layer l_q?
  logic [63:0] lhs, rhs;
  assign lhs = 64'(p_q) * 64'(total_q) * 64'(neurons[l_q]);
  assign rhs = 64'(window) * 64'(snap_q[l_q]);

  assign busy = run_q;
  assign layer_count = cnt_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int l = 0; l < N_LAYERS; l++) begin
        cnt_q[l] <= '0; snap_q[l] <= '0; score_q[l] <= '0;
      end
      total_q <= '0; dyn_bp_q <= '0; run_q <= 1'b0; l_q <= '0; p_q <= '0;
    end else begin
      if (batch_end) begin
        for (int l = 0; l < N_LAYERS; l++) begin
          snap_q[l] <= cnt_q[l];
          cnt_q[l]  <= '0;
          dyn_bp_q[l] <= (LAYER_W+1)'(l) < n_layers &&
                         ({cnt_q[l], 10'b0} < 42'(abt) * 42'(total_now));
        end
        if (ev_valid) cnt_q[ev_layer] <= 32'd1;
        total_q <= total_now;
        run_q   <= 1'b1;
        l_q     <= '0;
        p_q     <= score_t'(1);
      end else begin
        if (ev_valid) cnt_q[ev_layer] <= cnt_q[ev_layer] + 1;
        if (run_q) begin
          // scores rise while p*total*neurons fits in window*count
          if (total_q != '0 && neurons[l_q] != '0 && lhs <= rhs) begin
            score_q[l_q] <= p_q;
          end
          if (total_q == '0 || neurons[l_q] == '0 || lhs > rhs || p_q == SMAX) begin
            if (!(total_q != '0 && neurons[l_q] != '0 && lhs <= rhs) && p_q == score_t'(1))
              score_q[l_q] <= '0;
            p_q <= score_t'(1);
            if (l_q == layer_t'(N_LAYERS - 1)) run_q <= 1'b0;
            else l_q <= l_q + 1'b1;
          end else begin
            p_q <= p_q + 1'b1;
          end
        end
      end
    end
  end

  always_comb begin
    for (int l = 0; l < N_LAYERS; l++) begin
      bypass[l]     = static_bypass[l] || (dyn_bypass_en && dyn_bp_q[l]);
      prot_score[l] = (dyn_protect_en && !bypass[l]) ? score_q[l] : '0;
    end
  end

endmodule

// neuron_array: the X physical neuron units and their dendritic trees.
//
// Logical neuron id n is served by unit n mod X at slot n / X, so that one
// sweep step updates X consecutive ids in parallel. During the routing phase
// the router's synapse updates (den_*) are steered to the owning dendrite.
// `start` begins the update phase: slots 0 .. N/X-1 are swept, one per
// cycle; each step reads and clears every unit's dendrite entry and updates
// the units. One cycle later the step's spikes appear as a vector spk_vec
// (bit u = id spk_base + u) with spk_valid. The sweep only advances while
// the spike handler signals spk_ready, which is how the handler stalls it.
// `done` pulses with the last step's result. Sizes N and X follow the package.
module neuron_array
  import cynapse_pkg::*;
#(
  parameter int unsigned N = N_NEURONS,
  parameter int unsigned X = X_UNITS,
  localparam int unsigned ENTRIES = N / X,
  localparam int unsigned A_W = $clog2(ENTRIES),
  localparam int unsigned U_W = $clog2(X)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       start,
  output logic                       busy,
  output logic                       done,
  // synapse updates from the router
  input  logic                       den_we,
  input  nid_t                       den_post,
  input  logic signed [WEIGHT_W-1:0] den_w,
  // network description
  input  nid_t                       layer_base [N_LAYERS],
  input  logic [LAYER_W:0]           n_layers,
  input  neuron_cfg_t                layer_cfg [N_LAYERS],
  // spikes
  input  logic                       spk_ready,
  output logic                       spk_valid,
  output logic [X-1:0]               spk_vec,
  output nid_t                       spk_base
);
  logic             running_q, last_q;
  logic [A_W-1:0]   i_q;
  logic             adv;
  logic [X-1:0]     out_valid;

  assign adv  = running_q && spk_ready;
  assign busy = running_q || last_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running_q <= 1'b0;
      last_q    <= 1'b0;
      i_q       <= '0;
      spk_base  <= '0;
      done      <= 1'b0;
    end else begin
      done   <= 1'b0;
      last_q <= 1'b0;
      if (start && !busy) begin
        running_q <= 1'b1;
        i_q       <= '0;
      end else if (adv) begin
        spk_base <= NID_W'({i_q, {U_W{1'b0}}});
        i_q      <= i_q + 1'b1;
        if (i_q == A_W'(ENTRIES - 1)) begin
          running_q <= 1'b0;
          last_q    <= 1'b1;
        end
      end
      if (last_q) done <= 1'b1;
    end
  end

  assign spk_valid = out_valid[0];

  for (genvar u = 0; u < X; u++) begin : g_unit
    logic signed [WEIGHT_W-1:0] syn;
    logic                       we;
    layer_t                     layer;
    nid_t                       id;
    logic signed [31:0]         v_unused;

    assign we = den_we && den_post[U_W-1:0] == U_W'(u);
    assign id = NID_W'({i_q, U_W'(u)});

    dendrite_sram #(.ENTRIES(ENTRIES)) u_den (
      .clk, .rst_n,
      .acc_we(we), .acc_addr(den_post[U_W +: A_W]), .acc_w(den_w),
      .rd_addr(i_q), .rd_clr(adv), .rd_data(syn)
    );

    layer_lookup u_lk (.id, .layer_base, .n_layers, .layer);

    neuron_unit #(.ENTRIES(ENTRIES)) u_neuron (
      .clk, .rst_n,
      .in_valid(adv), .idx(i_q), .active(layer != '0), .cfg(layer_cfg[layer]),
      .syn_in(syn), .out_valid(out_valid[u]), .spike(spk_vec[u]), .v_out(v_unused)
    );
  end

endmodule

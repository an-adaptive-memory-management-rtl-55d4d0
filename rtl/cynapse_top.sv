// cynapse_top: event-driven spiking neural network core with a reuse-score
// synaptic cache in front of main memory.
//
// AER spike packets from the host enter the input queue. A system controller
// steps biological time: it routes the input events of the current timestep
// and then the internal spikes of the previous one (auxiliary queue) through
// the synapse router, which looks up page pointer, topology row and weight
// page of each spiking neuron and accumulates the weights in the dendritic
// SRAMs; then the X neuron units sweep all N logical neurons and their
// spikes go through the spike handler back into the auxiliary queue.
//
// All synaptic data comes from main memory through the reuse cache. Its
// read-time port is driven by the event reader, which looks ahead into the
// input queue and raises per-block reuse scores for events that are still
// waiting; its route-time port serves the router and lowers them. The
// activity monitor turns per-layer event counts into cache bypass flags and
// protection scores for the next batch.
//
// Ports: host configuration writes (cfg_*), the AER input stream (in_*, with
// in_last after the final packet), run control (start/done/t_now), one
// 64-byte-block read port to main memory (mem_*: request valid/ready, then a
// mem_resp pulse with the block), the internal spike stream (spk_out_*),
// and statistics counters (stats, index constants in the ST_* list below).
module cynapse_top
  import cynapse_pkg::*;
#(
  parameter int unsigned QDEPTH = 256,
  localparam int unsigned QPTR_W = $clog2(QDEPTH) + 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // host configuration
  input  logic             cfg_we,
  input  logic [7:0]       cfg_addr,
  input  logic [31:0]      cfg_wdata,
  // run control
  input  logic             start,
  output logic             running,
  output logic             done,
  output ts_t              t_now,
  // AER input stream
  input  logic             in_valid,
  output logic             in_ready,
  input  aer_t             in_ev,
  input  logic             in_last,
  // main memory
  output logic             mem_req,
  input  logic             mem_ready,
  output baddr_t           mem_addr,
  input  logic             mem_resp,
  input  logic [BLK_W-1:0] mem_rdata,
  // internal spikes
  output logic             spk_out_valid,
  output nid_t             spk_out_id,
  // statistics: 0 rt_hit 1 rt_alloc 2 rt_replace 3 rt_noalloc 4 ro_hit
  // 5 ro_miss 6 ro_bypass 7 mem_reads 8 events_read 9 events_skipped
  // 10 synapses 11 spikes 12 input_stall_cycles 13 batch_ends
  // 14 protected_layers (last batch) 15 bypassed_layers (last batch)
  output logic [31:0]      stats [16]
);
  // ---------------- configuration
  rt_mode_e    mode;
  logic        dyn_bypass_en, dyn_protect_en;
  score_t      reuse_thr;
  logic [QPTR_W-1:0] lookahead;
  ts_t         n_timesteps, batch_len;
  logic [9:0]  abt;
  logic [15:0] window;
  logic [N_LAYERS-1:0] static_bypass;
  logic [LAYER_W:0] n_layers;
  nid_t        layer_base [N_LAYERS];
  neuron_cfg_t layer_cfg [N_LAYERS];

  config_regs #(.QPTR_W(QPTR_W)) u_cfg (
    .clk, .rst_n, .cfg_we, .cfg_addr, .cfg_wdata,
    .mode, .dyn_bypass_en, .dyn_protect_en, .reuse_thr, .lookahead, .n_timesteps,
    .abt, .window, .batch_len, .static_bypass, .n_layers, .layer_base, .layer_cfg
  );

  // ---------------- queues
  logic pop_in, head_valid;
  aer_t head_ev, peek_ev;
  logic [QPTR_W-1:0] q_rd_ptr, q_wr_ptr, peek_ptr;

  aer_event_queue #(.DEPTH(QDEPTH)) u_inq (
    .clk, .rst_n, .in_valid, .in_ready, .in_ev, .pop(pop_in), .head_valid, .head_ev,
    .rd_ptr(q_rd_ptr), .wr_ptr(q_wr_ptr), .peek_ptr, .peek_ev
  );

  logic aux_push, pop_aux;
  nid_t aux_id, aux_head;
  logic [NID_W:0] aux_count;

  aux_queue u_auxq (
    .clk, .rst_n, .push(aux_push), .push_id(aux_id), .pop(pop_aux), .head_id(aux_head), .count(aux_count)
  );

  // ---------------- adaptive policy
  logic [N_LAYERS-1:0] layer_bypass;
  score_t prot_score [N_LAYERS];
  logic   mon_busy, batch_end;
  logic   route_start, route_done;
  nid_t   route_id;
  layer_t route_layer;
  logic [31:0] layer_count [N_LAYERS];

  layer_lookup u_route_layer (.id(route_id), .layer_base, .n_layers, .layer(route_layer));

  activity_monitor u_mon (
    .clk, .rst_n, .ev_valid(route_start), .ev_layer(route_layer), .batch_end,
    .layer_base, .n_layers, .abt, .window, .dyn_bypass_en, .dyn_protect_en, .static_bypass,
    .bypass(layer_bypass), .prot_score, .busy(mon_busy), .layer_count
  );

  // ---------------- cache and its two clients
  logic rt_req, rt_ready, rt_resp;
  waddr_t rt_addr;
  logic [DATA_W-1:0] rt_rdata;
  rt_outcome_e rt_outcome;
  logic ro_req, ro_ready, ro_dec, ro_bypass, ro_resp, ro_hit;
  waddr_t ro_addr;
  score_t ro_ins_score;
  logic [DATA_W-1:0] ro_rdata;
  logic warm;

  event_reader #(.QDEPTH(QDEPTH)) u_reader (
    .clk, .rst_n, .enable(running), .lookahead, .in_last, .layer_bypass, .layer_base, .n_layers,
    .q_rd_ptr, .q_wr_ptr, .peek_ptr, .peek_ev,
    .rt_req, .rt_ready, .rt_addr, .rt_resp, .rt_rdata,
    .warm, .st_events_read(stats[8]), .st_events_skipped(stats[9])
  );

  reuse_cache u_cache (
    .clk, .rst_n, .mode, .reuse_thr,
    .rt_req, .rt_ready, .rt_addr, .rt_resp, .rt_rdata, .rt_outcome,
    .ro_req, .ro_ready, .ro_addr, .ro_dec, .ro_bypass, .ro_ins_score, .ro_resp, .ro_rdata, .ro_hit,
    .mem_req, .mem_ready, .mem_addr, .mem_resp, .mem_rdata,
    .st_rt_hit(stats[0]), .st_rt_alloc(stats[1]), .st_rt_replace(stats[2]), .st_rt_noalloc(stats[3]),
    .st_ro_hit(stats[4]), .st_ro_miss(stats[5]), .st_ro_bypass(stats[6]), .st_mem_reads(stats[7])
  );

  logic den_we, router_busy;
  nid_t den_post;
  logic signed [WEIGHT_W-1:0] den_w;

  synapse_router u_router (
    .clk, .rst_n, .start(route_start), .pre_id(route_id),
    .bypass(layer_bypass[route_layer]), .ins_score(prot_score[route_layer]),
    .busy(router_busy), .done(route_done),
    .ro_req, .ro_ready, .ro_addr, .ro_dec, .ro_bypass, .ro_ins_score, .ro_resp, .ro_rdata,
    .den_we, .den_post, .den_w, .st_synapses(stats[10])
  );

  // ---------------- neuron units and spike path
  logic nu_start, nu_busy, nu_done, spk_valid, spk_ready, handler_idle;
  logic [X_UNITS-1:0] spk_vec;
  nid_t spk_base;

  neuron_array u_neurons (
    .clk, .rst_n, .start(nu_start), .busy(nu_busy), .done(nu_done),
    .den_we, .den_post, .den_w, .layer_base, .n_layers, .layer_cfg,
    .spk_ready, .spk_valid, .spk_vec, .spk_base
  );

  spike_handler u_spk (
    .clk, .rst_n, .spk_valid, .spk_vec, .spk_base, .spk_ready, .idle(handler_idle),
    .aux_push, .aux_id, .st_spikes(stats[11])
  );

  assign spk_out_valid = aux_push;
  assign spk_out_id    = aux_id;

  // ---------------- control
  system_controller u_ctrl (
    .clk, .rst_n, .start, .n_timesteps, .batch_len, .running, .done, .t_now,
    .in_last, .head_valid, .head_ev, .pop_in,
    .aux_count, .aux_head, .pop_aux, .warm,
    .route_start, .route_id, .route_done,
    .nu_start, .nu_done, .handler_idle, .batch_end, .st_stall_cycles(stats[12])
  );

  // ---------------- remaining statistics
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) stats[13] <= '0;
    else if (batch_end) stats[13] <= stats[13] + 1;
  end

  always_comb begin
    stats[14] = '0;
    stats[15] = '0;
    for (int l = 0; l < N_LAYERS; l++) begin
      stats[14] += 32'(prot_score[l] != '0);
      stats[15] += 32'(layer_bypass[l] && (LAYER_W+1)'(l) < n_layers);
    end
  end

  // both route phases must find the router idle, and the cache's outcome
  // is only meaningful with a response
  assert property (@(posedge clk) disable iff (!rst_n) route_start |-> !router_busy);

endmodule

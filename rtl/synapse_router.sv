// synapse_router: route-time synaptic lookup of one spike event.
//
// For the pre-synaptic neuron of a dequeued event it
//   1. reads the neuron's page-pointer word (page base, weight count),
//   2. reads its topology row, one 64-bit word at a time,
//   3. for every set bit j of a topology word (lowest first) reads the next
//      word of the weight page and adds its signed low 32 bits to the
//      dendritic tree of post-synaptic neuron 64*word + j.
// Pages are variable-sized: weights are packed, so the k-th connection uses
// page word k. All reads go through the route-time port of the reuse cache;
// ro_dec is raised on the first access to each 64-byte block within the
// event, so each block's reuse score drops by one per routed event. The
// layer-dependent bypass flag and insertion (protection) score of the
// event's neuron are sampled with `start`.
// Timing: start is accepted when busy is low; `done` pulses one cycle when
// the last weight of the event has been delivered. den_we is a one-cycle
// pulse per synapse.
module synapse_router
  import cynapse_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  nid_t        pre_id,
  input  logic        bypass,
  input  score_t      ins_score,
  output logic        busy,
  output logic        done,
  // route-time cache port
  output logic        ro_req,
  input  logic        ro_ready,
  output waddr_t      ro_addr,
  output logic        ro_dec,
  output logic        ro_bypass,
  output score_t      ro_ins_score,
  input  logic        ro_resp,
  input  logic [DATA_W-1:0] ro_rdata,
  // dendrite update
  output logic        den_we,
  output nid_t        den_post,
  output logic signed [WEIGHT_W-1:0] den_w,
  output logic [31:0] st_synapses
);
  localparam int unsigned TW_W = $clog2(ROW_WORDS);

  typedef enum logic [2:0] {T_IDLE, T_PTR, T_TOPO, T_SCAN, T_WT, T_WAIT} tstate_e;
  typedef enum logic [1:0] {K_PTR, K_TOPO, K_WT} kind_e;

  tstate_e state_q;
  kind_e   kind_q;
  nid_t    id_q;
  logic    bypass_q;
  score_t  ins_q;
  waddr_t  waddr_q;
  logic [TW_W-1:0] tw_q;
  logic [DATA_W-1:0] bits_q;
  logic [$clog2(DATA_W)-1:0] bit_q;
  logic    first_wt_q;

  // lowest set bit of the current topology word
  logic [$clog2(DATA_W)-1:0] low_bit;
  always_comb begin
    low_bit = '0;
    for (int b = DATA_W - 1; b >= 0; b--) if (bits_q[b]) low_bit = b[$clog2(DATA_W)-1:0];
  end

  assign busy = state_q != T_IDLE;
  assign ro_req = state_q == T_PTR || state_q == T_TOPO || state_q == T_WT;
  assign ro_bypass = bypass_q;
  assign ro_ins_score = ins_q;
  always_comb begin
    ro_addr = '0;
    ro_dec  = 1'b0;
    unique case (state_q)
      T_PTR:  begin ro_addr = ptr_addr(id_q);      ro_dec = 1'b1; end
      T_TOPO: begin ro_addr = topo_addr(id_q, tw_q); ro_dec = tw_q[BLK_OFF_W-1:0] == '0; end
      T_WT:   begin ro_addr = waddr_q;              ro_dec = first_wt_q || waddr_q[BLK_OFF_W-1:0] == '0; end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= T_IDLE; kind_q <= K_PTR; id_q <= '0; bypass_q <= 1'b0; ins_q <= '0;
      waddr_q <= '0; tw_q <= '0; bits_q <= '0; bit_q <= '0; first_wt_q <= 1'b0;
      done <= 1'b0; den_we <= 1'b0; den_post <= '0; den_w <= '0; st_synapses <= '0;
    end else begin
      done   <= 1'b0;
      den_we <= 1'b0;
      unique case (state_q)
        T_IDLE: if (start) begin
          id_q <= pre_id; bypass_q <= bypass; ins_q <= ins_score;
          tw_q <= '0; first_wt_q <= 1'b1;
          state_q <= T_PTR;
        end
        T_PTR:  if (ro_ready) begin kind_q <= K_PTR;  state_q <= T_WAIT; end
        T_TOPO: if (ro_ready) begin kind_q <= K_TOPO; state_q <= T_WAIT; end
        T_WT:   if (ro_ready) begin kind_q <= K_WT;   state_q <= T_WAIT; end
        T_SCAN: begin
          if (bits_q == '0) begin
            if (tw_q == '1) begin
              done <= 1'b1;
              state_q <= T_IDLE;
            end else begin
              tw_q <= tw_q + 1'b1;
              state_q <= T_TOPO;
            end
          end else begin
            bit_q <= low_bit;
            bits_q[low_bit] <= 1'b0;
            state_q <= T_WT;
          end
        end
        default: if (ro_resp) begin // T_WAIT
          unique case (kind_q)
            K_PTR: begin
              waddr_q <= ro_rdata[WADDR_W-1:0];
              state_q <= T_TOPO;
            end
            K_TOPO: begin
              bits_q  <= ro_rdata;
              state_q <= T_SCAN;
            end
            default: begin
              den_we   <= 1'b1;
              den_post <= {tw_q, bit_q};
              den_w    <= ro_rdata[WEIGHT_W-1:0];
              st_synapses <= st_synapses + 1;
              waddr_q  <= waddr_q + 1'b1;
              first_wt_q <= 1'b0;
              state_q  <= T_SCAN;
            end
          endcase
        end
      endcase
    end
  end

endmodule

// reuse_cache: read-only set-associative synaptic cache managed by reuse
// scores that are learned from the event queue ahead of execution.
//
// 256 KB, 4 ways, 64-byte blocks of eight 64-bit words (1024 sets). Each
// block carries a small saturating reuse score: the number of future routes
// that are known to need it.
//
// Read-time port (rt_*, event reader): a request for a word of a neuron that
// is still waiting in the input queue.
//   hit                     -> score + 1, outcome RT_HIT
//   miss, a way is invalid  -> fill that way, score 1, outcome RT_ALLOC
//   miss, set full          -> mode RT_CONSERVATIVE: no allocation
//                              mode RT_AGGRESSIVE  : replace min-score way
//                              mode RT_INTELLIGENT : replace min-score way
//                                                    only if its score is
//                                                    below reuse_thr
//                              a replacing fill gets score 1 (RT_ALLOC),
//                              otherwise the word is read from memory
//                              without allocation (RT_NOALLOC)
// Route-time port (ro_*, router): the real synaptic lookup.
//   hit   -> score - 1 when ro_dec (one realised reuse per block per event)
//   miss  -> ro_bypass: word read from memory, nothing allocated;
//            else the min-score way (an invalid one first) is replaced and
//            gets score ro_ins_score (0, or a layer's protection score).
// Scores saturate at 0 and at the maximum. Victim ties go to the lowest way.
//
// Both ports are served by one lookup pipeline, route-time first, one request
// at a time (this design's choice; it keeps score updates free of races).
// Handshake per port: req is held until ready (accept); exactly one resp
// pulse follows. Hit: resp two cycles after accept. Miss: one 64-byte block
// request on mem_* (valid/ready), then resp the cycle after mem_resp.
// The stats outputs count each case for the energy evaluation.
module reuse_cache
  import cynapse_pkg::*;
#(
  parameter int unsigned SETS = CACHE_SETS,
  parameter int unsigned WAYS = CACHE_WAYS
) (
  input  logic        clk,
  input  logic        rst_n,
  // configuration
  input  rt_mode_e    mode,
  input  score_t      reuse_thr,
  // read-time port
  input  logic        rt_req,
  output logic        rt_ready,
  input  waddr_t      rt_addr,
  output logic        rt_resp,
  output logic [DATA_W-1:0] rt_rdata,
  output rt_outcome_e rt_outcome,
  // route-time port
  input  logic        ro_req,
  output logic        ro_ready,
  input  waddr_t      ro_addr,
  input  logic        ro_dec,
  input  logic        ro_bypass,
  input  score_t      ro_ins_score,
  output logic        ro_resp,
  output logic [DATA_W-1:0] ro_rdata,
  output logic        ro_hit,
  // main memory, one block per request
  output logic        mem_req,
  input  logic        mem_ready,
  output baddr_t      mem_addr,
  input  logic        mem_resp,
  input  logic [BLK_W-1:0] mem_rdata,
  // statistics
  output logic [31:0] st_rt_hit,
  output logic [31:0] st_rt_alloc,
  output logic [31:0] st_rt_replace,
  output logic [31:0] st_rt_noalloc,
  output logic [31:0] st_ro_hit,
  output logic [31:0] st_ro_miss,
  output logic [31:0] st_ro_bypass,
  output logic [31:0] st_mem_reads
);
  localparam int unsigned SET_W = $clog2(SETS);
  localparam int unsigned WAY_W = (WAYS > 1) ? $clog2(WAYS) : 1;
  localparam int unsigned TAG_W = WADDR_W - BLK_OFF_W - SET_W;
  localparam score_t      SCORE_MAX = '1;

  typedef logic [SET_W-1:0] set_t;
  typedef logic [TAG_W-1:0] tag_t;
  typedef logic [WAY_W-1:0] way_t;

  typedef enum logic [2:0] {S_IDLE, S_LOOKUP, S_MEMREQ, S_MEMWAIT, S_RESP} state_e;

  // storage
  logic [BLK_W-1:0] data_q  [SETS*WAYS];
  tag_t             tag_q   [SETS][WAYS];
  score_t           score_q [SETS][WAYS];
  logic [WAYS-1:0]  valid_q [SETS];

  // latched request
  state_e  state_q;
  logic    port_ro_q;          // 1: route-time request
  waddr_t  addr_q;
  logic    dec_q, bypass_q;
  score_t  ins_q;
  logic    alloc_q;
  way_t    way_q;
  logic    repl_q;
  logic [DATA_W-1:0] rdata_q;
  logic    hit_q;
  rt_outcome_e outcome_q;

  set_t set_idx;
  tag_t tag_idx;
  logic [BLK_OFF_W-1:0] off_idx;
  assign off_idx = addr_q[BLK_OFF_W-1:0];
  assign set_idx = addr_q[BLK_OFF_W +: SET_W];
  assign tag_idx = addr_q[WADDR_W-1 -: TAG_W];

  // tag compare and victim selection
  logic   hit;
  way_t   hit_way;
  logic   has_invalid;
  way_t   inv_way;
  way_t   min_way;
  score_t min_score;

  always_comb begin
    hit = 1'b0;
    hit_way = '0;
    has_invalid = 1'b0;
    inv_way = '0;
    min_way = '0;
    min_score = SCORE_MAX;
    for (int w = WAYS - 1; w >= 0; w--) begin
      if (valid_q[set_idx][w] && tag_q[set_idx][w] == tag_idx) begin
        hit = 1'b1;
        hit_way = way_t'(w);
      end
      if (!valid_q[set_idx][w]) begin
        has_invalid = 1'b1;
        inv_way = way_t'(w);
      end
    end
    for (int w = WAYS - 1; w >= 0; w--) begin
      if (valid_q[set_idx][w] && score_q[set_idx][w] <= min_score) begin
        min_score = score_q[set_idx][w];
        min_way = way_t'(w);
      end
    end
  end

  // allocation decision on a miss
  logic miss_alloc;
  logic miss_repl;
  always_comb begin
    miss_repl = 1'b0;
    if (port_ro_q) begin
      miss_alloc = !bypass_q;
      miss_repl  = !bypass_q && !has_invalid;
    end else if (has_invalid) begin
      miss_alloc = 1'b1;
    end else begin
      unique case (mode)
        RT_AGGRESSIVE:  miss_alloc = 1'b1;
        RT_INTELLIGENT: miss_alloc = min_score < reuse_thr;
        default:        miss_alloc = 1'b0;
      endcase
      miss_repl = miss_alloc;
    end
  end

  logic [BLK_W-1:0] hit_blk;
  assign hit_blk = data_q[{set_idx, hit_way}];

  assign ro_ready = state_q == S_IDLE && ro_req;
  assign rt_ready = state_q == S_IDLE && rt_req && !ro_req;
  assign mem_req  = state_q == S_MEMREQ;
  assign mem_addr = addr_q[WADDR_W-1:BLK_OFF_W];

  assign ro_resp    = state_q == S_RESP && port_ro_q;
  assign rt_resp    = state_q == S_RESP && !port_ro_q;
  assign ro_rdata   = rdata_q;
  assign rt_rdata   = rdata_q;
  assign ro_hit     = hit_q;
  assign rt_outcome = outcome_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= S_IDLE;
      port_ro_q <= 1'b0;
      addr_q    <= '0;
      dec_q     <= 1'b0;
      bypass_q  <= 1'b0;
      ins_q     <= '0;
      alloc_q   <= 1'b0;
      repl_q    <= 1'b0;
      way_q     <= '0;
      rdata_q   <= '0;
      hit_q     <= 1'b0;
      outcome_q <= RT_HIT;
      for (int s = 0; s < SETS; s++) valid_q[s] <= '0;
      st_rt_hit <= '0; st_rt_alloc <= '0; st_rt_replace <= '0; st_rt_noalloc <= '0;
      st_ro_hit <= '0; st_ro_miss <= '0; st_ro_bypass <= '0; st_mem_reads <= '0;
    end else begin
      unique case (state_q)
        S_IDLE: begin
          if (ro_req) begin
            port_ro_q <= 1'b1;
            addr_q    <= ro_addr;
            dec_q     <= ro_dec;
            bypass_q  <= ro_bypass;
            ins_q     <= ro_ins_score;
            state_q   <= S_LOOKUP;
          end else if (rt_req) begin
            port_ro_q <= 1'b0;
            addr_q    <= rt_addr;
            dec_q     <= 1'b0;
            bypass_q  <= 1'b0;
            ins_q     <= score_t'(1);
            state_q   <= S_LOOKUP;
          end
        end
        S_LOOKUP: begin
          if (hit) begin
            rdata_q   <= hit_blk[off_idx*DATA_W +: DATA_W];
            hit_q     <= 1'b1;
            outcome_q <= RT_HIT;
            if (port_ro_q) begin
              st_ro_hit <= st_ro_hit + 1;
              if (dec_q && score_q[set_idx][hit_way] != '0)
                score_q[set_idx][hit_way] <= score_q[set_idx][hit_way] - 1'b1;
            end else begin
              st_rt_hit <= st_rt_hit + 1;
              if (score_q[set_idx][hit_way] != SCORE_MAX)
                score_q[set_idx][hit_way] <= score_q[set_idx][hit_way] + 1'b1;
            end
            state_q <= S_RESP;
          end else begin
            hit_q   <= 1'b0;
            alloc_q <= miss_alloc;
            repl_q  <= miss_repl;
            way_q   <= has_invalid ? inv_way : min_way;
            state_q <= S_MEMREQ;
          end
        end
        S_MEMREQ: begin
          if (mem_ready) begin
            st_mem_reads <= st_mem_reads + 1;
            state_q <= S_MEMWAIT;
          end
        end
        S_MEMWAIT: begin
          if (mem_resp) begin
            rdata_q <= mem_rdata[off_idx*DATA_W +: DATA_W];
            if (alloc_q) begin
              tag_q[set_idx][way_q]   <= tag_idx;
              score_q[set_idx][way_q] <= ins_q;
              valid_q[set_idx][way_q] <= 1'b1;
            end
            if (port_ro_q) begin
              if (alloc_q) st_ro_miss   <= st_ro_miss + 1;
              else         st_ro_bypass <= st_ro_bypass + 1;
            end else begin
              outcome_q <= alloc_q ? RT_ALLOC : RT_NOALLOC;
              if (!alloc_q)     st_rt_noalloc <= st_rt_noalloc + 1;
              else if (repl_q)  st_rt_replace <= st_rt_replace + 1;
              else              st_rt_alloc   <= st_rt_alloc + 1;
            end
            state_q <= S_RESP;
          end
        end
        default: begin // S_RESP
          state_q <= S_IDLE;
        end
      endcase
    end
  end

  // data array: written only by a fill
  always_ff @(posedge clk) begin
    if (state_q == S_MEMWAIT && mem_resp && alloc_q)
      data_q[{set_idx, way_q}] <= mem_rdata;
  end

  assert property (@(posedge clk) disable iff (!rst_n) rt_resp |-> !ro_resp);

endmodule

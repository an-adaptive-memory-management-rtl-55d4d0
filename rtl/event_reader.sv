// event_reader: read-time lookahead engine of the reuse-score cache.
//
// It walks the input event queue ahead of the router. For every event it
// reads, it issues read-time requests for every cache block the route of
// that event will touch: the page-pointer word (whose data gives the page
// base and the number of weights), each block of the neuron's topology row,
// and each block of its weight page. The cache raises the blocks' reuse
// scores or brings them in according to its read-time policy.
//
// Window: the reader keeps at most `lookahead` events between the queue head
// and its own pointer. Before the run starts this fills the window (warm-up,
// `warm` goes high when the window is full, or when no more events exist);
// afterwards every dequeue at route-time opens room for exactly one new
// read-time event. If routing overtakes the reader it restarts at the head.
// Neurons of layers flagged for bypass are skipped (no read-time traffic).
// Handshake with the cache: hold rt_req until rt_ready, then wait rt_resp.
module event_reader
  import cynapse_pkg::*;
#(
  parameter int unsigned QDEPTH = 256,
  localparam int unsigned PTR_W = $clog2(QDEPTH) + 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             enable,
  input  logic [PTR_W-1:0] lookahead,
  input  logic             in_last,      // host has sent its last event
  input  logic [N_LAYERS-1:0] layer_bypass,
  input  nid_t             layer_base [N_LAYERS],
  input  logic [LAYER_W:0] n_layers,
  // queue
  input  logic [PTR_W-1:0] q_rd_ptr,
  input  logic [PTR_W-1:0] q_wr_ptr,
  output logic [PTR_W-1:0] peek_ptr,
  input  aer_t             peek_ev,
  // cache read-time port
  output logic             rt_req,
  input  logic             rt_ready,
  output waddr_t           rt_addr,
  input  logic             rt_resp,
  input  logic [DATA_W-1:0] rt_rdata,
  // status
  output logic             warm,
  output logic [31:0]      st_events_read,
  output logic [31:0]      st_events_skipped
);
  localparam int unsigned TB_W = $clog2(ROW_WORDS / BLK_WORDS);

  typedef enum logic [2:0] {R_IDLE, R_PTR, R_TOPO, R_WT, R_WAIT} rstate_e;

  rstate_e state_q, ret_q;
  logic [PTR_W-1:0] la_ptr_q;
  nid_t   id_q;
  logic [TB_W-1:0] tblk_q;
  baddr_t wblk_q, wlast_q;
  waddr_t addr_q;

  logic [PTR_W-1:0] la_dist, pending, avail;
  logic behind;
  layer_t peek_layer;

  assign la_dist    = la_ptr_q - q_rd_ptr;   // events already read ahead
  assign pending = q_wr_ptr - q_rd_ptr;   // events in the queue
  assign avail   = q_wr_ptr - la_ptr_q;   // events not yet read
  assign behind  = la_dist > pending;        // head overtook the reader
  assign peek_ptr = la_ptr_q;

  layer_lookup u_layer (.id(peek_ev.id), .layer_base, .n_layers, .layer(peek_layer));

  assign warm    = state_q == R_IDLE && !behind &&
                   (la_dist >= lookahead || (avail == '0 && (in_last || pending == PTR_W'(QDEPTH))));
  assign rt_req  = state_q == R_WAIT ? 1'b0 : (state_q != R_IDLE);
  assign rt_addr = addr_q;

  // page pointer word fields
  waddr_t page_base;
  logic [24:0] page_cnt;
  waddr_t page_end;
  assign page_base = rt_rdata[WADDR_W-1:0];
  assign page_cnt  = rt_rdata[56:32];
  assign page_end  = page_base + WADDR_W'(page_cnt) - 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q  <= R_IDLE;
      ret_q    <= R_IDLE;
      la_ptr_q <= '0;
      id_q     <= '0;
      tblk_q   <= '0;
      wblk_q   <= '0;
      wlast_q  <= '0;
      addr_q   <= '0;
      st_events_read    <= '0;
      st_events_skipped <= '0;
    end else begin
      unique case (state_q)
        R_IDLE: begin
          if (behind) begin
            la_ptr_q <= q_rd_ptr;
          end else if (enable && avail != '0 && la_dist < lookahead) begin
            la_ptr_q <= la_ptr_q + 1'b1;
            if (layer_bypass[peek_layer]) begin
              st_events_skipped <= st_events_skipped + 1;
            end else begin
              st_events_read <= st_events_read + 1;
              id_q    <= peek_ev.id;
              addr_q  <= ptr_addr(peek_ev.id);
              state_q <= R_PTR;
            end
          end
        end
        R_PTR, R_TOPO, R_WT: begin
          if (rt_ready) begin
            ret_q   <= state_q;
            state_q <= R_WAIT;
          end
        end
        default: begin // R_WAIT
          if (rt_resp) begin
            unique case (ret_q)
              R_PTR: begin
                tblk_q  <= '0;
                wblk_q  <= page_base[WADDR_W-1:BLK_OFF_W];
                wlast_q <= page_end[WADDR_W-1:BLK_OFF_W];
                if (page_cnt == '0) wlast_q <= page_base[WADDR_W-1:BLK_OFF_W] - 1'b1;
                addr_q  <= topo_addr(id_q, '0);
                state_q <= R_TOPO;
              end
              R_TOPO: begin
                if (tblk_q == '1) begin
                  addr_q  <= {wblk_q, {BLK_OFF_W{1'b0}}};
                  state_q <= (wlast_q + 1'b1 == wblk_q) ? R_IDLE : R_WT;
                end else begin
                  tblk_q  <= tblk_q + 1'b1;
                  addr_q  <= addr_q + WADDR_W'(BLK_WORDS);
                  state_q <= R_TOPO;
                end
              end
              default: begin // R_WT
                if (wblk_q == wlast_q) begin
                  state_q <= R_IDLE;
                end else begin
                  wblk_q  <= wblk_q + 1'b1;
                  addr_q  <= {wblk_q + 1'b1, {BLK_OFF_W{1'b0}}};
                  state_q <= R_WT;
                end
              end
            endcase
          end
        end
      endcase
    end
  end

endmodule

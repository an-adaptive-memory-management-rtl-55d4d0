// cynapse_pkg: types and constants shared by the event-driven spiking neural
// network core and its reuse-score synaptic cache.
//
// Sizes that follow the source design: 8-byte synaptic words, a 256 KB 4-way
// cache with 64-byte blocks, a 256 MB main memory. The number of logical
// neurons N (16384) and physical neuron units X (16) are design-time choices
// of this implementation; N is large enough for a 13.6k-neuron network.
//
// Main-memory map (64-bit word addresses), this design's own choice:
//   topology row of neuron n : TOPO_BASE + n*ROW_WORDS  (N bits = N/64 words,
//                              bit j of the row set if n connects to j)
//   page pointer of neuron n : PTR_BASE + n  ([24:0] page base word address,
//                              [56:32] number of weights in the page)
//   weight page              : anywhere above PTR_BASE + N, one 64-bit word
//                              per connection, in ascending post-neuron order;
//                              the weight value is the signed low 32 bits.
package cynapse_pkg;

  // network capacity
  localparam int unsigned N_NEURONS = 16384;
  localparam int unsigned NID_W     = $clog2(N_NEURONS);
  localparam int unsigned X_UNITS   = 16;
  localparam int unsigned N_LAYERS  = 8;
  localparam int unsigned LAYER_W   = $clog2(N_LAYERS);
  localparam int unsigned TS_W      = 16;

  // memory
  localparam int unsigned DATA_W      = 64;                 // 8-byte synaptic data
  localparam int unsigned DRAM_BYTES  = 256 * 1024 * 1024;
  localparam int unsigned WADDR_W     = $clog2(DRAM_BYTES / (DATA_W / 8)); // 25
  localparam int unsigned BLK_WORDS   = 8;                  // 64-byte block
  localparam int unsigned BLK_OFF_W   = $clog2(BLK_WORDS);
  localparam int unsigned BADDR_W     = WADDR_W - BLK_OFF_W; // 22
  localparam int unsigned BLK_W       = DATA_W * BLK_WORDS;  // 512
  localparam int unsigned CACHE_BYTES = 256 * 1024;
  localparam int unsigned CACHE_WAYS  = 4;
  localparam int unsigned CACHE_SETS  = CACHE_BYTES / (CACHE_WAYS * BLK_WORDS * DATA_W / 8); // 1024
  localparam int unsigned SCORE_W     = 4;
  localparam int unsigned WEIGHT_W    = 32;

  localparam int unsigned ROW_WORDS = N_NEURONS / DATA_W;   // topology words per neuron
  localparam logic [WADDR_W-1:0] TOPO_BASE = '0;
  localparam logic [WADDR_W-1:0] PTR_BASE  = WADDR_W'(N_NEURONS * ROW_WORDS);

  typedef logic [NID_W-1:0]   nid_t;
  typedef logic [TS_W-1:0]    ts_t;
  typedef logic [WADDR_W-1:0] waddr_t;
  typedef logic [BADDR_W-1:0] baddr_t;
  typedef logic [SCORE_W-1:0] score_t;
  typedef logic [LAYER_W-1:0] layer_t;

  // Address Event Representation packet: biological timestep and source id
  typedef struct packed {
    ts_t  ts;
    nid_t id;
  } aer_t;

  // read-time replacement approach
  typedef enum logic [1:0] {
    RT_CONSERVATIVE = 2'd0,   // never replace at read-time
    RT_AGGRESSIVE   = 2'd1,   // always replace the minimum-score way
    RT_INTELLIGENT  = 2'd2    // replace only if minimum score < reuse threshold
  } rt_mode_e;

  // outcome of a read-time request
  typedef enum logic [1:0] {
    RT_HIT     = 2'd0,        // block present, score incremented
    RT_ALLOC   = 2'd1,        // block brought in with score 1
    RT_NOALLOC = 2'd2         // miss, policy declined to allocate
  } rt_outcome_e;

  // per-layer neuron parameters (generalized integrate-and-fire)
  typedef struct packed {
    logic signed [31:0] theta;      // firing threshold
    logic signed [31:0] v_reset;    // potential after a spike
    logic signed [31:0] v_rest;     // leak target
    logic [4:0]         leak_shift; // 0: no leak (IF), else leak (v-v_rest)>>>shift
    logic [7:0]         t_ref;      // refractory steps
    logic [15:0]        a_inc;      // threshold adaptation per spike
    logic [4:0]         a_shift;    // adaptation decay shift, 0: no decay
  } neuron_cfg_t;

  function automatic waddr_t topo_addr(nid_t n, logic [$clog2(ROW_WORDS)-1:0] w);
    return TOPO_BASE + waddr_t'(n) * waddr_t'(ROW_WORDS) + waddr_t'(w);
  endfunction

  function automatic waddr_t ptr_addr(nid_t n);
    return PTR_BASE + waddr_t'(n);
  endfunction

endpackage

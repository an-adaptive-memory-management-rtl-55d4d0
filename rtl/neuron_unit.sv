// neuron_unit: one physical generalized integrate-and-fire neuron circuit,
// time-multiplexed over ENTRIES logical neurons.
//
// Per logical neuron it keeps a membrane potential v, a threshold adaptation
// a and a refractory counter r. One update per cycle (in_valid, slot idx):
//   refractory (r > 0): r -= 1, v = v_reset, the input is discarded
//   otherwise         : v' = v + I - ((v - v_rest) >>> leak_shift)
//                       (leak_shift = 0 means no leak: a perfect IF neuron)
//                       spike if v' >= theta + a; then v = v_reset,
//                       r = t_ref, a += a_inc
//   every step        : a -= a >>> a_shift (no decay if a_shift = 0)
// LIF, IF and adaptive neurons are thus reduced forms of one circuit chosen
// by the per-layer parameters in cfg. The exact equations and the shift-
// based leak are this design's choice; the source names only a generalized
// integrate-and-fire model. Neurons with active = 0 (the input layer, which
// is simulated by the host) are left untouched and never spike.
// Timing: result (out_valid, spike) one cycle after in_valid. All state is
// cleared at reset. v saturates at the 32-bit limits, a at 16 bits.
module neuron_unit
  import cynapse_pkg::*;
#(
  parameter int unsigned ENTRIES = N_NEURONS / X_UNITS,
  localparam int unsigned A_W = $clog2(ENTRIES)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       in_valid,
  input  logic [A_W-1:0]             idx,
  input  logic                       active,
  input  neuron_cfg_t                cfg,
  input  logic signed [WEIGHT_W-1:0] syn_in,
  output logic                       out_valid,
  output logic                       spike,
  output logic signed [31:0]         v_out      // potential after the update
);
  logic signed [31:0] v_mem [ENTRIES];
  logic [15:0]        a_mem [ENTRIES];
  logic [7:0]         r_mem [ENTRIES];

  logic signed [31:0] v, v_new;
  logic [15:0]        a, a_dec, a_new;
  logic [7:0]         r, r_new;
  logic signed [33:0] v_sum, thr;
  logic signed [32:0] leak;
  logic               fire;

  assign v = v_mem[idx];
  assign a = a_mem[idx];
  assign r = r_mem[idx];

  always_comb begin
    a_dec = (cfg.a_shift != '0) ? a - (a >> cfg.a_shift) : a;
    leak  = (cfg.leak_shift != '0) ? (33'(v) - 33'(cfg.v_rest)) >>> cfg.leak_shift : 33'sd0;
    v_sum = 34'(v) + 34'(syn_in) - 34'(leak);
    thr   = 34'(cfg.theta) + 34'(signed'({1'b0, a}));
    fire  = 1'b0;
    v_new = v;
    a_new = a_dec;
    r_new = r;
    if (r != '0) begin
      r_new = r - 1'b1;
      v_new = cfg.v_reset;
    end else if (v_sum >= thr) begin
      fire  = 1'b1;
      v_new = cfg.v_reset;
      r_new = cfg.t_ref;
      a_new = (17'(a_dec) + 17'(cfg.a_inc) > 17'hFFFF) ? 16'hFFFF : a_dec + cfg.a_inc;
    end else if (v_sum > 34'sh7FFFFFFF) begin
      v_new = 32'sh7FFFFFFF;
    end else if (v_sum < -34'sh80000000) begin
      v_new = 32'sh80000000;
    end else begin
      v_new = v_sum[31:0];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) begin
        v_mem[i] <= '0;
        a_mem[i] <= '0;
        r_mem[i] <= '0;
      end
      out_valid <= 1'b0;
      spike     <= 1'b0;
      v_out     <= '0;
    end else begin
      out_valid <= in_valid;
      spike     <= in_valid && active && fire;
      if (in_valid && active) begin
        v_mem[idx] <= v_new;
        a_mem[idx] <= a_new;
        r_mem[idx] <= r_new;
        v_out      <= v_new;
      end
    end
  end
endmodule

// config_regs: host-written configuration of the core and its cache policy.
//
// Written by the host processor over a simple write port (one 32-bit word per
// cycle when cfg_we). Register map (word addresses), this design's own:
//   0x00 [1:0] read-time approach (0 conservative, 1 aggressive,
//        2 intelligent)  [2] dynamic bypass enable  [3] dynamic protection
//   0x01 reuse threshold       0x02 lookahead distance (events)
//   0x03 timesteps to run      0x04 activity bypass threshold (1/1024)
//   0x05 protection window     0x06 batch length in timesteps (0: none)
//   0x07 static bypass mask    0x08 number of layers
//   0x10 + 8*l + k : layer l, k = 0 first neuron id, 1 theta, 2 v_reset,
//        3 v_rest, 4 leak_shift, 5 t_ref, 6 a_inc, 7 a_shift
// Reset values: intelligent approach, threshold 2, lookahead 64, ABT 20
// (about 2%), window 256, one layer starting at id 0, all neuron
// parameters zero.
module config_regs
  import cynapse_pkg::*;
#(
  parameter int unsigned QPTR_W = 9
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                cfg_we,
  input  logic [7:0]          cfg_addr,
  input  logic [31:0]         cfg_wdata,
  output rt_mode_e            mode,
  output logic                dyn_bypass_en,
  output logic                dyn_protect_en,
  output score_t              reuse_thr,
  output logic [QPTR_W-1:0]   lookahead,
  output ts_t                 n_timesteps,
  output logic [9:0]          abt,
  output logic [15:0]         window,
  output ts_t                 batch_len,
  output logic [N_LAYERS-1:0] static_bypass,
  output logic [LAYER_W:0]    n_layers,
  output nid_t                layer_base [N_LAYERS],
  output neuron_cfg_t         layer_cfg [N_LAYERS]
);
  logic [7:0] loff;
  layer_t     lsel;
  assign loff = cfg_addr - 8'h10;
  assign lsel = loff[3 +: LAYER_W];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode           <= RT_INTELLIGENT;
      dyn_bypass_en  <= 1'b0;
      dyn_protect_en <= 1'b0;
      reuse_thr      <= score_t'(2);
      lookahead      <= QPTR_W'(64);
      n_timesteps    <= ts_t'(1);
      abt            <= 10'd20;
      window         <= 16'd256;
      batch_len      <= '0;
      static_bypass  <= '0;
      n_layers       <= (LAYER_W+1)'(1);
      for (int l = 0; l < N_LAYERS; l++) begin
        layer_base[l] <= '0;
        layer_cfg[l]  <= '0;
      end
    end else if (cfg_we) begin
      if (cfg_addr[7:4] == 4'h0) begin
        unique case (cfg_addr[3:0])
          4'h0: begin
            mode           <= rt_mode_e'(cfg_wdata[1:0]);
            dyn_bypass_en  <= cfg_wdata[2];
            dyn_protect_en <= cfg_wdata[3];
          end
          4'h1: reuse_thr     <= cfg_wdata[SCORE_W-1:0];
          4'h2: lookahead     <= cfg_wdata[QPTR_W-1:0];
          4'h3: n_timesteps   <= cfg_wdata[TS_W-1:0];
          4'h4: abt           <= cfg_wdata[9:0];
          4'h5: window        <= cfg_wdata[15:0];
          4'h6: batch_len     <= cfg_wdata[TS_W-1:0];
          4'h7: static_bypass <= cfg_wdata[N_LAYERS-1:0];
          4'h8: n_layers      <= cfg_wdata[LAYER_W:0];
          default: ;
        endcase
      end else if (cfg_addr < 8'(16 + 8 * N_LAYERS)) begin
        unique case (cfg_addr[2:0])
          3'd0: layer_base[lsel]         <= cfg_wdata[NID_W-1:0];
          3'd1: layer_cfg[lsel].theta      <= cfg_wdata;
          3'd2: layer_cfg[lsel].v_reset    <= cfg_wdata;
          3'd3: layer_cfg[lsel].v_rest     <= cfg_wdata;
          3'd4: layer_cfg[lsel].leak_shift <= cfg_wdata[4:0];
          3'd5: layer_cfg[lsel].t_ref      <= cfg_wdata[7:0];
          3'd6: layer_cfg[lsel].a_inc      <= cfg_wdata[15:0];
          default: layer_cfg[lsel].a_shift <= cfg_wdata[4:0];
        endcase
      end
    end
  end
endmodule

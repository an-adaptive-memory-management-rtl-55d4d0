// spike_handler: spike buffer between the neuron units and the auxiliary
// queue.
//
// It takes the spike vector of one update step (up to X spikes), keeps it in
// a one-vector buffer and writes the spiking neuron ids into the auxiliary
// queue one per cycle, lowest unit first. spk_ready tells the neuron array
// that the buffer is free and no vector with spikes is arriving, so the sweep
// stalls exactly while spikes are being drained. Spike-free vectors are
// dropped at once. `idle` is high when nothing is buffered. st_spikes counts
// every internal spike written out; the sweep stalls for one cycle per spike. The buffer depth is this design's choice.
module spike_handler
  import cynapse_pkg::*;
#(
  parameter int unsigned X = X_UNITS,
  localparam int unsigned U_W = $clog2(X)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         spk_valid,
  input  logic [X-1:0] spk_vec,
  input  nid_t         spk_base,
  output logic         spk_ready,
  output logic         idle,
  output logic         aux_push,
  output nid_t         aux_id,
  output logic [31:0]  st_spikes
);
  logic [X-1:0] buf_q;
  nid_t         base_q;
  logic [U_W-1:0] low;

  always_comb begin
    low = '0;
    for (int u = X - 1; u >= 0; u--) if (buf_q[u]) low = U_W'(u);
  end

  assign idle      = buf_q == '0;
  assign spk_ready = idle && !(spk_valid && spk_vec != '0);
  assign aux_push  = !idle;
  assign aux_id    = base_q + NID_W'(low);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buf_q     <= '0;
      base_q    <= '0;
      st_spikes <= '0;
    end else begin
      if (!idle) begin
        buf_q[low] <= 1'b0;
        st_spikes  <= st_spikes + 1;
      end else if (spk_valid && spk_vec != '0) begin
        buf_q  <= spk_vec;
        base_q <= spk_base;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) spk_valid && spk_vec != '0 |-> idle);

endmodule

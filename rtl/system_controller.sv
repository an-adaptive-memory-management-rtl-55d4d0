// system_controller: timestep sequencing and barrier synchronisation.
//
// One run covers n_timesteps biological timesteps. After `start` the event
// reader warms the cache up to its lookahead distance (warm). Each timestep
// then has three phases, each ending in a barrier:
//   ROUTE_IN : dequeue and route every input event whose timestep is not
//              later than the current time; the phase ends when the head
//              belongs to a later timestep, or the queue is empty and the
//              host has sent its last event (in_last).
//   ROUTE_AUX: route the internal spikes of the previous timestep, i.e. all
//              entries that the auxiliary queue holds when the phase begins.
//   UPDATE   : sweep the neuron units; new spikes fill the auxiliary queue;
//              the phase ends when the sweep is done and the spike buffer is
//              empty.
// Then the global timer ticks. Every batch_len timesteps (if nonzero) and at
// the end of the run a batch_end pulse lets the activity monitor refresh the
// adaptive cache settings. Routing one event at a time (route_start, then
// wait for route_done) and the order input-before-internal are this design's
// choices. `done` pulses once when the run is over.
module system_controller
  import cynapse_pkg::*;
#(
  parameter int unsigned AUX_PTR_W = NID_W + 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  ts_t                  n_timesteps,
  input  ts_t                  batch_len,
  output logic                 running,
  output logic                 done,
  output ts_t                  t_now,
  // input queue
  input  logic                 in_last,
  input  logic                 head_valid,
  input  aer_t                 head_ev,
  output logic                 pop_in,
  // auxiliary queue
  input  logic [AUX_PTR_W-1:0] aux_count,
  input  nid_t                 aux_head,
  output logic                 pop_aux,
  // event reader
  input  logic                 warm,
  // router
  output logic                 route_start,
  output nid_t                 route_id,
  input  logic                 route_done,
  // neuron units and spike handler
  output logic                 nu_start,
  input  logic                 nu_done,
  input  logic                 handler_idle,
  output logic                 batch_end,
  output logic [31:0]          st_stall_cycles    // cycles waiting for input events
);
  typedef enum logic [2:0] {C_IDLE, C_WARM, C_ROUTE_IN, C_ROUTE_AUX, C_WAIT_ROUTE,
                            C_UPDATE, C_DRAIN, C_TICK} cstate_e;

  cstate_e state_q, ret_q;
  logic [AUX_PTR_W-1:0] aux_left_q;
  ts_t batch_cnt_q;
  logic nu_done_q;

  assign running = state_q != C_IDLE;

  always_comb begin
    pop_in         = 1'b0;
    pop_aux        = 1'b0;
    route_start    = 1'b0;
    route_id       = head_ev.id;
    if (state_q == C_ROUTE_IN && head_valid && head_ev.ts <= t_now) begin
      pop_in      = 1'b1;
      route_start = 1'b1;
    end else if (state_q == C_ROUTE_AUX && aux_left_q != '0) begin
      pop_aux        = 1'b1;
      route_start    = 1'b1;
      route_id       = aux_head;
    end
  end

  assign nu_start = state_q == C_UPDATE;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= C_IDLE; ret_q <= C_IDLE; aux_left_q <= '0; batch_cnt_q <= '0;
      t_now <= '0; done <= 1'b0; batch_end <= 1'b0; nu_done_q <= 1'b0;
      st_stall_cycles <= '0;
    end else begin
      done      <= 1'b0;
      batch_end <= 1'b0;
      unique case (state_q)
        C_IDLE: if (start) begin
          t_now <= '0;
          batch_cnt_q <= '0;
          state_q <= C_WARM;
        end
        C_WARM: if (warm) state_q <= C_ROUTE_IN;
        C_ROUTE_IN: begin
          if (route_start) begin
            ret_q   <= C_ROUTE_IN;
            state_q <= C_WAIT_ROUTE;
          end else if ((head_valid && head_ev.ts > t_now) || (!head_valid && in_last)) begin
            aux_left_q <= aux_count;
            state_q    <= C_ROUTE_AUX;
          end else begin
            st_stall_cycles <= st_stall_cycles + 1;
          end
        end
        C_ROUTE_AUX: begin
          if (route_start) begin
            aux_left_q <= aux_left_q - 1'b1;
            ret_q      <= C_ROUTE_AUX;
            state_q    <= C_WAIT_ROUTE;
          end else begin
            state_q <= C_UPDATE;
          end
        end
        C_WAIT_ROUTE: if (route_done) state_q <= ret_q;
        C_UPDATE: begin
          nu_done_q <= 1'b0;
          state_q   <= C_DRAIN;
        end
        C_DRAIN: begin
          if (nu_done) nu_done_q <= 1'b1;
          if ((nu_done || nu_done_q) && handler_idle) state_q <= C_TICK;
        end
        default: begin // C_TICK
          t_now <= t_now + 1'b1;
          if (batch_len != '0 && batch_cnt_q + 1'b1 == batch_len) begin
            batch_end   <= 1'b1;
            batch_cnt_q <= '0;
          end else begin
            batch_cnt_q <= batch_cnt_q + 1'b1;
          end
          if (t_now + 1'b1 >= n_timesteps) begin
            batch_end <= 1'b1;
            done      <= 1'b1;
            state_q   <= C_IDLE;
          end else begin
            state_q <= C_ROUTE_IN;
          end
        end
      endcase
    end
  end
endmodule

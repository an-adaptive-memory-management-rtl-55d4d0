// aux_queue: auxiliary queue of internal spikes.
//
// Every spike produced by the neuron units during the update phase of
// timestep t is written here by the spike handler and routed during
// timestep t+1. It only needs neuron ids: the timestep is implied. Its depth
// is N, since a neuron fires at most once per timestep, so it cannot
// overflow. Plain FIFO: push/pop act at the clock edge, head_id is a
// combinational read, count is the fill level.
module aux_queue
  import cynapse_pkg::*;
#(
  parameter int unsigned DEPTH = N_NEURONS,
  localparam int unsigned PTR_W = $clog2(DEPTH) + 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push,
  input  nid_t             push_id,
  input  logic             pop,
  output nid_t             head_id,
  output logic [PTR_W-1:0] count
);
  nid_t mem [DEPTH];
  logic [PTR_W-1:0] rd_ptr, wr_ptr;

  assign count   = wr_ptr - rd_ptr;
  assign head_id = mem[rd_ptr[PTR_W-2:0]];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
    end else begin
      if (push) wr_ptr <= wr_ptr + 1'b1;
      if (pop)  rd_ptr <= rd_ptr + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr[PTR_W-2:0]] <= push_id;
  end

  assert property (@(posedge clk) disable iff (!rst_n) pop |-> count != '0);
  assert property (@(posedge clk) disable iff (!rst_n) push |-> count != PTR_W'(DEPTH));

endmodule

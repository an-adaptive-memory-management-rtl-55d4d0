// aer_event_queue: input event queue of AER packets (timestep, neuron id).
//
// Packets stream in from the host in non-decreasing timestep order, so the
// priority queue reduces to a FIFO whose head is compared with the current
// biological time by the controller (the head is routed when its timestep
// has been reached). Besides the usual push/pop it offers a second read port,
// the peek port, through which the event reader reads events ahead of the
// head ("read-time") long before they are dequeued ("route-time"). Pointers
// are absolute, one bit wider than the index, so that the reader can measure
// its distance from the head; the reader uses rd_ptr/wr_ptr for that.
// Timing: push and pop take effect at the clock edge; head and peek data are
// combinational reads of the storage. Depth 256 is this design's choice.
module aer_event_queue
  import cynapse_pkg::*;
#(
  parameter int unsigned DEPTH = 256,
  localparam int unsigned PTR_W = $clog2(DEPTH) + 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // host stream
  input  logic             in_valid,
  output logic             in_ready,
  input  aer_t             in_ev,
  // route-time side
  input  logic             pop,
  output logic             head_valid,
  output aer_t             head_ev,
  // read-time side
  output logic [PTR_W-1:0] rd_ptr,
  output logic [PTR_W-1:0] wr_ptr,
  input  logic [PTR_W-1:0] peek_ptr,
  output aer_t             peek_ev
);
  aer_t mem [DEPTH];
  logic [PTR_W-1:0] count;

  assign count      = wr_ptr - rd_ptr;
  assign in_ready   = count != PTR_W'(DEPTH);
  assign head_valid = count != '0;
  assign head_ev    = mem[rd_ptr[PTR_W-2:0]];
  assign peek_ev    = mem[peek_ptr[PTR_W-2:0]];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
    end else begin
      if (in_valid && in_ready) wr_ptr <= wr_ptr + 1'b1;
      if (pop && head_valid)    rd_ptr <= rd_ptr + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid && in_ready) mem[wr_ptr[PTR_W-2:0]] <= in_ev;
  end

  // a pop of an empty queue is a controller error
  assert property (@(posedge clk) disable iff (!rst_n) pop |-> head_valid);

endmodule

// dendrite_sram: dendritic tree of one physical neuron unit.
//
// Holds the synaptic input accumulated during the routing phase for each of
// the ENTRIES logical neurons that the unit serves (N/X of them). The router
// adds a signed weight per synapse event (acc_we; the sum saturates at the
// 32-bit limits); during the update phase the neuron unit reads an entry and
// clears it in the same cycle (rd_clr), so the tree starts empty for the next
// timestep. Asynchronous read, writes at the clock edge; the two phases never
// overlap, and a write in the same cycle as a clear of the same entry keeps
// the clear. Cleared at reset.
module dendrite_sram
  import cynapse_pkg::*;
#(
  parameter int unsigned ENTRIES = N_NEURONS / X_UNITS,
  localparam int unsigned A_W = $clog2(ENTRIES)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        acc_we,
  input  logic [A_W-1:0]              acc_addr,
  input  logic signed [WEIGHT_W-1:0]  acc_w,
  input  logic [A_W-1:0]              rd_addr,
  input  logic                        rd_clr,
  output logic signed [WEIGHT_W-1:0]  rd_data
);
  localparam logic signed [WEIGHT_W-1:0] MAXV = {1'b0, {(WEIGHT_W-1){1'b1}}};
  localparam logic signed [WEIGHT_W-1:0] MINV = {1'b1, {(WEIGHT_W-1){1'b0}}};

  logic signed [WEIGHT_W-1:0] mem [ENTRIES];
  logic signed [WEIGHT_W:0]   sum;

  assign rd_data = mem[rd_addr];
  assign sum = {mem[acc_addr][WEIGHT_W-1], mem[acc_addr]} + {acc_w[WEIGHT_W-1], acc_w};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) mem[i] <= '0;
    end else begin
      if (acc_we) begin
        if (sum[WEIGHT_W] != sum[WEIGHT_W-1]) mem[acc_addr] <= sum[WEIGHT_W] ? MINV : MAXV;
        else                                  mem[acc_addr] <= sum[WEIGHT_W-1:0];
      end
      if (rd_clr) mem[rd_addr] <= '0;
    end
  end
endmodule

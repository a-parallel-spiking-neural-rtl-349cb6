// snn_neuron_mem: neuron state and parameter tables of one CAL unit.
//
// Two small RAMs of C entries, as distributed RAM: the state table holds
// (u, v) of each neuron and the parameter table holds (ab, 1-a, c, d). Both
// are read asynchronously at the CAL unit's counter, so a neuron's record is
// available in the cycle it is addressed. The state table has one write
// port shared by the neuron update pipeline (write-back during the CAL
// phase) and by the host (loading initial states); the parameter table is
// written only by the host. Keeping states and parameters in distributed
// RAM follows the document; the port arrangement is this design's own.
//
// Timing: writes take effect at the clock edge; reads are combinational.
// Contents are not reset: they must be loaded before the first timestep.
module snn_neuron_mem
  import snn_pkg::*;
#(
  parameter int unsigned C  = 25,
  parameter int unsigned IW = (C > 1) ? $clog2(C) : 1
) (
  input  logic          clk,
  input  logic [IW-1:0] raddr,
  output neuron_state_t state_rd,
  output neuron_param_t param_rd,
  input  logic          state_we,
  input  logic [IW-1:0] state_waddr,
  input  neuron_state_t state_wdata,
  input  logic          param_we,
  input  logic [IW-1:0] param_waddr,
  input  neuron_param_t param_wdata
);

  neuron_state_t state_tab [C];
  neuron_param_t param_tab [C];

  always_ff @(posedge clk) begin
    if (state_we) state_tab[state_waddr] <= state_wdata;
    if (param_we) param_tab[param_waddr] <= param_wdata;
  end

  assign state_rd = state_tab[raddr];
  assign param_rd = param_tab[raddr];

endmodule

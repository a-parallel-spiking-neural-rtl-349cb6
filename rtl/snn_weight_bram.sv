// snn_weight_bram: one synaptic weight Block RAM of an ACC unit.
//
// The RAM has N words, one per source neuron j. Each word packs the 9-bit
// weights W[i0, j] and W[i1, j] of the two target neurons i0, i1 that share
// the RAM, so a single read returns the weights of both neurons for a fired
// neuron j (18 bits, the width of a Virtex-5 18 Kbit Block RAM port). Two
// weights per RAM follows the document's figure of the ACC unit.
//
// Interface and timing: the read is synchronous with one cycle of latency
// (rdata is valid the cycle after raddr). The write port is used only to load
// weights; `wlane` selects which of the two 9-bit weights of word `waddr` is
// written. The array is not reset: it is loaded before use.
module snn_weight_bram
  import snn_pkg::*;
#(
  parameter int unsigned N  = 800,
  parameter int unsigned AW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output weight_t       rdata [2],
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic          wlane,
  input  weight_t       wdata
);

  logic [2*WW-1:0] mem [N];

  always_ff @(posedge clk) begin
    if (we) begin
      if (wlane) mem[waddr][2*WW-1:WW] <= wdata;
      else       mem[waddr][WW-1:0]    <= wdata;
    end
    if (re) begin
      rdata[0] <= weight_t'(mem[raddr][WW-1:0]);
      rdata[1] <= weight_t'(mem[raddr][2*WW-1:WW]);
    end
  end

endmodule

// snn_lod: leading ones detector of one processing element.
//
// The detector holds a C-bit copy x of the neuron fired pattern f^k. Each
// call returns the index of the lowest set bit of x and clears that bit, so
// successive calls step through every neuron that fired; when x is empty the
// detector reports e (empty = 1). The lowest set bit is isolated as
// z = x & -x and encoded in one cycle, as in the document's algorithm; for
// C = 6 and x = 6'b011001 successive calls return 0, 3, 4, e.
//
// Interface and timing: `load` copies `vec` into x at the clock edge.
// `idx` and `empty` are combinational functions of x. A `pop` clears the
// reported bit at the clock edge, so the next index is visible in the next
// cycle. `load` takes priority over `pop`. The register clears on reset.
module snn_lod #(
  parameter int unsigned C  = 25,
  parameter int unsigned IW = (C > 1) ? $clog2(C) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  logic [C-1:0]  vec,
  input  logic          pop,
  output logic [IW-1:0] idx,
  output logic          empty
);

  logic [C-1:0] x;
  logic [C-1:0] z;

  // isolate the lowest set bit
  assign z     = x & (~x + C'(1));
  assign empty = (x == '0);

  always_comb begin
    idx = '0;
    for (int unsigned i = 0; i < C; i++)
      if (z[i]) idx = IW'(i);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    x <= '0;
    else if (load) x <= vec;
    else if (pop)  x <= x & ~z;
  end

endmodule

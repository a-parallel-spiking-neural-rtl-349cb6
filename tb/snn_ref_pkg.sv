// snn_ref_pkg: reference model of the neuron arithmetic for the testbenches.
//
// Computes the Izhikevich update of one neuron in plain integer arithmetic,
// written independently of the RTL: numbers are integers in units of 2^-8,
// every intermediate result is clamped to the 18-bit range, and products are
// rounded towards minus infinity with an explicit floor division. Stage
// order and the constants (140, 0.04 as 5243/2^17, threshold 30) are those of
// the design's specification.
package snn_ref_pkg;

  localparam longint LIM_HI = 131071;
  localparam longint LIM_LO = -131072;

  function automatic longint clamp(input longint x);
    if (x > LIM_HI) return LIM_HI;
    if (x < LIM_LO) return LIM_LO;
    return x;
  endfunction

  // floor(x / d) for d > 0
  function automatic longint floor_div(input longint x, input longint d);
    longint q;
    q = x / d;
    if ((x % d) != 0 && x < 0) q = q - 1;
    return q;
  endfunction

  // one neuron update; values in units of 2^-8
  function automatic void neuron_update(
    input  longint i_in, input longint u, input longint v,
    input  longint ab, input longint oma, input longint c, input longint d,
    output longint u_new, output longint v_new, output bit spike);
    longint t, p, sq, lin, vd, u1, u2, uo;
    t   = clamp(i_in - u + 140 * 256);
    p   = clamp(floor_div(v * 5243, 131072));
    sq  = clamp(floor_div(p * v, 256));
    lin = clamp(t + 6 * v);
    vd  = clamp(sq + lin);
    u1  = clamp(floor_div(ab * vd, 256));
    u2  = clamp(floor_div(oma * u, 256));
    uo  = clamp(u1 + u2);
    spike = (vd >= 30 * 256);
    if (spike) begin
      v_new = c;
      u_new = clamp(uo + d);
    end else begin
      v_new = vd;
      u_new = uo;
    end
  endfunction

endpackage

// snn_pkg: number formats, record types and saturating arithmetic shared by
// the spiking neural network simulator.
//
// All neuron quantities are 18-bit two's complement fixed point numbers with
// a sign bit, 9 integer bits and 8 fractional bits (Q9.8), and synaptic
// weights are 9-bit two's complement fractions with 8 fractional bits. Both
// formats follow the document. A weight therefore has the same LSB weight as
// a neuron quantity and joins an accumulator by plain sign extension.
//
// This design's own choices: every arithmetic result that is stored in an
// 18-bit register saturates to the Q9.8 range instead of wrapping, products
// are truncated (floor) back to 8 fractional bits, and the constant 0.04 of
// the membrane equation is held with 17 fractional bits so that it is not
// rounded to 10/256.
package snn_pkg;

  localparam int unsigned WL   = 18;  // neuron word length
  localparam int unsigned FRAC = 8;   // fractional bits of a neuron word
  localparam int unsigned WW   = 9;   // synaptic weight width

  typedef logic signed [WL-1:0] fix_t;
  typedef logic signed [WW-1:0] weight_t;

  localparam fix_t FIX_MAX = fix_t'(2**(WL-1) - 1);
  localparam fix_t FIX_MIN = fix_t'(-(2**(WL-1)));

  // Constants of equation (2) and (3)
  localparam fix_t CONST_140       = fix_t'(140 * 2**FRAC);
  localparam fix_t CONST_THRESHOLD = fix_t'(30 * 2**FRAC);
  localparam int unsigned K004_FRAC = 17;
  localparam logic signed [WL-1:0] CONST_0P04 = 18'sd5243;  // round(0.04 * 2^17)

  // State of one neuron (Izhikevich u and v)
  typedef struct packed {
    fix_t u;
    fix_t v;
  } neuron_state_t;

  // Stored parameters of one neuron: ab and 1-a replace a and b
  typedef struct packed {
    fix_t ab;
    fix_t one_minus_a;
    fix_t c;
    fix_t d;
  } neuron_param_t;

  // Target of a configuration write from the host
  typedef enum logic [1:0] {
    CFG_WEIGHT = 2'd0,
    CFG_PARAM  = 2'd1,
    CFG_STATE  = 2'd2,
    CFG_SPIKE  = 2'd3
  } cfg_kind_t;

  // Saturate a wide signed value to the Q9.8 range
  function automatic fix_t sat(input logic signed [47:0] x);
    if (x > 48'(signed'(FIX_MAX))) return FIX_MAX;
    if (x < 48'(signed'(FIX_MIN))) return FIX_MIN;
    return fix_t'(x);
  endfunction

  // Saturating sum of two Q9.8 numbers
  function automatic fix_t sat_add(input fix_t a, input fix_t b);
    return sat(48'(a) + 48'(b));
  endfunction

  // Q9.8 times Q9.8, truncated back to Q9.8 and saturated
  function automatic fix_t fix_mul(input fix_t a, input fix_t b);
    logic signed [47:0] p;
    p = 48'(a) * 48'(b);
    return sat(p >>> FRAC);
  endfunction

  // Weight sign-extended to Q9.8
  function automatic fix_t weight_to_fix(input weight_t w);
    return fix_t'(w);
  endfunction

endpackage

// snn_neuron_pipeline: Izhikevich neuron update, six pipeline stages.
//
// One neuron enters per cycle with its accumulated synaptic input I, its
// state (u, v) and its parameters (ab, 1-a, c, d); six cycles later the new
// state and the spike bit leave. With a timestep of 1 ms (forward Euler,
// dt = 1) the update is
//   v' = v + 0.04 v^2 + 5 v + 140 - u + I = 0.04 v^2 + 6 v + (140 - u + I)
//   u' = (ab) v' + (1 - a) u
//   if v' >= 30: v' <- c, u' <- u' + d, spike = 1
// Storing ab and 1-a instead of a and b, using the new v for u, and the
// stage contents below follow the document's datapath figure:
//   stage 1  t = I - u + 140          0.04 v
//   stage 2  0.04 v * v               t + 6 v      (both named v_diff1)
//   stage 3  v_diff = sum of the two
//   stage 4  u_out1 = ab * v_diff     u_out2 = (1-a) * u     fired = v_diff >= 30
//   stage 5  u_out = u_out1 + u_out2
//   stage 6  v_new, u_new from the reset multiplexers
// 6 v is a shift-and-add (4v + 2v). The four variable products and the
// 0.04 v constant product are the design's five multiplications.
//
// Number format: Q9.8 throughout (see snn_pkg). This design's own choices:
// each stage result saturates to the Q9.8 range, products truncate, 0.04 is
// held with 17 fractional bits, and the threshold test is v' >= 30 as in the
// document's reset equation (its figure prints "> 30").
//
// Timing: inputs are sampled when `in_valid` is high; `out_valid` and the
// outputs follow exactly 6 clock cycles later. No stall: one neuron per cycle.
module snn_neuron_pipeline
  import snn_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  fix_t          acc_in,
  input  neuron_state_t state_in,
  input  neuron_param_t param_in,
  output logic          out_valid,
  output neuron_state_t state_out,
  output logic          spike_out
);

  localparam int unsigned LATENCY = 6;

  logic [LATENCY-1:0] vld;

  // stage 1
  fix_t s1_t, s1_v004, s1_v, s1_u;
  neuron_param_t s1_p;
  // stage 2
  fix_t s2_sq, s2_lin, s2_u;
  neuron_param_t s2_p;
  // stage 3
  fix_t s3_vdiff, s3_u;
  neuron_param_t s3_p;
  // stage 4
  fix_t s4_uout1, s4_uout2, s4_vdiff, s4_c, s4_d;
  logic s4_fired;
  // stage 5
  fix_t s5_uout, s5_vdiff, s5_c, s5_d;
  logic s5_fired;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld <= '0;
    else        vld <= {vld[LATENCY-2:0], in_valid};
  end

  // Datapath registers carry no reset; the valid chain qualifies them.
  always_ff @(posedge clk) begin
    // stage 1
    s1_t    <= sat(48'(acc_in) - 48'(state_in.u) + 48'(CONST_140));
    s1_v004 <= sat((48'(state_in.v) * 48'(CONST_0P04)) >>> K004_FRAC);
    s1_v    <= state_in.v;
    s1_u    <= state_in.u;
    s1_p    <= param_in;
    // stage 2
    s2_sq   <= fix_mul(s1_v004, s1_v);
    s2_lin  <= sat(48'(s1_t) + (48'(s1_v) <<< 2) + (48'(s1_v) <<< 1));
    s2_u    <= s1_u;
    s2_p    <= s1_p;
    // stage 3
    s3_vdiff <= sat_add(s2_sq, s2_lin);
    s3_u     <= s2_u;
    s3_p     <= s2_p;
    // stage 4
    s4_uout1 <= fix_mul(s3_p.ab, s3_vdiff);
    s4_uout2 <= fix_mul(s3_p.one_minus_a, s3_u);
    s4_fired <= (s3_vdiff >= CONST_THRESHOLD);
    s4_vdiff <= s3_vdiff;
    s4_c     <= s3_p.c;
    s4_d     <= s3_p.d;
    // stage 5
    s5_uout  <= sat_add(s4_uout1, s4_uout2);
    s5_fired <= s4_fired;
    s5_vdiff <= s4_vdiff;
    s5_c     <= s4_c;
    s5_d     <= s4_d;
    // stage 6
    state_out.v <= s5_fired ? s5_c : s5_vdiff;
    state_out.u <= s5_fired ? sat_add(s5_uout, s5_d) : s5_uout;
    spike_out   <= s5_fired;
  end

  assign out_valid = vld[LATENCY-1];

endmodule

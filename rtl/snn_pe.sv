// snn_pe: processing element k of the ring, handling neurons C*k .. C*k+C-1.
//
// A PE holds the fired pattern f^k of its C neurons, a leading ones
// detector over it, an ACC unit with the weight tables of its neurons and a
// CAL unit with their states and parameters. In the ACC phase the detector
// feeds the fired neurons of this PE into the ring and the ACC unit adds the
// weights of every fired neuron passing by. In the CAL phase the CAL unit
// reads the accumulated inputs, updates the neurons and writes each new
// spike bit back into f^k, which becomes the detector's input in the next
// timestep. The composition follows the document's datapath figure.
//
// Interface: control from the timestep controller (`acc_clear`, `acc_en`,
// `cal_start`), the ring of relative addresses to and from the neighbours,
// the detector's e flag, and host ports to load weights, parameters, states
// and the fired pattern (`cfg_*`, only while idle) and to read a state.
// `acc_clear` also copies f^k into the detector.
module snn_pe
  import snn_pkg::*;
#(
  parameter int unsigned K     = 32,
  parameter int unsigned C     = 25,
  parameter int unsigned PE_ID = 0,
  parameter int unsigned N     = K * C,
  parameter int unsigned AW    = (N > 1) ? $clog2(N) : 1,
  parameter int unsigned IW    = (C > 1) ? $clog2(C) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // control
  input  logic          acc_clear,
  input  logic          acc_en,
  input  logic          cal_start,
  output logic          lod_empty,
  output logic          cal_done,
  // ring
  input  logic          ring_in_valid,
  input  logic [IW-1:0] ring_in_rel,
  output logic          ring_out_valid,
  output logic [IW-1:0] ring_out_rel,
  // fired pattern of this PE's neurons
  output logic [C-1:0]  spikes,
  // host access
  input  logic          cfg_we,
  input  cfg_kind_t     cfg_kind,
  input  logic [IW-1:0] cfg_idx,
  input  logic [AW-1:0] cfg_src,
  input  weight_t       cfg_weight,
  input  neuron_param_t cfg_param,
  input  neuron_state_t cfg_state,
  input  logic          cfg_spike,
  output neuron_state_t rd_state
);

  logic [C-1:0]  f;
  logic [IW-1:0] lod_idx, acc_sel, spike_idx;
  logic          lod_pop, spike_we, spike_bit, cal_busy;
  fix_t          acc_val;

  snn_lod #(.C(C), .IW(IW)) u_lod (
    .clk   (clk),
    .rst_n (rst_n),
    .load  (acc_clear),
    .vec   (f),
    .pop   (lod_pop),
    .idx   (lod_idx),
    .empty (lod_empty)
  );

  snn_acc_unit #(.K(K), .C(C), .PE_ID(PE_ID), .N(N), .AW(AW), .IW(IW)) u_acc (
    .clk            (clk),
    .rst_n          (rst_n),
    .clear          (acc_clear),
    .en             (acc_en),
    .lod_idx        (lod_idx),
    .lod_empty      (lod_empty),
    .lod_pop        (lod_pop),
    .ring_in_valid  (ring_in_valid),
    .ring_in_rel    (ring_in_rel),
    .ring_out_valid (ring_out_valid),
    .ring_out_rel   (ring_out_rel),
    .acc_sel        (acc_sel),
    .acc_out        (acc_val),
    .w_we           (cfg_we && cfg_kind == CFG_WEIGHT),
    .w_src          (cfg_src),
    .w_idx          (cfg_idx),
    .w_data         (cfg_weight)
  );

  snn_cal_unit #(.C(C), .IW(IW)) u_cal (
    .clk              (clk),
    .rst_n            (rst_n),
    .start            (cal_start),
    .busy             (cal_busy),
    .done             (cal_done),
    .acc_sel          (acc_sel),
    .acc_val          (acc_val),
    .spike_we         (spike_we),
    .spike_idx        (spike_idx),
    .spike_bit        (spike_bit),
    .host_state_we    (cfg_we && cfg_kind == CFG_STATE),
    .host_param_we    (cfg_we && cfg_kind == CFG_PARAM),
    .host_idx         (cfg_idx),
    .host_state_wdata (cfg_state),
    .host_param_wdata (cfg_param),
    .host_state_rdata (rd_state)
  );

  // fired pattern register f^k
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      f <= '0;
    else if (spike_we)
      f[spike_idx] <= spike_bit;
    else if (!cal_busy && cfg_we && cfg_kind == CFG_SPIKE)
      f[cfg_idx] <= cfg_spike;
  end

  assign spikes = f;

endmodule

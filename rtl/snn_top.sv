// snn_top: event-driven simulator of a fully connected network of N = K*C
// Izhikevich neurons.
//
// K processing elements (PEs) form a unidirectional ring, PE k passing to
// PE k+1 and PE K-1 back to PE 0; each PE handles C neurons. Per timestep,
// the ACC phase adds the synaptic weights of the neurons that fired in the
// previous timestep into the inputs of all neurons, touching only fired
// neurons: in each pass every PE's leading ones detector contributes one
// fired neuron, which visits all K PEs in K cycles. The phase ends when the
// AND of the K detectors' e (empty) flags is 1. The CAL phase then updates
// every neuron with the Izhikevich model in all PEs at once. A timestep whose
// busiest PE holds A fired neurons takes K*A + C + 8 cycles.
// The ring, the detectors, the AND of their e flags and the defaults
// K = 32, C = 25 (800 neurons) follow the document.
//
// Interface (this design's own): `start` runs one timestep; `done` pulses in
// its last cycle; `spikes[i]` is the spike output of neuron i from the last
// timestep, and `passes` the number of ACC passes it took. While idle, the
// host loads the network with `cfg_we`: `cfg_kind` selects a weight
// W[C*cfg_pe + cfg_idx, cfg_src], the parameters or the state of neuron
// C*cfg_pe + cfg_idx, or its spike bit (to seed activity). `rd_state` is
// the state of neuron C*cfg_pe + cfg_idx (combinational). Reset is
// asynchronous and active low; memories are not reset.
module snn_top
  import snn_pkg::*;
#(
  parameter int unsigned K  = 32,
  parameter int unsigned C  = 25,
  parameter int unsigned N  = K * C,
  parameter int unsigned AW = (N > 1) ? $clog2(N) : 1,
  parameter int unsigned IW = (C > 1) ? $clog2(C) : 1,
  parameter int unsigned KW = (K > 1) ? $clog2(K) : 1,
  parameter int unsigned PW = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic          busy,
  output logic          done,
  output logic [PW-1:0] passes,
  output logic [N-1:0]  spikes,
  input  logic          cfg_we,
  input  cfg_kind_t     cfg_kind,
  input  logic [KW-1:0] cfg_pe,
  input  logic [IW-1:0] cfg_idx,
  input  logic [AW-1:0] cfg_src,
  input  weight_t       cfg_weight,
  input  neuron_param_t cfg_param,
  input  neuron_state_t cfg_state,
  input  logic          cfg_spike,
  output neuron_state_t rd_state
);

  logic          acc_clear, acc_en, cal_start;
  logic [K-1:0]  lod_empty, cal_done;
  logic          ring_valid [K];
  logic [IW-1:0] ring_rel   [K];
  neuron_state_t pe_state   [K];

  snn_ctrl #(.K(K), .PW(PW)) u_ctrl (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (start),
    .all_empty (&lod_empty),
    .cal_done  (cal_done[0]),
    .acc_clear (acc_clear),
    .acc_en    (acc_en),
    .cal_start (cal_start),
    .busy      (busy),
    .done      (done),
    .passes    (passes)
  );

  for (genvar k = 0; k < K; k++) begin : g_pe
    localparam int unsigned UP = (k == 0) ? K - 1 : k - 1;

    snn_pe #(.K(K), .C(C), .PE_ID(k), .N(N), .AW(AW), .IW(IW)) u_pe (
      .clk            (clk),
      .rst_n          (rst_n),
      .acc_clear      (acc_clear),
      .acc_en         (acc_en),
      .cal_start      (cal_start),
      .lod_empty      (lod_empty[k]),
      .cal_done       (cal_done[k]),
      .ring_in_valid  (ring_valid[UP]),
      .ring_in_rel    (ring_rel[UP]),
      .ring_out_valid (ring_valid[k]),
      .ring_out_rel   (ring_rel[k]),
      .spikes         (spikes[C*k +: C]),
      .cfg_we         (cfg_we && !busy && cfg_pe == KW'(k)),
      .cfg_kind       (cfg_kind),
      .cfg_idx        (cfg_idx),
      .cfg_src        (cfg_src),
      .cfg_weight     (cfg_weight),
      .cfg_param      (cfg_param),
      .cfg_state      (cfg_state),
      .cfg_spike      (cfg_spike),
      .rd_state       (pe_state[k])
    );
  end

  assign rd_state = pe_state[cfg_pe];

  // all CAL units run in lockstep
  a_cal_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
    cal_done[0] |-> &cal_done);

endmodule

// snn_cal_unit: neuron update (CAL) unit of one processing element.
//
// During the CAL phase a counter runs from 0 to C-1 and walks through the
// PE's C neurons, one per cycle: it selects the neuron's accumulator in the
// ACC unit, and it addresses the state and parameter tables, whose records go
// with the accumulator value into the six-stage update pipeline. The new
// (u, v) from the pipeline is written back into the state table at the
// address "counter minus 6", since the pipeline delays it by six cycles, and
// the neuron's spike bit is reported for the PE's fired pattern register.
// This structure follows the document; the counter keeps running to C+5 so
// that the last write-back happens, and then the unit signals `done`.
//
// Interface and timing: `start` (one cycle) begins the phase in the next
// cycle; the phase lasts C+6 cycles and `done` is high in its last cycle.
// While idle, the host may load states and parameters and read states
// through `host_*` (reads are combinational).
module snn_cal_unit
  import snn_pkg::*;
#(
  parameter int unsigned C  = 25,
  parameter int unsigned IW = (C > 1) ? $clog2(C) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic          busy,
  output logic          done,
  // ACC unit
  output logic [IW-1:0] acc_sel,
  input  fix_t          acc_val,
  // spike bits to the fired pattern register
  output logic          spike_we,
  output logic [IW-1:0] spike_idx,
  output logic          spike_bit,
  // host access while idle
  input  logic          host_state_we,
  input  logic          host_param_we,
  input  logic [IW-1:0] host_idx,
  input  neuron_state_t host_state_wdata,
  input  neuron_param_t host_param_wdata,
  output neuron_state_t host_state_rdata
);

  localparam int unsigned LAT = 6;
  localparam int unsigned CW  = $clog2(C + LAT);

  logic [CW-1:0]  cnt;
  logic [IW-1:0]  raddr;
  logic [IW-1:0]  wb_addr;
  neuron_state_t  state_rd, pipe_state;
  neuron_param_t  param_rd;
  logic           pipe_valid, pipe_spike;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      cnt  <= '0;
    end else if (!busy) begin
      busy <= start;
      cnt  <= '0;
    end else begin
      if (cnt == CW'(C + LAT - 1)) busy <= 1'b0;
      cnt <= cnt + 1'b1;
    end
  end

  assign done    = busy && (cnt == CW'(C + LAT - 1));
  assign acc_sel = IW'(cnt);
  assign raddr   = busy ? IW'(cnt) : host_idx;
  assign wb_addr = IW'(cnt - CW'(LAT));

  snn_neuron_mem #(.C(C), .IW(IW)) u_mem (
    .clk         (clk),
    .raddr       (raddr),
    .state_rd    (state_rd),
    .param_rd    (param_rd),
    .state_we    (pipe_valid || (!busy && host_state_we)),
    .state_waddr (pipe_valid ? wb_addr : host_idx),
    .state_wdata (pipe_valid ? pipe_state : host_state_wdata),
    .param_we    (!busy && host_param_we),
    .param_waddr (host_idx),
    .param_wdata (host_param_wdata)
  );

  snn_neuron_pipeline u_pipe (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (busy && (cnt < CW'(C))),
    .acc_in    (acc_val),
    .state_in  (state_rd),
    .param_in  (param_rd),
    .out_valid (pipe_valid),
    .state_out (pipe_state),
    .spike_out (pipe_spike)
  );

  assign spike_we         = pipe_valid;
  assign spike_idx        = wb_addr;
  assign spike_bit        = pipe_spike;
  assign host_state_rdata = state_rd;

  // the pipeline result must land on the neuron the counter read six cycles earlier
  a_wb_in_phase: assert property (@(posedge clk) disable iff (!rst_n)
    pipe_valid |-> busy && cnt >= CW'(LAT));

endmodule

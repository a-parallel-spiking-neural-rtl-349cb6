// snn_ctrl: timestep controller of the simulator.
//
// A timestep has two phases. The ACC phase starts with one set-up cycle in
// which every PE copies its fired pattern into its leading ones detector and
// clears its accumulators. It then runs passes of K steps: at the first step
// of each pass every detector hands out one fired neuron (or e), and during
// the K steps these neurons travel once round the ring. Before each pass the
// controller looks at the AND of the K detectors' e flags; when all are
// empty the ACC phase ends and that check cycle also lets the last weight
// reads land in the accumulators. The CAL phase then updates all neurons of
// all PEs in parallel and ends when the CAL units report done.
// The phases, the passes of K cycles and the AND of the e flags follow the
// document; the document does not show its state machine, so the states and
// the single set-up and check cycles are this design's own.
//
// Timing: `start` is taken in IDLE. A timestep with A passes takes
// 1 + K*A + 1 cycles of ACC phase and C + 6 cycles of CAL phase; `done` is
// high in the last cycle. `passes` holds the number of passes of the last
// ACC phase.
module snn_ctrl #(
  parameter int unsigned K  = 32,
  parameter int unsigned PW = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          all_empty,
  input  logic          cal_done,
  output logic          acc_clear,
  output logic          acc_en,
  output logic          cal_start,
  output logic          busy,
  output logic          done,
  output logic [PW-1:0] passes
);

  localparam int unsigned SW = (K > 1) ? $clog2(K) : 1;

  typedef enum logic [1:0] {
    S_IDLE     = 2'd0,
    S_ACC_INIT = 2'd1,
    S_ACC_RUN  = 2'd2,
    S_CAL      = 2'd3
  } state_t;

  state_t        state, state_nx;
  logic [SW-1:0] step;

  always_comb begin
    state_nx  = state;
    acc_clear = 1'b0;
    acc_en    = 1'b0;
    cal_start = 1'b0;
    done      = 1'b0;
    unique case (state)
      S_IDLE:     if (start) state_nx = S_ACC_INIT;
      S_ACC_INIT: begin
        acc_clear = 1'b1;
        state_nx  = S_ACC_RUN;
      end
      S_ACC_RUN: begin
        if (step == '0 && all_empty) begin
          cal_start = 1'b1;
          state_nx  = S_CAL;
        end else begin
          acc_en = 1'b1;
        end
      end
      S_CAL: if (cal_done) begin
        done     = 1'b1;
        state_nx = S_IDLE;
      end
      default: state_nx = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      step   <= '0;
      passes <= '0;
    end else begin
      state <= state_nx;
      if (acc_clear) begin
        step   <= '0;
        passes <= '0;
      end else if (acc_en) begin
        step <= (step == SW'(K - 1)) ? '0 : step + 1'b1;
        if (step == '0) passes <= passes + 1'b1;
      end
    end
  end

  assign busy = (state != S_IDLE);

endmodule

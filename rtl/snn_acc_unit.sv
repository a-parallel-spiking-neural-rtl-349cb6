// snn_acc_unit: synapse weight accumulator (ACC unit) of processing element k.
//
// During the ACC phase the unit adds, for every fired neuron j that reaches
// it, the column W[i, j] of its C neurons i to their input accumulators I_i.
// The weights of the C neurons sit in ceil(C/2) Block RAMs of N words, two
// neurons per RAM, addressed by the absolute number j of the fired neuron.
//
// A pass of the ring lasts K steps. A step counter (reset by `clear`, wrapping
// at K) selects the address source: in step 0 the relative index from this
// PE's leading ones detector, in steps 1..K-1 the relative index that the
// neighbouring PE k-1 used one step earlier. The index used in a step is
// registered and passed on to PE k+1. Only the relative index (0..C-1, plus
// a valid bit that is 0 for e) travels round the ring; the absolute number
// j = relative + C*source_pe is formed with an offset that each PE predicts
// locally: it starts at C*k and steps down by C (modulo N) every step. All of
// this follows the document. The selected accumulator is driven to the CAL
// unit through a multiplexer controlled by the CAL unit's counter.
//
// Timing: the RAM read takes one cycle, so the weights addressed in a step
// are added at the end of the next cycle; the accumulators are final one
// cycle after the last step. `clear` (one cycle, before the first pass)
// zeroes the accumulators, the counter and the ring register. Accumulation
// saturates at the Q9.8 range (this design's choice).
// Weight loading: `w_we` writes weight `w_data` = W[C*k + w_idx, w_src].
module snn_acc_unit
  import snn_pkg::*;
#(
  parameter int unsigned K     = 32,
  parameter int unsigned C     = 25,
  parameter int unsigned PE_ID = 0,
  parameter int unsigned N     = K * C,
  parameter int unsigned AW    = (N > 1) ? $clog2(N) : 1,
  parameter int unsigned IW    = (C > 1) ? $clog2(C) : 1,
  parameter int unsigned SW    = (K > 1) ? $clog2(K) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          en,
  // leading ones detector of this PE
  input  logic [IW-1:0] lod_idx,
  input  logic          lod_empty,
  output logic          lod_pop,
  // ring of relative addresses
  input  logic          ring_in_valid,
  input  logic [IW-1:0] ring_in_rel,
  output logic          ring_out_valid,
  output logic [IW-1:0] ring_out_rel,
  // accumulator selection by the CAL unit
  input  logic [IW-1:0] acc_sel,
  output fix_t          acc_out,
  // weight loading
  input  logic          w_we,
  input  logic [AW-1:0] w_src,
  input  logic [IW-1:0] w_idx,
  input  weight_t       w_data
);

  localparam int unsigned NB = (C + 1) / 2;   // Block RAMs per PE
  localparam int unsigned OW = AW + 1;

  logic [SW-1:0] cnt;
  logic [OW-1:0] offset;
  logic          sel_valid;
  logic [IW-1:0] sel_rel;
  logic [AW-1:0] raddr;
  logic          rd_valid;
  weight_t       rdata [NB][2];
  fix_t          acc [C];

  // address source multiplexer
  always_comb begin
    if (cnt == '0) begin
      sel_valid = !lod_empty;
      sel_rel   = lod_idx;
    end else begin
      sel_valid = ring_in_valid;
      sel_rel   = ring_in_rel;
    end
  end

  assign lod_pop = en && (cnt == '0);
  assign raddr   = AW'(offset + OW'(sel_rel));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt            <= '0;
      offset         <= OW'(C * PE_ID);
      ring_out_valid <= 1'b0;
      ring_out_rel   <= '0;
      rd_valid       <= 1'b0;
    end else if (clear) begin
      cnt            <= '0;
      offset         <= OW'(C * PE_ID);
      ring_out_valid <= 1'b0;
      ring_out_rel   <= '0;
      rd_valid       <= 1'b0;
    end else begin
      rd_valid <= en && sel_valid;
      if (en) begin
        cnt            <= (cnt == SW'(K - 1)) ? '0 : cnt + 1'b1;
        offset         <= (offset == '0) ? OW'(C * (K - 1)) : offset - OW'(C);
        ring_out_valid <= sel_valid;
        ring_out_rel   <= sel_rel;
      end
    end
  end

  for (genvar b = 0; b < NB; b++) begin : g_bram
    snn_weight_bram #(.N(N), .AW(AW)) u_bram (
      .clk   (clk),
      .re    (en && sel_valid),
      .raddr (raddr),
      .rdata (rdata[b]),
      .we    (w_we && (w_idx / 2 == IW'(b))),
      .waddr (w_src),
      .wlane (w_idx[0]),
      .wdata (w_data)
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < C; i++) acc[i] <= '0;
    end else if (clear) begin
      for (int i = 0; i < C; i++) acc[i] <= '0;
    end else if (rd_valid) begin
      for (int i = 0; i < C; i++)
        acc[i] <= sat_add(acc[i], weight_to_fix(rdata[i / 2][i % 2]));
    end
  end

  assign acc_out = acc[acc_sel];

endmodule

// tb_snn_pe: self-checking testbench of one processing element, as a ring
// of one (K = 1, its ring output fed back to its input) with C = 6 neurons.
// The testbench sequences the phases like the controller: clear, one step
// per fired neuron until the detector reports e, one check cycle, CAL phase.
// The network's spikes, inputs and states are modelled with the integer
// reference and compared after every timestep; the first pattern is seeded
// through the host port.
module tb_snn_pe;
  import snn_pkg::*;
  import snn_ref_pkg::*;
  localparam int unsigned K = 1, C = 6, N = K * C;
  localparam int unsigned AW = $clog2(N), IW = $clog2(C);

  logic clk = 0, rst_n = 0;
  logic acc_clear, acc_en, cal_start, lod_empty, cal_done;
  logic ring_valid;
  logic [IW-1:0] ring_rel;
  logic [C-1:0] spikes;
  logic cfg_we, cfg_spike;
  cfg_kind_t cfg_kind;
  logic [IW-1:0] cfg_idx;
  logic [AW-1:0] cfg_src;
  weight_t cfg_weight;
  neuron_param_t cfg_param;
  neuron_state_t cfg_state, rd_state;

  int wm [N][N];
  longint mu [N], mv [N];
  neuron_param_t mp [N];
  bit mf [N];
  int checks = 0, failures = 0, n_fired = 0, n_quiet = 0;

  always #5 clk = ~clk;

  snn_pe #(.K(K), .C(C), .PE_ID(0)) dut (.clk, .rst_n, .acc_clear, .acc_en, .cal_start,
    .lod_empty, .cal_done, .ring_in_valid(ring_valid), .ring_in_rel(ring_rel),
    .ring_out_valid(ring_valid), .ring_out_rel(ring_rel), .spikes, .cfg_we, .cfg_kind,
    .cfg_idx, .cfg_src, .cfg_weight, .cfg_param, .cfg_state, .cfg_spike, .rd_state);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cfg(input cfg_kind_t kind, input int idx, input int src);
    cfg_kind = kind; cfg_idx = IW'(idx); cfg_src = AW'(src); cfg_we = 1;
    @(negedge clk); cfg_we = 0;
  endtask

  initial begin
    longint acc, un, vn;
    bit sp;
    int nf, steps;
    bit fprev [N];
    acc_clear = 0; acc_en = 0; cal_start = 0; cfg_we = 0; cfg_spike = 0;
    cfg_kind = CFG_WEIGHT; cfg_idx = '0; cfg_src = '0; cfg_weight = '0;
    cfg_param = '0; cfg_state = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < N; i++) begin
      for (int j = 0; j < N; j++) begin
        cfg_weight = weight_t'($urandom_range(0, 255));  // excitatory, up to 1 - 2^-8
        wm[i][j] = int'(cfg_weight);
        cfg(CFG_WEIGHT, i, j);
      end
      mp[i].ab = fix_t'(5); mp[i].one_minus_a = fix_t'(251);
      mp[i].c = fix_t'(-65 * 256); mp[i].d = fix_t'(8 * 256);
      cfg_param = mp[i]; cfg(CFG_PARAM, i, 0);
      mu[i] = -13 * 256; mv[i] = -40 * 256 + $urandom_range(0, 12 * 256);
      cfg_state.u = fix_t'(mu[i]); cfg_state.v = fix_t'(mv[i]); cfg(CFG_STATE, i, 0);
      mf[i] = (i % 2 == 0); cfg_spike = mf[i]; cfg(CFG_SPIKE, i, 0);
    end
    check(spikes == 6'b010101, "seeded pattern");
    for (int t = 0; t < 25; t++) begin
      // model
      nf = 0;
      fprev = mf;
      for (int j = 0; j < N; j++) nf += mf[j];
      for (int i = 0; i < N; i++) begin
        acc = 0;
        for (int j = 0; j < N; j++) if (fprev[j]) acc += wm[i][j];
        neuron_update(acc, mu[i], mv[i], longint'(mp[i].ab), longint'(mp[i].one_minus_a),
                      longint'(mp[i].c), longint'(mp[i].d), un, vn, sp);
        mu[i] = un; mv[i] = vn; mf[i] = sp;
        if (sp) n_fired++; else n_quiet++;
      end
      // ACC phase
      acc_clear = 1; @(negedge clk); acc_clear = 0;
      steps = 0;
      while (!lod_empty) begin acc_en = 1; @(negedge clk); steps++; end
      acc_en = 0;
      check(steps == nf, $sformatf("t %0d: %0d steps for %0d fired", t, steps, nf));
      cal_start = 1; @(negedge clk); cal_start = 0;
      while (!cal_done) @(negedge clk);
      @(negedge clk);
      for (int i = 0; i < N; i++) begin
        cfg_idx = IW'(i); #1;
        check(spikes[i] == mf[i], $sformatf("t %0d neuron %0d spike %0d exp %0d", t, i, spikes[i], mf[i]));
        check(longint'(rd_state.u) == mu[i] && longint'(rd_state.v) == mv[i],
              $sformatf("t %0d neuron %0d state v=%0d exp %0d u=%0d exp %0d", t, i, rd_state.v, mv[i], rd_state.u, mu[i]));
      end
      @(negedge clk);
    end
    check(n_fired > 0 && n_quiet > 0, $sformatf("coverage fired=%0d quiet=%0d", n_fired, n_quiet));
    $display("fired=%0d quiet=%0d", n_fired, n_quiet);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

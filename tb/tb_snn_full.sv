// tb_snn_full: end-to-end self-checking testbench of the simulator at its
// default size, K = 32 PEs of C = 25 neurons (the 800-neuron, fully
// connected network), with the top's parameters left at their defaults.
// All 640,000 weights are loaded through the host port. The first timestep
// has no fired neuron; before each later timestep about 2 % of the neurons
// are made to fire through the host port, on top of the network's own
// spikes. A reference model computes every neuron's input, new
// state and spike. Each timestep checks the spikes, all states, the number
// of ACC passes A (the most fired neurons in one PE) and the timestep length
// K*A + C + 8 cycles. The mechanisms of the design are counted and each must
// occur: an empty ACC phase, a single pass, several passes, a ring step
// carrying e while others carry a neuron, a neuron firing and not firing.
module tb_snn_full;
  import snn_pkg::*;
  import snn_ref_pkg::*;
  localparam int unsigned K = 32, C = 25;
  localparam int unsigned STEPS = 6, SEED_PCT = 2;
  localparam int unsigned N  = K * C;
  localparam int unsigned AW = (N > 1) ? $clog2(N) : 1;
  localparam int unsigned IW = (C > 1) ? $clog2(C) : 1;
  localparam int unsigned KW = (K > 1) ? $clog2(K) : 1;

  logic clk = 0, rst_n = 0;
  logic start, busy, done, cfg_we, cfg_spike;
  logic [15:0] passes;
  logic [N-1:0] spikes;
  cfg_kind_t cfg_kind;
  logic [KW-1:0] cfg_pe;
  logic [IW-1:0] cfg_idx;
  logic [AW-1:0] cfg_src;
  weight_t cfg_weight;
  neuron_param_t cfg_param;
  neuron_state_t cfg_state, rd_state;

  int wm [N][N];
  longint mu [N], mv [N];
  neuron_param_t mp [N];
  bit mf [N];
  int checks = 0, failures = 0;
  int n_empty_phase = 0, n_one_pass = 0, n_multi_pass = 0, n_mixed_e = 0;
  int n_fired = 0, n_quiet = 0;

  always #5 clk = ~clk;

  snn_top dut (.clk, .rst_n, .start, .busy, .done, .passes, .spikes,
    .cfg_we, .cfg_kind, .cfg_pe, .cfg_idx, .cfg_src, .cfg_weight, .cfg_param, .cfg_state,
    .cfg_spike, .rd_state);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (N * N * 4 + STEPS * (K * C * 3 + N * 4 + 100) + 10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cfg(input cfg_kind_t kind, input int i, input int src);
    cfg_kind = kind; cfg_pe = KW'(i / C); cfg_idx = IW'(i % C); cfg_src = AW'(src);
    cfg_we = 1;
    @(negedge clk); cfg_we = 0;
  endtask

  task automatic set_spike(input int i, input bit b);
    cfg_spike = b; mf[i] = b;
    cfg(CFG_SPIKE, i, 0);
  endtask

  // one timestep on the model and on the design, then compare
  task automatic timestep(input int t);
    longint acc, un, vn;
    bit sp, fprev [N];
    int a, cnt, cyc, nvalid;
    fprev = mf;
    a = 0; nvalid = 0;
    for (int k = 0; k < K; k++) begin
      cnt = 0;
      for (int c = 0; c < C; c++) cnt += fprev[k * C + c];
      if (cnt > a) a = cnt;
      if (cnt > 0) nvalid++;
    end
    if (a == 0) n_empty_phase++;
    else if (a == 1) n_one_pass++;
    else n_multi_pass++;
    if (a > 0 && nvalid < K) n_mixed_e++;
    for (int i = 0; i < N; i++) begin
      acc = 0;
      for (int j = 0; j < N; j++) if (fprev[j]) acc += wm[i][j];
      check(acc >= -131072 && acc <= 131071, "input out of range");
      neuron_update(acc, mu[i], mv[i], longint'(mp[i].ab), longint'(mp[i].one_minus_a),
                    longint'(mp[i].c), longint'(mp[i].d), un, vn, sp);
      mu[i] = un; mv[i] = vn; mf[i] = sp;
      if (sp) n_fired++; else n_quiet++;
    end
    start = 1; @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    check(cyc == K * a + C + 8, $sformatf("t %0d: A=%0d timestep %0d cycles, exp %0d", t, a, cyc, K * a + C + 8));
    check(int'(passes) == a, $sformatf("t %0d: passes %0d exp %0d", t, passes, a));
    @(negedge clk);
    for (int i = 0; i < N; i++) begin
      check(spikes[i] == mf[i], $sformatf("t %0d neuron %0d spike %0d exp %0d", t, i, spikes[i], mf[i]));
      cfg_pe = KW'(i / C); cfg_idx = IW'(i % C);
      #1;
      check(longint'(rd_state.u) == mu[i] && longint'(rd_state.v) == mv[i],
            $sformatf("t %0d neuron %0d v=%0d exp %0d u=%0d exp %0d", t, i, rd_state.v, mv[i], rd_state.u, mu[i]));
    end
    @(negedge clk);
  endtask

  initial begin
    start = 0; cfg_we = 0; cfg_spike = 0; cfg_kind = CFG_WEIGHT; cfg_pe = '0; cfg_idx = '0;
    cfg_src = '0; cfg_weight = '0; cfg_param = '0; cfg_state = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // network: mostly excitatory weights, regular-spiking-like neurons
    for (int i = 0; i < N; i++) begin
      for (int j = 0; j < N; j++) begin
        cfg_weight = weight_t'(int'($urandom_range(0, 255)) - (($urandom_range(0, 4) == 0) ? 256 : 0));
        wm[i][j] = int'(cfg_weight);
        cfg(CFG_WEIGHT, i, j);
      end
      mp[i].ab = fix_t'(5); mp[i].one_minus_a = fix_t'(251);
      mp[i].c = fix_t'(-65 * 256); mp[i].d = fix_t'(8 * 256);
      cfg_param = mp[i]; cfg(CFG_PARAM, i, 0);
      mu[i] = -13 * 256; mv[i] = -65 * 256 + $urandom_range(0, 20 * 256);
      cfg_state.u = fix_t'(mu[i]); cfg_state.v = fix_t'(mv[i]);
      cfg(CFG_STATE, i, 0);
      mf[i] = 0;
    end
    // worked example of the document: neurons 0, 5 and 6 fired
    if (K == 4 && C == 2) begin
      set_spike(0, 1); set_spike(5, 1); set_spike(6, 1);
    end
    for (int t = 0; t < STEPS; t++) begin
      timestep(t);
      // stimulus: random extra spikes between timesteps
      for (int i = 0; i < N; i++)
        if ($urandom_range(0, 99) < SEED_PCT && !mf[i]) set_spike(i, 1);
    end
    $display("empty=%0d one_pass=%0d multi_pass=%0d mixed_e=%0d fired=%0d quiet=%0d",
             n_empty_phase, n_one_pass, n_multi_pass, n_mixed_e, n_fired, n_quiet);
    check(n_empty_phase > 0, "no empty ACC phase");
    check(n_multi_pass > 0, "no multi-pass ACC phase");
    check(n_mixed_e > 0, "no pass with e from some PEs");
    check(n_fired > 0 && n_quiet > 0, "fire/no-fire not both seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_snn_activity: the 800-neuron network at its default size (K = 32,
// C = 25, top parameters untouched) under a low, cortex-like activity of
// about 6.5 Hz, i.e. 0.65 % of the neurons firing per 1 ms timestep.
// The neurons are regular-spiking cells (a = 0.02, b = 0.2, c = -65 mV,
// d = 8) with weak random synapses (|W| <= 16/256). The activity is driven by
// setting the fired bit of randomly chosen neurons through the host port
// before each timestep, since the design has no input current of its own.
// Every timestep is checked against the reference model (spikes, states of
// all neurons, passes A, K*A + C + 8 cycles); the mean timestep length is
// reported in cycles and in ns at 110.47 MHz.
module tb_snn_activity;
  import snn_pkg::*;
  import snn_ref_pkg::*;
  localparam int unsigned K = 32, C = 25;
  localparam int unsigned STEPS = 100;
  localparam int unsigned RATE_PER_100K = 650;  // 0.65 % per timestep
  localparam int unsigned N  = K * C;
  localparam int unsigned AW = $clog2(N);
  localparam int unsigned IW = $clog2(C);
  localparam int unsigned KW = $clog2(K);

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
  longint total_cycles = 0;
  int n_spikes = 0, max_a = 0, n_multi_pass = 0;

  always #5 clk = ~clk;

  snn_top dut (.clk, .rst_n, .start, .busy, .done, .passes, .spikes,
    .cfg_we, .cfg_kind, .cfg_pe, .cfg_idx, .cfg_src, .cfg_weight, .cfg_param, .cfg_state,
    .cfg_spike, .rd_state);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (N * N + STEPS * (N * 3 + 2000) + 10000) @(posedge clk);
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

  task automatic timestep(input int t);
    longint acc, un, vn;
    bit sp;
    int fired [$];
    int a, cnt, cyc;
    a = 0;
    for (int k = 0; k < K; k++) begin
      cnt = 0;
      for (int c = 0; c < C; c++) cnt += mf[k * C + c];
      if (cnt > a) a = cnt;
    end
    for (int j = 0; j < N; j++) if (mf[j]) fired.push_back(j);
    n_spikes += fired.size();
    if (a > max_a) max_a = a;
    if (a > 1) n_multi_pass++;
    for (int i = 0; i < N; i++) begin
      acc = 0;
      foreach (fired[f]) acc += wm[i][fired[f]];
      neuron_update(acc, mu[i], mv[i], longint'(mp[i].ab), longint'(mp[i].one_minus_a),
                    longint'(mp[i].c), longint'(mp[i].d), un, vn, sp);
      mu[i] = un; mv[i] = vn; mf[i] = sp;
    end
    start = 1; @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    total_cycles += cyc;
    check(cyc == K * a + C + 8, $sformatf("t %0d: A=%0d timestep %0d cycles", t, a, cyc));
    check(int'(passes) == a, $sformatf("t %0d: passes %0d exp %0d", t, passes, a));
    @(negedge clk);
    for (int i = 0; i < N; i++) begin
      check(spikes[i] == mf[i], $sformatf("t %0d neuron %0d spike", t, i));
      cfg_pe = KW'(i / C); cfg_idx = IW'(i % C);
      #1;
      check(longint'(rd_state.u) == mu[i] && longint'(rd_state.v) == mv[i],
            $sformatf("t %0d neuron %0d v=%0d exp %0d", t, i, rd_state.v, mv[i]));
    end
    @(negedge clk);
  endtask

  initial begin
    start = 0; cfg_we = 0; cfg_spike = 0; cfg_kind = CFG_WEIGHT; cfg_pe = '0; cfg_idx = '0;
    cfg_src = '0; cfg_weight = '0; cfg_param = '0; cfg_state = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < N; i++) begin
      for (int j = 0; j < N; j++) begin
        cfg_weight = weight_t'(int'($urandom_range(0, 32)) - 16);
        wm[i][j] = int'(cfg_weight);
        cfg(CFG_WEIGHT, i, j);
      end
      mp[i].ab = fix_t'(1);             // 0.02 * 0.2 = 0.004 -> 1/256
      mp[i].one_minus_a = fix_t'(251);  // 0.98
      mp[i].c = fix_t'(-65 * 256); mp[i].d = fix_t'(8 * 256);
      cfg_param = mp[i]; cfg(CFG_PARAM, i, 0);
      mu[i] = -13 * 256; mv[i] = -65 * 256;
      cfg_state.u = fix_t'(mu[i]); cfg_state.v = fix_t'(mv[i]);
      cfg(CFG_STATE, i, 0);
      mf[i] = 0;
    end
    for (int t = 0; t < STEPS; t++) begin
      for (int i = 0; i < N; i++)
        if ($urandom_range(0, 99999) < RATE_PER_100K && !mf[i]) begin
          cfg_spike = 1; mf[i] = 1; cfg(CFG_SPIKE, i, 0);
        end
      timestep(t);
    end
    $display("spikes per timestep %0.2f, max A %0d, multi-pass timesteps %0d",
             real'(n_spikes) / STEPS, max_a, n_multi_pass);
    $display("mean timestep %0.1f cycles = %0.1f ns at 110.47 MHz",
             real'(total_cycles) / STEPS, real'(total_cycles) / STEPS / 0.11047);
    check(n_spikes > 0, "no activity");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_snn_cal_unit: self-checking testbench of the CAL unit (C = 5).
// Loads random states and parameters through the host port, supplies random
// accumulator values indexed by the unit's accumulator selection, and runs
// several CAL phases. Checks: every neuron's spike bit is reported once at
// the right index, the tables hold the reference model's new states, `done`
// comes C+6 cycles after `start`, and host writes during a phase are ignored.
module tb_snn_cal_unit;
  import snn_pkg::*;
  import snn_ref_pkg::*;
  localparam int unsigned C = 5;
  localparam int unsigned IW = $clog2(C);

  logic clk = 0, rst_n = 0;
  logic start, busy, done;
  logic [IW-1:0] acc_sel, spike_idx, host_idx;
  fix_t acc_val;
  logic spike_we, spike_bit, host_state_we, host_param_we;
  neuron_state_t host_state_wdata, host_state_rdata;
  neuron_param_t host_param_wdata;

  fix_t acc_m [C];
  longint mu [C], mv [C];
  neuron_param_t mp [C];
  bit exp_spike [C];
  int seen [C];
  bit got_spike [C];
  int checks = 0, failures = 0, n_fired = 0;

  always #5 clk = ~clk;

  snn_cal_unit #(.C(C)) dut (.clk, .rst_n, .start, .busy, .done, .acc_sel, .acc_val,
    .spike_we, .spike_idx, .spike_bit, .host_state_we, .host_param_we, .host_idx,
    .host_state_wdata, .host_param_wdata, .host_state_rdata);

  assign acc_val = acc_m[acc_sel];

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

  always @(posedge clk) if (spike_we) begin
    seen[spike_idx]++;
    got_spike[spike_idx] = spike_bit;
  end

  initial begin
    int cyc;
    longint un, vn;
    bit sp;
    start = 0; host_state_we = 0; host_param_we = 0; host_idx = '0;
    host_state_wdata = '0; host_param_wdata = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < C; i++) begin
      @(negedge clk);
      host_param_we = 1; host_state_we = 1; host_idx = IW'(i);
      mp[i].ab = fix_t'($urandom_range(1, 64));
      mp[i].one_minus_a = fix_t'($urandom_range(240, 255));
      mp[i].c = fix_t'(-65 * 256);
      mp[i].d = fix_t'($urandom_range(2 * 256, 8 * 256));
      host_param_wdata = mp[i];
      mu[i] = -14 * 256; mv[i] = -65 * 256 + $urandom_range(0, 5000);
      host_state_wdata.u = fix_t'(mu[i]); host_state_wdata.v = fix_t'(mv[i]);
    end
    @(negedge clk); host_param_we = 0; host_state_we = 0;
    for (int ph = 0; ph < 12; ph++) begin
      for (int i = 0; i < C; i++) begin
        acc_m[i] = fix_t'($urandom_range(0, 40 * 256));
        neuron_update(longint'(acc_m[i]), mu[i], mv[i], longint'(mp[i].ab),
                      longint'(mp[i].one_minus_a), longint'(mp[i].c), longint'(mp[i].d),
                      un, vn, sp);
        mu[i] = un; mv[i] = vn; exp_spike[i] = sp; seen[i] = 0;
        if (sp) n_fired++;
      end
      start = 1; @(negedge clk); start = 0;
      cyc = 1;
      // a host write while busy must be ignored
      host_state_we = 1; host_idx = '0; host_state_wdata = '0;
      @(negedge clk); host_state_we = 0;
      cyc++;
      while (!done) begin @(negedge clk); cyc++; end
      check(cyc == C + 6, $sformatf("done after %0d cycles, exp %0d", cyc, C + 6));
      @(negedge clk);
      check(!busy, "busy after done");
      for (int i = 0; i < C; i++) begin
        host_idx = IW'(i); #1;
        check(seen[i] == 1 && got_spike[i] == exp_spike[i],
              $sformatf("ph %0d neuron %0d spike seen=%0d got=%0d exp=%0d", ph, i, seen[i], got_spike[i], exp_spike[i]));
        check(longint'(host_state_rdata.u) == mu[i] && longint'(host_state_rdata.v) == mv[i],
              $sformatf("ph %0d neuron %0d state got u=%0d v=%0d exp u=%0d v=%0d", ph, i,
                        host_state_rdata.u, host_state_rdata.v, mu[i], mv[i]));
      end
      @(negedge clk);
    end
    check(n_fired > 0, "no neuron fired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_snn_neuron_pipeline: self-checking testbench of the six-stage neuron
// update pipeline. A new random neuron enters every cycle (with idle gaps);
// each result is compared with the integer reference model, and it must
// leave exactly 6 cycles after it entered. Inputs are drawn mostly from the
// physiological range (so that both the fire and the no-fire branch occur)
// and sometimes from the full 18-bit range (saturation).
module tb_snn_neuron_pipeline;
  import snn_pkg::*;
  import snn_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic in_valid;
  fix_t acc_in;
  neuron_state_t state_in, state_out;
  neuron_param_t param_in;
  logic out_valid, spike_out;
  int checks = 0, failures = 0;
  int n_fired = 0, n_quiet = 0;

  typedef struct {
    longint u, v;
    bit spike;
    int t_in;
  } exp_t;
  exp_t q [$];
  int cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  snn_neuron_pipeline dut (.clk, .rst_n, .in_valid, .acc_in, .state_in, .param_in,
                           .out_valid, .state_out, .spike_out);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  function automatic int rnd(input int lo, input int hi);
    return int'($urandom_range(0, hi - lo)) + lo;
  endfunction

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output checker
  always @(negedge clk) if (rst_n) begin
    if (out_valid) begin
      exp_t e;
      if (q.size() == 0) check(0, "unexpected output");
      else begin
        e = q.pop_front();
        check(cycle - e.t_in == 6, $sformatf("latency %0d", cycle - e.t_in));
        check(longint'(state_out.v) == e.v && longint'(state_out.u) == e.u && spike_out == e.spike,
              $sformatf("got v=%0d u=%0d s=%0d exp v=%0d u=%0d s=%0d",
                        state_out.v, state_out.u, spike_out, e.v, e.u, e.spike));
        if (e.spike) n_fired++; else n_quiet++;
      end
    end
  end

  initial begin
    exp_t e;
    longint un, vn;
    bit sp;
    in_valid = 0; acc_in = '0; state_in = '0; param_in = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 7) != 0);
      if (n % 10 == 9) begin
        acc_in   = fix_t'($urandom);
        state_in = neuron_state_t'({$urandom, $urandom});
        param_in = neuron_param_t'({$urandom, $urandom, $urandom});
      end else begin
        acc_in           = fix_t'(rnd(-30 * 256, 30 * 256));
        state_in.v       = fix_t'(rnd(-90 * 256, 40 * 256));
        state_in.u       = fix_t'(rnd(-20 * 256, 20 * 256));
        param_in.ab      = fix_t'(rnd(1, 128));
        param_in.one_minus_a = fix_t'(rnd(230, 255));
        param_in.c       = fix_t'(rnd(-70 * 256, -50 * 256));
        param_in.d       = fix_t'(rnd(0, 8 * 256));
      end
      if (in_valid) begin
        neuron_update(longint'(acc_in), longint'(state_in.u), longint'(state_in.v),
                      longint'(param_in.ab), longint'(param_in.one_minus_a),
                      longint'(param_in.c), longint'(param_in.d), un, vn, sp);
        e.u = un; e.v = vn; e.spike = sp; e.t_in = cycle;
        q.push_back(e);
      end
    end
    @(negedge clk); in_valid = 0;
    repeat (10) @(negedge clk);
    check(q.size() == 0, "results missing");
    check(n_fired > 100 && n_quiet > 100, $sformatf("coverage fired=%0d quiet=%0d", n_fired, n_quiet));
    $display("fired=%0d quiet=%0d", n_fired, n_quiet);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

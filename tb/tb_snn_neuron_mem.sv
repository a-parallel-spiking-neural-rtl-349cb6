// tb_snn_neuron_mem: self-checking testbench of the neuron state and
// parameter tables. Random writes to either table, alone or together, are
// followed by combinational reads of every entry against a model.
module tb_snn_neuron_mem;
  import snn_pkg::*;
  localparam int unsigned C = 25;
  localparam int unsigned IW = $clog2(C);

  logic clk = 0;
  logic [IW-1:0] raddr, state_waddr, param_waddr;
  neuron_state_t state_rd, state_wdata;
  neuron_param_t param_rd, param_wdata;
  logic state_we, param_we;
  neuron_state_t ms [C];
  neuron_param_t mp [C];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  snn_neuron_mem #(.C(C)) dut (.clk, .raddr, .state_rd, .param_rd, .state_we, .state_waddr,
                               .state_wdata, .param_we, .param_waddr, .param_wdata);

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

  initial begin
    state_we = 0; param_we = 0; raddr = '0; state_waddr = '0; param_waddr = '0;
    state_wdata = '0; param_wdata = '0;
    for (int i = 0; i < C; i++) begin
      @(negedge clk);
      state_we = 1; param_we = 1; state_waddr = IW'(i); param_waddr = IW'(C - 1 - i);
      state_wdata = neuron_state_t'({$urandom, $urandom});
      param_wdata = neuron_param_t'({$urandom, $urandom, $urandom});
      ms[i] = state_wdata; mp[C - 1 - i] = param_wdata;
    end
    for (int r = 0; r < 20; r++) begin
      for (int w = 0; w < 5; w++) begin
        int a, b;
        @(negedge clk);
        a = $urandom_range(0, C - 1); b = $urandom_range(0, C - 1);
        state_we = $urandom_range(0, 1); param_we = $urandom_range(0, 1);
        state_waddr = IW'(a); param_waddr = IW'(b);
        state_wdata = neuron_state_t'({$urandom, $urandom});
        param_wdata = neuron_param_t'({$urandom, $urandom, $urandom});
        if (state_we) ms[a] = state_wdata;
        if (param_we) mp[b] = param_wdata;
      end
      @(negedge clk); state_we = 0; param_we = 0;
      for (int i = 0; i < C; i++) begin
        raddr = IW'(i);
        #1;
        check(state_rd == ms[i] && param_rd == mp[i], $sformatf("entry %0d", i));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

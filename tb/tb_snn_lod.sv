// tb_snn_lod: self-checking testbench of the leading ones detector.
// Checks the example 6'b011001 -> 0, 3, 4, e, then random 25-bit vectors
// against the ascending list of their set bits, one index per call.
module tb_snn_lod;
  localparam int unsigned C  = 25;
  localparam int unsigned IW = $clog2(C);

  logic clk = 0, rst_n = 0;
  logic load, pop;
  logic [C-1:0] vec;
  logic [IW-1:0] idx;
  logic empty;
  int checks = 0, failures = 0;

  logic load6, pop6, empty6;
  logic [5:0] vec6;
  logic [2:0] idx6;

  always #5 clk = ~clk;

  snn_lod #(.C(C)) dut (.clk, .rst_n, .load, .vec, .pop, .idx, .empty);
  snn_lod #(.C(6)) dut6 (.clk, .rst_n, .load(load6), .vec(vec6), .pop(pop6),
                         .idx(idx6), .empty(empty6));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_list [$];
    int n;
    load = 0; pop = 0; vec = '0; load6 = 0; pop6 = 0; vec6 = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(empty && empty6, "empty after reset");
    // example of the specification
    vec6 = 6'b011001; load6 = 1;
    @(negedge clk); load6 = 0;
    begin
      int ex [3] = '{0, 3, 4};
      for (int i = 0; i < 3; i++) begin
        check(!empty6 && idx6 == 3'(ex[i]), $sformatf("example call %0d gave %0d", i, idx6));
        pop6 = 1; @(negedge clk); pop6 = 0;
      end
      check(empty6, "example ends with e");
    end
    // random vectors, some sparse, some dense
    for (int r = 0; r < 300; r++) begin
      vec = '0;
      n = $urandom_range(0, (r % 3 == 0) ? C : 4);
      for (int b = 0; b < n; b++) vec[$urandom_range(0, C - 1)] = 1'b1;
      exp_list.delete();
      for (int b = 0; b < C; b++) if (vec[b]) exp_list.push_back(b);
      load = 1; @(negedge clk); load = 0;
      foreach (exp_list[i]) begin
        check(!empty && idx == IW'(exp_list[i]),
              $sformatf("vec %h call %0d: got %0d exp %0d", vec, i, idx, exp_list[i]));
        pop = 1; @(negedge clk); pop = 0;
        // holding without pop keeps the value
      end
      check(empty, $sformatf("vec %h not empty after %0d calls", vec, exp_list.size()));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_snn_weight_bram: self-checking testbench of the weight Block RAM.
// Writes random weights into both lanes of every word (lanes written
// separately), then reads back random addresses and checks both lanes one
// cycle after the address, and that the output holds while `re` is low.
module tb_snn_weight_bram;
  import snn_pkg::*;
  localparam int unsigned N = 40;
  localparam int unsigned AW = $clog2(N);

  logic clk = 0;
  logic re, we, wlane;
  logic [AW-1:0] raddr, waddr;
  weight_t rdata [2];
  weight_t wdata;
  weight_t model [N][2];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  snn_weight_bram #(.N(N)) dut (.clk, .re, .raddr, .rdata, .we, .waddr, .wlane, .wdata);

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
    int a;
    re = 0; we = 0; wlane = 0; raddr = '0; waddr = '0; wdata = '0;
    for (int pass = 0; pass < 2; pass++)
      for (int i = 0; i < N; i++)
        for (int l = 0; l < 2; l++) begin
          @(negedge clk);
          we = 1; waddr = AW'(i); wlane = l[0]; wdata = weight_t'($urandom);
          model[i][l] = wdata;
        end
    @(negedge clk); we = 0;
    for (int r = 0; r < 500; r++) begin
      a = $urandom_range(0, N - 1);
      re = 1; raddr = AW'(a);
      @(negedge clk);
      re = 0; raddr = AW'($urandom_range(0, N - 1));
      check(rdata[0] == model[a][0] && rdata[1] == model[a][1],
            $sformatf("addr %0d got %0d,%0d exp %0d,%0d", a, rdata[0], rdata[1], model[a][0], model[a][1]));
      @(negedge clk);
      check(rdata[0] == model[a][0] && rdata[1] == model[a][1], "output not held");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_snn_ctrl: self-checking testbench of the timestep controller (K = 4).
// The testbench models K leading ones detectors (a count of fired neurons
// each, decremented at the first step of each pass) and a CAL phase of
// CAL_LEN cycles. For random activity levels A it checks: one clear cycle,
// exactly K*A enable cycles, the pass count A, one CAL start after the ACC
// phase, and a timestep of 1 + K*A + 1 + CAL_LEN cycles.
module tb_snn_ctrl;
  localparam int unsigned K = 4, CAL_LEN = 9, PW = 16;

  logic clk = 0, rst_n = 0;
  logic start, all_empty, cal_done, acc_clear, acc_en, cal_start, busy, done;
  logic [PW-1:0] passes;
  int cnt [K];
  int checks = 0, failures = 0;
  int n_clear, n_en, n_calstart, step, cal_cnt;
  bit cal_run;

  always #5 clk = ~clk;

  snn_ctrl #(.K(K), .PW(PW)) dut (.clk, .rst_n, .start, .all_empty, .cal_done, .acc_clear,
                                  .acc_en, .cal_start, .busy, .done, .passes);

  always_comb begin
    all_empty = 1'b1;
    for (int k = 0; k < K; k++) if (cnt[k] != 0) all_empty = 1'b0;
  end
  assign cal_done = cal_run && (cal_cnt == CAL_LEN - 1);

  // model of the detectors and of the CAL units
  always @(posedge clk) begin
    if (acc_clear) begin n_clear++; step = 0; end
    if (acc_en) begin
      n_en++;
      if (step == 0) for (int k = 0; k < K; k++) if (cnt[k] > 0) cnt[k]--;
      step = (step + 1) % K;
    end
    if (cal_start) begin n_calstart++; cal_run <= 1; cal_cnt <= 0; end
    else if (cal_run) begin
      if (cal_cnt == CAL_LEN - 1) cal_run <= 0;
      cal_cnt <= cal_cnt + 1;
    end
  end

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
    int a, cyc;
    start = 0; cal_run = 0; cal_cnt = 0;
    for (int k = 0; k < K; k++) cnt[k] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      a = 0;
      @(negedge clk);
      for (int k = 0; k < K; k++) begin
        cnt[k] = (t % 5 == 0) ? 0 : $urandom_range(0, 5);
        if (cnt[k] > a) a = cnt[k];
      end
      n_clear = 0; n_en = 0; n_calstart = 0;
      check(!busy, "busy before start");
      start = 1; @(negedge clk); start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      check(cyc == 1 + K * a + 1 + CAL_LEN, $sformatf("A=%0d: timestep %0d cycles", a, cyc));
      @(negedge clk);
      check(n_clear == 1 && n_en == K * a && n_calstart == 1,
            $sformatf("A=%0d: clear %0d en %0d calstart %0d", a, n_clear, n_en, n_calstart));
      check(passes == PW'(a), $sformatf("passes %0d exp %0d", passes, a));
      check(!busy, "busy after done");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

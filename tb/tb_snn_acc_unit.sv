// tb_snn_acc_unit: self-checking testbench of the ACC unit of PE 1 in a
// ring of K = 4 PEs with C = 3 neurons each (N = 12).
// The testbench plays the leading ones detector and the upstream neighbour:
// in step 0 of each pass it offers a detector index or e, in the other steps
// a random relative address or e on the ring input. A model adds
// W[i, rel + C*((1 - step) mod K)] for every valid address and the
// accumulators are compared after each ACC phase. Also checked: the detector
// is popped only in step 0, the ring output repeats the address used one
// step earlier, and `clear` zeroes the accumulators.
module tb_snn_acc_unit;
  import snn_pkg::*;
  localparam int unsigned K = 4, C = 3, PE_ID = 1, N = K * C;
  localparam int unsigned AW = $clog2(N), IW = $clog2(C);

  logic clk = 0, rst_n = 0;
  logic clear, en, lod_empty, lod_pop;
  logic [IW-1:0] lod_idx, ring_in_rel, ring_out_rel, acc_sel, w_idx;
  logic ring_in_valid, ring_out_valid, w_we;
  logic [AW-1:0] w_src;
  weight_t w_data;
  fix_t acc_out;

  int wm [C][N];
  int accm [C];
  int checks = 0, failures = 0, n_empty_steps = 0;

  always #5 clk = ~clk;

  snn_acc_unit #(.K(K), .C(C), .PE_ID(PE_ID)) dut (.clk, .rst_n, .clear, .en, .lod_idx,
    .lod_empty, .lod_pop, .ring_in_valid, .ring_in_rel, .ring_out_valid, .ring_out_rel,
    .acc_sel, .acc_out, .w_we, .w_src, .w_idx, .w_data);

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
    bit v; int rel, src, j, npass;
    clear = 0; en = 0; lod_empty = 1; lod_idx = '0; ring_in_valid = 0; ring_in_rel = '0;
    acc_sel = '0; w_we = 0; w_src = '0; w_idx = '0; w_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < C; i++)
      for (int jj = 0; jj < N; jj++) begin
        @(negedge clk);
        w_we = 1; w_idx = IW'(i); w_src = AW'(jj); w_data = weight_t'($urandom);
        wm[i][jj] = int'(w_data);
      end
    @(negedge clk); w_we = 0;
    for (int ph = 0; ph < 30; ph++) begin
      clear = 1; @(negedge clk); clear = 0;
      for (int i = 0; i < C; i++) accm[i] = 0;
      npass = $urandom_range(0, 4);
      for (int p = 0; p < npass; p++)
        for (int s = 0; s < K; s++) begin
          v = ($urandom_range(0, 3) != 0);
          rel = $urandom_range(0, C - 1);
          en = 1;
          if (s == 0) begin
            lod_empty = !v; lod_idx = IW'(rel);
            ring_in_valid = $urandom_range(0, 1); ring_in_rel = IW'($urandom_range(0, C - 1));
          end else begin
            lod_empty = $urandom_range(0, 1); lod_idx = IW'($urandom_range(0, C - 1));
            ring_in_valid = v; ring_in_rel = IW'(rel);
          end
          #1;
          check(lod_pop == (s == 0), $sformatf("pop in step %0d", s));
          src = (PE_ID + K - s) % K;
          j = rel + C * src;
          if (v) for (int i = 0; i < C; i++) accm[i] += wm[i][j];
          else n_empty_steps++;
          @(negedge clk);
          check(ring_out_valid == v && (!v || ring_out_rel == IW'(rel)),
                $sformatf("ring out after step %0d", s));
        end
      en = 0; lod_empty = 1; ring_in_valid = 0;
      @(negedge clk);
      for (int i = 0; i < C; i++) begin
        acc_sel = IW'(i); #1;
        check(int'(acc_out) == accm[i], $sformatf("phase %0d acc %0d got %0d exp %0d", ph, i, acc_out, accm[i]));
      end
      @(negedge clk);
    end
    check(n_empty_steps > 0, "no e step");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

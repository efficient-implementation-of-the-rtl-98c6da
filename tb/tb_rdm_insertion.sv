// Testbench of the insertion stage at its default size (128 positions,
// 16 frames, 54-cycle divider): checks that `ready` rises exactly 2048 clocks
// after reset, then streams 24 frames of random host samples and bits, first
// back to back and then with random gaps, and compares every y_k with the
// integer model of y_k = g * Q_b(x_k / g) and its running-mean reference. The
// latency must be 57 clocks, and x_out must be the matching input.
module tb_rdm_insertion;
  import tb_rdm_model_pkg::*;

  localparam int FL = 128, NF = 16, LAT = 57, KEY = 8'h6B;

  logic clk = 0, rst_n = 0, in_valid = 0, b = 0, ready, out_valid;
  logic [7:0] key = 8'(KEY);
  logic signed [24:0] x = 0, y, x_out;
  int checks = 0, failures = 0;

  rdm_insertion dut (.*);

  always #5 clk = ~clk;

  longint exp_y[$], exp_x[$];
  int     exp_t[$];
  int     cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    checks++;
    if (exp_y.size() == 0) begin failures++; $display("FAIL: unexpected output"); end
    else begin
      longint e, ex; int t;
      e = exp_y.pop_front(); ex = exp_x.pop_front(); t = exp_t.pop_front();
      if (longint'(y) != e || longint'(x_out) != ex || cyc - t != LAT) begin
        failures++;
        if (failures < 10)
          $display("FAIL: y=%0d exp=%0d x_out=%0d/%0d latency=%0d", y, e, x_out, ex, cyc - t);
      end
    end
  end

  initial begin
    ins_model m;
    int n, t0;
    longint xx;
    m = new(FL, NF, KEY, 0);
    repeat (2) @(negedge clk);
    rst_n = 1;
    t0 = cyc;
    while (!ready) @(negedge clk);
    checks++;
    if (cyc - t0 != FL * NF) begin
      failures++; $display("FAIL: init took %0d clocks", cyc - t0);
    end
    n = 0;
    while (n < 24 * FL) begin
      in_valid = (n < 12 * FL) ? 1'b1 : ($urandom_range(0, 2) != 0);
      xx = longint'($urandom_range(0, 102400)) - 51200;
      x = 25'(xx);
      b = 1'($urandom);
      if (in_valid) begin
        exp_y.push_back(m.step(xx, b));
        exp_x.push_back(xx);
        exp_t.push_back(cyc);
        n++;
      end
      @(negedge clk);
    end
    in_valid = 0;
    repeat (LAT + 5) @(negedge clk);
    checks++;
    if (exp_y.size() != 0) begin failures++; $display("FAIL: outputs missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
